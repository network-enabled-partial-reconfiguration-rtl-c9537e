// Transmit arbiter: merges the frames produced by the accelerator slots into one outgoing
// stream, which the transmit path hands back to the processor's Ethernet controller.
//
// Arbitration is per frame and round robin: when idle, the arbiter grants the first input with
// a word waiting, searching from the input after the one granted last; the grant is held until
// that input's last word has been accepted, so frames are never interleaved. While a grant is
// held the chosen input is connected combinationally to the output (no added latency, one word
// per cycle); in the cycle the grant is decided the output is idle, so each frame costs one
// extra cycle. The document only names this block and says that it manages the output paths and
// packs frames for transmission; the round-robin policy and the stream handshake are this
// design's choices.
module tx_arbiter
  import nprc_pkg::*;
#(
  parameter int unsigned NUM_IN = 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NUM_IN-1:0]              s_valid,
  input  logic [NUM_IN-1:0][DATA_W-1:0]  s_data,
  input  logic [NUM_IN-1:0][KEEP_W-1:0]  s_keep,
  input  logic [NUM_IN-1:0]              s_last,
  output logic [NUM_IN-1:0]              s_ready,
  output logic                           m_valid,
  output logic [DATA_W-1:0]              m_data,
  output logic [KEEP_W-1:0]              m_keep,
  output logic                           m_last,
  input  logic                           m_ready
);

  localparam int unsigned IW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic          locked_q;
  logic [IW-1:0] grant_q, pick;
  logic          any;

  // round-robin search starting after the last grant
  always_comb begin
    pick = grant_q;
    any  = 1'b0;
    for (int k = NUM_IN; k >= 1; k--) begin
      int unsigned c;
      c = (int'(grant_q) + k) % NUM_IN;
      if (s_valid[c]) begin
        pick = IW'(c);
        any  = 1'b1;
      end
    end
  end

  always_comb begin
    m_valid = locked_q && s_valid[grant_q];
    m_data  = s_data[grant_q];
    m_keep  = s_keep[grant_q];
    m_last  = s_last[grant_q];
    s_ready = '0;
    s_ready[grant_q] = locked_q && m_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      grant_q  <= IW'(NUM_IN - 1);
    end else if (!locked_q) begin
      if (any) begin
        locked_q <= 1'b1;
        grant_q  <= pick;
      end
    end else if (m_valid && m_ready && m_last) begin
      locked_q <= 1'b0;
    end
  end

endmodule

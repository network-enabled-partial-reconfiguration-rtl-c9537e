// Ping-pong receive frame buffer of the Ethernet bridge.
//
// Two banks of BUF_WORDS 32-bit words each. The write side fills one bank with an incoming
// frame while the read side drains the frame held in the other bank, so a frame can be
// received while the previous one is being processed. Banks are used strictly in turn, so
// frames leave in the order they arrived. When the last word of a frame is written, the frame
// metadata computed by the inline sniffer (meta_in, valid in that cycle) is stored with the
// bank and the bank is handed to the read side.
//
// Write side: s_valid/s_ready stream with s_last; s_ready is low while the bank to be written
// is still full. wr_fire/wr_idx/wr_data/wr_oversize expose each accepted word to the sniffer.
// A frame longer than BUF_WORDS words keeps being accepted (the excess overwrites the last
// word) and is flagged oversize so the sniffer marks it for dropping.
// Read side: m_valid/m_ready stream of the frame's words with m_idx (word index) and m_meta;
// m_release frees the bank at once, discarding the rest of the frame. The memory is read
// synchronously; a bank becomes visible to the read side one cycle after its last word is
// written. Throughput is one word per cycle on each side.
// The two-bank structure follows the document; sizes and handshakes are this design's.
module pingpong_rx_fifo
  import nprc_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // incoming frame
  input  logic              s_valid,
  input  logic [DATA_W-1:0] s_data,
  input  logic [KEEP_W-1:0] s_keep,
  input  logic              s_last,
  output logic              s_ready,
  // sniffer tap
  output logic              wr_fire,
  output logic [OFF_W-1:0]  wr_idx,
  output logic              wr_oversize,
  input  frame_meta_t       meta_in,
  // outgoing frame
  output logic              m_valid,
  output logic [DATA_W-1:0] m_data,
  output logic [KEEP_W-1:0] m_keep,
  output logic              m_last,
  output logic [OFF_W-1:0]  m_idx,
  output frame_meta_t       m_meta,
  input  logic              m_ready,
  input  logic              m_release
);

  localparam int unsigned AW = $clog2(BUF_WORDS);

  logic [DATA_W-1:0] mem [2*BUF_WORDS];
  frame_meta_t       meta_q [2];
  logic [1:0]        full_q;

  // ---------------- write side
  logic          wbank_q;
  logic [AW-1:0] widx_q;
  logic          ovf_q;

  assign s_ready     = !full_q[wbank_q];
  assign wr_fire     = s_valid && s_ready;
  assign wr_idx      = OFF_W'(widx_q);
  assign wr_oversize = ovf_q || (widx_q == AW'(BUF_WORDS - 1) && !s_last);

  always_ff @(posedge clk) begin
    if (wr_fire) mem[{wbank_q, widx_q}] <= s_data;
  end

  // ---------------- read side
  logic          rbank_q, rbank_d;
  logic [AW-1:0] ridx_q, ridx_d;
  logic          primed_q;
  logic          rd_free;
  logic [DATA_W-1:0] rdata_q;

  assign m_meta  = meta_q[rbank_q];
  assign m_valid = full_q[rbank_q] && primed_q;
  assign m_idx   = OFF_W'(ridx_q);
  assign m_last  = (OFF_W'(ridx_q) == m_meta.nwords - 1'b1);
  assign m_keep  = m_last ? m_meta.last_keep : '1;
  assign m_data  = rdata_q;
  assign rd_free = full_q[rbank_q] && (m_release || (m_valid && m_ready && m_last));

  always_comb begin
    rbank_d = rbank_q;
    ridx_d  = ridx_q;
    if (rd_free) begin
      rbank_d = !rbank_q;
      ridx_d  = '0;
    end else if (m_valid && m_ready) begin
      ridx_d  = ridx_q + 1'b1;
    end
  end

  // read address runs one step ahead so rdata_q always holds mem[rbank_q, ridx_q]
  always_ff @(posedge clk) rdata_q <= mem[{rbank_d, ridx_d}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank_q  <= 1'b0;
      widx_q   <= '0;
      ovf_q    <= 1'b0;
      full_q   <= '0;
      rbank_q  <= 1'b0;
      ridx_q   <= '0;
      primed_q <= 1'b0;
      meta_q[0] <= '0;
      meta_q[1] <= '0;
    end else begin
      if (wr_fire) begin
        if (s_last) begin
          meta_q[wbank_q] <= meta_in;
          full_q[wbank_q] <= 1'b1;
          wbank_q         <= !wbank_q;
          widx_q          <= '0;
          ovf_q           <= 1'b0;
        end else if (widx_q == AW'(BUF_WORDS - 1)) begin
          ovf_q <= 1'b1;
        end else begin
          widx_q <= widx_q + 1'b1;
        end
      end
      if (rd_free) full_q[rbank_q] <= 1'b0;
      rbank_q  <= rbank_d;
      ridx_q   <= ridx_d;
      primed_q <= full_q[rbank_q] && !rd_free;
    end
  end

endmodule

// Remote partial-reconfiguration tracker of the Ethernet bridge.
//
// A remote PR request frame carries the bitstream size in bytes and the number of data frames
// that will follow. On such a request (req_fire) the tracker records both, clears its frame and
// byte counters, switches the ICAP manager to the network source (net_sel) and tells it how many
// 32-bit words to expect (icap_start, icap_words = size rounded up to words).
// For each later remote-PR data frame the receive arbiter asks whether it is the one expected
// (seq_ok: a request is active and the frame's sequence number equals the number of frames
// accepted so far, counting from 0). An accepted frame's payload goes to the ICAP manager and,
// when it has been sent, the arbiter reports its payload bytes (data_done, data_bytes); the
// tracker then updates its counters. When the expected number of frames has arrived the request
// ends: done pulses (an interrupt for the processor) and size_ok tells whether the byte count
// matched the announced size. A frame out of sequence is dropped by the arbiter, which raises
// seq_err; the tracker keeps waiting for the expected number, so a retransmission can fill it.
// A new request while one is active restarts the count.
// The recorded fields and the completion interrupt follow the document; the sequence rule,
// the restart rule and the size check are this design's choices. All outputs are registered
// except seq_ok.
module remote_pr_tracker
  import nprc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_fire,
  input  logic [DATA_W-1:0] req_size,
  input  logic [DATA_W-1:0] req_count,
  input  logic [DATA_W-1:0] seq_in,
  output logic              seq_ok,
  input  logic              data_done,
  input  logic [DATA_W-1:0] data_bytes,
  output logic              active,
  output logic              net_sel,
  output logic              icap_start,
  output logic [DATA_W-1:0] icap_words,
  output logic [DATA_W-1:0] exp_size,
  output logic [DATA_W-1:0] exp_count,
  output logic [DATA_W-1:0] frames_rcvd,
  output logic [DATA_W-1:0] bytes_rcvd,
  output logic              done,
  output logic              size_ok
);

  assign seq_ok  = active && (seq_in == frames_rcvd);
  assign net_sel = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      icap_start  <= 1'b0;
      icap_words  <= '0;
      exp_size    <= '0;
      exp_count   <= '0;
      frames_rcvd <= '0;
      bytes_rcvd  <= '0;
      done        <= 1'b0;
      size_ok     <= 1'b0;
    end else begin
      icap_start <= 1'b0;
      done       <= 1'b0;
      if (req_fire) begin
        active      <= (req_count != '0);
        icap_start  <= 1'b1;
        icap_words  <= (req_size + 32'd3) >> 2;
        exp_size    <= req_size;
        exp_count   <= req_count;
        frames_rcvd <= '0;
        bytes_rcvd  <= '0;
        size_ok     <= 1'b0;
      end else if (data_done && active) begin
        frames_rcvd <= frames_rcvd + 1'b1;
        bytes_rcvd  <= bytes_rcvd + data_bytes;
        if (frames_rcvd + 1'b1 == exp_count) begin
          active  <= 1'b0;
          done    <= 1'b1;
          size_ok <= (bytes_rcvd + data_bytes == exp_size);
        end
      end
    end
  end

endmodule

// ICAP manager: writes partial bitstream words into the internal configuration access port.
//
// Two sources can feed the ICAP. By default (net_sel low) it is the stream from the processor's
// DMA controller, which the PR driver sets up to move a bitstream cached in DRAM; the end of
// that transfer is marked by s_dma_last. When a remote PR request is active (net_sel high) the
// words come instead from the receive arbiter, which forwards the payload of remote-PR data
// frames; the end is reached when the number of words announced with net_start (net_words)
// has been written. Either way done pulses once, one cycle after the last word reaches the
// ICAP, and words_written counts the words of the current or last transfer.
//
// ICAP port: icap_csib is active low, icap_rdwrb low selects write, icap_i carries the word;
// all three are registered, so a word accepted in cycle t is presented to the port in cycle
// t+1. The port takes one word per cycle, so the selected source is never stalled and the
// unselected one is held off (ready low). Words are passed unchanged: any bit ordering the
// configuration port needs is assumed to be applied by whoever prepared the bitstream.
// The source switch follows the document; widths, the end-of-transfer rules and the port
// timing are this design's choices.
module icap_manager
  import nprc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // bitstream from the DMA controller
  input  logic              s_dma_valid,
  input  logic [DATA_W-1:0] s_dma_data,
  input  logic              s_dma_last,
  output logic              s_dma_ready,
  // bitstream from the network (receive arbiter)
  input  logic              s_net_valid,
  input  logic [DATA_W-1:0] s_net_data,
  output logic              s_net_ready,
  input  logic              net_sel,
  input  logic              net_start,
  input  logic [DATA_W-1:0] net_words,
  // configuration port
  output logic              icap_csib,
  output logic              icap_rdwrb,
  output logic [DATA_W-1:0] icap_i,
  // status
  output logic              done,
  output logic              busy,
  output logic [DATA_W-1:0] words_written
);

  logic [DATA_W-1:0] remaining_q;
  logic              restart_q;   // next word starts a new transfer count

  assign s_dma_ready = !net_sel;
  assign s_net_ready = net_sel;

  wire              fire = net_sel ? s_net_valid : s_dma_valid;
  wire [DATA_W-1:0] word = net_sel ? s_net_data  : s_dma_data;
  wire              last = net_sel ? (remaining_q == 32'd1) : s_dma_last;

  assign busy = !restart_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icap_csib     <= 1'b1;
      icap_rdwrb    <= 1'b1;
      icap_i        <= '0;
      done          <= 1'b0;
      remaining_q   <= '0;
      restart_q     <= 1'b1;
      words_written <= '0;
    end else begin
      done       <= 1'b0;
      icap_csib  <= !fire;
      icap_rdwrb <= !fire;
      if (fire) icap_i <= word;
      if (net_start) begin
        remaining_q   <= net_words;
        restart_q     <= 1'b1;
      end else if (fire) begin
        if (net_sel) remaining_q <= remaining_q - 1'b1;
        words_written <= restart_q ? 32'd1 : words_written + 1'b1;
        restart_q     <= last;
        done          <= last;
      end
    end
  end

endmodule

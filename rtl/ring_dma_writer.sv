// Ring-buffer DMA writer: moves frames destined for the processor into a receive ring in DRAM.
//
// The ring is ring_slots entries of SLOT_BYTES bytes starting at ring_base. The processor owns
// the tail index (entries it has consumed); this block owns the head index (head). A frame is
// written into the entry at head: its words go to entry+4, entry+8, ..., and after the last one
// a header word is written at entry+0 holding the frame length in bytes in bits [15:0] and a
// ready flag in bit 31. Only then does the head advance and frame_done pulse (an interrupt
// cause), so the processor never sees a partly written entry, much as an Ethernet controller's
// receive descriptor ring works. A new frame is refused (s_ready low) while the ring is full,
// i.e. while head+1 equals tail modulo ring_slots; the receive arbiter's time-out then decides.
//
// Bus side: an AXI write master issuing single-beat 32-bit writes (AW and W together, then wait
// for B), one outstanding write, so a word takes at least three cycles. bresp is recorded in
// bus_error (sticky). The document states that matched frames are moved to the address and
// offset held in the register stack, mimicking a ring-buffer DMA; the entry layout, header word
// and bus protocol details are this design's choices. s_abort (from the arbiter's time-out)
// discards a partly written frame: the entry is left unpublished and is reused by the next frame.
module ring_dma_writer
  import nprc_pkg::*;
#(
  parameter int unsigned SLOT_BYTES = 2048
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       ring_base,
  input  logic [15:0]       ring_slots,
  input  logic [15:0]       ring_tail,
  output logic [15:0]       head,
  output logic              frame_done,
  output logic              bus_error,
  // frame stream
  input  logic              s_valid,
  input  logic [DATA_W-1:0] s_data,
  input  logic [KEEP_W-1:0] s_keep,
  input  logic              s_last,
  output logic              s_ready,
  input  logic              s_abort,   // sender gave up on the current frame
  // AXI write master
  output logic              m_awvalid,
  output logic [31:0]       m_awaddr,
  input  logic              m_awready,
  output logic              m_wvalid,
  output logic [31:0]       m_wdata,
  output logic [3:0]        m_wstrb,
  input  logic              m_wready,
  input  logic              m_bvalid,
  input  logic [1:0]        m_bresp,
  output logic              m_bready
);

  typedef enum logic [1:0] { S_IDLE, S_ADDR, S_RESP } state_e;

  state_e      state_q;
  logic        in_frame_q;   // between first and last word of a frame
  logic        is_hdr_q;     // the write in flight is the header
  logic        last_q;       // the write in flight carries the frame's last word
  logic [15:0] widx_q;       // data words written in this frame
  logic [15:0] bytes_q;
  logic        aw_done_q, w_done_q;
  logic        abort_q;      // abort seen while a write was in flight

  wire [15:0] head_next = (head + 16'd1 == ring_slots) ? 16'd0 : head + 16'd1;
  wire        ring_full = (head_next == ring_tail);
  wire [31:0] entry     = ring_base + 32'(head) * SLOT_BYTES;

  assign s_ready   = (state_q == S_IDLE) && !abort_q && (in_frame_q || !ring_full);
  assign m_awvalid = (state_q == S_ADDR) && !aw_done_q;
  assign m_wvalid  = (state_q == S_ADDR) && !w_done_q;
  assign m_bready  = (state_q == S_RESP);

  wire aw_ok = aw_done_q || (m_awvalid && m_awready);
  wire w_ok  = w_done_q  || (m_wvalid  && m_wready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      in_frame_q <= 1'b0;
      is_hdr_q   <= 1'b0;
      last_q     <= 1'b0;
      widx_q     <= '0;
      bytes_q    <= '0;
      aw_done_q  <= 1'b0;
      w_done_q   <= 1'b0;
      abort_q    <= 1'b0;
      head       <= '0;
      frame_done <= 1'b0;
      bus_error  <= 1'b0;
      m_awaddr   <= '0;
      m_wdata    <= '0;
      m_wstrb    <= '0;
    end else begin
      frame_done <= 1'b0;
      if (s_abort && state_q != S_IDLE) abort_q <= 1'b1;
      case (state_q)
        S_IDLE: if (s_abort || abort_q) begin
          // forget the partial frame; the entry is not published
          in_frame_q <= 1'b0;
          widx_q     <= '0;
          bytes_q    <= '0;
          abort_q    <= 1'b0;
        end else if (s_valid && s_ready) begin
          m_awaddr   <= entry + 32'd4 + 32'({widx_q, 2'b00});
          m_wdata    <= s_data;
          m_wstrb    <= s_keep;
          widx_q     <= widx_q + 16'd1;
          bytes_q    <= bytes_q + (s_last ? 16'(keep_bytes(s_keep)) : 16'd4);
          in_frame_q <= !s_last;
          last_q     <= s_last;
          is_hdr_q   <= 1'b0;
          state_q    <= S_ADDR;
        end
        S_ADDR: begin
          aw_done_q <= aw_ok;
          w_done_q  <= w_ok;
          if (aw_ok && w_ok) begin
            aw_done_q <= 1'b0;
            w_done_q  <= 1'b0;
            state_q   <= S_RESP;
          end
        end
        S_RESP: if (m_bvalid) begin
          if (m_bresp != 2'b00) bus_error <= 1'b1;
          if (is_hdr_q) begin
            head       <= head_next;
            frame_done <= 1'b1;
            widx_q     <= '0;
            bytes_q    <= '0;
            is_hdr_q   <= 1'b0;
            state_q    <= S_IDLE;
          end else if (last_q) begin
            m_awaddr <= entry;
            m_wdata  <= {1'b1, 15'd0, bytes_q};
            m_wstrb  <= '1;
            is_hdr_q <= 1'b1;
            last_q   <= 1'b0;
            state_q  <= S_ADDR;
          end else begin
            state_q  <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule

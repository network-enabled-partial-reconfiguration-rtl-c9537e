// Receive DMA proxy: the fabric-side target of the processor's Ethernet controller receive DMA.
//
// Instead of pointing its receive buffers and descriptor ring at DRAM, the processor points them
// at this block's AXI window, so the controller's own DMA writes every received frame into the
// fabric and the processor never touches it. The window has two regions:
//   offset 0 .. 8*NUM_DESC-1   descriptor RAM, NUM_DESC descriptors of two words, readable and
//                              writable over the bus (word 0: buffer address, wrap bit 1, used
//                              bit 0; word 1: status with the frame length in bits [12:0] and
//                              end-of-frame in bit 15);
//   offset >= DATA_BASE        the receive buffer: every write with a non-zero byte strobe is the
//                              next 4 bytes of the frame being received, in order; the
//                              address inside the region is ignored, so every descriptor may
//                              name the same buffer address.
// Other offsets are ignored on write and read as 0.
// Frame words leave on a stream one behind the bus: a word is held until the next frame word
// arrives (then it is not the last one) or until the controller writes back a descriptor status
// word with end-of-frame set (then it is the last one, and the length gives its byte enables).
// The frame is thus forwarded while it is still being written; nothing is stored in DRAM.
// Because the frame has already been passed on, descriptor word 0 always reads back with the
// used bit cleared: every buffer is handed straight back to the controller and the processor
// does not have to recycle descriptors. Back-pressure from the stream stalls the bus (wready).
// Bus: AXI4 slave, 32-bit data, INCR bursts, one write and one read burst at a time; bid/rid
// return the request's id; responses are OKAY. A write burst ends with wlast (awlen is not
// needed).
// Timing: the last word of a frame is offered one cycle after the status write that ends it.
// That frames are moved into fabric memory by remapping the controller's buffer locations
// follows the document; the descriptor-in-fabric scheme, the used-bit trick, the window layout
// and the one-word hold are this design's. The descriptor word layout is that of the Zynq
// Ethernet controller (not given in the document).
module dma_proxy_rx
  import nprc_pkg::*;
#(
  parameter int unsigned NUM_DESC  = 64,
  parameter int unsigned ADDR_W    = 16,
  parameter int unsigned ID_W      = 12,
  parameter int unsigned DATA_BASE = 32'h8000
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4 slave, write
  input  logic [ID_W-1:0]   s_awid,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic [7:0]        s_awlen,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wlast,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [ID_W-1:0]   s_bid,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  // AXI4 slave, read
  input  logic [ID_W-1:0]   s_arid,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic [7:0]        s_arlen,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [ID_W-1:0]   s_rid,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rlast,
  output logic              s_rvalid,
  input  logic              s_rready,
  // received frames
  output logic              m_valid,
  output logic [DATA_W-1:0] m_data,
  output logic [KEEP_W-1:0] m_keep,
  output logic              m_last,
  input  logic              m_ready,
  output logic              frame_end     // pulses when a frame's end is seen on the bus
);

  localparam int unsigned DW = $clog2(2 * NUM_DESC);

  logic [31:0] desc [2*NUM_DESC];

  // ---------------- write side
  logic              wact_q;
  logic [ADDR_W-1:0] waddr_q;
  logic [ID_W-1:0]   wid_q;
  logic              hold_v;
  logic [31:0]       hold_d;

  wire  w_data_rgn = waddr_q >= ADDR_W'(DATA_BASE);
  wire  w_desc     = waddr_q < ADDR_W'(8 * NUM_DESC);
  wire  [DW-1:0] w_idx = waddr_q[DW+1:2];
  wire  out_free   = !m_valid || m_ready;
  wire  is_word    = w_data_rgn && s_wstrb != '0;
  wire  is_eof     = w_desc && w_idx[0] && s_wstrb[1] && s_wdata[15];

  assign s_awready = !wact_q && !s_bvalid;
  // a beat that pushes a word out needs the output register free
  assign s_wready  = wact_q && (out_free || !hold_v || !(is_word || is_eof));
  assign s_bresp   = 2'b00;
  assign s_bid     = wid_q;

  wire wbeat = s_wvalid && s_wready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wact_q    <= 1'b0;
      waddr_q   <= '0;
      wid_q     <= '0;
      s_bvalid  <= 1'b0;
      hold_v    <= 1'b0;
      hold_d    <= '0;
      m_valid   <= 1'b0;
      m_data    <= '0;
      m_keep    <= '0;
      m_last    <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      frame_end <= 1'b0;
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_awvalid && s_awready) begin
        wact_q  <= 1'b1;
        waddr_q <= s_awaddr;
        wid_q   <= s_awid;
      end
      if (wbeat) begin
        waddr_q <= waddr_q + ADDR_W'(4);
        if (s_wlast) begin
          wact_q   <= 1'b0;
          s_bvalid <= 1'b1;
        end
        if (is_word) begin
          if (hold_v) begin
            m_valid <= 1'b1;
            m_data  <= hold_d;
            m_keep  <= '1;
            m_last  <= 1'b0;
          end
          hold_v <= 1'b1;
          hold_d <= s_wdata;
        end else if (is_eof) begin
          // a status word with no frame data before it (e.g. software initialising the ring)
          // ends nothing
          frame_end <= hold_v;
          if (hold_v) begin
            m_valid <= 1'b1;
            m_data  <= hold_d;
            m_keep  <= (s_wdata[1:0] == 2'd0) ? 4'hF : keep_of(s_wdata[1:0]);
            m_last  <= 1'b1;
          end
          hold_v <= 1'b0;
        end
      end
    end
  end

  function automatic logic [3:0] keep_of(input logic [1:0] n);
    return 4'((5'd1 << n) - 5'd1);
  endfunction

  // descriptor RAM (byte-strobed writes)
  always_ff @(posedge clk) begin
    if (wbeat && w_desc)
      for (int b = 0; b < 4; b++)
        if (s_wstrb[b]) desc[w_idx][8*b +: 8] <= s_wdata[8*b +: 8];
  end

  // ---------------- read side
  logic              ract_q;
  logic [ADDR_W-1:0] raddr_q;
  logic [7:0]        rleft_q;

  wire  [DW-1:0] r_idx = raddr_q[DW+1:2];
  assign s_arready = !ract_q && !s_rvalid;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ract_q   <= 1'b0;
      raddr_q  <= '0;
      rleft_q  <= '0;
      s_rid    <= '0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rlast  <= 1'b0;
    end else if (s_arvalid && s_arready) begin
      ract_q  <= 1'b1;
      raddr_q <= s_araddr;
      rleft_q <= s_arlen;
      s_rid   <= s_arid;
    end else if (ract_q && (!s_rvalid || s_rready)) begin
      s_rvalid <= 1'b1;
      s_rlast  <= (rleft_q == 8'd0);
      if (raddr_q >= ADDR_W'(8 * NUM_DESC)) s_rdata <= '0;
      else if (!r_idx[0]) s_rdata <= desc[r_idx] & ~32'd1;   // used bit always clear
      else s_rdata <= desc[r_idx];
      raddr_q <= raddr_q + ADDR_W'(4);
      rleft_q <= rleft_q - 8'd1;
      if (rleft_q == 8'd0) ract_q <= 1'b0;
    end else if (s_rvalid && s_rready) begin
      s_rvalid <= 1'b0;
    end
  end

  // A write response, once offered, stays offered until it is taken.
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);

endmodule

// Network-enabled partial reconfiguration: the programmable-logic side of an FPGA SoC that
// receives Ethernet frames from the processor's Ethernet controller by DMA proxying, decides
// in hardware what each frame is for, and starts partial reconfiguration without the processor
// having to decode the frame.
//
// Datapath: the Ethernet controller's receive DMA writes each frame, and its descriptor
// status, into the receive DMA proxy's window (prx_*, an AXI4 slave) instead of DRAM; the proxy
// turns the writes into a frame stream that is written into the ping-pong frame buffer;
// while they are written the frame sniffer matches them against the rule stack and extracts
// fields. The receive arbiter then drains each frame, in order, to the accelerator slots
// (slot_*), to the processor's DRAM ring through the ring DMA writer (m_axi_*), or to the PR
// path: a PR command latches the bitstream name and interrupts the processor, whose PR driver
// then streams the cached bitstream from DRAM through its DMA controller (dma_*) into the ICAP
// manager; a remote-PR request switches the ICAP manager to the network and the payload of the
// following remote-PR data frames is written straight into the ICAP (icap_*). The transmit
// arbiter merges the frames the slots produce (slot_tx_*) onto tx_*, towards the Ethernet
// controller. The processor sets everything up, and reads status, through the AXI4-Lite
// register stack (s_axil_*); irq is the level interrupt of the register stack.
//
// The block structure is the document's; the stream widths (32-bit words), the register map,
// the frame formats for PR commands and remote PR, and every handshake are this design's.
// The ICAP primitive, the DMA controller, the accelerators in the slots and the processor's
// Ethernet controller are outside this module; their signals are its ports.
module nprc_top
  import nprc_pkg::*;
#(
  parameter int unsigned NUM_SLOTS  = 1,
  parameter int unsigned NUM_RULES  = 8,
  parameter int unsigned BUF_WORDS  = 512,
  parameter int unsigned SLOT_BYTES = 2048
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // register stack (processor general-purpose port)
  input  logic                            s_axil_awvalid,
  input  logic [11:0]                     s_axil_awaddr,
  output logic                            s_axil_awready,
  input  logic                            s_axil_wvalid,
  input  logic [31:0]                     s_axil_wdata,
  input  logic [3:0]                      s_axil_wstrb,
  output logic                            s_axil_wready,
  output logic                            s_axil_bvalid,
  output logic [1:0]                      s_axil_bresp,
  input  logic                            s_axil_bready,
  input  logic                            s_axil_arvalid,
  input  logic [11:0]                     s_axil_araddr,
  output logic                            s_axil_arready,
  output logic                            s_axil_rvalid,
  output logic [31:0]                     s_axil_rdata,
  output logic [1:0]                      s_axil_rresp,
  input  logic                            s_axil_rready,
  output logic                            irq,
  // receive DMA proxy: the Ethernet controller's receive DMA writes here (AXI4 slave)
  input  logic [11:0]                     prx_awid,
  input  logic [15:0]                     prx_awaddr,
  input  logic [7:0]                      prx_awlen,
  input  logic                            prx_awvalid,
  output logic                            prx_awready,
  input  logic [31:0]                     prx_wdata,
  input  logic [3:0]                      prx_wstrb,
  input  logic                            prx_wlast,
  input  logic                            prx_wvalid,
  output logic                            prx_wready,
  output logic [11:0]                     prx_bid,
  output logic [1:0]                      prx_bresp,
  output logic                            prx_bvalid,
  input  logic                            prx_bready,
  input  logic [11:0]                     prx_arid,
  input  logic [15:0]                     prx_araddr,
  input  logic [7:0]                      prx_arlen,
  input  logic                            prx_arvalid,
  output logic                            prx_arready,
  output logic [11:0]                     prx_rid,
  output logic [31:0]                     prx_rdata,
  output logic [1:0]                      prx_rresp,
  output logic                            prx_rlast,
  output logic                            prx_rvalid,
  input  logic                            prx_rready,
  // frames for the processor: DRAM ring (processor high-performance port)
  output logic                            m_axi_awvalid,
  output logic [31:0]                     m_axi_awaddr,
  input  logic                            m_axi_awready,
  output logic                            m_axi_wvalid,
  output logic [31:0]                     m_axi_wdata,
  output logic [3:0]                      m_axi_wstrb,
  input  logic                            m_axi_wready,
  input  logic                            m_axi_bvalid,
  input  logic [1:0]                      m_axi_bresp,
  output logic                            m_axi_bready,
  // cached bitstream from the DMA controller
  input  logic                            dma_valid,
  input  logic [DATA_W-1:0]               dma_data,
  input  logic                            dma_last,
  output logic                            dma_ready,
  // configuration access port
  output logic                            icap_csib,
  output logic                            icap_rdwrb,
  output logic [DATA_W-1:0]               icap_i,
  // accelerator slots: receive side
  output logic [NUM_SLOTS-1:0]            slot_valid,
  output logic [DATA_W-1:0]               slot_data,
  output logic [KEEP_W-1:0]               slot_keep,
  output logic                            slot_last,
  input  logic [NUM_SLOTS-1:0]            slot_ready,
  output logic [NUM_SLOTS-1:0]            slot_abort,
  // accelerator slots: transmit side
  input  logic [NUM_SLOTS-1:0]            slot_tx_valid,
  input  logic [NUM_SLOTS-1:0][DATA_W-1:0] slot_tx_data,
  input  logic [NUM_SLOTS-1:0][KEEP_W-1:0] slot_tx_keep,
  input  logic [NUM_SLOTS-1:0]            slot_tx_last,
  output logic [NUM_SLOTS-1:0]            slot_tx_ready,
  // frames to transmit (reverse proxy)
  output logic                            tx_valid,
  output logic [DATA_W-1:0]               tx_data,
  output logic [KEEP_W-1:0]               tx_keep,
  output logic                            tx_last,
  input  logic                            tx_ready
);

  // received frames from the DMA proxy
  logic                  rx_valid, rx_last, rx_ready, rx_frame_end;
  logic [DATA_W-1:0]     rx_data;
  logic [KEEP_W-1:0]     rx_keep;

  // configuration
  rule_t [NUM_RULES-1:0] rules;
  field_cfg_t            fields;
  action_e               default_action;
  logic [31:0]           timeout, ring_base;
  logic [15:0]           ring_slots, ring_tail, ring_head;

  // buffer <-> sniffer <-> arbiter
  logic                  wr_fire, wr_oversize;
  logic [OFF_W-1:0]      wr_idx;
  frame_meta_t           sniff_meta, f_meta;
  logic                  f_valid, f_last, f_ready, f_release;
  logic [DATA_W-1:0]     f_data;
  logic [KEEP_W-1:0]     f_keep;
  logic [OFF_W-1:0]      f_idx;

  // events and status
  logic                  pr_cmd, req_fire, seq_ok, seq_err, data_done, drop;
  logic [DATA_W-1:0]     data_bytes, drop_frame_num;
  action_e               drop_action;
  logic                  ps_valid, ps_last, ps_ready, ps_abort;
  logic [DATA_W-1:0]     ps_data;
  logic [KEEP_W-1:0]     ps_keep;
  logic                  net_valid, net_ready;
  logic [DATA_W-1:0]     net_data;
  logic                  remote_active, net_sel, icap_start, remote_done, size_ok;
  logic [DATA_W-1:0]     icap_words, exp_size, exp_count, frames_rcvd, bytes_rcvd;
  logic                  pr_done, icap_busy, ring_frame_done, ring_bus_error;
  logic [DATA_W-1:0]     icap_written;
  logic [NUM_IRQ-1:0]    irq_set;

  always_comb begin
    irq_set = '0;
    irq_set[IRQ_PR_CMD]      = pr_cmd;
    irq_set[IRQ_REMOTE_DONE] = remote_done;
    irq_set[IRQ_PR_DONE]     = pr_done;
    irq_set[IRQ_DROP]        = drop;
    irq_set[IRQ_SEQ_ERR]     = seq_err;
    irq_set[IRQ_PS_FRAME]    = ring_frame_done;
  end

  config_stack #(.NUM_RULES(NUM_RULES), .ADDR_W(12)) u_cfg (
    .clk, .rst_n,
    .s_awvalid(s_axil_awvalid), .s_awaddr(s_axil_awaddr), .s_awready(s_axil_awready),
    .s_wvalid(s_axil_wvalid), .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb),
    .s_wready(s_axil_wready), .s_bvalid(s_axil_bvalid), .s_bresp(s_axil_bresp),
    .s_bready(s_axil_bready), .s_arvalid(s_axil_arvalid), .s_araddr(s_axil_araddr),
    .s_arready(s_axil_arready), .s_rvalid(s_axil_rvalid), .s_rdata(s_axil_rdata),
    .s_rresp(s_axil_rresp), .s_rready(s_axil_rready),
    .rules, .fields, .default_action, .timeout, .ring_base, .ring_slots, .ring_tail,
    .irq_set, .name_we(pr_cmd || req_fire), .name_in(f_meta.name),
    .drop_we(drop), .drop_frame_num, .drop_action, .ring_head,
    .remote_size(exp_size), .remote_count(exp_count), .remote_frames(frames_rcvd),
    .remote_bytes(bytes_rcvd), .remote_active, .remote_size_ok(size_ok),
    .icap_words(icap_written), .icap_busy,
    .ring_bus_error, .irq
  );

  dma_proxy_rx #(.NUM_DESC(64), .ADDR_W(16), .ID_W(12)) u_proxy (
    .clk, .rst_n,
    .s_awid(prx_awid), .s_awaddr(prx_awaddr), .s_awlen(prx_awlen), .s_awvalid(prx_awvalid),
    .s_awready(prx_awready), .s_wdata(prx_wdata), .s_wstrb(prx_wstrb), .s_wlast(prx_wlast),
    .s_wvalid(prx_wvalid), .s_wready(prx_wready), .s_bid(prx_bid), .s_bresp(prx_bresp),
    .s_bvalid(prx_bvalid), .s_bready(prx_bready),
    .s_arid(prx_arid), .s_araddr(prx_araddr), .s_arlen(prx_arlen), .s_arvalid(prx_arvalid),
    .s_arready(prx_arready), .s_rid(prx_rid), .s_rdata(prx_rdata), .s_rresp(prx_rresp),
    .s_rlast(prx_rlast), .s_rvalid(prx_rvalid), .s_rready(prx_rready),
    .m_valid(rx_valid), .m_data(rx_data), .m_keep(rx_keep), .m_last(rx_last),
    .m_ready(rx_ready), .frame_end(rx_frame_end)
  );

  pingpong_rx_fifo #(.BUF_WORDS(BUF_WORDS)) u_buf (
    .clk, .rst_n,
    .s_valid(rx_valid), .s_data(rx_data), .s_keep(rx_keep), .s_last(rx_last),
    .s_ready(rx_ready),
    .wr_fire, .wr_idx, .wr_oversize, .meta_in(sniff_meta),
    .m_valid(f_valid), .m_data(f_data), .m_keep(f_keep), .m_last(f_last), .m_idx(f_idx),
    .m_meta(f_meta), .m_ready(f_ready), .m_release(f_release)
  );

  frame_sniffer #(.NUM_RULES(NUM_RULES)) u_sniff (
    .clk, .rst_n, .rules, .fields, .default_action,
    .in_fire(wr_fire), .in_idx(wr_idx), .in_data(rx_data), .in_keep(rx_keep),
    .in_last(rx_last), .in_oversize(wr_oversize), .meta_o(sniff_meta)
  );

  rx_arbiter #(.NUM_SLOTS(NUM_SLOTS)) u_rxarb (
    .clk, .rst_n, .timeout, .payload_off(fields.payload_off),
    .f_valid, .f_data, .f_keep, .f_last, .f_idx, .f_meta, .f_ready, .f_release,
    .pr_cmd, .req_fire, .seq_ok, .seq_err, .data_done, .data_bytes,
    .drop, .drop_frame_num, .drop_action,
    .slot_valid, .slot_data, .slot_keep, .slot_last, .slot_ready, .slot_abort,
    .ps_valid, .ps_data, .ps_keep, .ps_last, .ps_ready, .ps_abort,
    .net_valid, .net_data, .net_ready
  );

  remote_pr_tracker u_remote (
    .clk, .rst_n, .req_fire, .req_size(f_meta.size), .req_count(f_meta.count),
    .seq_in(f_meta.seq), .seq_ok, .data_done, .data_bytes,
    .active(remote_active), .net_sel, .icap_start, .icap_words,
    .exp_size, .exp_count, .frames_rcvd, .bytes_rcvd, .done(remote_done), .size_ok
  );

  ring_dma_writer #(.SLOT_BYTES(SLOT_BYTES)) u_ring (
    .clk, .rst_n, .ring_base, .ring_slots, .ring_tail, .head(ring_head),
    .frame_done(ring_frame_done), .bus_error(ring_bus_error),
    .s_valid(ps_valid), .s_data(ps_data), .s_keep(ps_keep), .s_last(ps_last),
    .s_ready(ps_ready), .s_abort(ps_abort),
    .m_awvalid(m_axi_awvalid), .m_awaddr(m_axi_awaddr), .m_awready(m_axi_awready),
    .m_wvalid(m_axi_wvalid), .m_wdata(m_axi_wdata), .m_wstrb(m_axi_wstrb),
    .m_wready(m_axi_wready), .m_bvalid(m_axi_bvalid), .m_bresp(m_axi_bresp),
    .m_bready(m_axi_bready)
  );

  icap_manager u_icap (
    .clk, .rst_n,
    .s_dma_valid(dma_valid), .s_dma_data(dma_data), .s_dma_last(dma_last),
    .s_dma_ready(dma_ready),
    .s_net_valid(net_valid), .s_net_data(net_data), .s_net_ready(net_ready),
    .net_sel, .net_start(icap_start), .net_words(icap_words),
    .icap_csib, .icap_rdwrb, .icap_i,
    .done(pr_done), .busy(icap_busy), .words_written(icap_written)
  );

  tx_arbiter #(.NUM_IN(NUM_SLOTS)) u_txarb (
    .clk, .rst_n,
    .s_valid(slot_tx_valid), .s_data(slot_tx_data), .s_keep(slot_tx_keep),
    .s_last(slot_tx_last), .s_ready(slot_tx_ready),
    .m_valid(tx_valid), .m_data(tx_data), .m_keep(tx_keep), .m_last(tx_last),
    .m_ready(tx_ready)
  );

endmodule

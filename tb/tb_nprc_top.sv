// End-to-end testbench of nprc_top at its default parameters (one accelerator slot, eight
// rules, 512-word frame buffers), with a full-size 799,584-byte partial bitstream.
//
// The testbench plays the processor (register writes and reads over AXI4-Lite, the PR driver
// that answers a PR-command interrupt by streaming the cached bitstream through the DMA port),
// the Ethernet controller's receive DMA (frames written as 16-beat AXI bursts into the proxy
// window, then the descriptor status and used-bit write-back), the DRAM behind the ring port,
// the accelerator slot and the ICAP primitive (a monitor that checks every configuration word
// against the generated bitstream). Frames use EtherType
// 0x88B5 with a 4-character command word in word 4: "PRCM" (PR command, name in words 5..8),
// "RPRQ" (remote-PR request: size in word 9, data-frame count in word 10), "RPDT" (remote-PR
// data: sequence number in word 5, bitstream from word 6), "DATA" (accelerator data) and
// "NOPE" (dropped); anything else goes to the processor ring.
// Mechanisms counted, each must occur: ring delivery, slot delivery, rule drop, time-out drop,
// oversize drop, receive overlapping a drain, PR-command decode and interrupt, cached PR through
// the DMA source, remote PR through the network source, sequence error and recovery,
// transmit-arbiter forwarding. Cycle checks: PR-command interrupt within 4 cycles of the
// descriptor status write that ends the frame; one ICAP word per cycle while the DMA streams.
module tb_nprc_top;
  import nprc_pkg::*;

  localparam int BS_BYTES = 799584;          // bitstream size used in the evaluation
  localparam int BS_WORDS = BS_BYTES / 4;
  localparam int PAY_W    = 256;             // bitstream words per remote-PR data frame
  localparam int NFR      = (BS_WORDS + PAY_W - 1) / PAY_W;
  localparam logic [31:0] K_PRCM = 32'h4D43_5250, K_RPRQ = 32'h5152_5052,
                          K_RPDT = 32'h5444_5052, K_DATA = 32'h4154_4144,
                          K_NOPE = 32'h4550_4F4E;
  localparam logic [31:0] MAC0 = 32'h4433_2211;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // DUT signals
  logic s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0, s_axil_arvalid = 0,
        s_axil_rready = 0;
  logic [11:0] s_axil_awaddr = 0, s_axil_araddr = 0;
  logic [31:0] s_axil_wdata = 0;
  logic [3:0]  s_axil_wstrb = 4'hF;
  logic s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid, irq;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axil_rdata;
  logic [11:0] prx_awid = 0, prx_arid = 0, prx_bid, prx_rid;
  logic [15:0] prx_awaddr = 0, prx_araddr = 0;
  logic [7:0]  prx_awlen = 0, prx_arlen = 0;
  logic prx_awvalid = 0, prx_awready, prx_wlast = 0, prx_wvalid = 0, prx_wready, prx_bvalid,
        prx_bready = 1, prx_arvalid = 0, prx_arready, prx_rlast, prx_rvalid, prx_rready = 1;
  logic [31:0] prx_wdata = 0, prx_rdata;
  logic [3:0]  prx_wstrb = 0;
  logic [1:0]  prx_bresp, prx_rresp;
  logic m_axi_awvalid, m_axi_wvalid, m_axi_bready;
  logic m_axi_awready = 1, m_axi_wready = 1, m_axi_bvalid = 0;
  logic [31:0] m_axi_awaddr, m_axi_wdata;
  logic [3:0] m_axi_wstrb;
  logic [1:0] m_axi_bresp = 0;
  logic dma_valid = 0, dma_last = 0, dma_ready;
  logic [31:0] dma_data = 0;
  logic icap_csib, icap_rdwrb;
  logic [31:0] icap_i;
  logic [0:0] slot_valid, slot_ready = 0, slot_abort;
  logic [31:0] slot_data;
  logic [3:0] slot_keep;
  logic slot_last;
  logic [0:0] slot_tx_valid = 0, slot_tx_last = 0, slot_tx_ready;
  logic [0:0][31:0] slot_tx_data = 0;
  logic [0:0][3:0] slot_tx_keep = 0;
  logic tx_valid, tx_last, tx_ready = 1;
  logic [31:0] tx_data;
  logic [3:0] tx_keep;

  nprc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] bsw(input int k);
    return 32'(k) * 32'h9E37_79B1 + 32'h0123_4567;
  endfunction

  // ---------------- processor: register access
  task automatic reg_wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_awaddr = a; s_axil_wdata = d;
    s_axil_bready = 1;
    while (!s_axil_awready) @(negedge clk);
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic reg_rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_arvalid = 1; s_axil_araddr = a;
    @(negedge clk);
    s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    s_axil_rready = 1; @(negedge clk); s_axil_rready = 0;
  endtask

  // ---------------- frame source (DMA proxy)
  logic [31:0] fb [600];
  int last_word_cycle;
  task automatic hdr(input logic [31:0] kw);
    fb[0] = MAC0; fb[1] = 32'h0A09_6655; fb[2] = 32'h0E0D_0C0B; fb[3] = 32'h1111_B588;
    fb[4] = kw;
  endtask

  // ---------------- Ethernet controller receive DMA (writes through the proxy)
  // A frame is written as 16-beat bursts into the receive-buffer window, followed by the
  // descriptor status write-back (end-of-frame, length in bytes) and the used bit.
  int desc_i = 0;
  task automatic axi_wr(input logic [15:0] a, input int n, input int base, input logic [3:0] lk,
                        input logic [31:0] one = 0);
    @(negedge clk);
    prx_awvalid = 1; prx_awaddr = a; prx_awlen = 8'(n - 1);
    #1 while (!prx_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    prx_awvalid = 0;
    for (int i = 0; i < n; i++) begin
      prx_wvalid = 1; prx_wdata = (base < 0) ? one : fb[base + i]; prx_wlast = (i == n - 1);
      prx_wstrb = (i == n - 1) ? lk : 4'hF;
      #1 while (!prx_wready) begin @(negedge clk); #1; end
      @(posedge clk);
      if (i == n - 1) last_word_cycle = cyc;
      @(negedge clk);
      prx_wvalid = 0; prx_wlast = 0;
    end
    #1 while (!prx_bvalid) begin @(negedge clk); #1; end
  endtask
  task automatic send(input int len, input logic [3:0] keep = 4'b0011);
    int nb;
    nb = 4 * (len - 1) + $countones(keep);
    for (int p = 0; p < len; p += 16)
      axi_wr(16'(32'h8000 + 4 * p), (len - p < 16) ? len - p : 16, p, (len - p <= 16) ? keep : 4'hF);
    axi_wr(16'(8 * desc_i + 4), 1, -1, 4'hF, 32'h0000_8000 | 32'(nb));
    begin
      int t;
      t = last_word_cycle;
      axi_wr(16'(8 * desc_i), 1, -1, 4'hF, 32'h0000_0001);
      last_word_cycle = t;
    end
    desc_i = (desc_i + 1) % 64;
  endtask

  // ---------------- DRAM behind the ring port
  logic [31:0] dram [logic [31:0]];
  always @(posedge clk) begin
    m_axi_bvalid <= 1'b0;
    if (m_axi_awvalid && m_axi_wvalid) begin
      dram[m_axi_awaddr] = m_axi_wdata;
      m_axi_bvalid <= 1'b1;
    end
  end

  // ---------------- accelerator slot sink
  logic [31:0] slot_q [$];
  bit slot_stall = 0;
  int n_slot_words = 0, n_abort = 0, n_overlap = 0;
  always @(negedge clk) slot_ready <= slot_stall ? 1'b0 : 1'($urandom % 4 != 0);
  always @(posedge clk) begin
    if (slot_valid[0] && slot_ready[0]) begin slot_q.push_back(slot_data); n_slot_words++; end
    if (slot_abort[0]) n_abort++;
    // receive side accepting a frame while the arbiter drains the other bank
    if (dut.rx_valid && dut.rx_ready && dut.f_valid && dut.u_rxarb.state_q != 0) n_overlap++;
  end

  // ---------------- ICAP primitive model
  int icap_cnt = 0, icap_first = 0, icap_last = 0, icap_bad = 0;
  always @(posedge clk) if (rst_n && !icap_csib) begin
    if (!icap_rdwrb) begin
      if (icap_i != bsw(icap_cnt)) icap_bad++;
      if (icap_cnt == 0) icap_first = cyc;
      icap_last = cyc;
      icap_cnt++;
    end
  end

  // ---------------- interrupt bookkeeping
  task automatic wait_irq(input int bitn, input int max_cycles, output bit seen);
    logic [31:0] st;
    seen = 0;
    for (int i = 0; i < max_cycles && !seen; i++) begin
      if (irq) begin
        reg_rd(12'h004, st);
        if (st[bitn]) seen = 1;
      end else @(negedge clk);
    end
  endtask
  task automatic clear_irq(input logic [31:0] m);
    reg_wr(12'h004, m);
  endtask

  // ---------------- test
  int m_ring = 0, m_slot = 0, m_rule_drop = 0, m_tmo = 0, m_ovf = 0, m_prcmd = 0,
      m_cached = 0, m_remote = 0, m_seqerr = 0, m_tx = 0;

  initial begin
    logic [31:0] r;
    bit seen;
    int n0, base_rules;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // --- configuration by the processor at start-up
    reg_wr(12'h010, 5);  reg_wr(12'h014, 9);  reg_wr(12'h018, 10);
    reg_wr(12'h01C, 5);  reg_wr(12'h020, 6);  reg_wr(12'h024, 64);
    reg_wr(12'h028, 32'h1000_0000); reg_wr(12'h02C, 8); reg_wr(12'h034, 0);
    reg_wr(12'h008, 32'h3F);
    begin
      logic [31:0] kw [5];
      action_e     ac [5];
      kw = '{K_PRCM, K_RPRQ, K_RPDT, K_DATA, K_NOPE};
      ac = '{ACT_PR_CMD, ACT_REMOTE_REQ, ACT_REMOTE_DATA, ACT_SLOT, ACT_DROP};
      for (int ru = 0; ru < 5; ru++) begin
        logic [11:0] b;
        b = 12'h400 + 12'(ru * 'h80);
        reg_wr(b + 12'h10, 0); reg_wr(b + 12'h14, MAC0);        reg_wr(b + 12'h18, '1);
        reg_wr(b + 12'h20, 3); reg_wr(b + 12'h24, 32'h0000_B588); reg_wr(b + 12'h28, 32'hFFFF);
        reg_wr(b + 12'h30, 4); reg_wr(b + 12'h34, kw[ru]);      reg_wr(b + 12'h38, '1);
        reg_wr(b, {16'd0, 8'h01, 4'd0, 3'(ac[ru]), 1'b1});
      end
    end

    // --- 1. unmatched frame goes to the processor's DRAM ring
    hdr(32'h1234_5678); fb[3] = 32'h0000_0008;            // IPv4 EtherType: no rule
    for (int i = 4; i < 16; i++) fb[i] = 32'hC0DE_0000 + 32'(i);
    send(16);
    wait_irq(IRQ_PS_FRAME, 200, seen);
    check(seen, "ring frame interrupt");
    check(dram[32'h1000_0000] == {1'b1, 15'd0, 16'(15 * 4 + 2)}, "ring header");
    for (int i = 0; i < 16; i++) check(dram[32'h1000_0004 + 32'(4 * i)] == fb[i], "ring data");
    reg_rd(12'h030, r); check(r == 1, "ring head advanced");
    if (seen) m_ring++;
    clear_irq(32'h3F);

    // --- 2. accelerator data frames back to back (receive overlaps the drain)
    n0 = n_slot_words;
    for (int f = 0; f < 4; f++) begin
      hdr(K_DATA);
      for (int i = 5; i < 200; i++) fb[i] = {8'(f), 24'(i)};
      send(200);
    end
    repeat (2000) @(negedge clk);
    check(n_slot_words - n0 == 800, "slot received four frames");
    for (int f = 0; f < 4; f++)
      for (int i = 0; i < 200; i++) begin
        logic [31:0] w;
        w = slot_q.pop_front();
        if (i >= 5) check(w == {8'(f), 24'(i)}, "slot data");
      end
    if (n_slot_words - n0 == 800) m_slot++;

    // --- 3. a frame a rule marks for dropping goes nowhere
    n0 = n_slot_words;
    hdr(K_NOPE); send(20);
    repeat (50) @(negedge clk);
    check(n_slot_words == n0 && !irq, "rule drop: nothing delivered, no interrupt");
    if (n_slot_words == n0) m_rule_drop++;

    // --- 4. slot not accepting: the time-out drops the frame
    slot_stall = 1;
    hdr(K_DATA); for (int i = 5; i < 30; i++) fb[i] = i; send(30);
    wait_irq(IRQ_DROP, 400, seen);
    check(seen && n_abort == 1, "time-out drop interrupt and abort");
    reg_rd(12'h064, r); check(r == 32'd6, "dropped frame number");
    reg_rd(12'h068, r); check(r == 32'(ACT_SLOT), "dropped frame destination");
    reg_rd(12'h06C, r); check(r == 32'd1, "drop count");
    if (seen) m_tmo++;
    slot_stall = 0;
    clear_irq(32'h3F);
    slot_q.delete();

    // --- 5. oversize frame (longer than a 512-word buffer) is dropped
    n0 = n_slot_words;
    hdr(K_DATA); for (int i = 5; i < 600; i++) fb[i] = i; send(600);
    repeat (50) @(negedge clk);
    check(n_slot_words == n0, "oversize frame dropped");
    if (n_slot_words == n0) m_ovf++;

    // --- 6. PR command: decode in the fabric, interrupt, cached bitstream through the DMA
    hdr(K_PRCM);
    fb[5] = 32'h7365_7270; fb[6] = 32'h5F74_6E65; fb[7] = 32'h0000_3176; fb[8] = 0; // "present_v1"
    fb[9] = 0; send(10);
    begin
      int t0 = 0;
      for (int i = 0; i < 20 && !irq; i++) @(posedge clk);
      t0 = cyc;
      $display("PR command interrupt %0d cycles after the end-of-frame status write", t0 - last_word_cycle);
      check(irq && t0 - last_word_cycle <= 4,
            $sformatf("PR command interrupt latency %0d cycles", t0 - last_word_cycle));
    end
    reg_rd(12'h004, r); check(r[IRQ_PR_CMD], "PR command cause");
    reg_rd(12'h040, r); check(r == 32'h7365_7270, "name word 0");
    reg_rd(12'h044, r); check(r == 32'h5F74_6E65, "name word 1");
    reg_rd(12'h048, r); check(r == 32'h0000_3176, "name word 2");
    if (r == 32'h0000_3176) m_prcmd++;
    clear_irq(32'h3F);
    // PR driver: stream the cached bitstream through the DMA controller
    icap_cnt = 0; icap_bad = 0;
    for (int k = 0; k < BS_WORDS; k++) begin
      @(negedge clk);
      dma_valid = 1; dma_data = bsw(k); dma_last = (k == BS_WORDS - 1);
      while (!dma_ready) @(negedge clk);
    end
    @(negedge clk); dma_valid = 0; dma_last = 0;
    wait_irq(IRQ_PR_DONE, 100, seen);
    check(seen, "PR done interrupt (cached)");
    check(icap_cnt == BS_WORDS && icap_bad == 0, $sformatf("cached bitstream: %0d words, %0d bad",
          icap_cnt, icap_bad));
    check(icap_last - icap_first == BS_WORDS - 1, "one ICAP word per cycle");
    reg_rd(12'h070, r); check(r == BS_WORDS, "ICAP word count register");
    if (seen && icap_cnt == BS_WORDS && icap_bad == 0) m_cached++;
    clear_irq(32'h3F);

    // --- 7. remote PR: request, then the bitstream in NFR data frames
    icap_cnt = 0; icap_bad = 0;
    hdr(K_RPRQ);
    fb[5] = 32'h7365_7270; fb[6] = 32'h5F74_6E65; fb[7] = 32'h0000_3276; fb[8] = 0;
    fb[9] = BS_BYTES; fb[10] = NFR; send(11);
    repeat (5) @(negedge clk);
    reg_rd(12'h060, r); check(r[0], "remote PR active");
    reg_rd(12'h054, r); check(r == NFR, "packet count recorded");
    for (int f = 0; f < NFR; f++) begin
      int nw;
      nw = (f == NFR - 1) ? BS_WORDS - f * PAY_W : PAY_W;
      hdr(K_RPDT); fb[5] = f;
      for (int i = 0; i < nw; i++) fb[6 + i] = bsw(f * PAY_W + i);
      send(6 + nw, 4'hF);
      if (f == 3) begin
        // a repeated frame is out of sequence: refused with an interrupt, transfer goes on
        send(6 + nw, 4'hF);
        wait_irq(IRQ_SEQ_ERR, 600, seen);
        check(seen, "sequence error interrupt");
        if (seen) m_seqerr++;
        clear_irq(32'h3F);
      end
    end
    wait_irq(IRQ_REMOTE_DONE, 2000, seen);
    check(seen, "remote PR completion interrupt");
    reg_rd(12'h060, r); check(r == 32'b10, "remote PR finished with matching size");
    reg_rd(12'h058, r); check(r == NFR, "frames received");
    reg_rd(12'h05C, r); check(r == BS_BYTES, "bytes received");
    reg_rd(12'h04C, r);
    wait_irq(IRQ_PR_DONE, 100, seen);
    check(seen, "PR done interrupt (remote)");
    check(icap_cnt == BS_WORDS && icap_bad == 0, $sformatf("remote bitstream: %0d words, %0d bad",
          icap_cnt, icap_bad));
    if (seen && icap_cnt == BS_WORDS && icap_bad == 0) m_remote++;
    clear_irq(32'h3F);
    reg_rd(12'h060, r); check(r[0] == 0, "ICAP back on the DMA source");
    check(dma_ready, "DMA source selected again");

    // --- 8. frames produced by the slot go out through the transmit arbiter
    fork
      begin
        for (int f = 0; f < 3; f++)
          for (int i = 0; i < 20; i++) begin
            @(negedge clk);
            slot_tx_valid = 1; slot_tx_data[0] = {8'(f), 24'(i)}; slot_tx_last = (i == 19);
            slot_tx_keep[0] = 4'hF;
            while (!slot_tx_ready[0]) @(negedge clk);
          end
        @(negedge clk); slot_tx_valid = 0; slot_tx_last = 0;
      end
      begin
        int n = 0;
        while (n < 60) begin
          @(posedge clk);
          if (tx_valid && tx_ready) begin
            check(tx_data == {8'(n / 20), 24'(n % 20)} && tx_last == (n % 20 == 19), "tx word");
            n++;
          end
        end
        m_tx++;
      end
    join

    // --- mechanism coverage
    check(n_overlap > 0, "receive overlapped with drain");
    $display("mechanisms: ring=%0d slot=%0d rule_drop=%0d timeout=%0d oversize=%0d overlap=%0d",
             m_ring, m_slot, m_rule_drop, m_tmo, m_ovf, n_overlap);
    $display("            pr_cmd=%0d cached_pr=%0d remote_pr=%0d seq_err=%0d tx=%0d",
             m_prcmd, m_cached, m_remote, m_seqerr, m_tx);
    check(m_ring > 0 && m_slot > 0 && m_rule_drop > 0 && m_tmo > 0 && m_ovf > 0 && m_prcmd > 0 &&
          m_cached > 0 && m_remote > 0 && m_seqerr > 0 && m_tx > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

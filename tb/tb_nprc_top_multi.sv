// End-to-end testbench of nprc_top with three accelerator slots (NUM_SLOTS = 3, other
// parameters at their defaults).
//
// The testbench plays the processor (register accesses over AXI4-Lite), the Ethernet controller's
// receive DMA (AXI writes into the proxy window), the DRAM behind the ring port, three
// accelerator slots with independent random back-pressure and the ICAP primitive.
// Frames use EtherType 0x88B5 with a 4-character command word in word 4: "DAT0", "DAT1" and
// "DAT2" go to one slot each, "DALL" to all three at once (multicast), "DA12" to slots 1 and 2;
// "RPRQ"/"RPDT" carry a small remote-PR bitstream; anything else goes to the processor ring.
// A random mix of these frames is sent back to back; each slot's received words are compared
// with a reference queue built from the frame list, and the ring entries with the DRAM model.
// Then all three slots send frames at once into the transmit arbiter, whose output must be whole
// frames granted in round-robin order 0, 1, 2, 0, ...
// Mechanisms counted, each must occur: unicast to each slot, multicast to all slots, multicast
// to a subset, ring delivery, remote PR through the network source, round-robin rotation.
module tb_nprc_top_multi;
  import nprc_pkg::*;

  localparam int NS     = 3;
  localparam int NFRAME = 60;
  localparam logic [31:0] K_DAT0 = 32'h3054_4144, K_DAT1 = 32'h3154_4144,
                          K_DAT2 = 32'h3254_4144, K_DALL = 32'h4C4C_4144,
                          K_DA12 = 32'h3231_4144, K_RPRQ = 32'h5152_5052,
                          K_RPDT = 32'h5444_5052;
  localparam logic [31:0] MAC0 = 32'h4433_2211;
  localparam int RP_WORDS = 250, RP_PAY = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

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
  logic [NS-1:0] slot_valid, slot_ready = 0, slot_abort;
  logic [31:0] slot_data;
  logic [3:0] slot_keep;
  logic slot_last;
  logic [NS-1:0] slot_tx_valid = 0, slot_tx_last = 0, slot_tx_ready;
  logic [NS-1:0][31:0] slot_tx_data = 0;
  logic [NS-1:0][3:0] slot_tx_keep = 0;
  logic tx_valid, tx_last, tx_ready = 1;
  logic [31:0] tx_data;
  logic [3:0] tx_keep;

  nprc_top #(.NUM_SLOTS(NS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] bsw(input int k);
    return 32'(k) * 32'h7F4A_7C15 + 32'h89AB_CDEF;
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

  // ---------------- frame source
  logic [31:0] fb [300];
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

  // ---------------- DRAM behind the ring port (answers each write in the next cycle)
  logic [31:0] dram [logic [31:0]];
  always @(posedge clk) begin
    m_axi_bvalid <= 1'b0;
    if (m_axi_awvalid && m_axi_wvalid && m_axi_awready) begin
      dram[m_axi_awaddr] = m_axi_wdata;
      m_axi_bvalid <= 1'b1;
    end
  end

  // ---------------- three slot sinks with their own random ready
  logic [31:0] exp_q [NS][$];
  int n_words [NS];
  int n_bad = 0, n_abort = 0, n_multi_cycle = 0;
  always @(negedge clk)
    for (int s = 0; s < NS; s++) slot_ready[s] <= 1'($urandom % 3 != 0);
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) begin
      if (slot_valid[s] && slot_ready[s]) begin
        if (exp_q[s].size() == 0 || exp_q[s].pop_front() != slot_data) n_bad++;
        n_words[s]++;
      end
      if (slot_abort[s]) n_abort++;
    end
    // a word offered to more than one slot in the same cycle
    if ($countones(slot_valid) > 1) n_multi_cycle++;
  end

  // ---------------- ICAP primitive model
  int icap_cnt = 0, icap_bad = 0;
  always @(posedge clk) if (rst_n && !icap_csib && !icap_rdwrb) begin
    if (icap_i != bsw(icap_cnt)) icap_bad++;
    icap_cnt++;
  end

  // ---------------- test
  int m_uni [NS];
  int m_all = 0, m_sub = 0, m_ring = 0, m_remote = 0, m_rr = 0;

  initial begin
    logic [31:0] r;
    logic [31:0] kws [5];
    logic [7:0]  masks [5];
    int ring_frames = 0;
    int ring_len [$];
    int ring_seed [$];
    kws   = '{K_DAT0, K_DAT1, K_DAT2, K_DALL, K_DA12};
    masks = '{8'b001, 8'b010, 8'b100, 8'b111, 8'b110};
    for (int s = 0; s < NS; s++) begin n_words[s] = 0; m_uni[s] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // --- configuration: field offsets, ring of 64 entries, one rule per command word
    reg_wr(12'h010, 5);  reg_wr(12'h014, 9);  reg_wr(12'h018, 10);
    reg_wr(12'h01C, 5);  reg_wr(12'h020, 6);  reg_wr(12'h024, 0);
    reg_wr(12'h028, 32'h2000_0000); reg_wr(12'h02C, 64); reg_wr(12'h034, 0);
    reg_wr(12'h008, 32'h3F);
    for (int ru = 0; ru < 7; ru++) begin
      logic [11:0] b;
      logic [31:0] kw;
      logic [7:0]  mk;
      action_e     ac;
      b = 12'h400 + 12'(ru * 'h80);
      if (ru < 5) begin kw = kws[ru]; mk = masks[ru]; ac = ACT_SLOT; end
      else if (ru == 5) begin kw = K_RPRQ; mk = 0; ac = ACT_REMOTE_REQ; end
      else begin kw = K_RPDT; mk = 0; ac = ACT_REMOTE_DATA; end
      reg_wr(b + 12'h10, 0); reg_wr(b + 12'h14, MAC0);        reg_wr(b + 12'h18, '1);
      reg_wr(b + 12'h20, 3); reg_wr(b + 12'h24, 32'h0000_B588); reg_wr(b + 12'h28, 32'hFFFF);
      reg_wr(b + 12'h30, 4); reg_wr(b + 12'h34, kw);          reg_wr(b + 12'h38, '1);
      reg_wr(b, {16'd0, mk, 4'd0, 3'(ac), 1'b1});
    end

    // --- 1. random mix of slot frames (unicast, multicast, subset) and ring frames
    for (int f = 0; f < NFRAME; f++) begin
      int sel, len;
      sel = int'($urandom % 6);
      len = 8 + int'($urandom % 120);
      if (sel < 5) begin
        hdr(kws[sel]);
        for (int i = 5; i < len; i++) fb[i] = {8'(f), 24'($urandom)};
        for (int s = 0; s < NS; s++)
          if (masks[sel][s]) for (int i = 0; i < len; i++) exp_q[s].push_back(fb[i]);
        if (sel < 3) m_uni[sel]++;
        else if (sel == 3) m_all++;
        else m_sub++;
      end else begin
        hdr(32'h2020_2020); fb[3] = 32'h0000_0008;
        for (int i = 4; i < len; i++) fb[i] = {8'(f), 24'(i)};
        ring_len.push_back(len);
        ring_seed.push_back(f);
        ring_frames++;
      end
      send(len, 4'hF);
    end
    repeat (3000) @(negedge clk);
    for (int s = 0; s < NS; s++)
      check(exp_q[s].size() == 0, $sformatf("slot %0d received all its words (%0d left)", s,
            exp_q[s].size()));
    check(n_bad == 0, $sformatf("slot words in order and unchanged (%0d bad)", n_bad));
    check(n_abort == 0, "no aborts with the time-out disabled");
    check(n_multi_cycle > 0, "a word offered to several slots in one cycle");
    // ring entries
    reg_rd(12'h030, r); check(r == 32'(ring_frames), "ring head counts the ring frames");
    for (int e = 0; e < ring_frames; e++) begin
      logic [31:0] a;
      int len;
      len = ring_len[e];
      a = 32'h2000_0000 + 32'(e) * 2048;
      check(dram[a] == {1'b1, 15'd0, 16'(len * 4)}, "ring entry header");
      check(dram[a + 4] == MAC0 && dram[a + 32'(4 * len)] == {8'(ring_seed[e]), 24'(len - 1)},
            "ring entry first and last word");
    end
    m_ring = ring_frames;
    reg_wr(12'h004, 32'h3F);

    // --- 2. remote PR of a small bitstream in three frames, slots stay untouched
    hdr(K_RPRQ); fb[5] = 32'h5345_4127; fb[6] = 0; fb[7] = 0; fb[8] = 0;
    fb[9] = RP_WORDS * 4; fb[10] = (RP_WORDS + RP_PAY - 1) / RP_PAY;
    send(11, 4'hF);
    for (int f = 0; f * RP_PAY < RP_WORDS; f++) begin
      int nw;
      nw = (RP_WORDS - f * RP_PAY < RP_PAY) ? RP_WORDS - f * RP_PAY : RP_PAY;
      hdr(K_RPDT); fb[5] = f;
      for (int i = 0; i < nw; i++) fb[6 + i] = bsw(f * RP_PAY + i);
      send(6 + nw, 4'hF);
    end
    repeat (300) @(negedge clk);   // the last frame drains after it is fully buffered
    reg_rd(12'h004, r);
    check(r[IRQ_REMOTE_DONE] && r[IRQ_PR_DONE], "remote PR done and PR done interrupts");
    reg_rd(12'h060, r); check(r == 32'b10, "remote PR finished with matching size");
    check(icap_cnt == RP_WORDS && icap_bad == 0,
          $sformatf("remote bitstream: %0d words, %0d bad", icap_cnt, icap_bad));
    if (icap_cnt == RP_WORDS && icap_bad == 0) m_remote++;
    reg_wr(12'h004, 32'h3F);

    // --- 3. all slots transmit at once: whole frames, round-robin grant order
    begin
      int src_seq [$];
      fork
        for (int s0 = 0; s0 < NS; s0++) begin
          automatic int s = s0;
          fork
            for (int f = 0; f < 4; f++)
              for (int i = 0; i < 10 + s; i++) begin
                @(negedge clk);
                slot_tx_valid[s] = 1; slot_tx_data[s] = {8'(s), 8'(f), 16'(i)};
                slot_tx_last[s] = (i == 9 + s); slot_tx_keep[s] = 4'hF;
                while (!slot_tx_ready[s]) @(negedge clk);
                if (i == 9 + s && f == 3) begin
                  @(negedge clk); slot_tx_valid[s] = 0; slot_tx_last[s] = 0;
                end
              end
          join_none
        end
        begin
          int n, src, fr;
          n = 0;
          while (src_seq.size() < 4 * NS) begin
            @(posedge clk);
            if (tx_valid && tx_ready) begin
              if (n == 0) begin src = int'(tx_data[31:24]); fr = int'(tx_data[23:16]); end
              check(tx_data == {8'(src), 8'(fr), 16'(n)}, "tx words of one frame not interleaved");
              check(tx_last == (n == 9 + src), "tx frame end");
              n++;
              if (tx_last) begin src_seq.push_back(src); n = 0; end
            end
          end
        end
      join
      wait fork;
      for (int k = 0; k < src_seq.size(); k++)
        check(src_seq[k] == k % NS, $sformatf("round-robin grant %0d went to slot %0d", k,
              src_seq[k]));
      if (src_seq.size() == 4 * NS) m_rr++;
    end

    $display("mechanisms: unicast=%0d/%0d/%0d multicast_all=%0d multicast_subset=%0d ring=%0d",
             m_uni[0], m_uni[1], m_uni[2], m_all, m_sub, m_ring);
    $display("            remote_pr=%0d round_robin=%0d multi_offer_cycles=%0d",
             m_remote, m_rr, n_multi_cycle);
    check(m_uni[0] > 0 && m_uni[1] > 0 && m_uni[2] > 0 && m_all > 0 && m_sub > 0 && m_ring > 0 &&
          m_remote > 0 && m_rr > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

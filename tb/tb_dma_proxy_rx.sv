// Testbench of dma_proxy_rx: a model of the Ethernet controller's receive DMA writes random
// frames into the proxy window as AXI bursts, then writes back descriptor status and used bits.
//
// Frames of 1..300 bytes are written as bursts of 1..16 beats with random gaps; some frames are
// split over two buffers (a status write without end-of-frame in between). The output stream has
// random back-pressure. Checked: every output word, its last flag and byte enables against a
// reference queue; that the last word is offered one cycle after the end-of-frame status write;
// the frame-end count; descriptor read-back through bursts, with the used bit of word 0 always
// clear and word 1 unchanged; bid/rid echo the request ids; rlast on the last beat.
module tb_dma_proxy_rx;
  import nprc_pkg::*;

  localparam int ND = 8;
  localparam int DB = 32'h8000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0] s_awid = 0, s_arid = 0, s_bid, s_rid;
  logic [15:0] s_awaddr = 0, s_araddr = 0;
  logic [7:0]  s_awlen = 0, s_arlen = 0;
  logic s_awvalid = 0, s_awready, s_wlast = 0, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [3:0]  s_wstrb = 0;
  logic [1:0]  s_bresp, s_rresp;
  logic s_arvalid = 0, s_arready, s_rlast, s_rvalid, s_rready = 0;
  logic m_valid, m_last, m_ready = 0, frame_end;
  logic [31:0] m_data;
  logic [3:0]  m_keep;

  dma_proxy_rx #(.NUM_DESC(ND)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus master model
  bit eof_beat = 0;    // the beat being driven ends a frame
  task automatic wburst(input logic [15:0] a, input logic [31:0] d [$], input logic [3:0] st,
                        input bit eof = 0);
    logic [11:0] id;
    id = 12'($urandom);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = a; s_awlen = 8'(d.size() - 1); s_awid = id;
    #1 while (!s_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0;
    for (int i = 0; i < d.size(); i++) begin
      while ($urandom % 4 == 0) @(negedge clk);
      s_wvalid = 1; s_wdata = d[i]; s_wstrb = st; s_wlast = (i == d.size() - 1);
      eof_beat = eof;
      #1 while (!s_wready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_wvalid = 0; s_wlast = 0; eof_beat = 0;
    end
    repeat ($urandom % 3) @(negedge clk);
    s_bready = 1;
    #1 while (!s_bvalid) begin @(negedge clk); #1; end
    check(s_bid == id && s_bresp == 2'b00, "write response id");
    @(negedge clk);
    s_bready = 0;
  endtask

  task automatic rburst(input logic [15:0] a, input int n, output logic [31:0] d [$]);
    logic [11:0] id;
    id = 12'($urandom);
    d.delete();
    @(negedge clk);
    s_arvalid = 1; s_araddr = a; s_arlen = 8'(n - 1); s_arid = id;
    #1 while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 0;
    while (d.size() < n) begin
      s_rready = 1'($urandom % 3 != 0);
      #1;
      if (s_rvalid && s_rready) begin
        d.push_back(s_rdata);
        check(s_rid == id && s_rlast == (d.size() == n), "read id and rlast");
      end
      @(negedge clk);
    end
    s_rready = 0;
  endtask

  // ---------------- output monitor
  logic [4:0]  exp_q [$];       // {last, keep} of each expected word
  logic [31:0] exp_d [$];
  int n_out = 0, n_bad = 0, n_end = 0, n_lat_bad = 0, n_lat = 0;
  bit eof_pend = 0;
  always @(negedge clk) m_ready <= 1'($urandom % 4 != 0);
  always @(posedge clk) if (rst_n) begin
    if (eof_pend) begin
      n_lat++;
      if (!(m_valid && m_last)) n_lat_bad++;
    end
    eof_pend <= s_wvalid && s_wready && eof_beat;
    if (frame_end) n_end++;
    if (m_valid && m_ready) begin
      logic [4:0] e;
      n_out++;
      if (exp_q.size() == 0) n_bad++;
      else begin
        e = exp_q.pop_front();
        if (m_data != exp_d.pop_front() || m_keep != e[3:0] || m_last != e[4]) n_bad++;
      end
    end
  end

  // ---------------- test
  initial begin
    logic [31:0] d [$];
    logic [31:0] dref [2*ND];
    int nfr;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // descriptor ring set up by software, then read back
    d.delete();
    for (int i = 0; i < 2 * ND; i++) begin
      dref[i] = $urandom;
      d.push_back(dref[i]);
    end
    wburst(16'h0000, d, 4'hF);
    rburst(16'h0000, 2 * ND, d);
    for (int i = 0; i < 2 * ND; i++)
      check(d[i] == (i % 2 == 0 ? dref[i] & ~32'd1 : dref[i]), $sformatf("descriptor word %0d", i));
    rburst(16'(DB), 2, d);
    check(d[0] == 0 && d[1] == 0, "buffer region reads as zero");

    // frames
    nfr = 200;
    for (int f = 0; f < nfr; f++) begin
      int len, nw, pos, split;
      logic [31:0] w [$];
      len = 1 + int'($urandom % 300);
      nw = (len + 3) / 4;
      split = ($urandom % 4 == 0) ? 1 + int'($urandom % nw) : 0;
      w.delete();
      for (int i = 0; i < nw; i++) begin
        w.push_back($urandom);
        exp_d.push_back(w[i]);
        exp_q.push_back({i == nw - 1,
                         (i == nw - 1 && len % 4 != 0) ? 4'((1 << (len % 4)) - 1) : 4'hF});
      end
      pos = 0;
      while (pos < nw) begin
        int bl;
        logic [31:0] b [$];
        bl = 1 + int'($urandom % 16);
        if (pos + bl > nw) bl = nw - pos;
        if (split != 0 && pos < split && pos + bl > split) bl = split - pos;
        b.delete();
        for (int i = 0; i < bl; i++) b.push_back(w[pos + i]);
        wburst(16'(DB + 4 * pos), b, (pos + bl == nw && len % 4 != 0) ? 4'((1 << (len % 4)) - 1)
                                                                       : 4'hF);
        pos += bl;
        if (split != 0 && pos == split && pos < nw) begin
          // first buffer full: status without end-of-frame (start-of-frame bit 14 only)
          b.delete(); b.push_back(32'h0000_4000);
          wburst(16'(8 * (f % ND) + 4), b, 4'hF);
        end
      end
      // status write-back with end-of-frame and length, then the used bit in word 0
      d.delete(); d.push_back(32'h0000_8000 | 32'(len));
      wburst(16'(8 * (f % ND) + 4), d, 4'hF, 1);
      d.delete(); d.push_back(dref[2 * (f % ND)] | 32'd1);
      wburst(16'(8 * (f % ND)), d, 4'hF);
    end
    repeat (50) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("all words delivered (%0d left)", exp_q.size()));
    check(n_bad == 0, $sformatf("output words, last and keep (%0d bad of %0d)", n_bad, n_out));
    check(n_end == nfr, $sformatf("frame ends %0d", n_end));
    check(n_lat == nfr && n_lat_bad == 0,
          $sformatf("last word one cycle after the status write (%0d late of %0d)", n_lat_bad, n_lat));
    // used bits read back clear even though the controller set them
    rburst(16'h0000, 2 * ND, d);
    for (int i = 0; i < 2 * ND; i += 2) check(d[i][0] == 1'b0, "used bit reads clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

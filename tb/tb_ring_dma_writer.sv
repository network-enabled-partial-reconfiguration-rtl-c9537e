// Self-checking testbench of ring_dma_writer with a 4-entry ring of 256-byte entries.
// An AXI write slave model with random ready/response delays stores writes into a memory
// array. Frames of random length are sent; after each frame_done the entry at the old head
// must hold the header (ready flag, byte length) and the words in order, and the head must
// advance modulo the ring size. The processor side (tail) is advanced slowly, so the writer
// must refuse frames while the ring is full. One frame is aborted half-way and must leave no
// entry behind.
module tb_ring_dma_writer;
  import nprc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int SB = 256, SLOTS = 4;
  localparam logic [31:0] BASE = 32'h0010_0000;
  logic [31:0] ring_base = BASE;
  logic [15:0] ring_slots = SLOTS, ring_tail = 0, head;
  logic frame_done, bus_error;
  logic s_valid = 0, s_last = 0, s_ready, s_abort = 0;
  logic [31:0] s_data = 0;
  logic [3:0]  s_keep = 0;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [31:0] m_awaddr, m_wdata;
  logic [3:0]  m_wstrb;
  logic [1:0]  m_bresp;

  ring_dma_writer #(.SLOT_BYTES(SB)) dut (.*);

  int checks = 0, failures = 0, full_stalls = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AXI slave model
  logic [31:0] mem [logic [31:0]];
  bit aw_seen, w_seen;
  logic [31:0] aw_a, w_d;
  int writes = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      m_awready <= 0; m_wready <= 0; m_bvalid <= 0; m_bresp <= 0;
      aw_seen = 0; w_seen = 0;
    end else begin
      if (m_awvalid && m_awready) begin aw_seen = 1; aw_a = m_awaddr; end
      if (m_wvalid && m_wready) begin
        w_seen = 1; w_d = m_wdata;
        check(m_wstrb != 0, "strobe");
      end
      if (m_bvalid && m_bready) m_bvalid <= 0;
      if (aw_seen && w_seen && !m_bvalid && $urandom % 2 == 0) begin
        mem[aw_a] = w_d; writes++;
        aw_seen = 0; w_seen = 0;
        m_bvalid <= 1; m_bresp <= 0;
      end
      m_awready <= !aw_seen && ($urandom % 2 == 0);
      m_wready  <= !w_seen && ($urandom % 2 == 0);
    end
  end

  task automatic send(input int len, input int abort_at, output bit ok);
    bit rdy;
    #1;
    for (int i = 0; i < len; i++) begin
      s_valid = 1; s_data = 32'hA000_0000 + 32'(i); s_last = (i == len - 1);
      s_keep = s_last ? 4'b0001 : 4'hF;
      // sample ready at the falling edge: it is stable until the rising edge
      do begin
        @(negedge clk);
        rdy = s_ready;
        if (!s_ready && i == 0 && dut.ring_full) full_stalls++;
        @(posedge clk);
      end while (!rdy);
      #1; s_valid = 0; s_last = 0;
      if (i == abort_at) begin
        s_abort = 1; @(posedge clk); #1; s_abort = 0;
        ok = 0;
        return;
      end
    end
    ok = 1;
  endtask

  initial begin
    int exp_head = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // processor consumes one entry every 300 cycles
    fork
      forever begin
        repeat (300) @(posedge clk);
        if (ring_tail != head) ring_tail <= (ring_tail + 1) % SLOTS;
      end
    join_none
    for (int f = 0; f < 16; f++) begin
      int len, e;
      bit ok;
      len = (f == 5) ? 8 : 1 + $urandom % 20;
      e = exp_head;
      send(len, (f == 5) ? len / 2 : -1, ok);
      if (f == 5) len = 0;
      if (!ok) begin
        repeat (20) @(posedge clk);
        check(head == 16'(exp_head), "aborted frame not published");
        continue;
      end
      while (!frame_done) @(posedge clk);
      #1;
      exp_head = (exp_head + 1) % SLOTS;
      check(head == 16'(exp_head), "head advances");
      check(mem[BASE + 32'(e * SB)] == {1'b1, 15'd0, 16'((len - 1) * 4 + 1)}, "header");
      for (int i = 0; i < len; i++)
        check(mem[BASE + 32'(e * SB + 4 + 4 * i)] == 32'hA000_0000 + 32'(i), "payload word");
      mem.delete();
    end
    check(full_stalls > 0, "ring-full back-pressure exercised");
    check(!bus_error, "no bus error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

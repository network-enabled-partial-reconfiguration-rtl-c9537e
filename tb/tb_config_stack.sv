// Self-checking testbench of config_stack (four rules).
// Writes every writable register and every rule field over AXI4-Lite with random values,
// checks the configuration outputs and the read-back, checks that read-only registers ignore
// writes and show their status inputs, and exercises the interrupt logic: sticky status bits,
// write-1-to-clear, the enable mask and the irq output, plus the name and drop latches.
module tb_config_stack;
  import nprc_pkg::*;
  localparam int NR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [11:0] s_awaddr = 0, s_araddr = 0;
  logic [31:0] s_wdata = 0;
  logic [3:0]  s_wstrb = 4'hF;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  rule_t [NR-1:0] rules;
  field_cfg_t fields;
  action_e default_action;
  logic [31:0] timeout, ring_base;
  logic [15:0] ring_slots, ring_tail;
  logic [NUM_IRQ-1:0] irq_set = 0;
  logic name_we = 0, drop_we = 0;
  logic [NAME_WORDS-1:0][31:0] name_in = 0;
  logic [31:0] drop_frame_num = 0;
  action_e drop_action = ACT_DROP;
  logic [15:0] ring_head = 16'h1234;
  logic [31:0] remote_size = 32'd799584, remote_count = 32'd781, remote_frames = 32'd17,
               remote_bytes = 32'd17408, icap_words = 32'd199896;
  logic remote_active = 1, remote_size_ok = 0, icap_busy = 1, ring_bus_error = 0;
  logic irq;

  config_stack #(.NUM_RULES(NR)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1; s_wvalid = 1; s_awaddr = a; s_wdata = d; s_bready = 1;
    do @(negedge clk); while (!(s_awvalid && !s_bvalid && dut.wr) && !s_bvalid);
    s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    check(s_bresp == 2'b00, "bresp");
    @(negedge clk); s_bready = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a; s_rready = 0;
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  task automatic wr_rd(input logic [11:0] a, input logic [31:0] d, input logic [31:0] m);
    logic [31:0] r;
    wr(a, d); rd(a, r);
    check((r & m) == (d & m), $sformatf("readback %h: %h vs %h", a, r, d));
  endtask

  initial begin
    logic [31:0] r, v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(default_action == ACT_PS && !irq, "reset values");
    wr_rd(12'h000, 32'd2, 32'h7);   check(default_action == ACT_SLOT, "default action");
    wr_rd(12'h010, 32'd5, 32'h3FF); check(fields.name_off == 10'd5, "name off");
    wr_rd(12'h014, 32'd9, 32'h3FF); check(fields.size_off == 10'd9, "size off");
    wr_rd(12'h018, 32'd10, 32'h3FF); check(fields.count_off == 10'd10, "count off");
    wr_rd(12'h01C, 32'd11, 32'h3FF); check(fields.seq_off == 10'd11, "seq off");
    wr_rd(12'h020, 32'd12, 32'h3FF); check(fields.payload_off == 10'd12, "payload off");
    v = $urandom; wr_rd(12'h024, v, '1); check(timeout == v, "timeout");
    v = $urandom; wr_rd(12'h028, v, '1); check(ring_base == v, "ring base");
    wr_rd(12'h02C, 32'd64, 32'hFFFF); check(ring_slots == 16'd64, "ring slots");
    wr_rd(12'h034, 32'd7, 32'hFFFF);  check(ring_tail == 16'd7, "ring tail");
    // read-only registers
    wr(12'h030, 32'h0); rd(12'h030, r); check(r == 32'h1234, "ring head read only");
    rd(12'h050, r); check(r == 32'd799584, "remote size");
    rd(12'h054, r); check(r == 32'd781, "remote count");
    rd(12'h058, r); check(r == 32'd17, "remote frames");
    rd(12'h05C, r); check(r == 32'd17408, "remote bytes");
    rd(12'h060, r); check(r == 32'd1, "remote status");
    rd(12'h070, r); check(r == 32'd199896, "icap words");
    rd(12'h074, r); check(r == 32'd1, "status");
    // rules
    for (int ru = 0; ru < NR; ru++) begin
      logic [11:0] b;
      logic [7:0] m;
      b = 12'h400 + 12'(ru * 'h80);
      m = 8'($urandom);
      wr_rd(b, {16'd0, m, 4'd0, 3'(ru % 6), 1'b1}, 32'hFF0F);
      check(rules[ru].enable && rules[ru].action == action_e'(3'(ru % 6)) &&
            rules[ru].slot_mask == m, "rule control");
      for (int t = 0; t < NUM_TERMS; t++) begin
        logic [31:0] tv, tm;
        tv = $urandom; tm = $urandom;
        wr_rd(b + 12'(16 * (t + 1)), 32'(ru * 4 + t), 32'h3FF);
        wr_rd(b + 12'(16 * (t + 1) + 4), tv, '1);
        wr_rd(b + 12'(16 * (t + 1) + 8), tm, '1);
        check(rules[ru].terms[t].off == 10'(ru * 4 + t) && rules[ru].terms[t].value == tv &&
              rules[ru].terms[t].mask == tm, "rule term");
      end
    end
    // interrupts
    @(negedge clk); irq_set = 6'b000101; @(negedge clk); irq_set = 0;
    check(!irq, "masked interrupt does not fire");
    rd(12'h004, r); check(r == 32'b000101, "sticky status");
    wr(12'h008, 32'b000100); @(negedge clk); check(irq, "enabled interrupt fires");
    wr(12'h004, 32'b000100); @(negedge clk); check(!irq, "write 1 clears");
    rd(12'h004, r); check(r == 32'b000001, "other bit kept");
    // name and drop latches
    @(negedge clk); name_in = {32'h44434241, 32'h48474645, 32'h4C4B4A49, 32'h504F4E4D}; name_we = 1;
    @(negedge clk); name_we = 0; name_in = 0;
    rd(12'h040, r); check(r == 32'h504F4E4D, "name 0");
    rd(12'h04C, r); check(r == 32'h44434241, "name 3");
    @(negedge clk); drop_we = 1; drop_frame_num = 32'd99; drop_action = ACT_SLOT;
    @(negedge clk); drop_we = 0;
    rd(12'h064, r); check(r == 32'd99, "drop frame number");
    rd(12'h068, r); check(r == 32'(ACT_SLOT), "drop action");
    rd(12'h06C, r); check(r == 32'd1, "drop count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

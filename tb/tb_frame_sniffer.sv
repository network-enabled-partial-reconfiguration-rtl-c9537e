// Self-checking testbench of frame_sniffer.
// Three rules are programmed: rule 0 (two terms: a destination-address word and an EtherType
// half-word) marks PR commands, rule 1 (one masked term) sends to slot 1, rule 2 is disabled.
// Random frames of 1..20 words are fed, with the matching words planted at random; a reference
// evaluation in the testbench predicts the decision and the extracted fields, which are compared
// with meta_o in the cycle of each last word. Oversize frames must be dropped.
module tb_frame_sniffer;
  import nprc_pkg::*;

  localparam int NR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rule_t [NR-1:0]   rules;
  field_cfg_t       fields;
  logic             in_fire, in_last, in_oversize;
  logic [OFF_W-1:0] in_idx;
  logic [31:0]      in_data;
  logic [3:0]       in_keep;
  frame_meta_t      meta;

  frame_sniffer #(.NUM_RULES(NR)) dut (
    .clk, .rst_n, .rules, .fields, .default_action(ACT_PS),
    .in_fire, .in_idx, .in_data, .in_keep, .in_last, .in_oversize, .meta_o(meta));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] fr [20];
  int          n_hit = 0, n_slot = 0, n_def = 0;

  initial begin
    rules = '0;
    rules[0].enable = 1; rules[0].action = ACT_PR_CMD;
    rules[0].terms[0] = '{off: 10'd0, value: 32'h4433_2211, mask: 32'hFFFF_FFFF};
    rules[0].terms[1] = '{off: 10'd3, value: 32'h1234_8888, mask: 32'h0000_FFFF};
    rules[1].enable = 1; rules[1].action = ACT_SLOT; rules[1].slot_mask = 8'b10;
    rules[1].terms[0] = '{off: 10'd4, value: 32'h0000_CAFE, mask: 32'h0000_FFFF};
    rules[2].enable = 0; rules[2].action = ACT_DROP;   // disabled, would match everything
    fields = '{name_off: 10'd5, size_off: 10'd9, count_off: 10'd10, seq_off: 10'd11,
               payload_off: 10'd12};
    in_fire = 0; in_last = 0; in_oversize = 0; in_idx = 0; in_data = 0; in_keep = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      int len;
      bit m0, m1, m3, m4, ovf;
      action_e     exp_act;
      logic [7:0]  exp_mask;
      len = 1 + ($urandom % 20);
      for (int i = 0; i < len; i++) fr[i] = $urandom;
      m0 = $urandom % 2; m3 = $urandom % 2; m4 = $urandom % 2;
      if (m0) fr[0] = 32'h4433_2211;
      if (m3 && len > 3) fr[3] = {fr[3][31:16], 16'h8888};
      if (m4 && len > 4) fr[4] = {fr[4][31:16], 16'hCAFE};
      ovf = ($urandom % 10) == 0;
      // reference decision
      m0 = (fr[0] == 32'h4433_2211);
      m1 = (len > 3) && (fr[3][15:0] == 16'h8888);
      exp_act = ACT_PS; exp_mask = 0;
      if (len > 4 && fr[4][15:0] == 16'hCAFE) begin exp_act = ACT_SLOT; exp_mask = 8'b10; end
      if (m0 && m1) begin exp_act = ACT_PR_CMD; exp_mask = 0; end
      if (ovf) exp_act = ACT_DROP;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        // random idle cycles between words
        while ($urandom % 4 == 0) begin in_fire = 0; @(negedge clk); end
        in_fire = 1; in_idx = OFF_W'(i); in_data = fr[i]; in_last = (i == len - 1);
        in_keep = in_last ? 4'b0111 : 4'b1111; in_oversize = in_last && ovf;
        if (in_last) begin
          #1;
          check(meta.action == exp_act, $sformatf("frame %0d action %0d exp %0d", f, meta.action, exp_act));
          check(meta.slot_mask == exp_mask, "slot mask");
          check(meta.nwords == OFF_W'(len), "nwords");
          check(meta.last_keep == 4'b0111, "keep");
          check(meta.frame_num == 32'(f), "frame number");
          if (len > 8) for (int k = 0; k < 4; k++) check(meta.name[k] == fr[5 + k], "name");
          if (len > 9)  check(meta.size  == fr[9],  "size");
          if (len > 10) check(meta.count == fr[10], "count");
          if (len > 11) check(meta.seq   == fr[11], "seq");
          if (exp_act == ACT_PR_CMD) n_hit++;
          else if (exp_act == ACT_SLOT) n_slot++;
          else n_def++;
        end
      end
      @(negedge clk); in_fire = 0; in_last = 0; in_oversize = 0;
    end
    check(n_hit > 10 && n_slot > 10 && n_def > 10, "all decisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

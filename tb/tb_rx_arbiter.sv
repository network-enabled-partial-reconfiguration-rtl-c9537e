// Self-checking testbench of rx_arbiter with three accelerator slots.
// A model of the frame buffer presents 150 random frames of every action, with random gaps.
// Each word carries its frame number and index, so every sink can check exactly what it
// receives against queues of expected words built when the frames were generated: slot frames
// must reach every slot of their mask (multicast, random per-slot ready), processor frames the
// ring port, and accepted remote-PR data frames their payload (from word payload_off on) the
// ICAP port, followed by data_done with the payload byte count. Out-of-sequence data frames
// must raise seq_err; PR commands pr_cmd; requests req_fire. One frame goes to a slot that never
// becomes ready and must be dropped by the time-out with an abort pulse and the drop event.
module tb_rx_arbiter;
  import nprc_pkg::*;
  localparam int NS = 3, NF = 150, MAXW = 12, TMO = 20, POFF = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic f_valid, f_last, f_ready, f_release;
  logic [31:0] f_data;
  logic [3:0] f_keep;
  logic [OFF_W-1:0] f_idx;
  frame_meta_t f_meta;
  logic pr_cmd, req_fire, seq_ok, seq_err, data_done, drop;
  logic [31:0] data_bytes, drop_frame_num;
  action_e drop_action;
  logic [NS-1:0] slot_valid, slot_ready, slot_abort;
  logic [31:0] slot_data, ps_data, net_data;
  logic [3:0] slot_keep, ps_keep;
  logic slot_last, ps_valid, ps_last, ps_ready, ps_abort, net_valid, net_ready;

  rx_arbiter #(.NUM_SLOTS(NS)) dut (.*, .timeout(32'(TMO)), .payload_off(10'(POFF)));

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

  // generated frames
  frame_meta_t meta_a [NF];
  int          len_a  [NF];
  int          stuck_frame = 40;
  logic [31:0] exp_slot [NS][$];
  logic [31:0] exp_ps [$], exp_net [$];
  int          exp_bytes [$];
  int          n_pr = 0, n_req = 0, n_err = 0, n_drop = 0;

  initial begin
    int gen_seq = 0;
    for (int f = 0; f < NF; f++) begin
      frame_meta_t m;
      int len, k;
      m = '0;
      len = 1 + $urandom % MAXW;
      k = $urandom % 6;
      m.action = action_e'(3'(k));
      m.slot_mask = 8'(1 + $urandom % 7);
      m.frame_num = 32'(f);
      m.nwords = OFF_W'(len);
      m.last_keep = 4'b0011;
      if (f == stuck_frame) begin m.action = ACT_SLOT; m.slot_mask = 8'b100; end
      if (m.action == ACT_REMOTE_DATA) begin
        if ($urandom % 4 == 0) m.seq = 32'(gen_seq + 7);
        else begin m.seq = 32'(gen_seq); gen_seq++; end
      end
      for (int i = 0; i < len; i++) begin
        logic [31:0] w;
        w = {16'(f), 16'(i)};
        if (m.action == ACT_SLOT && f != stuck_frame)
          for (int g = 0; g < NS; g++) if (m.slot_mask[g]) exp_slot[g].push_back(w);
        if (m.action == ACT_PS) exp_ps.push_back(w);
        if (m.action == ACT_REMOTE_DATA && m.seq == 32'(gen_seq - 1) && i >= POFF)
          exp_net.push_back(w);
      end
      if (m.action == ACT_REMOTE_DATA && m.seq == 32'(gen_seq - 1))
        exp_bytes.push_back(len > POFF ? 4 * (len - POFF - 1) + 2 : 0);
      if (m.action == ACT_REMOTE_DATA && m.seq != 32'(gen_seq - 1)) n_err++;
      if (m.action == ACT_PR_CMD) n_pr++;
      if (m.action == ACT_REMOTE_REQ) n_req++;
      meta_a[f] = m; len_a[f] = len;
    end
  end

  // frame buffer model
  int hf = 0, ptr = 0;
  bit gap = 0, in_frame = 0;
  always_comb begin
    // like the real buffer, a frame once offered stays offered until taken or released
    f_valid = (hf < NF) && !(gap && ptr == 0 && !in_frame);
    f_meta  = meta_a[hf < NF ? hf : 0];
    f_idx   = OFF_W'(ptr);
    f_data  = {16'(hf), 16'(ptr)};
    f_last  = (hf < NF) && (ptr == len_a[hf < NF ? hf : 0] - 1);
    f_keep  = f_last ? 4'b0011 : 4'hF;
  end
  int exp_seq = 0;
  assign seq_ok = (f_meta.seq == 32'(exp_seq));

  int got_pr = 0, got_req = 0, got_err = 0, got_drop = 0, got_abort = 0, got_done = 0;
  always @(posedge clk) if (rst_n) begin
    // sinks
    for (int g = 0; g < NS; g++)
      if (slot_valid[g] && slot_ready[g]) begin
        if (exp_slot[g].size() == 0) check(0, "unexpected slot word");
        else check(slot_data == exp_slot[g].pop_front(), $sformatf("slot %0d word", g));
      end
    if (ps_valid && ps_ready) begin
      if (exp_ps.size() == 0) check(0, "unexpected ps word");
      else check(ps_data == exp_ps.pop_front(), "ps word");
    end
    if (net_valid && net_ready) begin
      if (exp_net.size() == 0) check(0, "unexpected net word");
      else check(net_data == exp_net.pop_front(), "net word");
    end
    if (data_done) begin
      check(data_bytes == 32'(exp_bytes.pop_front()), "payload bytes");
      exp_seq++; got_done++;
    end
    if (pr_cmd) begin got_pr++; check(f_meta.action == ACT_PR_CMD, "pr_cmd frame"); end
    if (req_fire) got_req++;
    if (seq_err) got_err++;
    if (drop) begin
      got_drop++;
      check(drop_frame_num == 32'(stuck_frame) && drop_action == ACT_SLOT, "drop info");
    end
    if (|slot_abort) begin got_abort++; check(slot_abort == 3'b100, "abort to stuck slot"); end
    // buffer model
    if (f_release) begin hf <= hf + 1; ptr <= 0; end
    else if (f_valid && f_ready) begin
      if (f_last) begin hf <= hf + 1; ptr <= 0; end
      else ptr <= ptr + 1;
    end
    gap <= ($urandom % 5 == 0);
    in_frame <= !(f_release || (f_valid && f_ready && f_last)) && (in_frame || f_valid);
    slot_ready <= (hf == stuck_frame) ? 3'b011 & 3'($urandom) : 3'($urandom);
    ps_ready <= ($urandom % 3 != 0);
    net_ready <= 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (hf == NF);
    repeat (5) @(posedge clk);
    for (int g = 0; g < NS; g++) check(exp_slot[g].size() == 0, "all slot words delivered");
    check(exp_ps.size() == 0, "all ps words delivered");
    check(exp_net.size() == 0, "all net words delivered");
    check(got_pr == n_pr && n_pr > 0, "pr_cmd count");
    check(got_req == n_req && n_req > 0, "req_fire count");
    check(got_err == n_err && n_err > 0, "seq_err count");
    check(got_done > 0, "data frames accepted");
    check(got_drop == 1 && got_abort == 1, "one time-out drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

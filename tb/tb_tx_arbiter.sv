// Self-checking testbench of tx_arbiter with three inputs.
// Each input sends random frames with random gaps; the output has random ready. The checker
// rebuilds frames from the output (which must never interleave) and matches each against the
// head of the queue of the input it came from; all inputs must be served, and when all three
// inputs keep a frame waiting the grants must rotate 0,1,2.
module tb_tx_arbiter;
  import nprc_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] s_valid, s_last, s_ready;
  logic [N-1:0][31:0] s_data;
  logic [N-1:0][3:0]  s_keep;
  logic m_valid, m_last, m_ready;
  logic [31:0] m_data;
  logic [3:0]  m_keep;

  tx_arbiter #(.NUM_IN(N)) dut (.*);

  int checks = 0, failures = 0;
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

  // word tags: [31:30] input, [29:16] frame number, [15:0] word index
  localparam int NF = 60;
  int served[N];
  bit saturate = 0;

  for (genvar g = 0; g < N; g++) begin : src
    initial begin
      s_valid[g] = 0; s_last[g] = 0; s_data[g] = 0; s_keep[g] = 0;
      wait (rst_n); #1;
      for (int f = 0; f < NF; f++) begin
        int len;
        bit rdy;
        len = 1 + $urandom % 10;
        for (int i = 0; i < len; i++) begin
          while (!saturate && $urandom % 3 == 0) begin @(posedge clk); #1; end
          s_valid[g] = 1; s_last[g] = (i == len - 1);
          s_data[g] = {2'(g), 14'(f), 16'(i)}; s_keep[g] = s_last[g] ? 4'b0011 : 4'hF;
          // sample ready at the falling edge: it is stable until the rising edge
          do begin @(negedge clk); rdy = s_ready[g]; @(posedge clk); end while (!rdy);
          #1;
          s_valid[g] = 0; s_last[g] = 0;
        end
      end
    end
  end

  // output checker
  int cur = -1, next_frame[N], next_word, last_grant = -1, rot_checks = 0;
  always @(posedge clk) if (rst_n) begin
    m_ready <= saturate ? 1'b1 : ($urandom % 4 != 0);
    if (m_valid && m_ready) begin
      int src_i;
      src_i = int'(m_data[31:30]);
      if (cur < 0) begin
        cur = src_i; next_word = 0;
        check(int'(m_data[29:16]) == next_frame[src_i], $sformatf("frame order per input src %0d got %0d exp %0d w %0d", src_i, m_data[29:16], next_frame[src_i], m_data[15:0]));
        if (saturate && last_grant >= 0) begin
          check(src_i == (last_grant + 1) % N, "round robin");
          rot_checks++;
        end
        last_grant = src_i;
      end
      check(src_i == cur, "no interleaving");
      check(int'(m_data[15:0]) == next_word, "word order");
      check(m_keep == (m_last ? 4'b0011 : 4'hF), "keep");
      next_word++;
      if (m_last) begin
        next_frame[cur]++; served[cur]++; cur = -1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first half random, second half with every input always busy
    wait (served[0] + served[1] + served[2] >= NF * N / 2);
    saturate = 1;
    wait (served[0] + served[1] + served[2] == NF * N);
    for (int g = 0; g < N; g++) check(served[g] == NF, "all frames of every input");
    check(rot_checks > 20, "rotation observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

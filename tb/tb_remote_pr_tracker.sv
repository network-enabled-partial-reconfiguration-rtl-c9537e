// Self-checking testbench of remote_pr_tracker.
// Runs several remote-PR requests with random sizes and packet counts, feeds data frames with
// in-order and out-of-order sequence numbers, and checks seq_ok, the counters, net_sel, the
// ICAP word count (size rounded up to words), the single done pulse at the last frame, size_ok,
// and that a new request restarts the count.
module tb_remote_pr_tracker;
  import nprc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_fire = 0, data_done = 0;
  logic [31:0] req_size = 0, req_count = 0, seq_in = 0, data_bytes = 0;
  logic seq_ok, active, net_sel, icap_start, done, size_ok;
  logic [31:0] icap_words, exp_size, exp_count, frames_rcvd, bytes_rcvd;

  remote_pr_tracker dut (.*);

  int checks = 0, failures = 0, dones = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  always @(posedge clk) if (done) dones++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!active && !net_sel && !seq_ok, "idle after reset");
    for (int r = 0; r < 20; r++) begin
      int cnt, size, sent, bytes, d0;
      bit short;
      cnt  = 1 + $urandom % 12;
      size = 4 * (1 + $urandom % 3000);
      short = (r % 5 == 4);                  // last frame one word short
      req_fire = 1; req_size = size; req_count = cnt;
      @(negedge clk); req_fire = 0;
      check(icap_start, "icap_start pulse");
      check(icap_words == (size + 3) / 4, "icap words");
      check(active && net_sel, "active");
      check(exp_size == size && exp_count == cnt, "recorded request");
      check(frames_rcvd == 0 && bytes_rcvd == 0, "counters cleared");
      @(negedge clk);
      check(!icap_start, "icap_start one cycle");
      sent = 0; bytes = 0; d0 = dones;
      // a request abandoned halfway is restarted by the next one
      while (sent < cnt) begin
        int b;
        if ($urandom % 4 == 0) begin       // wrong sequence number
          seq_in = sent + 1 + $urandom % 3;
          #1 check(!seq_ok, "out-of-order refused");
          @(negedge clk);
          continue;
        end
        seq_in = sent;
        #1 check(seq_ok, "in-order accepted");
        b = (sent == cnt - 1) ? size - bytes - (short ? 4 : 0) : (size / cnt) & ~3;
        data_done = 1; data_bytes = b;
        @(negedge clk); data_done = 0;
        sent++; bytes += b;
        check(frames_rcvd == sent && bytes_rcvd == bytes, "counters");
        check(done == (sent == cnt), "done pulse at last frame");
        if (sent == cnt) check(size_ok == !short, "size check");
      end
      @(negedge clk);
      check(!active && !net_sel, "inactive after completion");
      check(dones == d0 + 1, "exactly one done");
      seq_in = 0;
      #1 check(!seq_ok, "no data accepted when inactive");
      data_done = 1; data_bytes = 4; @(negedge clk); data_done = 0;
      check(frames_rcvd == cnt, "stray data ignored");
    end
    // restart: new request in the middle of one
    req_fire = 1; req_size = 400; req_count = 5; @(negedge clk); req_fire = 0;
    seq_in = 0; data_done = 1; data_bytes = 100; @(negedge clk); data_done = 0;
    req_fire = 1; req_size = 8; req_count = 2; @(negedge clk); req_fire = 0;
    check(frames_rcvd == 0 && exp_count == 2 && active, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

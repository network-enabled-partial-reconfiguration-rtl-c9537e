// Self-checking testbench of icap_manager.
// First a cached-bitstream transfer from the DMA source (random valid gaps, ends with last),
// then a network transfer of a given word count, then DMA again. Every word written to the
// ICAP port (csib low, rdwrb low) is compared in order with what was sent, the port must
// follow one cycle after the accepted word, the unselected source must be held off, and done
// must pulse exactly once per transfer, one cycle after the last word.
module tb_icap_manager;
  import nprc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_dma_valid = 0, s_dma_last = 0, s_net_valid = 0, net_sel = 0, net_start = 0;
  logic [31:0] s_dma_data = 0, s_net_data = 0, net_words = 0;
  logic s_dma_ready, s_net_ready, icap_csib, icap_rdwrb, done, busy;
  logic [31:0] icap_i, words_written;

  icap_manager dut (.*);

  int checks = 0, failures = 0, dones = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [31:0] expq[$];
  bit          done_exp = 0;
  int          net_left = 0;
  // port monitor
  always @(posedge clk) if (rst_n) begin
    if (!icap_csib) begin
      check(!icap_rdwrb, "write mode");
      if (expq.size() == 0) check(0, "unexpected ICAP word");
      else check(icap_i == expq.pop_front(), "ICAP word order/value");
    end
    check(done == done_exp, "done timing");
    if (done) dones++;
  end
  // reference: record accepted words, predict done one cycle after the last word
  always @(posedge clk) begin
    done_exp <= 1'b0;
    if (rst_n && !net_sel && s_dma_valid) begin
      check(s_dma_ready && !s_net_ready, "DMA selected");
      expq.push_back(s_dma_data);
      done_exp <= s_dma_last;
    end
    if (rst_n && net_sel && s_net_valid) begin
      check(s_net_ready && !s_dma_ready, "network selected");
      expq.push_back(s_net_data);
      done_exp <= (net_left == 1);
      net_left--;
    end
    if (net_start) net_left = int'(net_words);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dma_xfer(input int n);
    for (int i = 0; i < n; i++) begin
      while ($urandom % 3 == 0) @(negedge clk);
      s_dma_valid = 1; s_dma_data = $urandom; s_dma_last = (i == n - 1);
      @(negedge clk);
      s_dma_valid = 0; s_dma_last = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    dma_xfer(500);
    repeat (3) @(negedge clk);
    check(dones == 1, "one done after DMA transfer");
    check(words_written == 500, "DMA word count");
    // network transfer of 300 words
    net_sel = 1; net_start = 1; net_words = 300;
    @(negedge clk); net_start = 0;
    for (int i = 0; i < 300; i++) begin
      while ($urandom % 3 == 0) @(negedge clk);
      s_net_valid = 1; s_net_data = $urandom;
      @(negedge clk); s_net_valid = 0;
    end
    repeat (3) @(negedge clk);
    check(dones == 2, "one done after network transfer");
    check(words_written == 300, "network word count");
    net_sel = 0;
    // DMA words offered while the network is selected must not be taken
    dma_xfer(64);
    repeat (3) @(negedge clk);
    check(dones == 3, "third transfer done");
    check(words_written == 64, "count restarts per transfer");
    check(expq.size() == 0, "all words reached the ICAP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

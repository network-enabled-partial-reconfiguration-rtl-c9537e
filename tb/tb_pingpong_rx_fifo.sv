// Self-checking testbench of pingpong_rx_fifo (BUF_WORDS reduced to 16).
// A producer writes random frames of 1..20 words with random gaps; frames longer than 16 words
// must come back flagged oversize (the testbench's stand-in for the sniffer then stores a drop
// marker). A consumer with random ready reads frames back and compares every word, its index,
// last flag, keep and the stored metadata with a queue of what was sent; some frames are
// released early. It also checks that a frame is received while another is held (overlap),
// and the full-throughput case: a 16-word frame streams through with one word per cycle.
module tb_pingpong_rx_fifo;
  import nprc_pkg::*;

  localparam int BW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid, s_last, s_ready, wr_fire, wr_oversize;
  logic [31:0] s_data;
  logic [3:0]  s_keep;
  logic [OFF_W-1:0] wr_idx, m_idx;
  frame_meta_t meta_in, m_meta;
  logic m_valid, m_last, m_ready, m_release;
  logic [31:0] m_data;
  logic [3:0]  m_keep;

  pingpong_rx_fifo #(.BUF_WORDS(BW)) dut (.*);

  // sniffer stand-in: word count, keep, frame number, oversize -> drop
  int sent_frames = 0;
  always @(posedge clk) if (wr_fire && s_last) sent_frames <= sent_frames + 1;
  always_comb begin
    meta_in = '0;
    meta_in.nwords    = wr_idx + 1'b1;
    meta_in.last_keep = s_keep;
    meta_in.frame_num = 32'(sent_frames);
    meta_in.action    = wr_oversize ? ACT_DROP : ACT_PS;
  end

  int checks = 0, failures = 0, overlap = 0;
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

  // expected frames
  typedef struct { int len; bit ovf; logic [31:0] w[20]; logic [3:0] keep; } frame_t;
  frame_t q[$];
  localparam int NF = 400;

  initial begin : producer
    s_valid = 0; s_last = 0; s_data = 0; s_keep = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int f = 0; f < NF; f++) begin
      frame_t fr;
      fr.len  = (f == NF - 1) ? BW : 1 + ($urandom % 20);
      fr.ovf  = fr.len > BW;
      fr.keep = 4'(1 << (1 + $urandom % 4)) - 4'd1;
      if (fr.keep == 0) fr.keep = 4'hF;
      for (int i = 0; i < fr.len; i++) fr.w[i] = $urandom;
      q.push_back(fr);
      for (int i = 0; i < fr.len; i++) begin
        s_valid = (f == NF - 1) ? 1 : ($urandom % 3 != 0);
        while (!s_valid) begin @(posedge clk); #1; s_valid = ($urandom % 3 != 0); end
        s_data = fr.w[i]; s_last = (i == fr.len - 1); s_keep = s_last ? fr.keep : 4'hF;
        do @(posedge clk); while (!s_ready);
        #1;
      end
      s_valid = 0; s_last = 0;
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc++;
  int got = 0, released = 0, full_speed_cycles = 0;
  initial begin : consumer
    m_ready = 0; m_release = 0;
    wait (rst_n);
    while (got < NF) begin
      frame_t fr;
      int i, t0;
      bit early;
      @(negedge clk);
      if (!m_valid) continue;
      fr = q.pop_front();
      check(m_meta.frame_num == 32'(got), "frame order");
      check(m_meta.action == (fr.ovf ? ACT_DROP : ACT_PS), "oversize flag");
      early = (got < NF - 1) && ($urandom % 8 == 0);
      i = 0;
      t0 = cyc;
      if (fr.ovf || early) begin
        m_release = 1; @(negedge clk); m_release = 0;
        released++;
      end else begin
        while (i < fr.len) begin
          m_ready = (got == NF - 1) ? 1 : ($urandom % 4 != 0);
          #1;
          if (m_valid && m_ready) begin
            check(m_data == fr.w[i], $sformatf("frame %0d word %0d got %h exp %h idx %0d len %0d", got, i, m_data, fr.w[i], m_idx, fr.len));
            check(m_idx == OFF_W'(i), "index");
            check(m_last == (i == fr.len - 1), "last");
            check(m_keep == (i == fr.len - 1 ? fr.keep : 4'hF), "keep");
            if (s_ready && !m_last) overlap++;
            i++;
          end
          @(negedge clk);
        end
        m_ready = 0;
        if (got == NF - 1) full_speed_cycles = cyc - t0;
      end
      got++;
    end
    check(released > 10, "early releases exercised");
    check(overlap > 10, "receive overlapped with drain");
    check(full_speed_cycles == BW, $sformatf("one word per cycle: %0d cycles", full_speed_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

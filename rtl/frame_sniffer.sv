// Inline frame sniffer: classifies a frame while it is being written into the receive buffer.
//
// The sniffer watches every word accepted by the buffer (in_fire, with the word's index in the
// frame). For each rule of the configuration stack and each of its compare terms it keeps a
// "seen and equal" flag, set when the word at the term's offset equals the term's value under
// its mask. In the cycle of the frame's last word the flags (including the last word itself)
// decide the frame: the lowest-numbered enabled rule whose terms all hold wins and supplies the
// action and slot mask; if none holds, the default action applies. A frame marked oversize by
// the buffer is always dropped. In the same pass the sniffer captures the fields at the
// configured word offsets: the four-word bitstream name, the remote-PR bitstream size and
// packet count, and the sequence number of a remote-PR data frame.
//
// Timing: meta_o is combinational and valid in the cycle in_fire && in_last, so the buffer
// stores it with the last word; there is no extra decode latency after the frame.
// The document specifies that headers are matched inline against a register stack (addresses,
// data patterns, byte offsets, packet types); the rule/term layout is this design's choice.
module frame_sniffer
  import nprc_pkg::*;
#(
  parameter int unsigned NUM_RULES = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  rule_t [NUM_RULES-1:0]       rules,
  input  field_cfg_t                  fields,
  input  action_e                     default_action,
  input  logic                        in_fire,
  input  logic [OFF_W-1:0]            in_idx,
  input  logic [DATA_W-1:0]           in_data,
  input  logic [KEEP_W-1:0]           in_keep,
  input  logic                        in_last,
  input  logic                        in_oversize,
  output frame_meta_t                 meta_o
);

  logic [NUM_RULES-1:0][NUM_TERMS-1:0] seen_q, seen_cur, seen_d;
  logic [NAME_WORDS-1:0][DATA_W-1:0]   name_q, name_d;
  logic [DATA_W-1:0]                   size_q, size_d, count_q, count_d, seq_q, seq_d;
  logic [DATA_W-1:0]                   frame_num_q;

  wire first = (in_idx == '0);

  always_comb begin
    // state of the current frame: flags restart at word 0
    seen_cur = first ? '0 : seen_q;
    seen_d   = seen_cur;
    name_d   = name_q;
    size_d   = size_q;
    count_d  = count_q;
    seq_d    = seq_q;
    if (in_fire) begin
      for (int r = 0; r < NUM_RULES; r++)
        for (int t = 0; t < NUM_TERMS; t++)
          if (rules[r].terms[t].off == in_idx &&
              ((in_data ^ rules[r].terms[t].value) & rules[r].terms[t].mask) == '0)
            seen_d[r][t] = 1'b1;
      for (int n = 0; n < NAME_WORDS; n++)
        if (in_idx == fields.name_off + OFF_W'(n)) name_d[n] = in_data;
      if (in_idx == fields.size_off)  size_d  = in_data;
      if (in_idx == fields.count_off) count_d = in_data;
      if (in_idx == fields.seq_off)   seq_d   = in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q      <= '0;
      name_q      <= '0;
      size_q      <= '0;
      count_q     <= '0;
      seq_q       <= '0;
      frame_num_q <= '0;
    end else if (in_fire) begin
      seen_q  <= seen_d;
      name_q  <= name_d;
      size_q  <= size_d;
      count_q <= count_d;
      seq_q   <= seq_d;
      if (in_last) frame_num_q <= frame_num_q + 1'b1;
    end
  end

  // rule evaluation on the flags including the current word
  logic [NUM_RULES-1:0] rule_hit;
  always_comb begin
    for (int r = 0; r < NUM_RULES; r++) begin
      rule_hit[r] = rules[r].enable;
      for (int t = 0; t < NUM_TERMS; t++)
        if (rules[r].terms[t].mask != '0 && !seen_d[r][t]) rule_hit[r] = 1'b0;
    end
  end

  always_comb begin
    meta_o           = '0;
    meta_o.action    = default_action;
    meta_o.slot_mask = '0;
    for (int r = NUM_RULES - 1; r >= 0; r--)
      if (rule_hit[r]) begin
        meta_o.hit       = 1'b1;
        meta_o.rule_idx  = 4'(r);
        meta_o.action    = rules[r].action;
        meta_o.slot_mask = rules[r].slot_mask;
      end
    if (in_oversize) meta_o.action = ACT_DROP;
    meta_o.nwords    = in_idx + 1'b1;
    meta_o.last_keep = in_keep;
    meta_o.name      = name_d;
    meta_o.size      = size_d;
    meta_o.count     = count_d;
    meta_o.seq       = seq_d;
    meta_o.frame_num = frame_num_q;
  end

endmodule

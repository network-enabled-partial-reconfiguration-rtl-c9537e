// Configuration stack of the Ethernet bridge: the memory-mapped register bank through which the
// processor sets the bridge up at start-up and reads what the bridge has found.
//
// The processor writes match rules (each: enable, action, slot mask and NUM_TERMS compare terms
// of word offset, value and mask), the word offsets of the fields the sniffer extracts, the
// arbiter time-out, the default action for frames no rule matches and the DRAM receive ring
// (base, number of entries, consumed index). It reads back the latched bitstream name of the
// last PR command or remote-PR request, the remote-PR progress, the last time-out drop, the
// ring head and the ICAP word count. Six interrupt causes (nprc_pkg IRQ_*) set sticky status
// bits (irq_set); a status bit is cleared by writing 1 to it, and irq is high while any status
// bit that is enabled is set.
//
// Register map (byte addresses, 32-bit registers):
//   0x000 CTRL         [2:0] default action (reset: ACT_PS)
//   0x004 IRQ_STATUS   write 1 to clear          0x008 IRQ_ENABLE
//   0x010 NAME_OFF  0x014 SIZE_OFF  0x018 COUNT_OFF  0x01C SEQ_OFF  0x020 PAYLOAD_OFF (words)
//   0x024 TIMEOUT      cycles, 0 = never
//   0x028 RING_BASE  0x02C RING_SLOTS  0x030 RING_HEAD (read only)  0x034 RING_TAIL
//   0x040..0x04C BS_NAME[0..3] (read only)
//   0x050 REMOTE_SIZE 0x054 REMOTE_COUNT 0x058 REMOTE_FRAMES 0x05C REMOTE_BYTES
//   0x060 REMOTE_STATUS [0] active [1] size matched            (all read only)
//   0x064 DROP_FRAME_NUM 0x068 DROP_ACTION 0x06C DROP_COUNT 0x070 ICAP_WORDS
//   0x074 STATUS [0] ICAP transfer in progress [1] ring bus error  (all read only)
//   0x400 + 0x80*r     RULE_CTRL: [0] enable [3:1] action [15:8] slot mask
//   0x410 + 0x80*r + 0x10*t  TERM_OFF, +4 TERM_VALUE, +8 TERM_MASK
// Bus: AXI4-Lite slave, one transaction at a time per direction; a write needs AW and W
// together and is answered with B in the next cycle; a read answers with R in the next cycle.
// Byte strobes are ignored (whole-word writes). The existence of a PS-written register stack
// holding addresses, patterns, offsets and packet types, and of the name register, follows the
// document; the register map, bus details and reset values are this design's.
module config_stack
  import nprc_pkg::*;
#(
  parameter int unsigned NUM_RULES = 8,
  parameter int unsigned ADDR_W    = 12
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // AXI4-Lite slave
  input  logic                         s_awvalid,
  input  logic [ADDR_W-1:0]            s_awaddr,
  output logic                         s_awready,
  input  logic                         s_wvalid,
  input  logic [31:0]                  s_wdata,
  input  logic [3:0]                   s_wstrb,
  output logic                         s_wready,
  output logic                         s_bvalid,
  output logic [1:0]                   s_bresp,
  input  logic                         s_bready,
  input  logic                         s_arvalid,
  input  logic [ADDR_W-1:0]            s_araddr,
  output logic                         s_arready,
  output logic                         s_rvalid,
  output logic [31:0]                  s_rdata,
  output logic [1:0]                   s_rresp,
  input  logic                         s_rready,
  // configuration out
  output rule_t [NUM_RULES-1:0]        rules,
  output field_cfg_t                   fields,
  output action_e                      default_action,
  output logic [31:0]                  timeout,
  output logic [31:0]                  ring_base,
  output logic [15:0]                  ring_slots,
  output logic [15:0]                  ring_tail,
  // status in
  input  logic [NUM_IRQ-1:0]           irq_set,
  input  logic                         name_we,
  input  logic [NAME_WORDS-1:0][31:0]  name_in,
  input  logic                         drop_we,
  input  logic [31:0]                  drop_frame_num,
  input  action_e                      drop_action,
  input  logic [15:0]                  ring_head,
  input  logic [31:0]                  remote_size,
  input  logic [31:0]                  remote_count,
  input  logic [31:0]                  remote_frames,
  input  logic [31:0]                  remote_bytes,
  input  logic                         remote_active,
  input  logic                         remote_size_ok,
  input  logic [31:0]                  icap_words,
  input  logic                         icap_busy,
  input  logic                         ring_bus_error,
  output logic                         irq
);

  logic [NUM_IRQ-1:0]          irq_status_q, irq_enable_q;
  logic [NAME_WORDS-1:0][31:0] name_q;
  logic [31:0]                 drop_num_q, drop_count_q;
  action_e                     drop_act_q;

  assign irq = |(irq_status_q & irq_enable_q);

  // ---------------- write channel
  wire wr = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr;
  assign s_wready  = wr;
  assign s_bresp   = 2'b00;

  wire [ADDR_W-1:0] wa     = s_awaddr;
  wire              wa_rule = wa >= ADDR_W'(12'h400);
  wire [ADDR_W-1:0] wa_rel  = wa - ADDR_W'(12'h400);
  wire [ADDR_W-8:0] wa_r    = wa_rel[ADDR_W-1:7];
  wire [2:0]        wa_t    = wa_rel[6:4];
  wire [3:0]        wa_f    = wa_rel[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid       <= 1'b0;
      rules          <= '0;
      fields         <= '0;
      default_action <= ACT_PS;
      timeout        <= '0;
      ring_base      <= '0;
      ring_slots     <= '0;
      ring_tail      <= '0;
      irq_status_q   <= '0;
      irq_enable_q   <= '0;
      name_q         <= '0;
      drop_num_q     <= '0;
      drop_act_q     <= ACT_DROP;
      drop_count_q   <= '0;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      // status from the datapath
      irq_status_q <= irq_status_q | irq_set;
      if (name_we) name_q <= name_in;
      if (drop_we) begin
        drop_num_q   <= drop_frame_num;
        drop_act_q   <= drop_action;
        drop_count_q <= drop_count_q + 1'b1;
      end
      if (wr) begin
        s_bvalid <= 1'b1;
        if (!wa_rule) begin
          case (wa[7:0])
            8'h00: default_action <= action_e'(s_wdata[2:0]);
            8'h04: irq_status_q   <= (irq_status_q & ~s_wdata[NUM_IRQ-1:0]) | irq_set;
            8'h08: irq_enable_q   <= s_wdata[NUM_IRQ-1:0];
            8'h10: fields.name_off    <= s_wdata[OFF_W-1:0];
            8'h14: fields.size_off    <= s_wdata[OFF_W-1:0];
            8'h18: fields.count_off   <= s_wdata[OFF_W-1:0];
            8'h1C: fields.seq_off     <= s_wdata[OFF_W-1:0];
            8'h20: fields.payload_off <= s_wdata[OFF_W-1:0];
            8'h24: timeout    <= s_wdata;
            8'h28: ring_base  <= s_wdata;
            8'h2C: ring_slots <= s_wdata[15:0];
            8'h34: ring_tail  <= s_wdata[15:0];
            default: ;
          endcase
        end else if (32'(wa_r) < NUM_RULES) begin
          if (wa_t == 3'd0) begin
            if (wa_f == 4'h0) begin
              rules[wa_r].enable    <= s_wdata[0];
              rules[wa_r].action    <= action_e'(s_wdata[3:1]);
              rules[wa_r].slot_mask <= s_wdata[8 +: MAX_SLOTS];
            end
          end else if (32'(wa_t) <= NUM_TERMS) begin
            case (wa_f)
              4'h0: rules[wa_r].terms[wa_t - 3'd1].off   <= s_wdata[OFF_W-1:0];
              4'h4: rules[wa_r].terms[wa_t - 3'd1].value <= s_wdata;
              4'h8: rules[wa_r].terms[wa_t - 3'd1].mask  <= s_wdata;
              default: ;
            endcase
          end
        end
      end
    end
  end

  // ---------------- read channel
  logic [31:0] rd_val;
  wire [ADDR_W-1:0] ra     = s_araddr;
  wire              ra_rule = ra >= ADDR_W'(12'h400);
  wire [ADDR_W-1:0] ra_rel  = ra - ADDR_W'(12'h400);
  wire [ADDR_W-8:0] ra_r    = ra_rel[ADDR_W-1:7];
  wire [2:0]        ra_t    = ra_rel[6:4];
  wire [3:0]        ra_f    = ra_rel[3:0];

  always_comb begin
    rd_val = '0;
    if (!ra_rule) begin
      case (ra[7:0])
        8'h00: rd_val = 32'(default_action);
        8'h04: rd_val = 32'(irq_status_q);
        8'h08: rd_val = 32'(irq_enable_q);
        8'h10: rd_val = 32'(fields.name_off);
        8'h14: rd_val = 32'(fields.size_off);
        8'h18: rd_val = 32'(fields.count_off);
        8'h1C: rd_val = 32'(fields.seq_off);
        8'h20: rd_val = 32'(fields.payload_off);
        8'h24: rd_val = timeout;
        8'h28: rd_val = ring_base;
        8'h2C: rd_val = 32'(ring_slots);
        8'h30: rd_val = 32'(ring_head);
        8'h34: rd_val = 32'(ring_tail);
        8'h40: rd_val = name_q[0];
        8'h44: rd_val = name_q[1];
        8'h48: rd_val = name_q[2];
        8'h4C: rd_val = name_q[3];
        8'h50: rd_val = remote_size;
        8'h54: rd_val = remote_count;
        8'h58: rd_val = remote_frames;
        8'h5C: rd_val = remote_bytes;
        8'h60: rd_val = {30'd0, remote_size_ok, remote_active};
        8'h64: rd_val = drop_num_q;
        8'h68: rd_val = 32'(drop_act_q);
        8'h6C: rd_val = drop_count_q;
        8'h70: rd_val = icap_words;
        8'h74: rd_val = {30'd0, ring_bus_error, icap_busy};
        default: rd_val = '0;
      endcase
    end else if (32'(ra_r) < NUM_RULES) begin
      if (ra_t == 3'd0) begin
        if (ra_f == 4'h0)
          rd_val = {16'd0, rules[ra_r].slot_mask, 4'd0,
                    rules[ra_r].action, rules[ra_r].enable};
      end else if (32'(ra_t) <= NUM_TERMS) begin
        case (ra_f)
          4'h0: rd_val = 32'(rules[ra_r].terms[ra_t - 3'd1].off);
          4'h4: rd_val = rules[ra_r].terms[ra_t - 3'd1].value;
          4'h8: rd_val = rules[ra_r].terms[ra_t - 3'd1].mask;
          default: rd_val = '0;
        endcase
      end
    end
  end

  assign s_arready = !s_rvalid;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else if (s_arvalid && s_arready) begin
      s_rvalid <= 1'b1;
      s_rdata  <= rd_val;
    end else if (s_rready) begin
      s_rvalid <= 1'b0;
    end
  end

endmodule

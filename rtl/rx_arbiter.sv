// Receive arbiter: sends each buffered frame to the destination its sniffer decision names.
//
// Frames are taken from the ping-pong buffer strictly in arrival order, one at a time. In the
// idle state the arbiter looks at the metadata of the frame at the head of the buffer:
//   ACT_DROP        the frame is released unread;
//   ACT_PR_CMD      the frame is released and pr_cmd pulses, so the bitstream name it carries
//                   is latched for the processor and an interrupt is raised;
//   ACT_REMOTE_REQ  the frame is released and req_fire pulses with the announced bitstream size
//                   and packet count (to the remote-PR tracker);
//   ACT_REMOTE_DATA if the tracker accepts its sequence number (seq_ok) the words from word
//                   payload_off on are streamed to the ICAP manager and, after the last one,
//                   data_done reports the payload bytes; otherwise the frame is released and
//                   seq_err pulses;
//   ACT_PS          the whole frame is streamed to the ring DMA writer;
//   ACT_SLOT        the whole frame is streamed to every accelerator slot in the rule's mask at
//                   once; a word advances only when all selected slots have taken it (each
//                   slot's valid drops as soon as that slot has taken the word).
// Time-out: while streaming, a counter runs in every cycle in which the current word is offered
// and not (fully) taken, and is cleared when a word advances. When it reaches `timeout` cycles
// (0 disables it) the rest of the frame is discarded, the destination gets a one-cycle abort
// pulse and stops seeing valid, and drop pulses with the frame number and destination so the
// processor can ask for a retransmission. This is the only case in which a valid is withdrawn
// before it was accepted.
// Timing: a frame's first word is offered one cycle after the decision; then one word per cycle
// while the destination is ready. The destinations, FIFO order, multicast, time-out drop and
// interrupt follow the document; the handshakes and the exact rules above are this design's.
module rx_arbiter
  import nprc_pkg::*;
#(
  parameter int unsigned NUM_SLOTS = 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [31:0]                      timeout,
  input  logic [OFF_W-1:0]                 payload_off,
  // buffered frames
  input  logic                             f_valid,
  input  logic [DATA_W-1:0]                f_data,
  input  logic [KEEP_W-1:0]                f_keep,
  input  logic                             f_last,
  input  logic [OFF_W-1:0]                 f_idx,
  input  frame_meta_t                      f_meta,
  output logic                             f_ready,
  output logic                             f_release,
  // events
  output logic                             pr_cmd,
  output logic                             req_fire,
  input  logic                             seq_ok,
  output logic                             seq_err,
  output logic                             data_done,
  output logic [DATA_W-1:0]                data_bytes,
  output logic                             drop,
  output logic [DATA_W-1:0]                drop_frame_num,
  output action_e                          drop_action,
  // accelerator slots
  output logic [NUM_SLOTS-1:0]             slot_valid,
  output logic [DATA_W-1:0]                slot_data,
  output logic [KEEP_W-1:0]                slot_keep,
  output logic                             slot_last,
  input  logic [NUM_SLOTS-1:0]             slot_ready,
  output logic [NUM_SLOTS-1:0]             slot_abort,
  // processor ring
  output logic                             ps_valid,
  output logic [DATA_W-1:0]                ps_data,
  output logic [KEEP_W-1:0]                ps_keep,
  output logic                             ps_last,
  input  logic                             ps_ready,
  output logic                             ps_abort,
  // ICAP manager (network bitstream)
  output logic                             net_valid,
  output logic [DATA_W-1:0]                net_data,
  input  logic                             net_ready
);

  typedef enum logic [1:0] { S_IDLE, S_SLOT, S_PS, S_NET } state_e;

  state_e               state_q;
  logic [NUM_SLOTS-1:0] mask_q, taken_q;
  logic [31:0]          stall_q;
  logic [DATA_W-1:0]    bytes_q;

  logic                 advance, expire;
  logic [NUM_SLOTS-1:0] slot_fire, slot_all;
  wire                  skip_hdr = (f_idx < payload_off);
  wire [NUM_SLOTS-1:0]  rule_mask = f_meta.slot_mask[NUM_SLOTS-1:0];

  assign slot_data = f_data;
  assign slot_keep = f_keep;
  assign slot_last = f_last;
  assign ps_data   = f_data;
  assign ps_keep   = f_keep;
  assign ps_last   = f_last;
  assign net_data  = f_data;

  assign slot_valid = (state_q == S_SLOT && f_valid) ? (mask_q & ~taken_q) : '0;
  assign slot_fire  = slot_valid & slot_ready;
  assign slot_all   = taken_q | slot_fire | ~mask_q;
  assign ps_valid   = (state_q == S_PS) && f_valid;
  assign net_valid  = (state_q == S_NET) && f_valid && !skip_hdr;

  always_comb begin
    case (state_q)
      S_SLOT:  advance = f_valid && (&slot_all);
      S_PS:    advance = ps_valid && ps_ready;
      S_NET:   advance = f_valid && (skip_hdr || net_ready);
      default: advance = 1'b0;
    endcase
  end

  assign expire = (state_q != S_IDLE) && f_valid && !advance &&
                  (timeout != '0) && (stall_q + 1'b1 >= timeout);

  // idle-state decisions that consume a frame without streaming it
  wire idle_frame = (state_q == S_IDLE) && f_valid;
  assign pr_cmd   = idle_frame && f_meta.action == ACT_PR_CMD;
  assign req_fire = idle_frame && f_meta.action == ACT_REMOTE_REQ;
  assign seq_err  = idle_frame && f_meta.action == ACT_REMOTE_DATA && !seq_ok;
  wire   idle_drop = idle_frame && (f_meta.action == ACT_DROP ||
                     (f_meta.action == ACT_SLOT && rule_mask == '0) ||
                     !(f_meta.action inside {ACT_DROP, ACT_PS, ACT_SLOT, ACT_PR_CMD,
                                             ACT_REMOTE_REQ, ACT_REMOTE_DATA}));

  assign f_ready   = advance;
  assign f_release = pr_cmd || req_fire || seq_err || idle_drop || expire;

  assign data_done  = (state_q == S_NET) && advance && f_last;
  assign data_bytes = bytes_q + (skip_hdr ? '0 : DATA_W'(keep_bytes(f_keep)));

  assign drop           = expire;
  assign drop_frame_num = f_meta.frame_num;
  assign drop_action    = f_meta.action;
  assign slot_abort     = (expire && state_q == S_SLOT) ? mask_q : '0;
  assign ps_abort       = expire && state_q == S_PS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      mask_q  <= '0;
      taken_q <= '0;
      stall_q <= '0;
      bytes_q <= '0;
    end else begin
      case (state_q)
        S_IDLE: begin
          stall_q <= '0;
          bytes_q <= '0;
          taken_q <= '0;
          if (f_valid) begin
            if (f_meta.action == ACT_PS) state_q <= S_PS;
            if (f_meta.action == ACT_SLOT && rule_mask != '0) begin
              state_q <= S_SLOT;
              mask_q  <= rule_mask;
            end
            if (f_meta.action == ACT_REMOTE_DATA && seq_ok) state_q <= S_NET;
          end
        end
        default: begin
          if (expire) begin
            state_q <= S_IDLE;
          end else if (advance) begin
            stall_q <= '0;
            taken_q <= '0;
            bytes_q <= data_bytes;
            if (f_last) state_q <= S_IDLE;
          end else if (f_valid) begin
            stall_q <= stall_q + 1'b1;
            taken_q <= taken_q | slot_fire;
          end
        end
      endcase
    end
  end

  // A word offered to the processor ring stays offered until taken, unless the time-out fires.
  a_ps_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ps_valid && !ps_ready && !expire |=> ps_valid && $stable(ps_data));

endmodule

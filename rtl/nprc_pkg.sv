// Shared types and constants of the network partial-reconfiguration (PR) bridge.
//
// Frames enter the programmable logic as a stream of 32-bit words, byte 0 of the frame in
// bits [7:0] of the first word. Every frame is classified by a stack of match rules; the
// winning rule's action decides where the receive arbiter sends the frame: nowhere (drop),
// back to the processor's DRAM ring, to one or more accelerator slots, or to the PR path
// (a PR command naming a cached bitstream, a remote-PR request, or a remote-PR data frame
// that carries a piece of the bitstream). The action set follows the destinations the
// architecture names; the word width, the rule layout and the encodings are this design's.
package nprc_pkg;

  localparam int unsigned DATA_W    = 32;
  localparam int unsigned KEEP_W    = DATA_W / 8;
  localparam int unsigned MAX_SLOTS = 8;   // width of a slot mask
  localparam int unsigned NUM_TERMS = 4;   // compare terms per rule
  localparam int unsigned OFF_W     = 10;  // word offset into a frame
  localparam int unsigned NAME_WORDS = 4;  // bitstream name: 16 characters

  // Where a frame goes.
  typedef enum logic [2:0] {
    ACT_DROP        = 3'd0,
    ACT_PS          = 3'd1,  // ring buffer in processor DRAM
    ACT_SLOT        = 3'd2,  // accelerator slot(s) in the rule's slot mask
    ACT_PR_CMD      = 3'd3,  // PR of a cached bitstream: latch the name, interrupt
    ACT_REMOTE_REQ  = 3'd4,  // start of a remote PR: size and packet count
    ACT_REMOTE_DATA = 3'd5   // one frame of a bitstream sent over the network
  } action_e;

  // One compare term: (word[off] & mask) == (value & mask). A zero mask always matches.
  typedef struct packed {
    logic [OFF_W-1:0]  off;
    logic [DATA_W-1:0] value;
    logic [DATA_W-1:0] mask;
  } term_t;

  typedef struct packed {
    logic                          enable;
    action_e                       action;
    logic [MAX_SLOTS-1:0]          slot_mask;
    term_t [NUM_TERMS-1:0]         terms;
  } rule_t;

  // Word offsets of the fields the sniffer extracts.
  typedef struct packed {
    logic [OFF_W-1:0] name_off;
    logic [OFF_W-1:0] size_off;
    logic [OFF_W-1:0] count_off;
    logic [OFF_W-1:0] seq_off;
    logic [OFF_W-1:0] payload_off;
  } field_cfg_t;

  // Everything known about a buffered frame when its last word has arrived.
  typedef struct packed {
    action_e                       action;
    logic [MAX_SLOTS-1:0]          slot_mask;
    logic                          hit;        // a rule matched (else default action)
    logic [3:0]                    rule_idx;
    logic [OFF_W-1:0]              nwords;     // words stored
    logic [KEEP_W-1:0]             last_keep;  // byte enables of the last word
    logic [NAME_WORDS-1:0][DATA_W-1:0] name;
    logic [DATA_W-1:0]             size;       // remote PR: bitstream bytes
    logic [DATA_W-1:0]             count;      // remote PR: data frames to follow
    logic [DATA_W-1:0]             seq;        // remote PR data: sequence number
    logic [DATA_W-1:0]             frame_num;  // running number of received frames
  } frame_meta_t;

  // Interrupt causes (bit positions in the status and enable registers).
  localparam int unsigned IRQ_PR_CMD      = 0;
  localparam int unsigned IRQ_REMOTE_DONE = 1;
  localparam int unsigned IRQ_PR_DONE     = 2;
  localparam int unsigned IRQ_DROP        = 3;
  localparam int unsigned IRQ_SEQ_ERR     = 4;
  localparam int unsigned IRQ_PS_FRAME    = 5;
  localparam int unsigned NUM_IRQ         = 6;

  // Bytes held by a frame whose last word has byte enables `keep` (contiguous from byte 0).
  function automatic logic [2:0] keep_bytes(input logic [KEEP_W-1:0] keep);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < KEEP_W; i++) n += {2'b0, keep[i]};
    return n;
  endfunction

endpackage

// mon_pkg: types and constants shared by the FlexRay bus monitor.
//
// The monitor stamps every recorded event with a sample-clock timestamp and
// packs it into a self-describing record of 32-bit words:
//
//   word 0  header    [31:24] record identifier (what kind of record)
//                     [23:16] record length in words, header included
//                     [15:0]  source specific information
//   word 1  timestamp value of the time base when the event happened
//   word 2+ payload   0 .. MAX_PAYLOAD words
//
// The identifier and the length at the head of each record, and the
// timestamp in every record, follow the design; the field widths, their
// order and the identifier values are this design's own choice.
package mon_pkg;

  // Sample clock Cs = over-sampling (8) x channel bit rate (10 Mbit/s).
  localparam int unsigned SAMPLE_CLK_HZ = 80_000_000;
  // Time base width: 2^32 / 80 MHz = 53.7 s wrap-around period.
  localparam int unsigned TS_W          = 32;
  localparam int unsigned WORD_W        = 32;
  localparam int unsigned HDR_WORDS     = 2;    // header + timestamp
  localparam int unsigned LEN_W         = 8;
  localparam int unsigned MAX_PAYLOAD   = 253;  // keeps the length in 8 bits

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [TS_W-1:0]   ts_t;

  // Record identifiers.
  typedef enum logic [7:0] {
    ID_DATA_FRAME   = 8'h01,
    ID_CLUSTER_SYNC = 8'h02,
    ID_GLOBAL_SYNC  = 8'h03,
    ID_LINE_EDGE    = 8'h04
  } rec_id_e;

  typedef struct packed {
    logic [7:0]       id;
    logic [LEN_W-1:0] len;
    logic [15:0]      info;
  } rec_hdr_t;

  // ---------------------------------------------------------------------
  // Trigger unit configuration
  // ---------------------------------------------------------------------
  localparam int unsigned N_SIG   = 8;   // monitored single-bit signals
  localparam int unsigned N_COND  = 4;   // condition units
  localparam int unsigned N_TERM  = 2;   // product terms of the combination
  localparam int unsigned N_STAGE = 4;   // sequencer stages
  localparam int unsigned CNT_W   = 16;  // event counter width per stage

  typedef enum logic [2:0] {
    COND_OFF   = 3'd0,  // never true
    COND_RISE  = 3'd1,  // rising edge of sig[sel]
    COND_FALL  = 3'd2,  // falling edge of sig[sel]
    COND_STATE = 3'd3,  // (sig & mask) == (ref & mask)
    COND_EQ    = 3'd4,  // data word valid and (data & mask) == (ref & mask)
    COND_RANGE = 3'd5,  // data word valid and lo <= data <= hi
    COND_TIME  = 3'd6   // timestamp == ref
  } cond_kind_e;

  typedef struct packed {
    cond_kind_e  kind;
    logic [2:0]  sel;   // signal index for edge conditions
    word_t       mask;
    word_t       refv;
    word_t       lo;
    word_t       hi;
  } cond_cfg_t;

  // One product term: AND over the used conditions, each optionally negated.
  typedef struct packed {
    logic [N_COND-1:0] use_c;
    logic [N_COND-1:0] neg_c;
  } term_cfg_t;

  // One sequencer stage: wait until term 'term' was true 'count' times.
  typedef struct packed {
    logic             term;    // index into the product terms (N_TERM = 2)
    logic [CNT_W-1:0] count;   // 0 is taken as 1
  } stage_cfg_t;

  typedef enum logic {
    TRIG_POST = 1'b0,   // record from the trigger on
    TRIG_PRE  = 1'b1    // record from arming on, stop after the trigger
  } trig_pos_e;

  typedef struct packed {
    cond_cfg_t  [N_COND-1:0]  cond;
    term_cfg_t  [N_TERM-1:0]  term;
    logic                     use_seq;     // 0: fast combination, 1: sequence
    logic [1:0]               last_stage;  // index of the final stage
    stage_cfg_t [N_STAGE-1:0] stage;
    trig_pos_e                pos;
    logic [TS_W-1:0]          post_len;    // post-trigger cycles, 0 = until disarm
  } trig_cfg_t;

endpackage

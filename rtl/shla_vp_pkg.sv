// shla_vp_pkg - shared types and constants of the selective high-latency
// arithmetic (SHLA) value predictor.
//
// The predictor keeps, per PC, up to H recently produced results of one
// long-latency arithmetic instruction. Every stored value carries a 2-bit
// confidence counter and a 2-bit vLRU (value recency) field; both widths are
// the ones the predictor is defined with. The operation classes below are the
// x86 instructions the predictor is selective for (DIV, IDIV, DIVSD, VDIVSD,
// MUL, IMUL, SQRTSD); everything else bypasses it. The 3-bit encoding of the
// classes is this design's own choice: a real decoder would produce it.
package shla_vp_pkg;

  // Widths fixed by the predictor's definition.
  localparam int unsigned CONF_W = 2;  // confidence counter per value
  localparam int unsigned VLRU_W = 2;  // value-recency field per value

  localparam logic [CONF_W-1:0] CONF_MAX = '1;
  localparam logic [VLRU_W-1:0] VLRU_MAX = '1;

  // Instruction class delivered by the core's decoder with each lookup.
  typedef enum logic [2:0] {
    OP_OTHER  = 3'd0,
    OP_DIV    = 3'd1,
    OP_IDIV   = 3'd2,
    OP_DIVSD  = 3'd3,
    OP_VDIVSD = 3'd4,
    OP_MUL    = 3'd5,
    OP_IMUL   = 3'd6,
    OP_SQRTSD = 3'd7
  } op_class_e;

  // Outcome of one resolved instruction, as seen by the predictor.
  typedef enum logic [1:0] {
    VP_NONE    = 2'd0,  // the instruction was not predicted
    VP_CORRECT = 2'd1,  // predicted, and the prediction matched
    VP_WRONG   = 2'd2   // predicted, and the prediction did not match
  } vp_outcome_e;

  // Width of the statistics counters a predictor reports.
  localparam int unsigned STAT_W = 32;

  typedef struct packed {
    logic [STAT_W-1:0] reads;    // table lookups
    logic [STAT_W-1:0] writes;   // table updates
    logic [STAT_W-1:0] no_pred;  // resolved without a prediction
    logic [STAT_W-1:0] correct;  // resolved, prediction correct
    logic [STAT_W-1:0] wrong;    // resolved, prediction wrong
  } vp_counters_t;

  // Per-cycle table events, for observation and statistics.
  typedef struct packed {
    logic lk_hit;   // a lookup found its PC (confident or not)
    logic hit;      // an update found its PC in the table
    logic match;    // ... and its result among the stored values
    logic replace;  // ... or replaced the least recent stored value
    logic alloc;    // an update allocated a new entry
    logic evict;    // ... by evicting a valid one (LRU)
  } vp_events_t;

  // True for the high-latency arithmetic instructions the predictor serves.
  function automatic logic is_hla(op_class_e op);
    return op != OP_OTHER;
  endfunction

endpackage

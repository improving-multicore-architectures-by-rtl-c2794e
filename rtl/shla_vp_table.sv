// shla_vp_table - the selective high-latency arithmetic (SHLA) predictor table.
//
// A set-associative "enhanced last value" table. The PC of an instruction is
// split into SET (its least significant bits, which select a set) and PC_TAG
// (the remaining, most significant bits, compared against every way of the
// set). Each entry holds PC_TAG, an LRU age used to pick the entry evicted
// from its set, and H result values V1..VH. Each value has a 2-bit confidence
// counter C and a 2-bit vLRU field. All of this follows the predictor's
// definition; the valid bit per entry and the details of the update rules
// listed below are this design's own choices.
//
// Lookup port (frontend, one cycle): lk_valid_i/lk_pc_i are sampled at a
// clock edge, the set is read synchronously and the answer appears one cycle
// later on lk_rsp_valid_o/lk_hit_o/lk_predict_o/lk_value_o. lk_predict_o is
// the AND of a tag match and "enough confidence" from vp_value_select.
//
// Update port (resolve, one cycle): when an instruction's real result is
// known, up_valid_i/up_pc_i/up_result_i train the table at the next clock
// edge. up_predicted_i/up_pred_value_i say whether a prediction was issued for
// it and which value. The rules:
//   * tag hit, result equals a stored value: that value's C counts up
//     (saturating), its vLRU is set to the maximum and every other vLRU
//     counts down (saturating at 0);
//   * tag hit, result not stored: the value with the smallest vLRU (lowest
//     index on a tie) is replaced by the result with C = 0 and vLRU = max,
//     and the other vLRU fields count down;
//   * a wrong prediction also counts down C of the value that was predicted;
//   * tag miss: an invalid way, else the least recently used way, is
//     (re)allocated with V1 = result, C1 = 0, vLRU1 = max and the other values
//     cleared;
//   * the touched way becomes the most recently used one of its set.
// A lookup in the same cycle as an update of the same set reads the set as it
// was before that update.
//
// Storage: the data of a set (tags and values) is one memory word of
// ASSOC*(TAG_W + H*(VALUE_W+4)) bits with no reset; valid bits and LRU ages are
// flip-flops cleared by rst_ni (ages reset to the way number, a legal order).
module shla_vp_table
  import shla_vp_pkg::*;
#(
  parameter int unsigned ENTRIES     = 512,  // total entries (E)
  parameter int unsigned ASSOC       = 4,    // ways per set (A)
  parameter int unsigned H           = 4,    // result values per entry (H)
  parameter int unsigned PC_W        = 48,   // virtual address width of a PC
  parameter int unsigned VALUE_W     = 64,   // width of one result value
  parameter int unsigned CONF_THRESH = 2,    // minimum confidence to predict
  localparam int unsigned SETS       = ENTRIES / ASSOC,
  localparam int unsigned SET_W      = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W      = PC_W - ((SETS > 1) ? $clog2(SETS) : 0),
  localparam int unsigned LRU_W      = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned WAY_W      = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned IDX_W      = (H > 1) ? $clog2(H) : 1
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // lookup
  input  logic               lk_valid_i,
  input  logic [PC_W-1:0]    lk_pc_i,
  output logic               lk_rsp_valid_o,
  output logic               lk_hit_o,
  output logic               lk_predict_o,
  output logic [VALUE_W-1:0] lk_value_o,
  // update
  input  logic               up_valid_i,
  input  logic [PC_W-1:0]    up_pc_i,
  input  logic [VALUE_W-1:0] up_result_i,
  input  logic               up_predicted_i,
  input  logic [VALUE_W-1:0] up_pred_value_i,
  output logic               up_hit_o,      // tag matched (combinational)
  output logic               up_match_o,    // result was already stored
  output logic               up_replace_o,  // hit, a stored value replaced
  output logic               up_evict_o     // miss, a valid entry evicted
);

  typedef struct packed {
    logic [TAG_W-1:0]              tag;
    logic [H-1:0][VALUE_W-1:0]     val;
    logic [H-1:0][CONF_W-1:0]      conf;
    logic [H-1:0][VLRU_W-1:0]      vlru;
  } entry_t;

  typedef entry_t [ASSOC-1:0]          line_t;
  typedef logic [ASSOC-1:0][LRU_W-1:0] ages_t;

  // ---------------------------------------------------------------- storage
  line_t              mem     [SETS];
  logic [ASSOC-1:0]   valid_q [SETS];
  ages_t              age_q   [SETS];

  function automatic logic [SET_W-1:0] set_of(logic [PC_W-1:0] pc);
    return (SETS > 1) ? SET_W'(pc) : '0;
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(logic [PC_W-1:0] pc);
    return TAG_W'(pc >> ((SETS > 1) ? SET_W : 0));
  endfunction

  // ---------------------------------------------------------------- lookup
  line_t              lk_line_q;
  logic [ASSOC-1:0]   lk_vbits_q;
  logic [TAG_W-1:0]   lk_tag_q;
  logic               lk_v_q;

  always_ff @(posedge clk_i) begin
    if (lk_valid_i) lk_line_q <= mem[set_of(lk_pc_i)];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      lk_v_q     <= 1'b0;
      lk_vbits_q <= '0;
      lk_tag_q   <= '0;
    end else begin
      lk_v_q <= lk_valid_i;
      if (lk_valid_i) begin
        lk_vbits_q <= valid_q[set_of(lk_pc_i)];
        lk_tag_q   <= tag_of(lk_pc_i);
      end
    end
  end

  logic [ASSOC-1:0] lk_hit_vec;
  entry_t           lk_entry;

  always_comb begin
    lk_entry = '0;
    for (int unsigned w = 0; w < ASSOC; w++) begin
      lk_hit_vec[w] = lk_vbits_q[w] && (lk_line_q[w].tag == lk_tag_q);
      if (lk_hit_vec[w]) lk_entry = lk_line_q[w];
    end
  end

  logic [IDX_W-1:0]   lk_sel_idx;
  logic [VALUE_W-1:0] lk_sel_value;
  logic               lk_confident;

  vp_value_select #(
    .H(H), .VALUE_W(VALUE_W), .CONF_THRESH(CONF_THRESH)
  ) u_select (
    .values_i   (lk_entry.val),
    .conf_i     (lk_entry.conf),
    .vlru_i     (lk_entry.vlru),
    .sel_idx_o  (lk_sel_idx),
    .sel_value_o(lk_sel_value),
    .confident_o(lk_confident)
  );

  assign lk_rsp_valid_o = lk_v_q;
  assign lk_hit_o       = lk_v_q && (lk_hit_vec != '0);
  assign lk_predict_o   = lk_hit_o && lk_confident;
  assign lk_value_o     = lk_predict_o ? lk_sel_value : '0;

  // ---------------------------------------------------------------- update
  logic [SET_W-1:0]   up_set;
  logic [TAG_W-1:0]   up_tag;
  line_t              up_line;
  logic [ASSOC-1:0]   up_vbits;
  ages_t              up_ages;
  logic [ASSOC-1:0]   up_hit_vec;
  logic [WAY_W-1:0]   up_way;
  entry_t             new_entry;
  line_t              new_line;
  ages_t              new_ages;

  assign up_set   = set_of(up_pc_i);
  assign up_tag   = tag_of(up_pc_i);
  assign up_line  = mem[up_set];
  assign up_vbits = valid_q[up_set];
  assign up_ages  = age_q[up_set];

  always_comb begin
    logic             hit;
    logic             found_inv;
    logic             matched;
    logic [IDX_W-1:0] m_idx;
    logic [IDX_W-1:0] r_idx;
    logic             wrong;

    // which way: the hit way, else the first invalid way, else the oldest
    hit       = 1'b0;
    found_inv = 1'b0;
    up_way    = '0;
    for (int unsigned w = 0; w < ASSOC; w++)
      up_hit_vec[w] = up_vbits[w] && (up_line[w].tag == up_tag);
    for (int unsigned w = 0; w < ASSOC; w++) begin
      if (up_hit_vec[w] && !hit) begin
        hit    = 1'b1;
        up_way = WAY_W'(w);
      end
    end
    if (!hit) begin
      for (int unsigned w = 0; w < ASSOC; w++) begin
        if (!up_vbits[w] && !found_inv) begin
          found_inv = 1'b1;
          up_way    = WAY_W'(w);
        end
      end
      if (!found_inv) begin
        for (int unsigned w = 0; w < ASSOC; w++)
          if (32'(up_ages[w]) == ASSOC - 1) up_way = WAY_W'(w);
      end
    end

    new_entry = up_line[up_way];
    matched   = 1'b0;
    m_idx     = '0;
    r_idx     = '0;
    wrong     = up_predicted_i && (up_pred_value_i != up_result_i);

    if (hit) begin
      // locate the result among the stored values, and the replacement slot
      for (int unsigned i = 0; i < H; i++) begin
        if (!matched && new_entry.val[i] == up_result_i) begin
          matched = 1'b1;
          m_idx   = IDX_W'(i);
        end
      end
      for (int unsigned i = 1; i < H; i++)
        if (new_entry.vlru[i] < new_entry.vlru[r_idx]) r_idx = IDX_W'(i);

      // a wrong prediction lowers the confidence of the value that was used
      if (wrong) begin
        for (int unsigned i = 0; i < H; i++)
          if (new_entry.val[i] == up_pred_value_i && new_entry.conf[i] != '0)
            new_entry.conf[i] = new_entry.conf[i] - 1'b1;
      end

      if (!matched) begin
        m_idx                 = r_idx;
        new_entry.val[r_idx]  = up_result_i;
        new_entry.conf[r_idx] = '0;
      end else if (new_entry.conf[m_idx] != CONF_MAX) begin
        new_entry.conf[m_idx] = new_entry.conf[m_idx] + 1'b1;
      end

      for (int unsigned i = 0; i < H; i++) begin
        if (IDX_W'(i) == m_idx)            new_entry.vlru[i] = VLRU_MAX;
        else if (new_entry.vlru[i] != '0)  new_entry.vlru[i] = new_entry.vlru[i] - 1'b1;
      end
    end else begin
      new_entry.tag     = up_tag;
      new_entry.val     = '0;
      new_entry.conf    = '0;
      new_entry.vlru    = '0;
      new_entry.val[0]  = up_result_i;
      new_entry.vlru[0] = VLRU_MAX;
    end

    new_line         = up_line;
    new_line[up_way] = new_entry;

    // true LRU by ages: the touched way becomes 0, younger ways age by one
    for (int unsigned w = 0; w < ASSOC; w++) begin
      if (WAY_W'(w) == up_way)                 new_ages[w] = '0;
      else if (up_ages[w] < up_ages[up_way])   new_ages[w] = up_ages[w] + 1'b1;
      else                                     new_ages[w] = up_ages[w];
    end

    up_hit_o     = up_valid_i && hit;
    up_match_o   = up_valid_i && hit && matched;
    up_replace_o = up_valid_i && hit && !matched;
    up_evict_o   = up_valid_i && !hit && !found_inv;
  end

  always_ff @(posedge clk_i) begin
    if (up_valid_i) mem[up_set] <= new_line;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int unsigned w = 0; w < ASSOC; w++) age_q[s][w] <= LRU_W'(w);
      end
    end else if (up_valid_i) begin
      valid_q[up_set][up_way] <= 1'b1;
      age_q[up_set]           <= new_ages;
    end
  end

  // a PC may live in at most one way of its set
  a_unique_tag : assert property (@(posedge clk_i) disable iff (!rst_ni)
    up_valid_i |-> $onehot0(up_hit_vec));
  a_unique_tag_lk : assert property (@(posedge clk_i) disable iff (!rst_ni)
    lk_v_q |-> $onehot0(lk_hit_vec));

endmodule

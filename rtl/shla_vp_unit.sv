// shla_vp_unit - the SHLA value predictor of one core.
//
// Selective value prediction for high-latency arithmetic: only instructions
// the decoder classifies as DIV, IDIV, DIVSD, VDIVSD, MUL, IMUL or SQRTSD
// consult and train the predictor; every other instruction passes by it. Each
// core owns one such unit and shares nothing with other cores.
//
// Frontend side: fe_valid_i/fe_pc_i/fe_op_i present a fetched instruction. If
// it is a targeted instruction the table is read, and one cycle later
// pred_rsp_valid_o says an answer is there; pred_valid_o/pred_value_o carry
// the prediction when the entry hits with enough confidence. The core carries
// pred_valid_o/pred_value_o along with the instruction.
//
// Resolve side: when the instruction's result is computed the core presents
// rs_valid_i/rs_pc_i/rs_op_i/rs_result_i together with the prediction it
// carried (rs_predicted_i/rs_pred_value_i). In that cycle outcome_o gives
// no-prediction/correct/wrong; a wrong prediction pulses flush_o and then
// holds stall_o for PENALTY_LATENCY cycles. At the clock edge the table is
// trained with the result (in all three cases) and the counters advance.
//
// The parameter defaults are the main configuration the predictor was
// evaluated in: 512 entries, 4 ways, 4 values per entry, 17-cycle penalty.
// The port protocol (valid strobes, the prediction travelling with the
// instruction) is this design's own choice.
module shla_vp_unit
  import shla_vp_pkg::*;
#(
  parameter int unsigned ENTRIES         = 512,
  parameter int unsigned ASSOC           = 4,
  parameter int unsigned H               = 4,
  parameter int unsigned PC_W            = 48,
  parameter int unsigned VALUE_W         = 64,
  parameter int unsigned CONF_THRESH     = 2,
  parameter int unsigned PENALTY_LATENCY = 17
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // frontend lookup
  input  logic               fe_valid_i,
  input  logic [PC_W-1:0]    fe_pc_i,
  input  op_class_e          fe_op_i,
  output logic               pred_rsp_valid_o,
  output logic               pred_valid_o,
  output logic [VALUE_W-1:0] pred_value_o,
  // resolve / train
  input  logic               rs_valid_i,
  input  logic [PC_W-1:0]    rs_pc_i,
  input  op_class_e          rs_op_i,
  input  logic [VALUE_W-1:0] rs_result_i,
  input  logic               rs_predicted_i,
  input  logic [VALUE_W-1:0] rs_pred_value_i,
  output vp_outcome_e        outcome_o,
  output logic               flush_o,
  output logic               stall_o,
  // observation
  output vp_events_t         events_o,
  input  logic               stats_clear_i,
  output vp_counters_t       stats_o
);

  logic lk_valid, up_valid;

  assign lk_valid = fe_valid_i && is_hla(fe_op_i);
  assign up_valid = rs_valid_i && is_hla(rs_op_i);

  shla_vp_table #(
    .ENTRIES(ENTRIES), .ASSOC(ASSOC), .H(H), .PC_W(PC_W),
    .VALUE_W(VALUE_W), .CONF_THRESH(CONF_THRESH)
  ) u_table (
    .clk_i, .rst_ni,
    .lk_valid_i     (lk_valid),
    .lk_pc_i        (fe_pc_i),
    .lk_rsp_valid_o (pred_rsp_valid_o),
    .lk_hit_o       (events_o.lk_hit),
    .lk_predict_o   (pred_valid_o),
    .lk_value_o     (pred_value_o),
    .up_valid_i     (up_valid),
    .up_pc_i        (rs_pc_i),
    .up_result_i    (rs_result_i),
    .up_predicted_i (rs_predicted_i),
    .up_pred_value_i(rs_pred_value_i),
    .up_hit_o       (events_o.hit),
    .up_match_o     (events_o.match),
    .up_replace_o   (events_o.replace),
    .up_evict_o     (events_o.evict)
  );

  assign events_o.alloc = up_valid && !events_o.hit;

  vp_verify #(
    .VALUE_W(VALUE_W), .PENALTY_LATENCY(PENALTY_LATENCY)
  ) u_verify (
    .clk_i, .rst_ni,
    .rs_valid_i     (up_valid),
    .rs_predicted_i (rs_predicted_i),
    .rs_pred_value_i(rs_pred_value_i),
    .rs_result_i    (rs_result_i),
    .outcome_o, .flush_o, .stall_o
  );

  vp_stats #(.CNT_W(STAT_W)) u_stats (
    .clk_i, .rst_ni,
    .clear_i  (stats_clear_i),
    .read_i   (lk_valid),
    .write_i  (up_valid),
    .resolve_i(up_valid),
    .outcome_i(outcome_o),
    .reads_o  (stats_o.reads),
    .writes_o (stats_o.writes),
    .no_pred_o(stats_o.no_pred),
    .correct_o(stats_o.correct),
    .wrong_o  (stats_o.wrong)
  );

endmodule

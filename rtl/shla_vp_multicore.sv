// shla_vp_multicore - selective value prediction for a multicore processor.
//
// NUM_CORES cores, each with its own private SHLA value predictor
// (shla_vp_unit); no prediction state is shared between cores. The cores
// themselves are outside this design: each core's frontend lookup, resolve
// and recovery signals are brought out as one element per core of the arrays
// below, with the same meaning and timing as on shla_vp_unit.
//
// Defaults: 4 cores (the evaluated quad-core processor), 512-entry 4-way
// tables keeping 4 values per entry, 48-bit PCs, 64-bit results, a 17-cycle
// misprediction penalty.
module shla_vp_multicore
  import shla_vp_pkg::*;
#(
  parameter int unsigned NUM_CORES       = 4,
  parameter int unsigned ENTRIES         = 512,
  parameter int unsigned ASSOC           = 4,
  parameter int unsigned H               = 4,
  parameter int unsigned PC_W            = 48,
  parameter int unsigned VALUE_W         = 64,
  parameter int unsigned CONF_THRESH     = 2,
  parameter int unsigned PENALTY_LATENCY = 17
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  logic         [NUM_CORES-1:0]              fe_valid_i,
  input  logic         [NUM_CORES-1:0][PC_W-1:0]    fe_pc_i,
  input  op_class_e    [NUM_CORES-1:0]              fe_op_i,
  output logic         [NUM_CORES-1:0]              pred_rsp_valid_o,
  output logic         [NUM_CORES-1:0]              pred_valid_o,
  output logic         [NUM_CORES-1:0][VALUE_W-1:0] pred_value_o,
  input  logic         [NUM_CORES-1:0]              rs_valid_i,
  input  logic         [NUM_CORES-1:0][PC_W-1:0]    rs_pc_i,
  input  op_class_e    [NUM_CORES-1:0]              rs_op_i,
  input  logic         [NUM_CORES-1:0][VALUE_W-1:0] rs_result_i,
  input  logic         [NUM_CORES-1:0]              rs_predicted_i,
  input  logic         [NUM_CORES-1:0][VALUE_W-1:0] rs_pred_value_i,
  output vp_outcome_e  [NUM_CORES-1:0]              outcome_o,
  output logic         [NUM_CORES-1:0]              flush_o,
  output logic         [NUM_CORES-1:0]              stall_o,
  output vp_events_t   [NUM_CORES-1:0]              events_o,
  input  logic                                      stats_clear_i,
  output vp_counters_t [NUM_CORES-1:0]              stats_o
);

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    shla_vp_unit #(
      .ENTRIES(ENTRIES), .ASSOC(ASSOC), .H(H), .PC_W(PC_W), .VALUE_W(VALUE_W),
      .CONF_THRESH(CONF_THRESH), .PENALTY_LATENCY(PENALTY_LATENCY)
    ) u_vp (
      .clk_i, .rst_ni,
      .fe_valid_i      (fe_valid_i[c]),
      .fe_pc_i         (fe_pc_i[c]),
      .fe_op_i         (fe_op_i[c]),
      .pred_rsp_valid_o(pred_rsp_valid_o[c]),
      .pred_valid_o    (pred_valid_o[c]),
      .pred_value_o    (pred_value_o[c]),
      .rs_valid_i      (rs_valid_i[c]),
      .rs_pc_i         (rs_pc_i[c]),
      .rs_op_i         (rs_op_i[c]),
      .rs_result_i     (rs_result_i[c]),
      .rs_predicted_i  (rs_predicted_i[c]),
      .rs_pred_value_i (rs_pred_value_i[c]),
      .outcome_o       (outcome_o[c]),
      .flush_o         (flush_o[c]),
      .stall_o         (stall_o[c]),
      .events_o        (events_o[c]),
      .stats_clear_i   (stats_clear_i),
      .stats_o         (stats_o[c])
    );
  end

endmodule

// vp_verify - checks a value prediction against the computed result.
//
// When a high-latency arithmetic instruction finishes (rs_valid_i), its real
// result is compared with the value that was predicted for it. There are
// three outcomes: no prediction was made, the prediction was correct (the
// dependants that used it may commit), or it was wrong. A wrong prediction
// asserts flush_o for that cycle, telling the core to squash the speculated
// dependants, and then raises stall_o for exactly PENALTY_LATENCY cycles, the
// recovery penalty (17 cycles by default, the branch-misprediction penalty of
// the targeted core). A second wrong prediction during a penalty restarts it.
//
// Timing: outcome_o and flush_o are combinational from the rs_* inputs;
// stall_o is high from the cycle after the wrong outcome for PENALTY_LATENCY
// cycles. The stall-counter form of the penalty is this design's own choice.
module vp_verify
  import shla_vp_pkg::*;
#(
  parameter int unsigned VALUE_W         = 64,
  parameter int unsigned PENALTY_LATENCY = 17,  // cycles lost on a wrong prediction
  localparam int unsigned CNT_W = $clog2(PENALTY_LATENCY + 1)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               rs_valid_i,
  input  logic               rs_predicted_i,
  input  logic [VALUE_W-1:0] rs_pred_value_i,
  input  logic [VALUE_W-1:0] rs_result_i,
  output vp_outcome_e        outcome_o,
  output logic               flush_o,
  output logic               stall_o
);

  logic [CNT_W-1:0] remain_q;

  always_comb begin
    if (!rs_valid_i || !rs_predicted_i)         outcome_o = VP_NONE;
    else if (rs_pred_value_i == rs_result_i)    outcome_o = VP_CORRECT;
    else                                        outcome_o = VP_WRONG;
  end

  assign flush_o = rs_valid_i && (outcome_o == VP_WRONG);
  assign stall_o = (remain_q != '0);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)               remain_q <= '0;
    else if (flush_o)          remain_q <= CNT_W'(PENALTY_LATENCY);
    else if (remain_q != '0)   remain_q <= remain_q - 1'b1;
  end

endmodule

// vp_stats - event counters of one value predictor.
//
// Counts the table reads (lookups) and writes (updates) that a power model
// needs, and the three prediction outcomes: no prediction, correct and wrong.
// Prediction accuracy is correct / (correct + wrong). Every counter saturates
// at its maximum instead of wrapping. Counter width and saturation are this
// design's own choices.
//
// Timing: each counter increments at the clock edge that ends a cycle in
// which its event input is high; the outputs are the registered counts.
module vp_stats
  import shla_vp_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             clear_i,
  input  logic             read_i,        // a table lookup
  input  logic             write_i,       // a table update
  input  logic             resolve_i,     // an instruction resolved
  input  vp_outcome_e      outcome_i,     // its outcome, when resolve_i
  output logic [CNT_W-1:0] reads_o,
  output logic [CNT_W-1:0] writes_o,
  output logic [CNT_W-1:0] no_pred_o,
  output logic [CNT_W-1:0] correct_o,
  output logic [CNT_W-1:0] wrong_o
);

  function automatic logic [CNT_W-1:0] bump(logic [CNT_W-1:0] c, logic en);
    return (en && c != '1) ? c + 1'b1 : c;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      reads_o   <= '0;
      writes_o  <= '0;
      no_pred_o <= '0;
      correct_o <= '0;
      wrong_o   <= '0;
    end else if (clear_i) begin
      reads_o   <= '0;
      writes_o  <= '0;
      no_pred_o <= '0;
      correct_o <= '0;
      wrong_o   <= '0;
    end else begin
      reads_o   <= bump(reads_o,   read_i);
      writes_o  <= bump(writes_o,  write_i);
      no_pred_o <= bump(no_pred_o, resolve_i && outcome_i == VP_NONE);
      correct_o <= bump(correct_o, resolve_i && outcome_i == VP_CORRECT);
      wrong_o   <= bump(wrong_o,   resolve_i && outcome_i == VP_WRONG);
    end
  end

endmodule

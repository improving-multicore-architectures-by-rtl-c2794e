// vp_value_select - value selector of the SHLA value predictor.
//
// An entry of the predictor table holds H candidate results of one
// instruction. This block picks the candidate to predict and decides whether
// its confidence is high enough to issue it. The table ANDs `confident` with
// the tag match to form the final "predict" signal.
//
// How it selects: the candidate whose vLRU field is largest wins, i.e. the
// value that was most recently confirmed by a real result (the table sets a
// confirmed value's vLRU to its maximum and ages the others). On equal vLRU
// the lower index wins. The selected value is issued only if its 2-bit
// confidence counter is at or above CONF_THRESH. Having the selector follow
// recency and then test confidence is this design's reading of the
// "value selector -> enough confidence?" structure; the threshold value is
// this design's own choice (the upper half of the 2-bit counter).
//
// Purely combinational; no clock.
module vp_value_select
  import shla_vp_pkg::*;
#(
  parameter int unsigned H           = 4,   // result values kept per entry
  parameter int unsigned VALUE_W     = 64,  // width of one result value
  parameter int unsigned CONF_THRESH = 2,   // minimum confidence to predict
  localparam int unsigned IDX_W      = (H > 1) ? $clog2(H) : 1
) (
  input  logic [H-1:0][VALUE_W-1:0] values_i,
  input  logic [H-1:0][CONF_W-1:0]  conf_i,
  input  logic [H-1:0][VLRU_W-1:0]  vlru_i,
  output logic [IDX_W-1:0]          sel_idx_o,
  output logic [VALUE_W-1:0]        sel_value_o,
  output logic                      confident_o
);

  always_comb begin
    logic [VLRU_W-1:0] best;
    sel_idx_o = '0;
    best      = vlru_i[0];
    for (int unsigned i = 1; i < H; i++) begin
      if (vlru_i[i] > best) begin
        best      = vlru_i[i];
        sel_idx_o = IDX_W'(i);
      end
    end
    sel_value_o = values_i[sel_idx_o];
    confident_o = (32'(conf_i[sel_idx_o]) >= CONF_THRESH);
  end

endmodule

// tb_vp_verify - self-checking test of prediction verification.
//
// Checks the three outcomes (no prediction, correct, wrong), that a wrong
// prediction pulses flush for one cycle, that stall then stays high for
// exactly 17 cycles (the default penalty), and that a second wrong
// prediction during a penalty restarts it.
module tb_vp_verify;
  import shla_vp_pkg::*;

  localparam int unsigned PENALTY = 17;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        rs_valid = 1'b0, rs_predicted = 1'b0;
  logic [63:0] rs_pred_value = '0, rs_result = '0;
  vp_outcome_e outcome;
  logic        flush, stall;
  int checks = 0, failures = 0;

  vp_verify dut (
    .clk_i(clk), .rst_ni(rst_n), .rs_valid_i(rs_valid), .rs_predicted_i(rs_predicted),
    .rs_pred_value_i(rs_pred_value), .rs_result_i(rs_result),
    .outcome_o(outcome), .flush_o(flush), .stall_o(stall)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // present one resolve for a cycle and check the combinational outcome
  task automatic resolve(logic pred, logic [63:0] pv, logic [63:0] res, vp_outcome_e exp);
    rs_valid = 1'b1; rs_predicted = pred; rs_pred_value = pv; rs_result = res;
    #1;
    expect_eq("outcome", outcome, exp);
    expect_eq("flush", flush, exp == VP_WRONG);
    @(posedge clk); #1;
    rs_valid = 1'b0; rs_predicted = 1'b0;
  endtask

  // count cycles with stall high, starting now
  task automatic measure_stall(output int n);
    n = 0;
    while (stall && n < 100) begin
      n++;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_eq("idle stall", stall, 0);
    expect_eq("idle outcome", outcome, VP_NONE);
    resolve(1'b0, 64'd5, 64'd7, VP_NONE);
    expect_eq("no stall after none", stall, 0);
    resolve(1'b1, 64'd42, 64'd42, VP_CORRECT);
    expect_eq("no stall after correct", stall, 0);
    for (int k = 0; k < 20; k++) begin
      logic [63:0] r;
      r = {$urandom, $urandom};
      resolve(1'b1, r, r, VP_CORRECT);
    end
    resolve(1'b1, 64'd42, 64'd43, VP_WRONG);
    measure_stall(n);
    expect_eq("penalty cycles", n, PENALTY);
    // a second wrong prediction during the penalty restarts it
    resolve(1'b1, 64'h1, 64'h2, VP_WRONG);
    repeat (5) @(posedge clk);
    #1;
    resolve(1'b1, 64'h1, 64'h3, VP_WRONG);
    measure_stall(n);
    expect_eq("restarted penalty cycles", n, PENALTY);
    // a valid-less strobe is ignored
    rs_valid = 1'b0; rs_predicted = 1'b1; rs_pred_value = 1; rs_result = 2;
    #1;
    expect_eq("invalid outcome", outcome, VP_NONE);
    expect_eq("invalid flush", flush, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

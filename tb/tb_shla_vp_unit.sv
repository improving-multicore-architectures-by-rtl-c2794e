// tb_shla_vp_unit - self-checking test of one core's SHLA value predictor,
// at the default size (512 entries, 4 ways, 4 values, 17-cycle penalty).
//
// Plays the core: issues instructions to the frontend port, takes the
// prediction one cycle later, resolves the instruction with its result the
// cycle after and carries the prediction along. Checks that only the
// targeted arithmetic classes reach the table, that a steadily repeating
// result becomes predicted after three trainings, that each outcome
// (none / correct / wrong) matches the carried prediction, that a wrong
// prediction flushes and stalls for exactly 17 cycles, and that the
// statistics agree with the counts kept here.
module tb_shla_vp_unit;
  import shla_vp_pkg::*;

  localparam int PENALTY = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fe_valid = 0, rs_valid = 0, rs_predicted = 0, stats_clear = 0;
  logic [47:0] fe_pc = '0, rs_pc = '0;
  op_class_e fe_op = OP_OTHER, rs_op = OP_OTHER;
  logic [63:0] rs_result = '0, rs_pred_value = '0;
  logic pred_rsp_valid, pred_valid, flush, stall;
  logic [63:0] pred_value;
  vp_outcome_e outcome;
  vp_events_t events;
  vp_counters_t stats;

  shla_vp_unit dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fe_valid_i(fe_valid), .fe_pc_i(fe_pc), .fe_op_i(fe_op),
    .pred_rsp_valid_o(pred_rsp_valid), .pred_valid_o(pred_valid), .pred_value_o(pred_value),
    .rs_valid_i(rs_valid), .rs_pc_i(rs_pc), .rs_op_i(rs_op), .rs_result_i(rs_result),
    .rs_predicted_i(rs_predicted), .rs_pred_value_i(rs_pred_value),
    .outcome_o(outcome), .flush_o(flush), .stall_o(stall),
    .events_o(events), .stats_clear_i(stats_clear), .stats_o(stats)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit last_lk_hit;
  int e_reads = 0, e_writes = 0, e_none = 0, e_corr = 0, e_wrong = 0;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // one instruction through lookup and resolve; returns whether it was predicted
  task automatic run_insn(logic [47:0] pc, op_class_e op, logic [63:0] res,
                          output bit predicted, output logic [63:0] pv);
    bit hla;
    vp_outcome_e exp;
    hla = (op != OP_OTHER);
    fe_valid = 1; fe_pc = pc; fe_op = op;
    @(posedge clk); #1;
    fe_valid = 0;
    expect_eq("rsp_valid", pred_rsp_valid, hla);
    last_lk_hit = events.lk_hit;
    predicted = hla && pred_rsp_valid && pred_valid;
    pv = pred_value;
    if (hla) e_reads++;
    rs_valid = 1; rs_pc = pc; rs_op = op; rs_result = res;
    rs_predicted = predicted; rs_pred_value = pv;
    #1;
    exp = !hla || !predicted ? VP_NONE : (pv == res ? VP_CORRECT : VP_WRONG);
    expect_eq("outcome", outcome, exp);
    expect_eq("flush", flush, exp == VP_WRONG);
    if (hla) begin
      e_writes++;
      if (exp == VP_NONE) e_none++;
      if (exp == VP_CORRECT) e_corr++;
      if (exp == VP_WRONG) e_wrong++;
    end
    @(posedge clk); #1;
    rs_valid = 0;
    if (exp == VP_WRONG) begin
      int n = 0;
      while (stall && n < 100) begin n++; @(posedge clk); #1; end
      expect_eq("penalty cycles", n, PENALTY);
    end else begin
      expect_eq("no stall", stall, 0);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit p;
    logic [63:0] v;
    int n_pred_first;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // a steady DIV result: no prediction for the first three, then correct
    n_pred_first = -1;
    for (int k = 0; k < 8; k++) begin
      run_insn(48'h4000_1234, OP_DIV, 64'd1234567, p, v);
      if (p && n_pred_first < 0) n_pred_first = k;
      if (k >= 3) expect_eq("steady predicted value", v, 64'd1234567);
    end
    expect_eq("first prediction at 4th instance", n_pred_first, 3);

    // the same PC as a non-targeted instruction neither looks up nor trains
    run_insn(48'h4000_9999, OP_OTHER, 64'd5, p, v);
    expect_eq("bypass not predicted", p, 0);
    for (int k = 0; k < 4; k++) run_insn(48'h4000_9999, OP_OTHER, 64'd5, p, v);
    run_insn(48'h4000_9999, OP_MUL, 64'd5, p, v);
    expect_eq("bypass left no entry", last_lk_hit, 0);

    // the result changes: one wrong prediction with its penalty
    run_insn(48'h4000_1234, OP_DIV, 64'd42, p, v);
    expect_eq("changed value was predicted", p, 1);
    expect_eq("wrong count", e_wrong, 1);

    // random mix of classes, PCs and two alternating results
    for (int n = 0; n < 1500; n++) begin
      op_class_e op;
      logic [47:0] pc;
      op = op_class_e'($urandom_range(0, 7));
      pc = 48'h5000_0000 + 48'($urandom_range(0, 40) * 3);
      run_insn(pc, op, ($urandom_range(0, 9) == 0) ? 64'(pc) + 1 : 64'(pc) * 7, p, v);
    end

    expect_eq("stat reads", stats.reads, e_reads);
    expect_eq("stat writes", stats.writes, e_writes);
    expect_eq("stat none", stats.no_pred, e_none);
    expect_eq("stat correct", stats.correct, e_corr);
    expect_eq("stat wrong", stats.wrong, e_wrong);
    checks++;
    if (e_corr == 0 || e_wrong < 2) begin failures++; $display("FAIL coverage"); end
    $display("correct=%0d wrong=%0d none=%0d", e_corr, e_wrong, e_none);
    stats_clear = 1; @(posedge clk); #1 stats_clear = 0;
    expect_eq("stats cleared", stats.correct, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

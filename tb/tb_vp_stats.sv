// tb_vp_stats - self-checking test of the predictor's event counters.
//
// Drives a random stream of reads, writes and resolved outcomes, keeps its
// own counts, and compares them with the counters; then checks clear and
// saturation (with a narrow 4-bit counter).
module tb_vp_stats;
  import shla_vp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic        rd = 1'b0, wr = 1'b0, resolve = 1'b0;
  vp_outcome_e outcome = VP_NONE;
  logic [31:0] reads, writes, no_pred, correct, wrong;
  logic [3:0]  s_reads, s_writes, s_no_pred, s_correct, s_wrong;
  int checks = 0, failures = 0;
  int e_reads = 0, e_writes = 0, e_none = 0, e_corr = 0, e_wrong = 0;

  vp_stats #(.CNT_W(32)) dut (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .read_i(rd), .write_i(wr),
    .resolve_i(resolve), .outcome_i(outcome), .reads_o(reads), .writes_o(writes),
    .no_pred_o(no_pred), .correct_o(correct), .wrong_o(wrong)
  );

  vp_stats #(.CNT_W(4)) dut_small (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .read_i(rd), .write_i(wr),
    .resolve_i(resolve), .outcome_i(outcome), .reads_o(s_reads), .writes_o(s_writes),
    .no_pred_o(s_no_pred), .correct_o(s_correct), .wrong_o(s_wrong)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int sat15(int v);
    return (v > 15) ? 15 : v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_eq("reset reads", int'(reads), 0);
    for (int n = 0; n < 500; n++) begin
      rd = 1'($urandom); wr = 1'($urandom); resolve = 1'($urandom);
      outcome = vp_outcome_e'($urandom_range(0, 2));
      if (rd) e_reads++;
      if (wr) e_writes++;
      if (resolve && outcome == VP_NONE) e_none++;
      if (resolve && outcome == VP_CORRECT) e_corr++;
      if (resolve && outcome == VP_WRONG) e_wrong++;
      @(posedge clk); #1;
      expect_eq("reads", int'(reads), e_reads);
      expect_eq("writes", int'(writes), e_writes);
      expect_eq("no_pred", int'(no_pred), e_none);
      expect_eq("correct", int'(correct), e_corr);
      expect_eq("wrong", int'(wrong), e_wrong);
      expect_eq("sat reads", int'(s_reads), sat15(e_reads));
      expect_eq("sat wrong", int'(s_wrong), sat15(e_wrong));
    end
    rd = 0; wr = 0; resolve = 0;
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    expect_eq("cleared reads", int'(reads), 0);
    expect_eq("cleared correct", int'(correct), 0);
    expect_eq("cleared small", int'(s_correct), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

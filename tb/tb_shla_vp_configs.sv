// tb_shla_vp_configs - the table sizes and core counts the predictor was
// evaluated with, each checked for capacity, LRU eviction and history.
//
// Entry-count sweep: 128, 256, 1024, 2048 entries (4 ways, 4 values).
// Associativity sweep: 1, 2, 8 ways (512 entries, 4 values).
// History sweep: 1, 2, 3 values (512 entries, 4 ways).
// (512/4/4, the default, is covered by the unit and top testbenches.)
// Core-count sweep: a 32-core top keeping one value per entry (the setting
// used to compare with instruction reuse) and a 2-core top; every core trains
// the same PC with its own result and must predict exactly that result,
// showing that no state is shared.
module tb_shla_vp_configs;
  import shla_vp_pkg::*;

  localparam int NR = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NR-1:0] done;
  int chk [NR];
  int fail[NR];
  int checks = 0, failures = 0;

  vp_cfg_runner #(.ENTRIES(128),  .ASSOC(4), .H(4)) r0 (clk, rst_n, done[0], chk[0], fail[0]);
  vp_cfg_runner #(.ENTRIES(256),  .ASSOC(4), .H(4)) r1 (clk, rst_n, done[1], chk[1], fail[1]);
  vp_cfg_runner #(.ENTRIES(1024), .ASSOC(4), .H(4)) r2 (clk, rst_n, done[2], chk[2], fail[2]);
  vp_cfg_runner #(.ENTRIES(2048), .ASSOC(4), .H(4)) r3 (clk, rst_n, done[3], chk[3], fail[3]);
  vp_cfg_runner #(.ENTRIES(512),  .ASSOC(1), .H(4)) r4 (clk, rst_n, done[4], chk[4], fail[4]);
  vp_cfg_runner #(.ENTRIES(512),  .ASSOC(2), .H(4)) r5 (clk, rst_n, done[5], chk[5], fail[5]);
  vp_cfg_runner #(.ENTRIES(512),  .ASSOC(8), .H(4)) r6 (clk, rst_n, done[6], chk[6], fail[6]);
  vp_cfg_runner #(.ENTRIES(512),  .ASSOC(4), .H(1)) r7 (clk, rst_n, done[7], chk[7], fail[7]);
  vp_cfg_runner #(.ENTRIES(512),  .ASSOC(4), .H(2)) r8 (clk, rst_n, done[8], chk[8], fail[8]);
  vp_cfg_runner #(.ENTRIES(512),  .ASSOC(4), .H(3)) r9 (clk, rst_n, done[9], chk[9], fail[9]);

  // ---------------------------------------------------------- core counts
  localparam int NC_BIG = 32, NC_SMALL = 2;
  localparam logic [47:0] PC = 48'h0040_2468;

  logic         [NC_BIG-1:0]        b_fe_valid = '0, b_rs_valid = '0;
  logic         [NC_BIG-1:0][47:0]  b_pc;
  op_class_e    [NC_BIG-1:0]        b_op;
  logic         [NC_BIG-1:0][63:0]  b_res, b_zero;
  logic         [NC_BIG-1:0]        b_rsp, b_pred, b_flush, b_stall;
  logic         [NC_BIG-1:0][63:0]  b_pval;
  vp_outcome_e  [NC_BIG-1:0]        b_out;
  vp_events_t   [NC_BIG-1:0]        b_ev;
  vp_counters_t [NC_BIG-1:0]        b_st;

  shla_vp_multicore #(.NUM_CORES(NC_BIG), .H(1)) u_thirtytwo (
    .clk_i(clk), .rst_ni(rst_n),
    .fe_valid_i(b_fe_valid), .fe_pc_i(b_pc), .fe_op_i(b_op),
    .pred_rsp_valid_o(b_rsp), .pred_valid_o(b_pred), .pred_value_o(b_pval),
    .rs_valid_i(b_rs_valid), .rs_pc_i(b_pc), .rs_op_i(b_op), .rs_result_i(b_res),
    .rs_predicted_i('0), .rs_pred_value_i(b_zero),
    .outcome_o(b_out), .flush_o(b_flush), .stall_o(b_stall), .events_o(b_ev),
    .stats_clear_i(1'b0), .stats_o(b_st)
  );

  logic         [NC_SMALL-1:0]        s_fe_valid = '0, s_rs_valid = '0;
  logic         [NC_SMALL-1:0][47:0]  s_pc;
  op_class_e    [NC_SMALL-1:0]        s_op;
  logic         [NC_SMALL-1:0][63:0]  s_res, s_zero;
  logic         [NC_SMALL-1:0]        s_rsp, s_pred, s_flush, s_stall;
  logic         [NC_SMALL-1:0][63:0]  s_pval;
  vp_outcome_e  [NC_SMALL-1:0]        s_out;
  vp_events_t   [NC_SMALL-1:0]        s_ev;
  vp_counters_t [NC_SMALL-1:0]        s_st;

  shla_vp_multicore #(.NUM_CORES(NC_SMALL)) u_two (
    .clk_i(clk), .rst_ni(rst_n),
    .fe_valid_i(s_fe_valid), .fe_pc_i(s_pc), .fe_op_i(s_op),
    .pred_rsp_valid_o(s_rsp), .pred_valid_o(s_pred), .pred_value_o(s_pval),
    .rs_valid_i(s_rs_valid), .rs_pc_i(s_pc), .rs_op_i(s_op), .rs_result_i(s_res),
    .rs_predicted_i('0), .rs_pred_value_i(s_zero),
    .outcome_o(s_out), .flush_o(s_flush), .stall_o(s_stall), .events_o(s_ev),
    .stats_clear_i(1'b0), .stats_o(s_st)
  );

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC_BIG; c++) begin
      b_pc[c] = PC; b_op[c] = OP_SQRTSD; b_res[c] = 64'h1000 + 64'(c); b_zero[c] = '0;
    end
    for (int c = 0; c < NC_SMALL; c++) begin
      s_pc[c] = PC; s_op[c] = OP_MUL; s_res[c] = 64'h2000 + 64'(c); s_zero[c] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // every core trains the shared PC with its own result three times
    repeat (3) begin
      b_rs_valid = '1; s_rs_valid = '1;
      @(posedge clk); #1;
      b_rs_valid = '0; s_rs_valid = '0;
    end
    b_fe_valid = '1; s_fe_valid = '1;
    @(posedge clk); #1;
    b_fe_valid = '0; s_fe_valid = '0;
    for (int c = 0; c < NC_BIG; c++) begin
      expect_eq("32-core predict", b_pred[c], 1);
      expect_eq("32-core own value", b_pval[c], 64'h1000 + 64'(c));
    end
    for (int c = 0; c < NC_SMALL; c++) begin
      expect_eq("2-core predict", s_pred[c], 1);
      expect_eq("2-core own value", s_pval[c], 64'h2000 + 64'(c));
    end
    wait (&done);
    for (int i = 0; i < NR; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

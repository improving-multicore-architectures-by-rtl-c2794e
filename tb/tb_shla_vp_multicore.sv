// tb_shla_vp_multicore - end-to-end test of the multicore SHLA value
// predictor at its default configuration (4 cores, 512-entry 4-way tables,
// 4 values per entry, 17-cycle penalty).
//
// Each core runs its own instruction stream in lockstep: an instruction is
// looked up, its prediction taken one cycle later and carried to the resolve
// port the cycle after, with the real result. A core that mispredicts stops
// issuing for as long as its stall output is high.
//   core 0: four DIV PCs with constant results (steady correct predictions);
//   core 1: one IMUL PC shared with core 0 but producing other results, which
//           switch between two values (wrong predictions, flushes, stalls);
//           core 0 must never mispredict, showing the tables are private;
//   core 2: eight SQRTSD PCs that all map to one set of a 4-way table
//           (LRU evictions);
//   core 3: DIVSD mixed with non-targeted instructions that bypass the
//           predictor, and a result cycling through five values at one PC
//           (value replacement in a 4-value entry, low-confidence hits).
// Every outcome is checked against the carried prediction, every penalty is
// timed, the per-core statistics are compared with counts kept here, and each
// mechanism must have occurred at least once.
module tb_shla_vp_multicore;
  import shla_vp_pkg::*;

  localparam int NC = 4, PENALTY = 17, SETS = 128;

  logic clk = 1'b0, rst_n = 1'b0, stats_clear = 1'b0;
  logic         [NC-1:0]        fe_valid = '0, rs_valid = '0, rs_predicted = '0;
  logic         [NC-1:0][47:0]  fe_pc = '0, rs_pc = '0;
  op_class_e    [NC-1:0]        fe_op, rs_op;
  logic         [NC-1:0][63:0]  rs_result = '0, rs_pred_value = '0;
  logic         [NC-1:0]        pred_rsp_valid, pred_valid, flush, stall;
  logic         [NC-1:0][63:0]  pred_value;
  vp_outcome_e  [NC-1:0]        outcome;
  vp_events_t   [NC-1:0]        events;
  vp_counters_t [NC-1:0]        stats;

  shla_vp_multicore dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fe_valid_i(fe_valid), .fe_pc_i(fe_pc), .fe_op_i(fe_op),
    .pred_rsp_valid_o(pred_rsp_valid), .pred_valid_o(pred_valid), .pred_value_o(pred_value),
    .rs_valid_i(rs_valid), .rs_pc_i(rs_pc), .rs_op_i(rs_op), .rs_result_i(rs_result),
    .rs_predicted_i(rs_predicted), .rs_pred_value_i(rs_pred_value),
    .outcome_o(outcome), .flush_o(flush), .stall_o(stall), .events_o(events),
    .stats_clear_i(stats_clear), .stats_o(stats)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int e_reads[NC], e_writes[NC], e_none[NC], e_corr[NC], e_wrong[NC];
  int n_bypass = 0, n_evict = 0, n_replace = 0, n_alloc = 0, n_lowconf = 0;
  int n_miss = 0, n_stall = 0, n_flush = 0;
  int stall_len[NC];
  bit pending_wrong[NC];
  int seq[NC];

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  localparam logic [47:0] SHARED_PC = 48'h0040_1000;

  // instruction n of core c: pc, class and result
  function automatic void insn(int c, int n, output logic [47:0] pc, output op_class_e op,
                               output logic [63:0] res);
    case (c)
      0: begin
        pc = SHARED_PC + 48'((n % 4) * 5); op = OP_DIV; res = 64'(pc) * 64'd3 + 64'd11;
      end
      1: begin
        pc = SHARED_PC; op = OP_IMUL;
        res = ((n / 7) % 2 == 0) ? 64'hDEAD_0001 : 64'hBEEF_0002;
      end
      2: begin
        pc = 48'h0080_0000 + 48'((n % 8) * SETS); op = OP_SQRTSD;
        res = 64'h3FF0_0000_0000_0000 + 64'(n % 8);
      end
      default: begin
        if (n % 2 == 1) begin
          pc = 48'h00C0_0000 + 48'(n % 16); op = OP_OTHER; res = 64'(n);
        end else if (n % 4 == 0) begin
          pc = 48'h00C0_1000; op = OP_DIVSD; res = 64'((n / 4) % 5) + 64'd100;
        end else begin
          pc = 48'h00C0_2000; op = OP_VDIVSD; res = 64'd777;
        end
      end
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] pc [NC];
    op_class_e   op [NC];
    logic [63:0] res[NC];
    bit          issue[NC];
    for (int c = 0; c < NC; c++) begin
      e_reads[c] = 0; e_writes[c] = 0; e_none[c] = 0; e_corr[c] = 0; e_wrong[c] = 0;
      stall_len[c] = 0; pending_wrong[c] = 0; seq[c] = 0;
      fe_op[c] = OP_OTHER; rs_op[c] = OP_OTHER;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int it = 0; it < 600; it++) begin
      // lookup cycle: cores that are not stalled issue their next instruction
      for (int c = 0; c < NC; c++) begin
        issue[c] = !stall[c];
        if (issue[c]) begin
          insn(c, seq[c], pc[c], op[c], res[c]);
          seq[c]++;
        end
        fe_valid[c] = issue[c]; fe_pc[c] = pc[c]; fe_op[c] = op[c];
      end
      @(posedge clk); #1;
      fe_valid = '0;
      // resolve cycle
      for (int c = 0; c < NC; c++) begin
        bit hla;
        hla = issue[c] && (op[c] != OP_OTHER);
        if (issue[c]) begin
          expect_eq("rsp_valid", pred_rsp_valid[c], hla);
          if (op[c] == OP_OTHER) n_bypass++;
        end
        if (hla) begin
          e_reads[c]++;
          if (!events[c].lk_hit) n_miss++;
          else if (!pred_valid[c]) n_lowconf++;
        end
        rs_valid[c] = issue[c]; rs_pc[c] = pc[c]; rs_op[c] = op[c]; rs_result[c] = res[c];
        rs_predicted[c] = hla && pred_valid[c]; rs_pred_value[c] = pred_value[c];
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        vp_outcome_e exp;
        bit hla;
        hla = issue[c] && (op[c] != OP_OTHER);
        exp = !hla || !rs_predicted[c] ? VP_NONE
            : (rs_pred_value[c] == res[c] ? VP_CORRECT : VP_WRONG);
        expect_eq("outcome", outcome[c], exp);
        expect_eq("flush", flush[c], exp == VP_WRONG);
        if (hla) begin
          e_writes[c]++;
          if (exp == VP_NONE) e_none[c]++;
          if (exp == VP_CORRECT) e_corr[c]++;
          if (exp == VP_WRONG) begin e_wrong[c]++; n_flush++; pending_wrong[c] = 1; end
          if (events[c].evict) n_evict++;
          if (events[c].replace) n_replace++;
          if (events[c].alloc) n_alloc++;
        end
      end
      @(posedge clk); #1;
      rs_valid = '0;
      // time the penalties: wait until no core is stalled
      while (stall != '0) begin
        for (int c = 0; c < NC; c++) if (stall[c]) stall_len[c]++;
        @(posedge clk); #1;
      end
      for (int c = 0; c < NC; c++) begin
        if (pending_wrong[c]) begin
          expect_eq("penalty cycles", stall_len[c], PENALTY);
          n_stall++;
        end else begin
          expect_eq("no penalty", stall_len[c], 0);
        end
        pending_wrong[c] = 0; stall_len[c] = 0;
      end
    end

    for (int c = 0; c < NC; c++) begin
      expect_eq("stat reads", stats[c].reads, e_reads[c]);
      expect_eq("stat writes", stats[c].writes, e_writes[c]);
      expect_eq("stat none", stats[c].no_pred, e_none[c]);
      expect_eq("stat correct", stats[c].correct, e_corr[c]);
      expect_eq("stat wrong", stats[c].wrong, e_wrong[c]);
      $display("core %0d: lookups=%0d correct=%0d wrong=%0d none=%0d", c, e_reads[c],
               e_corr[c], e_wrong[c], e_none[c]);
    end
    // core 0 shares a PC with core 1 but not a table: it never mispredicts
    expect_eq("core 0 private table", e_wrong[0], 0);
    $display("mechanisms: correct=%0d wrong/flush=%0d stall=%0d bypass=%0d miss=%0d alloc=%0d evict=%0d replace=%0d lowconf=%0d",
             e_corr[0] + e_corr[1] + e_corr[2] + e_corr[3], n_flush, n_stall, n_bypass,
             n_miss, n_alloc, n_evict, n_replace, n_lowconf);
    begin
      int mech[9];
      mech = '{e_corr[0], n_flush, n_stall, n_bypass, n_miss, n_alloc, n_evict, n_replace,
               n_lowconf};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

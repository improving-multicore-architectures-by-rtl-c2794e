// vp_cfg_runner - drives one shla_vp_unit of a given size through a fixed
// capacity, eviction and history test and reports its check counts.
//
//   capacity: ENTRIES consecutive PCs (ASSOC per set) are trained three times
//             with a constant result each; every one must then be predicted
//             with its own value, so the table really holds ENTRIES entries;
//   eviction: one more PC per set must evict that set's least recently
//             trained PC (now a lookup miss) and keep the next one;
//   history:  one PC cycling through H results keeps all of them (no value
//             replacement once warm); cycling through H+1 results keeps
//             replacing.
// done_o rises when the sequence is over; checks_o/failures_o are the totals.
module vp_cfg_runner
  import shla_vp_pkg::*;
#(
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned ASSOC   = 4,
  parameter int unsigned H       = 4
) (
  input  logic clk_i,
  input  logic rst_ni,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int unsigned SETS = ENTRIES / ASSOC;

  logic        fe_valid = 0, rs_valid = 0;
  logic [47:0] fe_pc = '0, rs_pc = '0;
  logic [63:0] rs_result = '0;
  logic        pred_rsp_valid, pred_valid, flush, stall;
  logic [63:0] pred_value;
  vp_outcome_e outcome;
  vp_events_t  events;
  vp_counters_t stats;

  shla_vp_unit #(.ENTRIES(ENTRIES), .ASSOC(ASSOC), .H(H)) dut (
    .clk_i, .rst_ni,
    .fe_valid_i(fe_valid), .fe_pc_i(fe_pc), .fe_op_i(OP_DIV),
    .pred_rsp_valid_o(pred_rsp_valid), .pred_valid_o(pred_valid), .pred_value_o(pred_value),
    .rs_valid_i(rs_valid), .rs_pc_i(rs_pc), .rs_op_i(OP_DIV), .rs_result_i(rs_result),
    .rs_predicted_i(1'b0), .rs_pred_value_i(64'd0),
    .outcome_o(outcome), .flush_o(flush), .stall_o(stall),
    .events_o(events), .stats_clear_i(1'b0), .stats_o(stats)
  );

  function automatic logic [63:0] val_of(int p);
    return 64'(p) * 64'd2654435761 + 64'd1;
  endfunction

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks_o++;
    if (got !== exp) begin
      failures_o++;
      if (failures_o < 10)
        $display("FAIL E=%0d A=%0d H=%0d %s: got %0h expected %0h", ENTRIES, ASSOC, H,
                 what, got, exp);
    end
  endtask

  // train: one resolve cycle; returns the table events of that cycle
  task automatic train(int pc, logic [63:0] res, output vp_events_t ev);
    rs_valid = 1; rs_pc = 48'(pc); rs_result = res;
    #1 ev = events;
    @(posedge clk_i); #1;
    rs_valid = 0;
  endtask

  task automatic lookup(int pc, output bit hit, output bit pred, output logic [63:0] v);
    fe_valid = 1; fe_pc = 48'(pc);
    @(posedge clk_i); #1;
    fe_valid = 0;
    hit = events.lk_hit; pred = pred_valid; v = pred_value;
  endtask

  initial begin
    vp_events_t ev;
    bit hit, pred;
    logic [63:0] v;
    int repl;
    done_o = 0; checks_o = 0; failures_o = 0;
    @(posedge rst_ni);
    @(posedge clk_i); #1;
    // capacity
    for (int pass = 0; pass < 3; pass++)
      for (int p = 0; p < int'(ENTRIES); p++) train(p, val_of(p), ev);
    for (int p = 0; p < int'(ENTRIES); p++) begin
      lookup(p, hit, pred, v);
      expect_eq("capacity predict", pred, 1);
      expect_eq("capacity value", v, val_of(p));
    end
    // eviction: the last pass trained PC s first in set s
    for (int s = 0; s < int'(SETS); s++) begin
      train(int'(ENTRIES) + s, 64'd5, ev);
      expect_eq("evict event", ev.evict, 1);
    end
    for (int s = 0; s < int'(SETS); s += 7) begin
      lookup(s, hit, pred, v);
      expect_eq("LRU victim gone", hit, 0);
      if (ASSOC > 1) begin
        lookup(s + int'(SETS), hit, pred, v);
        expect_eq("next way kept", hit, 1);
      end
    end
    // history: H values fit, H+1 do not
    for (int k = 0; k < 4 * int'(H); k++) train(3 * int'(ENTRIES), 64'd1000 + 64'(k % H), ev);
    repl = 0;
    for (int k = 0; k < 4 * int'(H); k++) begin
      train(3 * int'(ENTRIES), 64'd1000 + 64'(k % H), ev);
      if (ev.replace) repl++;
    end
    expect_eq("H values retained", repl, 0);
    repl = 0;
    for (int k = 0; k < 4 * int'(H + 1); k++) begin
      train(3 * int'(ENTRIES) + 1, 64'd2000 + 64'(k % (H + 1)), ev);
      if (ev.replace) repl++;
    end
    expect_eq("H+1 values keep replacing", repl, 4 * (H + 1) - 1);
    done_o = 1;
  end
endmodule

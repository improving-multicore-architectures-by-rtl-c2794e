// tb_shla_vp_table - self-checking test of the SHLA predictor table.
//
// A small table (16 entries, 4 ways, 4 values per entry, 12-bit PCs) is
// driven with random lookups and updates over a pool of PCs larger than the
// table, each PC producing results from a few recurring values. A reference
// model written here keeps its own copy of tags, LRU ages, values,
// confidence counters and vLRU fields and predicts every lookup answer and
// every update event. A directed part first checks the basic training
// sequence: a value seen three times is predicted on the fourth lookup, one
// cycle after the lookup is issued.
module tb_shla_vp_table;
  import shla_vp_pkg::*;

  localparam int ENTRIES = 16, ASSOC = 4, H = 4, PC_W = 12, VALUE_W = 64, THR = 2;
  localparam int SETS = ENTRIES / ASSOC, SET_W = 2;
  localparam int NPC = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lk_valid = 0, up_valid = 0, up_predicted = 0;
  logic [PC_W-1:0] lk_pc = '0, up_pc = '0;
  logic [VALUE_W-1:0] up_result = '0, up_pred_value = '0;
  logic lk_rsp_valid, lk_hit, lk_predict, up_hit, up_match, up_replace, up_evict;
  logic [VALUE_W-1:0] lk_value;

  shla_vp_table #(.ENTRIES(ENTRIES), .ASSOC(ASSOC), .H(H), .PC_W(PC_W),
                  .VALUE_W(VALUE_W), .CONF_THRESH(THR)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .lk_valid_i(lk_valid), .lk_pc_i(lk_pc), .lk_rsp_valid_o(lk_rsp_valid),
    .lk_hit_o(lk_hit), .lk_predict_o(lk_predict), .lk_value_o(lk_value),
    .up_valid_i(up_valid), .up_pc_i(up_pc), .up_result_i(up_result),
    .up_predicted_i(up_predicted), .up_pred_value_i(up_pred_value),
    .up_hit_o(up_hit), .up_match_o(up_match), .up_replace_o(up_replace),
    .up_evict_o(up_evict)
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------- reference model
  bit          m_valid [SETS][ASSOC];
  int          m_tag   [SETS][ASSOC];
  int          m_age   [SETS][ASSOC];
  logic [63:0] m_val   [SETS][ASSOC][H];
  int          m_conf  [SETS][ASSOC][H];
  int          m_vlru  [SETS][ASSOC][H];

  int checks = 0, failures = 0;
  int n_pred = 0, n_evict = 0, n_replace = 0, n_match = 0, n_lowconf = 0;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic void model_reset();
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < ASSOC; w++) begin
        m_valid[s][w] = 0; m_age[s][w] = w; m_tag[s][w] = 0;
      end
  endfunction

  function automatic int find_way(int pc);
    int s = pc % SETS, t = pc / SETS;
    for (int w = 0; w < ASSOC; w++) if (m_valid[s][w] && m_tag[s][w] == t) return w;
    return -1;
  endfunction

  // expected lookup: hit, predict, value
  function automatic void model_lookup(int pc, output bit hit, output bit pred,
                                       output logic [63:0] val);
    int s = pc % SETS, w = find_way(pc), best = 0;
    hit = (w >= 0); pred = 0; val = '0;
    if (!hit) return;
    for (int i = 1; i < H; i++) if (m_vlru[s][w][i] > m_vlru[s][w][best]) best = i;
    pred = (m_conf[s][w][best] >= THR);
    if (pred) val = m_val[s][w][best];
  endfunction

  // apply an update; return expected events
  function automatic void model_update(int pc, logic [63:0] res, bit predicted,
                                       logic [63:0] pv, output bit hit,
                                       output bit match, output bit evict);
    int s = pc % SETS, t = pc / SETS, w, m, r;
    w = find_way(pc);
    hit = (w >= 0); match = 0; evict = 0;
    if (hit) begin
      m = -1;
      for (int i = 0; i < H; i++) if (m < 0 && m_val[s][w][i] == res) m = i;
      if (predicted && pv != res)
        for (int i = 0; i < H; i++)
          if (m_val[s][w][i] == pv && m_conf[s][w][i] > 0) m_conf[s][w][i]--;
      match = (m >= 0);
      if (!match) begin
        r = 0;
        for (int i = 1; i < H; i++) if (m_vlru[s][w][i] < m_vlru[s][w][r]) r = i;
        m = r;
        m_val[s][w][m] = res; m_conf[s][w][m] = 0;
      end else if (m_conf[s][w][m] < 3) m_conf[s][w][m]++;
      for (int i = 0; i < H; i++)
        if (i == m) m_vlru[s][w][i] = 3;
        else if (m_vlru[s][w][i] > 0) m_vlru[s][w][i]--;
    end else begin
      w = -1;
      for (int k = 0; k < ASSOC; k++) if (w < 0 && !m_valid[s][k]) w = k;
      if (w < 0) begin
        evict = 1;
        for (int k = 0; k < ASSOC; k++) if (m_age[s][k] == ASSOC - 1) w = k;
      end
      m_valid[s][w] = 1; m_tag[s][w] = t;
      for (int i = 0; i < H; i++) begin
        m_val[s][w][i] = '0; m_conf[s][w][i] = 0; m_vlru[s][w][i] = 0;
      end
      m_val[s][w][0] = res; m_vlru[s][w][0] = 3;
    end
    begin
      int a = m_age[s][w];
      for (int k = 0; k < ASSOC; k++) if (m_age[s][k] < a) m_age[s][k]++;
      m_age[s][w] = 0;
    end
  endfunction

  // ------------------------------------------------------- stimulus
  int          pcs  [NPC];
  logic [63:0] vals [NPC][3];

  // one cycle: optional lookup and optional update, then check
  task automatic cycle(bit do_lk, int lpc, bit do_up, int upc, logic [63:0] res,
                       bit predicted, logic [63:0] pv);
    bit e_hit, e_pred, u_hit, u_match, u_evict;
    logic [63:0] e_val;
    lk_valid = do_lk; lk_pc = PC_W'(lpc);
    up_valid = do_up; up_pc = PC_W'(upc); up_result = res;
    up_predicted = predicted; up_pred_value = pv;
    #1;
    if (do_lk) model_lookup(lpc, e_hit, e_pred, e_val);
    if (do_up) begin
      model_update(upc, res, predicted, pv, u_hit, u_match, u_evict);
      expect_eq("up_hit", up_hit, u_hit);
      expect_eq("up_match", up_match, u_match);
      expect_eq("up_replace", up_replace, u_hit && !u_match);
      expect_eq("up_evict", up_evict, u_evict);
      if (u_evict) n_evict++;
      if (u_hit && !u_match) n_replace++;
      if (u_match) n_match++;
    end
    @(posedge clk); #1;
    lk_valid = 0; up_valid = 0;
    expect_eq("rsp_valid", lk_rsp_valid, do_lk);
    if (do_lk) begin
      expect_eq("lk_hit", lk_hit, e_hit);
      expect_eq("lk_predict", lk_predict, e_pred);
      expect_eq("lk_value", lk_value, e_val);
      if (e_pred) n_pred++;
      if (e_hit && !e_pred) n_lowconf++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_reset();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // directed: train PC 0x123 with 77 three times; predicted on the 4th
    cycle(1, 'h123, 0, 0, 0, 0, 0);
    expect_eq("cold miss", lk_hit, 0);
    for (int k = 0; k < 3; k++) cycle(0, 0, 1, 'h123, 64'd77, 0, 0);
    cycle(1, 'h123, 0, 0, 0, 0, 0);
    expect_eq("trained predict", lk_predict, 1);
    expect_eq("trained value", lk_value, 64'd77);

    for (int p = 0; p < NPC; p++) begin
      pcs[p] = int'($urandom_range(0, (1 << PC_W) - 1));
      for (int v = 0; v < 3; v++) vals[p][v] = {$urandom, $urandom};
    end
    for (int n = 0; n < 20000; n++) begin
      int lp, up, sel;
      bit pr;
      logic [63:0] res, pv;
      // a hot subset keeps entries alive, the rest forces evictions
      lp = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 5) : $urandom_range(0, NPC - 1);
      up = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 5) : $urandom_range(0, NPC - 1);
      sel = ($urandom_range(0, 7) == 0) ? $urandom_range(1, 2) : 0;
      res = vals[up][sel];
      pr  = 1'($urandom);
      pv  = ($urandom_range(0, 2) == 0) ? vals[up][$urandom_range(0, 2)] : res;
      cycle(1'($urandom), pcs[lp], 1'($urandom), pcs[up], res, pr, pv);
    end
    checks++;
    if (n_pred == 0 || n_evict == 0 || n_replace == 0 || n_match == 0 || n_lowconf == 0) begin
      failures++;
      $display("FAIL coverage pred=%0d evict=%0d replace=%0d match=%0d lowconf=%0d",
               n_pred, n_evict, n_replace, n_match, n_lowconf);
    end
    $display("coverage pred=%0d evict=%0d replace=%0d match=%0d lowconf=%0d",
             n_pred, n_evict, n_replace, n_match, n_lowconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

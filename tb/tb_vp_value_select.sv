// tb_vp_value_select - self-checking test of the value selector.
//
// Drives random candidate sets (values, confidence counters, vLRU fields)
// plus a few directed corner cases, and compares the selected index, value
// and the confidence verdict with a reference computed here: find the largest
// vLRU first, then the first candidate holding it, then compare its counter
// with the threshold.
module tb_vp_value_select;
  import shla_vp_pkg::*;

  localparam int unsigned H = 4;
  localparam int unsigned VALUE_W = 64;
  localparam int unsigned CONF_THRESH = 2;

  logic [H-1:0][VALUE_W-1:0] values;
  logic [H-1:0][CONF_W-1:0]  conf;
  logic [H-1:0][VLRU_W-1:0]  vlru;
  logic [1:0]                sel_idx;
  logic [VALUE_W-1:0]        sel_value;
  logic                      confident;

  int checks = 0, failures = 0;

  vp_value_select #(.H(H), .VALUE_W(VALUE_W), .CONF_THRESH(CONF_THRESH)) dut (
    .values_i(values), .conf_i(conf), .vlru_i(vlru),
    .sel_idx_o(sel_idx), .sel_value_o(sel_value), .confident_o(confident)
  );

  task automatic check_one();
    int mx, exp_idx;
    mx = 0;
    for (int i = 0; i < H; i++) if (int'(vlru[i]) > mx) mx = int'(vlru[i]);
    exp_idx = -1;
    for (int i = 0; i < H; i++) if (exp_idx < 0 && int'(vlru[i]) == mx) exp_idx = i;
    #1;
    checks++;
    if (int'(sel_idx) != exp_idx || sel_value != values[exp_idx] ||
        confident != (int'(conf[exp_idx]) >= CONF_THRESH)) begin
      failures++;
      $display("FAIL vlru=%h conf=%h idx=%0d exp=%0d conf_ok=%0b", vlru, conf,
               sel_idx, exp_idx, confident);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: newest value is index 2, confident
    for (int i = 0; i < H; i++) values[i] = 64'(100 + i);
    vlru = {2'd0, 2'd3, 2'd1, 2'd2};
    conf = {2'd0, 2'd2, 2'd3, 2'd3};
    check_one();
    if (sel_idx != 2 || !confident) begin failures++; $display("FAIL directed 1"); end
    checks++;
    // directed: newest value not confident enough -> no prediction
    conf = {2'd3, 2'd1, 2'd3, 2'd3};
    check_one();
    if (confident) begin failures++; $display("FAIL directed 2"); end
    checks++;
    // directed: tie on vLRU goes to the lowest index
    vlru = {2'd3, 2'd3, 2'd0, 2'd3};
    check_one();
    if (sel_idx != 0) begin failures++; $display("FAIL directed 3"); end
    checks++;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < H; i++) begin
        values[i] = {$urandom, $urandom};
        conf[i]   = 2'($urandom);
        vlru[i]   = 2'($urandom);
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

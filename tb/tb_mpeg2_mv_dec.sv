// tb_mpeg2_mv_dec: random motion codes for all eight predictors and all f_code
// values, checked against a model of the standard's vector reconstruction
// that keeps its own copy of the predictors; predictor resets are mixed in.
module tb_mpeg2_mv_dec;
  logic clk = 0, rst_n = 0, pmv_reset, in_valid, r, s, t, valid;
  logic [3:0] f_code; logic signed [5:0] motion_code; logic [7:0] motion_residual;
  logic signed [12:0] vec;
  int checks = 0, failures = 0, wraps = 0;
  int pm [2][2][2];
  mpeg2_mv_dec dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    pmv_reset = 0; in_valid = 0; r = 0; s = 0; t = 0; f_code = 1; motion_code = 0; motion_residual = 0;
    foreach (pm[i, j, k]) pm[i][j][k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int fc = $urandom_range(1, 9), rs = fc - 1, f = 1 << rs;
      automatic int mc = $urandom_range(0, 32) - 16, mr = $urandom_range(0, f - 1);
      automatic int ri = $urandom_range(0, 1), si = $urandom_range(0, 1), ti = $urandom_range(0, 1);
      automatic int delta, v;
      if ($urandom_range(0, 99) == 0) begin
        pmv_reset = 1; @(negedge clk); pmv_reset = 0;
        foreach (pm[i, j, k]) pm[i][j][k] = 0;
      end
      if (f == 1 || mc == 0) delta = mc;
      else begin delta = ((mc < 0 ? -mc : mc) - 1) * f + mr + 1; if (mc < 0) delta = -delta; end
      v = pm[ri][si][ti] + delta;
      if (v < -16 * f) begin v += 32 * f; wraps++; end
      if (v > 16 * f - 1) begin v -= 32 * f; wraps++; end
      pm[ri][si][ti] = v;
      in_valid = 1; r = ri[0]; s = si[0]; t = ti[0]; f_code = 4'(fc); motion_code = 6'(mc); motion_residual = 8'(mr);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!valid || int'(vec) != v) begin failures++; if (failures < 10) $display("FAIL n=%0d got %0d exp %0d", n, vec, v); end
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    checks++; if (wraps == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

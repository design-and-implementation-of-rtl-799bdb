// tb_mpeg2_idct8: random 8x8 coefficient blocks, fed back to back; each
// output is compared with a double-precision evaluation of the 2-D IDCT
// formula (rounded and saturated), allowing an error of one. Also checks the
// 16-cycle output burst per block.
module tb_mpeg2_idct8;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_half; logic [2:0] in_row, out_col;
  coef_t in_coef [8]; res4_t out_res;
  int checks = 0, failures = 0, maxerr = 0;
  localparam int NBLK = 60;
  real refx [NBLK][8][8];
  int nout = 0;
  mpeg2_idct8 dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic real ak(int k); return k == 0 ? 0.70710678118654752 : 1.0; endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int b, n, h;
    b = nout / 16; n = out_col; h = out_half;
    checks++;
    if (int'(out_col) != (nout % 16) / 2 || int'(out_half) != nout % 2) begin failures++; $display("FAIL order"); end
    for (int i = 0; i < 4; i++) begin
      real r; int e, d;
      r = refx[b][4 * h + i][n];
      e = $rtoi(r >= 0 ? r + 0.5 : r - 0.5);
      if (e > 255) e = 255; if (e < -256) e = -256;
      d = int'(out_res[i]) - e; if (d < 0) d = -d;
      if (d > maxerr) maxerr = d;
      checks++;
      if (d > 1) begin failures++; if (failures < 10) $display("FAIL blk %0d m=%0d n=%0d got %0d exp %0d", b, 4*h+i, n, out_res[i], e); end
    end
    nout++;
  end

  initial begin
    int Y [8][8];
    int t0, t1;
    in_valid = 0; in_row = 0; foreach (in_coef[i]) in_coef[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      foreach (Y[v, u]) Y[v][u] = 0;
      if (b == 0) Y[0][0] = 1000;
      else if (b == 1) Y[0][0] = -2048;
      else foreach (Y[v, u]) if ($urandom_range(0, 3) == 0 || (v + u < 3)) Y[v][u] = int'($urandom_range(0, 1200)) - 600;
      for (int m = 0; m < 8; m++) for (int n = 0; n < 8; n++) begin
        real s;
        s = 0.0;
        for (int k = 0; k < 8; k++) for (int l = 0; l < 8; l++)
          s += ak(k) * ak(l) * Y[k][l] * $cos((2*m+1)*3.14159265358979*k/16.0) * $cos((2*n+1)*3.14159265358979*l/16.0);
        refx[b][m][n] = s / 4.0;
      end
      for (int v = 0; v < 8; v++) begin
        @(negedge clk);
        while (!in_ready) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_row = 3'(v);
        for (int u = 0; u < 8; u++) in_coef[u] = coef_t'(Y[v][u]);
      end
    end
    @(negedge clk); in_valid = 0;
    t0 = $time;
    while (nout < NBLK * 16 && ($time - t0) < 10000) @(negedge clk);
    checks++;
    if (nout != NBLK * 16) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("max abs error %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

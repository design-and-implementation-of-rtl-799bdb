// tb_h264_residual_path: a stream of 4x4 level blocks, about a third of
// them flagged all-zero, through de-quantiser and transform; checks every
// residual, the block order, the shortcut count and the 4-cycle block rate.
module tb_h264_residual_path;
  import vdec_pkg::*; import h264_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, in_ready, dc_bypass, all_zero, out_valid, bypass;
  logic [5:0] qp; logic [1:0] out_col; coef_t in_blk [16]; res4_t out_res;
  int checks = 0, failures = 0;
  localparam int N = 300;
  int expr [N][16]; int nout = 0, nbyp = 0, expbyp = 0, first_out = -1, last_out = 0, cyc = 0;
  h264_residual_path dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) begin
    cyc++;
    if (rst_n && bypass) nbyp++;
    if (rst_n && out_valid) begin
      automatic int b = nout / 4, j = nout % 4;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      checks++; if (int'(out_col) != j) begin failures++; $display("FAIL col"); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (out_res[i] != coef_t'(expr[b][i*4+j])) begin failures++; if (failures < 10) $display("FAIL blk %0d (%0d,%0d) got %0d exp %0d", b, i, j, out_res[i], expr[b][i*4+j]); end
      end
      nout++;
    end
  end
  initial begin
    int c[16], d[16], r[16];
    in_valid = 0; dc_bypass = 0; all_zero = 0; qp = 0; foreach (in_blk[i]) in_blk[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < N; b++) begin
      automatic bit z = ($urandom_range(0, 2) == 0);
      automatic int q = $urandom_range(10, 40);
      automatic bit db = 1'($urandom);
      foreach (c[i]) c[i] = z ? 0 : (($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 8)) - 4 : 0);
      if (z) foreach (r[i]) r[i] = 0; else begin dequant(c, q, db, d); idct(d, r); end
      expr[b] = r; expbyp += z;
      in_valid = 1; all_zero = z; qp = 6'(q); dc_bypass = db; foreach (c[i]) in_blk[i] = coef_t'(c[i]);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    in_valid = 0;
    repeat (12) @(negedge clk);
    checks++; if (nout != 4 * N) begin failures++; $display("FAIL outputs %0d", nout); end
    checks++; if (nbyp != expbyp || nbyp == 0) begin failures++; $display("FAIL bypass count %0d exp %0d", nbyp, expbyp); end
    checks++; if (last_out - first_out + 1 != 4 * N) begin failures++; $display("FAIL rate %0d cycles", last_out - first_out + 1); end
    $display("shortcut blocks: %0d of %0d", nbyp, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

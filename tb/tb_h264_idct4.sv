// tb_h264_idct4: back-to-back random blocks (and all-zero blocks) against
// the matrix-form reference; checks the column order and the 4-cycle rate.
module tb_h264_idct4;
  import vdec_pkg::*; import h264_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, in_zero, in_ready, out_valid; logic [1:0] out_col;
  coef_t in_blk [16]; res4_t out_res;
  int checks = 0, failures = 0;
  localparam int N = 300;
  int expr [N][16]; int nout = 0; int first_out = -1, last_out = 0, cyc = 0;
  h264_idct4 dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      automatic int b = nout / 4, j = nout % 4;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      checks++;
      if (int'(out_col) != j) begin failures++; $display("FAIL col order"); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (out_res[i] != coef_t'(expr[b][i*4+j])) begin failures++; if (failures < 10) $display("FAIL blk %0d (%0d,%0d) got %0d exp %0d", b, i, j, out_res[i], expr[b][i*4+j]); end
      end
      nout++;
    end
  end
  initial begin
    int d[16], r[16];
    in_valid = 0; in_zero = 0; foreach (in_blk[i]) in_blk[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < N; b++) begin
      automatic bit z = (b % 7 == 3);
      foreach (d[i]) d[i] = z ? 0 : int'($urandom_range(0, 4000)) - 2000;
      if (z) foreach (r[i]) r[i] = 0; else idct(d, r);
      expr[b] = r;
      in_valid = 1; in_zero = z; foreach (d[i]) in_blk[i] = z ? coef_t'(99) : coef_t'(d[i]);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++; if (nout != 4 * N) begin failures++; $display("FAIL outputs %0d", nout); end
    checks++; if (last_out - first_out + 1 != 4 * N) begin failures++; $display("FAIL rate: %0d cycles for %0d blocks", last_out - first_out + 1, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_h264_dequant: random blocks and QPs against the reference rescaling.
module tb_h264_dequant;
  import vdec_pkg::*; import h264_ref_pkg::*;
  logic clk = 0, rst_n = 0, en, in_valid, dc_bypass, out_valid; logic [5:0] qp;
  coef_t in_blk [16], out_blk [16];
  int checks = 0, failures = 0;
  h264_dequant dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int c[16], d[16];
    en = 1; in_valid = 0; dc_bypass = 0; qp = 0; foreach (in_blk[i]) in_blk[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      automatic int q = $urandom_range(0, 51);
      automatic bit b = 1'($urandom);
      foreach (c[i]) c[i] = int'($urandom_range(0, 20)) - 10;
      dequant(c, q, b, d);
      foreach (d[i]) if (d[i] > 32767) d[i] = 32767; else if (d[i] < -32768) d[i] = -32768;
      in_valid = 1; qp = 6'(q); dc_bypass = b; foreach (c[i]) in_blk[i] = coef_t'(c[i]);
      @(negedge clk); in_valid = 0;
      checks++; if (!out_valid) begin failures++; $display("FAIL valid"); end
      foreach (d[i]) begin
        checks++;
        if (out_blk[i] != coef_t'(d[i])) begin failures++; if (failures < 10) $display("FAIL qp=%0d i=%0d got %0d exp %0d", q, i, out_blk[i], d[i]); end
      end
      // stall: en low holds the output
      en = 0; in_valid = 1; foreach (in_blk[i]) in_blk[i] = 7; @(negedge clk); in_valid = 0; en = 1;
      checks++; if (out_blk[5] != coef_t'(d[5])) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_h264_dc_transform: luma and chroma DC blocks over all QPs, against a
// reference applying the Hadamard matrices and the scaling rules.
module tb_h264_dc_transform;
  import vdec_pkg::*; import h264_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, is_chroma, out_valid; logic [5:0] qp;
  coef_t dc_in [16], dc_out [16];
  int checks = 0, failures = 0;
  h264_dc_transform dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int c[16], f[16], e[16], H[4][4], H2[2][2];
    H2 = '{'{1, 1}, '{1, -1}};
    H = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    in_valid = 0; is_chroma = 0; qp = 0; foreach (dc_in[i]) dc_in[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      automatic int q = t % 52;
      automatic bit ch = t >= 300;
      int lsv;
      foreach (c[i]) c[i] = (ch && i > 3) ? 0 : int'($urandom_range(0, 60)) - 30;
      lsv = V[q % 6][0];
      foreach (e[i]) e[i] = 0;
      if (!ch) begin
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          f[i*4+j] = 0;
          for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) f[i*4+j] += H[i][k] * c[k*4+l] * H[l][j];
          if (q >= 12) e[i*4+j] = (f[i*4+j] * lsv) <<< (q / 6 - 2);
          else e[i*4+j] = (f[i*4+j] * lsv + (1 << (1 - q / 6))) >>> (2 - q / 6);
        end
      end else begin
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
          automatic int s = 0;
          for (int k = 0; k < 2; k++) for (int l = 0; l < 2; l++) s += H2[i][k] * c[k*2+l] * H2[l][j];
          e[i*2+j] = (q >= 6) ? (s * lsv) <<< (q / 6 - 1) : (s * lsv) >>> 1;
        end
      end
      for (int i = 0; i < 16; i++) if (e[i] > 32767) e[i] = 32767; else if (e[i] < -32768) e[i] = -32768;
      in_valid = 1; is_chroma = ch; qp = 6'(q); foreach (c[i]) dc_in[i] = coef_t'(c[i]);
      @(negedge clk); in_valid = 0;
      checks++; if (!out_valid) begin failures++; $display("FAIL valid"); end
      foreach (e[i]) begin
        checks++;
        if (dc_out[i] != coef_t'(e[i])) begin failures++; if (failures < 10) $display("FAIL t=%0d ch=%0d qp=%0d i=%0d got %0d exp %0d", t, ch, q, i, dc_out[i], e[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

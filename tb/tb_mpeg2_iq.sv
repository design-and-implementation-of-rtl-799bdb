// tb_mpeg2_iq: random blocks, intra and non-intra, both quantiser scale
// types, checked against a reference written from the standard's
// arithmetic / saturation / mismatch-control description.
module tb_mpeg2_iq;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, intra, q_scale_type, out_valid; logic [2:0] in_row, out_row_idx;
  coef_t qf [8]; coef_t out_row [8];
  logic [1:0] intra_dc_precision; logic [4:0] quantiser_scale_code;
  logic [7:0] w_intra [64], w_non_intra [64];
  int checks = 0, failures = 0;
  int nl[32] = '{0,1,2,3,4,5,6,7,8,10,12,14,16,18,20,22,24,28,32,36,40,44,48,52,56,64,72,80,88,96,104,112};
  mpeg2_iq dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int tdiv(int a, int b); // C-style truncating division
    int r = (a < 0 ? -a : a) / b; return a < 0 ? -r : r;
  endfunction

  initial begin
    int QF[64], F[64], qsv, sum, got[64], r;
    in_valid = 0; in_row = 0; intra = 0; q_scale_type = 0; intra_dc_precision = 0; quantiser_scale_code = 1;
    foreach (qf[i]) qf[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      intra = 1'($urandom); q_scale_type = 1'($urandom); intra_dc_precision = 2'($urandom);
      quantiser_scale_code = 5'($urandom_range(1, 31));
      foreach (w_intra[i]) begin w_intra[i] = 8'($urandom_range(1, 255)); w_non_intra[i] = 8'($urandom_range(1, 255)); end
      foreach (QF[i]) QF[i] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 4000)) - 2000 : (($urandom_range(0,1)) ? int'($urandom_range(0, 6)) - 3 : 0);
      if (t % 5 == 0) foreach (QF[i]) QF[i] = (i == 0) ? 2 : 0;
      qsv = q_scale_type ? nl[quantiser_scale_code] : 2 * quantiser_scale_code;
      sum = 0;
      for (int i = 0; i < 64; i++) begin
        int f2;
        if (i == 0 && intra) f2 = QF[i] * (8 >> intra_dc_precision);
        else if (intra) f2 = tdiv(QF[i] * w_intra[i] * qsv * 2, 32);
        else f2 = tdiv((QF[i] * 2 + (QF[i] > 0 ? 1 : QF[i] < 0 ? -1 : 0)) * w_non_intra[i] * qsv, 32);
        F[i] = f2 > 2047 ? 2047 : f2 < -2048 ? -2048 : f2;
        sum += F[i];
      end
      if ((sum & 1) == 0) F[63] = (F[63] & 1) ? F[63] - 1 : F[63] + 1;
      r = 0;
      fork
        for (int v = 0; v < 8; v++) begin
          @(negedge clk); in_valid = 1; in_row = 3'(v);
          for (int u = 0; u < 8; u++) qf[u] = coef_t'(QF[v * 8 + u]);
        end
        begin
          @(negedge clk);
          for (int v = 0; v < 8; v++) begin
            @(negedge clk);
            checks++;
            if (!out_valid || out_row_idx != 3'(v)) begin failures++; $display("FAIL timing row %0d", v); end
            for (int u = 0; u < 8; u++) got[v * 8 + u] = out_row[u];
          end
        end
      join
      @(negedge clk); in_valid = 0;
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (got[i] != F[i]) begin failures++; if (failures < 10) $display("FAIL t=%0d i=%0d got %0d exp %0d", t, i, got[i], F[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

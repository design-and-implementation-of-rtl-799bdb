// tb_intra16_pred: luma 16x16 and chroma 8x8 prediction in all four modes,
// with random neighbours and availabilities, against the standard's
// equations (plane mode in its direct multiply form). Checks block order,
// column order and the cycle count (start, one slope cycle, then one registered column per cycle).
module tb_intra16_pred;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0, start, is_chroma, up_avail, left_avail, busy, out_valid;
  i16_mode_e mode; pixel_t up [16], left [16], corner; logic [3:0] out_blk; logic [1:0] out_col; pix4_t out_pix;
  int checks = 0, failures = 0;
  int U [-1:15]; int L [-1:15];
  int expp [16][16];
  intra16_pred dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int clip(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction

  task automatic compute(input bit ch, input i16_mode_e m, input bit ua, input bit la);
    int n = ch ? 8 : 16;
    int H = 0, V = 0, a, b, c, xc;
    xc = ch ? 3 : 7;
    for (int k = 0; k < n / 2; k++) begin
      H += (k + 1) * (U[n / 2 + k] - U[n / 2 - 2 - k]);
      V += (k + 1) * (L[n / 2 + k] - L[n / 2 - 2 - k]);
    end
    a = 16 * (L[n - 1] + U[n - 1]);
    b = ch ? (17 * H + 16) >>> 5 : (5 * H + 32) >>> 6;
    c = ch ? (17 * V + 16) >>> 5 : (5 * V + 32) >>> 6;
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
      int dc = 128, su = 0, sl = 0;
      if (!ch) begin
        for (int i = 0; i < 16; i++) begin su += U[i]; sl += L[i]; end
        if (ua && la) dc = (su + sl + 16) >> 5; else if (la) dc = (sl + 8) >> 4; else if (ua) dc = (su + 8) >> 4;
      end else begin
        int x0 = (x / 4) * 4, y0 = (y / 4) * 4;
        for (int i = 0; i < 4; i++) begin su += U[x0 + i]; sl += L[y0 + i]; end
        if (x0 == y0) begin
          if (ua && la) dc = (su + sl + 4) >> 3; else if (la) dc = (sl + 2) >> 2; else if (ua) dc = (su + 2) >> 2;
        end else if (x0 > 0) begin
          if (ua) dc = (su + 2) >> 2; else if (la) dc = (sl + 2) >> 2;
        end else begin
          if (la) dc = (sl + 2) >> 2; else if (ua) dc = (su + 2) >> 2;
        end
      end
      case (m)
        I16_VERT:  expp[x][y] = U[x];
        I16_HOR:   expp[x][y] = L[y];
        I16_DC:    expp[x][y] = dc;
        default:   expp[x][y] = clip((a + b * (x - xc) + c * (y - xc) + 16) >>> 5);
      endcase
    end
  endtask

  initial begin
    start = 0; is_chroma = 0; mode = I16_VERT; up_avail = 1; left_avail = 1; corner = 0;
    foreach (up[i]) up[i] = 0; foreach (left[i]) left[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic bit ch = (t % 2 == 1);
      automatic i16_mode_e m = i16_mode_e'((t / 2) % 4);
      automatic bit ua = (t % 5 != 4);
      automatic bit la = (t % 7 != 6);
      automatic int nblk = ch ? 4 : 16;
      automatic int cycles = 0;
      for (int i = -1; i < 16; i++) begin U[i] = $urandom_range(0, 255); L[i] = $urandom_range(0, 255); end
      if (t % 8 == 3) for (int i = -1; i < 16; i++) begin U[i] = 10 * i + 40; L[i] = 255 - 12 * (i + 1); end
      L[-1] = U[-1];
      compute(ch, m, ua, la);
      foreach (up[i]) up[i] = pixel_t'(U[i]);
      foreach (left[i]) left[i] = pixel_t'(L[i]);
      corner = pixel_t'(U[-1]); is_chroma = ch; mode = m; up_avail = ua; left_avail = la;
      start = 1; @(negedge clk); start = 0;
      for (int k = 0; k < nblk * 4; k++) begin
        while (!out_valid && cycles < 10) begin @(negedge clk); cycles++; end
        begin
          automatic int bi = k / 4, x0, y0, x;
          if (ch) begin x0 = (bi % 2) * 4; y0 = (bi / 2) * 4; end
          else begin x0 = ((bi >> 2) & 1) * 8 + (bi & 1) * 4; y0 = ((bi >> 3) & 1) * 8 + ((bi >> 1) & 1) * 4; end
          x = x0 + k % 4;
          checks++;
          if (int'(out_blk) != bi || int'(out_col) != k % 4) begin failures++; $display("FAIL order t=%0d k=%0d", t, k); end
          for (int y = 0; y < 4; y++) begin
            checks++;
            if (int'(out_pix[y]) != expp[x][y0 + y]) begin failures++; if (failures < 10) $display("FAIL t=%0d ch=%0d m=%0d x=%0d y=%0d got %0d exp %0d", t, ch, m, x, y0 + y, out_pix[y], expp[x][y0 + y]); end
          end
        end
        @(negedge clk);
      end
      checks++; if (cycles != 2) begin failures++; $display("FAIL latency %0d", cycles); end
      checks++; if (out_valid) begin failures++; $display("FAIL extra output"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

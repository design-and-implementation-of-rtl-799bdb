// tb_mc_interp: random 9x9 windows and all 16 quarter-sample positions in
// H.264 mode plus the four half-sample positions in MPEG-2 mode. The
// reference first builds the half-sample planes of the whole window
// (b, h, j) and then applies the standard's quarter-sample rules.
module tb_mc_interp;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0, start, busy, out_valid; video_mode_e mode;
  logic [1:0] frac_x, frac_y, out_col; pixel_t win [9][9]; pix4_t out_pix;
  int checks = 0, failures = 0;
  int W [-2:6][-2:6];      // [x][y]
  int bp [-2:6][-2:6], hp [-2:6][-2:6], jp [-2:6][-2:6], b1p [-2:6][-2:6];
  int expv [4][4];
  mc_interp dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int clp(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction
  function automatic int f6(int a, int b, int c, int d, int e, int f); return a - 5*b + 20*c + 20*d - 5*e + f; endfunction

  task automatic build(input video_mode_e md, input int fx, input int fy);
    for (int x = 0; x <= 4; x++) for (int y = -2; y <= 6; y++) begin
      b1p[x][y] = f6(W[x-2][y], W[x-1][y], W[x][y], W[x+1][y], W[x+2][y], W[x+3][y]);
      bp[x][y] = clp((b1p[x][y] + 16) >>> 5);
    end
    for (int x = 0; x <= 4; x++) for (int y = 0; y <= 4; y++)
      hp[x][y] = clp((f6(W[x][y-2], W[x][y-1], W[x][y], W[x][y+1], W[x][y+2], W[x][y+3]) + 16) >>> 5);
    for (int x = 0; x <= 3; x++) for (int y = 0; y <= 3; y++)
      jp[x][y] = clp((f6(b1p[x][y-2], b1p[x][y-1], b1p[x][y], b1p[x][y+1], b1p[x][y+2], b1p[x][y+3]) + 512) >>> 10);
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) begin
      int G = W[x][y], Hs = W[x+1][y], M = W[x][y+1], N = W[x+1][y+1];
      int b = bp[x][y], h = hp[x][y], j = jp[x][y], m = hp[x+1][y], s = bp[x][y+1];
      int v;
      if (md == MODE_MPEG2) begin
        if (fx == 0 && fy == 0) v = G;
        else if (fy == 0) v = (G + Hs + 1) / 2;
        else if (fx == 0) v = (G + M + 1) / 2;
        else v = (G + Hs + M + N + 2) / 4;
      end else begin
        int tbl [4][4];   // [fy][fx]
        tbl = '{'{G, (G + b + 1) / 2, b, (Hs + b + 1) / 2},
                '{(G + h + 1) / 2, (b + h + 1) / 2, (b + j + 1) / 2, (b + m + 1) / 2},
                '{h, (h + j + 1) / 2, j, (j + m + 1) / 2},
                '{(M + h + 1) / 2, (h + s + 1) / 2, (j + s + 1) / 2, (m + s + 1) / 2}};
        v = tbl[fy][fx];
      end
      expv[x][y] = v;
    end
  endtask

  initial begin
    start = 0; mode = MODE_H264; frac_x = 0; frac_y = 0;
    foreach (win[i, j]) win[i][j] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic video_mode_e md = (t % 5 == 4) ? MODE_MPEG2 : MODE_H264;
      automatic int fx = (md == MODE_MPEG2) ? 2 * ($urandom_range(0, 1)) : t % 4;
      automatic int fy = (md == MODE_MPEG2) ? 2 * ($urandom_range(0, 1)) : (t / 4) % 4;
      for (int x = -2; x <= 6; x++) for (int y = -2; y <= 6; y++)
        W[x][y] = (t % 10 == 7) ? (((x + y) % 2 == 0) ? 255 : 0) : $urandom_range(0, 255);
      build(md, (md == MODE_MPEG2) ? fx / 2 : fx, (md == MODE_MPEG2) ? fy / 2 : fy);
      for (int x = -2; x <= 6; x++) for (int y = -2; y <= 6; y++) win[y + 2][x + 2] = pixel_t'(W[x][y]);
      mode = md; frac_x = 2'(fx); frac_y = 2'(fy);
      start = 1; @(negedge clk); start = 0;
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        checks++; if (!out_valid || int'(out_col) != c) begin failures++; $display("FAIL timing"); end
        for (int y = 0; y < 4; y++) begin
          checks++;
          if (int'(out_pix[y]) != expv[c][y]) begin failures++; if (failures < 10) $display("FAIL t=%0d md=%0d fx=%0d fy=%0d (%0d,%0d) got %0d exp %0d", t, md, fx, fy, c, y, out_pix[y], expv[c][y]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

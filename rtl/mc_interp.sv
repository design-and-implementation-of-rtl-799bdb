// mc_interp: luma sample interpolator shared by H.264 and MPEG-2 motion
// compensation.
//
// The interpolator is separable: half samples come from one-dimensional
// 6-tap filters (1, -5, 20, 20, -5, 1), horizontal (b) or vertical (h); the
// centre half sample j filters the unrounded horizontal results again
// vertically. Quarter samples are two-tap averages of the two nearest
// integer or half samples, following the H.264 standard:
//   a = (G+b+1)>>1  c = (H+b+1)>>1  d = (G+h+1)>>1  n = (M+h+1)>>1
//   f = (b+j+1)>>1  i = (h+j+1)>>1  k = (j+m+1)>>1  q = (j+s+1)>>1
//   e = (b+h+1)>>1  g = (b+m+1)>>1  p = (h+s+1)>>1  r = (m+s+1)>>1
// (G integer sample, H right of it, M below it, m and s the vertical and
// horizontal half samples one to the right and one below). MPEG-2 needs
// only half-sample accuracy and bilinear averaging, which is the two-tap
// part of the same unit: (G+H+1)>>1, (G+M+1)>>1 and (G+H+M+N+2)>>2.
//
// Interface: `win` is the 9x9 reference window, row-major, whose element
// [2][2] is the integer sample at the block's top-left corner (two samples
// of margin before, four after, as the 6-tap filter needs for a 4x4 block).
// frac_x/frac_y are the quarter-sample fractions (H.264) or, in MPEG-2 mode,
// the half-sample flags in bit 1. Timing: `start` registers the window; the
// 4x4 prediction leaves column by column on the next four cycles.
// Lint note: the MPEG-2 bilinear result is computed in a 32-bit integer and
// only its low eight bits (always 0..255) are used.
module mc_interp
  import vdec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  video_mode_e mode,
  input  logic [1:0]  frac_x,
  input  logic [1:0]  frac_y,
  input  pixel_t      win [9][9],
  output logic        busy,
  output logic        out_valid,
  output logic [1:0]  out_col,
  output pix4_t       out_pix
);
  pixel_t      w_q [9][9];
  video_mode_e mode_q;
  logic [1:0]  fx_q, fy_q;
  logic [1:0]  col;
  pix4_t       pix_d;

  function automatic int px(input int i, input int j);   // sample (i, j), i = column
    return int'(w_q[j + 2][i + 2]);
  endfunction
  function automatic int tap6(input int e, input int f, input int g, input int h,
                              input int i, input int j);
    return e - 5 * f + 20 * g + 20 * h - 5 * i + j;
  endfunction
  function automatic int b1(input int i, input int j);   // horizontal, unrounded
    return tap6(px(i-2, j), px(i-1, j), px(i, j), px(i+1, j), px(i+2, j), px(i+3, j));
  endfunction
  function automatic int h1(input int i, input int j);   // vertical, unrounded
    return tap6(px(i, j-2), px(i, j-1), px(i, j), px(i, j+1), px(i, j+2), px(i, j+3));
  endfunction
  function automatic int clp(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  always_comb begin
    for (int y = 0; y < 4; y++) begin
      int x, G, H, M, N, b, h, jj, m, s, v;
      x = int'(col);
      G = px(x, y); H = px(x + 1, y); M = px(x, y + 1); N = px(x + 1, y + 1);
      b  = clp((b1(x, y) + 16) >>> 5);
      h  = clp((h1(x, y) + 16) >>> 5);
      m  = clp((h1(x + 1, y) + 16) >>> 5);
      s  = clp((b1(x, y + 1) + 16) >>> 5);
      jj = clp((tap6(b1(x, y-2), b1(x, y-1), b1(x, y), b1(x, y+1), b1(x, y+2), b1(x, y+3)) + 512) >>> 10);
      v = G;
      if (mode_q == MODE_MPEG2) begin
        case ({fx_q[1], fy_q[1]})
          2'b00: v = G;
          2'b10: v = (G + H + 1) >> 1;
          2'b01: v = (G + M + 1) >> 1;
          default: v = (G + H + M + N + 2) >> 2;
        endcase
      end else begin
        case ({fx_q, fy_q})
          4'b00_00: v = G;
          4'b01_00: v = (G + b + 1) >> 1;
          4'b10_00: v = b;
          4'b11_00: v = (H + b + 1) >> 1;
          4'b00_01: v = (G + h + 1) >> 1;
          4'b00_10: v = h;
          4'b00_11: v = (M + h + 1) >> 1;
          4'b01_01: v = (b + h + 1) >> 1;
          4'b11_01: v = (b + m + 1) >> 1;
          4'b01_11: v = (h + s + 1) >> 1;
          4'b11_11: v = (m + s + 1) >> 1;
          4'b10_01: v = (b + jj + 1) >> 1;
          4'b10_11: v = (jj + s + 1) >> 1;
          4'b01_10: v = (h + jj + 1) >> 1;
          4'b11_10: v = (jj + m + 1) >> 1;
          default:  v = jj;
        endcase
      end
      pix_d[y] = pixel_t'(v);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q <= '{default: '0};
      mode_q <= MODE_H264; fx_q <= '0; fy_q <= '0;
      busy <= 1'b0; col <= '0;
      out_valid <= 1'b0; out_col <= '0; out_pix <= '{default: '0};
    end else begin
      out_valid <= busy;
      if (busy) begin
        out_pix <= pix_d;
        out_col <= col;
        col     <= col + 2'd1;
        if (col == 2'd3) busy <= 1'b0;
      end
      if (start && (!busy || col == 2'd3)) begin
        w_q <= win; mode_q <= mode; fx_q <= frac_x; fy_q <= frac_y;
        busy <= 1'b1; col <= '0;
      end
    end
  end

endmodule

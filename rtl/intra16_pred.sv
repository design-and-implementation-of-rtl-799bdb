// intra16_pred: H.264 Intra16x16 luma and intra chroma (8x8) predictor:
// vertical, horizontal, DC and plane.
//
// The macroblock is predicted as a sequence of 4x4 blocks in the standard's
// 4x4 block order (for chroma: raster order of the four blocks), each sent
// column by column like an Intra4x4 block, so the rest of the pipeline
// sees no difference between the classes.
//
// Plane mode: a slope calculator first forms
//   luma:   H = sum_{x'=0..7} (x'+1)(p[8+x',-1] - p[6-x',-1]), V likewise,
//           b = (5H + 32) >> 6, c = (5V + 32) >> 6, a = 16 (p[-1,15] + p[15,-1])
//   chroma: H, V over x' = 0..3, b = (17H + 16) >> 5, c = (17V + 16) >> 5,
//           a = 16 (p[-1,7] + p[7,-1])
// and stores a' = a - 7b - 7c + 16 (luma) or a - 3b - 3c + 16 (chroma) with
// the slopes. A sample is then Clip1((a' + b x + c y) >> 5). No multiplier
// is used: b x is a shift-and-add over the four bits of x, and the four
// samples of a column are the column top plus 0, c, 2c and c + 2c.
// DC mode: luma averages all available upper and left neighbours; chroma
// applies the standard per-4x4-block rule (corner blocks use both sides,
// the upper-right block prefers the upper row, the lower-left block the
// left column). 128 when nothing is available.
//
// Neighbours: up[0..15] = p[0..15,-1], left[0..15] = p[-1,0..15], corner =
// p[-1,-1]; chroma uses entries 0..7. Timing: `start` registers the
// neighbours; the next cycle computes the slopes; the first column leaves
// two cycles after start, then one column per cycle (64 columns for luma,
// 16 for chroma) with out_blk/out_col naming it.
// Lint note: the DC value is computed in a 32-bit integer and only its low
// eight bits (always in range) are used.
module intra16_pred
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       is_chroma,
  input  i16_mode_e  mode,
  input  pixel_t     up [16],
  input  pixel_t     left [16],
  input  pixel_t     corner,
  input  logic       up_avail,
  input  logic       left_avail,
  output logic       busy,
  output logic       out_valid,
  output logic [3:0] out_blk,
  output logic [1:0] out_col,
  output pix4_t      out_pix
);
  typedef logic signed [19:0] s20_t;

  pixel_t     u_q [16], l_q [16], m_q;
  logic       chroma_q, ua_q, la_q;
  i16_mode_e  mode_q;
  logic       slope_phase;           // cycle in which slopes are computed
  s20_t       a1, sb, sc;            // a', slope b, slope c
  s20_t       a1_d, sb_d, sc_d;
  logic [5:0] cnt;                   // {block, column}
  logic [3:0] blk;
  logic [1:0] col;
  logic [3:0] bx, by;                // top-left of current 4x4 block
  pix4_t      pix_d;

  function automatic int pu(input int x);  // p[x,-1], x = -1 is the corner
    return (x < 0) ? int'(m_q) : int'(u_q[x]);
  endfunction
  function automatic int pl(input int y);
    return (y < 0) ? int'(m_q) : int'(l_q[y]);
  endfunction

  // slope calculator
  always_comb begin
    int h, v, n;
    h = 0; v = 0;
    n = chroma_q ? 4 : 8;
    for (int k = 0; k < 8; k++)
      if (k < n) begin
        h += (k + 1) * (pu(n + k) - pu(n - 2 - k));
        v += (k + 1) * (pl(n + k) - pl(n - 2 - k));
      end
    if (!chroma_q) begin
      sb_d = s20_t'((5 * h + 32) >>> 6);
      sc_d = s20_t'((5 * v + 32) >>> 6);
      a1_d = s20_t'(16 * (pl(15) + pu(15)) - 7 * int'(sb_d) - 7 * int'(sc_d) + 16);
    end else begin
      sb_d = s20_t'((17 * h + 16) >>> 5);
      sc_d = s20_t'((17 * v + 16) >>> 5);
      a1_d = s20_t'(16 * (pl(7) + pu(7)) - 3 * int'(sb_d) - 3 * int'(sc_d) + 16);
    end
  end

  assign blk = cnt[5:2];
  assign col = cnt[1:0];
  always_comb begin
    if (chroma_q) begin bx = {1'b0, blk[0], 2'b00}; by = {1'b0, blk[1], 2'b00}; end
    else          begin bx = {blk[2], blk[0], 2'b00}; by = {blk[3], blk[1], 2'b00}; end
  end

  // sample generation for the current column
  always_comb begin
    s20_t top, bxs, cy;
    logic [3:0] x;
    int su, sl, dcv;
    x = bx | 4'(col);
    // b * x by shift-and-add, c * y0 likewise
    bxs = '0; cy = '0;
    for (int k = 0; k < 4; k++) begin
      if (x[k])  bxs += sb <<< k;
      if (by[k]) cy  += sc <<< k;
    end
    top = a1 + bxs + cy;
    // DC value
    su = 0; sl = 0;
    dcv = 128;
    if (!chroma_q) begin
      for (int i = 0; i < 16; i++) begin su += int'(u_q[i]); sl += int'(l_q[i]); end
      if (ua_q && la_q) dcv = (su + sl + 16) >> 5;
      else if (la_q)    dcv = (sl + 8) >> 4;
      else if (ua_q)    dcv = (su + 8) >> 4;
    end else begin
      for (int i = 0; i < 4; i++) begin su += int'(u_q[int'(bx) + i]); sl += int'(l_q[int'(by) + i]); end
      if ((bx == 0 && by == 0) || (bx != 0 && by != 0)) begin
        if (ua_q && la_q) dcv = (su + sl + 4) >> 3;
        else if (la_q)    dcv = (sl + 2) >> 2;
        else if (ua_q)    dcv = (su + 2) >> 2;
      end else if (bx != 0) begin
        if (ua_q)         dcv = (su + 2) >> 2;
        else if (la_q)    dcv = (sl + 2) >> 2;
      end else begin
        if (la_q)         dcv = (sl + 2) >> 2;
        else if (ua_q)    dcv = (su + 2) >> 2;
      end
    end
    for (int y = 0; y < 4; y++) begin
      s20_t v;
      v = top;
      if (y[0]) v += sc;
      if (y[1]) v += sc <<< 1;
      case (mode_q)
        I16_VERT:  pix_d[y] = u_q[x];
        I16_HOR:   pix_d[y] = l_q[by | 4'(y)];
        I16_DC:    pix_d[y] = pixel_t'(dcv);
        default:   pix_d[y] = clip1(32'(v >>> 5));
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q <= '{default: '0}; l_q <= '{default: '0}; m_q <= '0;
      chroma_q <= 1'b0; ua_q <= 1'b0; la_q <= 1'b0; mode_q <= I16_VERT;
      slope_phase <= 1'b0; a1 <= '0; sb <= '0; sc <= '0;
      cnt <= '0; busy <= 1'b0;
      out_valid <= 1'b0; out_blk <= '0; out_col <= '0; out_pix <= '{default: '0};
    end else begin
      out_valid <= busy && !slope_phase;
      if (start && !busy) begin
        u_q <= up; l_q <= left; m_q <= corner;
        chroma_q <= is_chroma; ua_q <= up_avail; la_q <= left_avail; mode_q <= mode;
        busy <= 1'b1; slope_phase <= 1'b1; cnt <= '0;
      end else if (busy && slope_phase) begin
        a1 <= a1_d; sb <= sb_d; sc <= sc_d;
        slope_phase <= 1'b0;
      end else if (busy) begin
        out_pix <= pix_d;
        out_blk <= blk;
        out_col <= col;
        cnt     <= cnt + 6'd1;
        if ((chroma_q && cnt == 6'd15) || cnt == 6'd63) busy <= 1'b0;
      end
    end
  end

endmodule

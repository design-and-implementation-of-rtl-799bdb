// intra4x4_pred: H.264 Intra4x4 predictor.
//
// Every directional mode (vertical, horizontal, diagonal down-left,
// diagonal down-right, vertical-right, horizontal-down, vertical-left,
// horizontal-up) predicts each sample as
//     pred[x, y] = (P0 + P1 + P2 + P3 + 2) >> 2
// for four neighbour samples chosen by mode and position: a three-tap
// filter (a + 2b + c) picks b twice, a two-tap average (a + b + 1) >> 1
// picks a and b twice each, a copy picks one sample four times. So the
// datapath is one selection network and one add-and-round unit per output;
// `sel` below is the selection table, derived from the equations of the
// H.264 standard. DC mode averages the available upper and left neighbours
// (128 when neither is available).
//
// Neighbours: up[0..7] = A..H (row above, including the above-right four),
// left[0..3] = I..L, corner = M. Timing: on `start` the neighbours and mode
// are registered; the block leaves column by column (x = 0..3, four samples
// y = 0..3 each) on the next four cycles. A new start may be given in the
// cycle that carries the last column.
// Lint note: the angular helper takes a 32-bit index of which only the low
// bits are used, and the two low bits of the DC sum are the dropped
// rounding bits; both unused-bit warnings are expected.
module intra4x4_pred
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  i4_mode_e   mode,
  input  pixel_t     up [8],
  input  pixel_t     left [4],
  input  pixel_t     corner,
  input  logic       up_avail,
  input  logic       left_avail,
  output logic       busy,
  output logic       out_valid,
  output logic [1:0] out_col,
  output pix4_t      out_pix
);
  pixel_t     nb [13];           // 0..7 up, 8..11 left, 12 corner
  i4_mode_e   mode_q;
  logic       ua_q, la_q;
  logic [1:0] col;
  pix4_t      pred_col;
  pixel_t     dc;

  // neighbour index helpers: U(-1) and L(-1) are the corner
  function automatic int uix(input int i); return (i < 0) ? 12 : i; endfunction
  function automatic int lix(input int j); return (j < 0) ? 12 : 8 + j; endfunction

  // four neighbour indices for sample (x, y) of mode m
  function automatic logic [15:0] sel(input i4_mode_e m, input int x, input int y);
    int a, b, c, d, z;
    a = 0; b = 0; c = 0; d = 0;
    case (m)
      I4_VERT: begin a = x; b = x; c = x; d = x; end
      I4_HOR:  begin a = lix(y); b = a; c = a; d = a; end
      I4_DDL: begin
        if (x == 3 && y == 3) begin a = 6; b = 7; c = 7; d = 7; end
        else begin a = x + y; b = x + y + 1; c = b; d = x + y + 2; end
      end
      I4_DDR: begin
        if (x > y)      begin a = uix(x - y - 2); b = uix(x - y - 1); c = b; d = uix(x - y); end
        else if (x < y) begin a = lix(y - x - 2); b = lix(y - x - 1); c = b; d = lix(y - x); end
        else            begin a = uix(0); b = 12; c = 12; d = lix(0); end
      end
      I4_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0)  begin a = uix(x - (y >> 1) - 1); b = a; c = uix(x - (y >> 1)); d = c; end
        else if (z > 0)            begin a = uix(x - (y >> 1) - 2); b = uix(x - (y >> 1) - 1); c = b; d = uix(x - (y >> 1)); end
        else if (z == -1)          begin a = lix(0); b = 12; c = 12; d = uix(0); end
        else                       begin a = lix(y - 1); b = lix(y - 2); c = b; d = lix(y - 3); end
      end
      I4_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0)  begin a = lix(y - (x >> 1) - 1); b = a; c = lix(y - (x >> 1)); d = c; end
        else if (z > 0)            begin a = lix(y - (x >> 1) - 2); b = lix(y - (x >> 1) - 1); c = b; d = lix(y - (x >> 1)); end
        else if (z == -1)          begin a = lix(0); b = 12; c = 12; d = uix(0); end
        else                       begin a = uix(x - 1); b = uix(x - 2); c = b; d = uix(x - 3); end
      end
      I4_VL: begin
        if (y % 2 == 0) begin a = x + (y >> 1); b = a; c = a + 1; d = c; end
        else            begin a = x + (y >> 1); b = a + 1; c = b; d = a + 2; end
      end
      I4_HU: begin
        z = x + 2 * y;
        if (z > 5)                 begin a = lix(3); b = a; c = a; d = a; end
        else if (z == 5)           begin a = lix(2); b = lix(3); c = b; d = b; end
        else if (z % 2 == 0)       begin a = lix(y + (x >> 1)); b = a; c = lix(y + (x >> 1) + 1); d = c; end
        else                       begin a = lix(y + (x >> 1)); b = lix(y + (x >> 1) + 1); c = b; d = lix(y + (x >> 1) + 2); end
      end
      default: ;
    endcase
    return {4'(a), 4'(b), 4'(c), 4'(d)};
  endfunction

  // DC: mean of the available neighbours
  always_comb begin
    logic [10:0] su, sl;
    su = '0; sl = '0;
    for (int i = 0; i < 4; i++) begin
      su += 11'(nb[i]);
      sl += 11'(nb[8 + i]);
    end
    if (ua_q && la_q)  dc = 8'((su + sl + 11'd4) >> 3);
    else if (la_q)     dc = 8'((sl + 11'd2) >> 2);
    else if (ua_q)     dc = 8'((su + 11'd2) >> 2);
    else               dc = 8'd128;
  end

  // selection + add-and-round for the current column
  always_comb begin
    for (int y = 0; y < 4; y++) begin
      logic [15:0] s;
      logic [9:0]  sum;
      s   = '0;
      sum = '0;
      for (int x = 0; x < 4; x++)
        if (col == 2'(x)) s = sel(mode_q, x, y);
      sum = 10'(nb[s[15:12]]) + 10'(nb[s[11:8]]) + 10'(nb[s[7:4]]) + 10'(nb[s[3:0]]) + 10'd2;
      pred_col[y] = (mode_q == I4_DC) ? dc : sum[9:2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nb        <= '{default: '0};
      mode_q    <= I4_VERT;
      ua_q      <= 1'b0;
      la_q      <= 1'b0;
      busy      <= 1'b0;
      col       <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_pix   <= '{default: '0};
    end else begin
      out_valid <= busy;
      if (busy) begin
        out_pix <= pred_col;
        out_col <= col;
        col     <= col + 2'd1;
        if (col == 2'd3) busy <= 1'b0;
      end
      if (start && (!busy || col == 2'd3)) begin
        for (int i = 0; i < 8; i++) nb[i] <= up[i];
        for (int i = 0; i < 4; i++) nb[8 + i] <= left[i];
        nb[12] <= corner;
        mode_q <= mode;
        ua_q   <= up_avail;
        la_q   <= left_avail;
        busy   <= 1'b1;
        col    <= '0;
      end
    end
  end

endmodule

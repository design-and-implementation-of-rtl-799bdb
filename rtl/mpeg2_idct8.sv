// mpeg2_idct8: 8x8 inverse DCT for MPEG-2, split into two 1-D IDCTs with a
// transpose buffer between them (row-column decomposition).
//
//   stage 1 (rows):    Z[v][n] = sum_u c(u) * Y[v][u] * cos((2n+1)u*pi/16)
//   stage 2 (columns): x[m][n] = sum_v c(v) * Z[v][n] * cos((2m+1)v*pi/16)
// with c(0) = sqrt(1/8) and c(k) = 1/2 otherwise, which is the 2-D formula
// x = 2/N * sum a(k) a(l) Y cos cos for N = 8. Both stages are
// parallel-in/parallel-out: stage 1 takes a whole row of eight coefficients
// per cycle, stage 2 produces four results per cycle, the upper and then the
// lower half of one output column (the decoder's 1x4 column order). Results
// are saturated to [-256, 255].
//
// Arithmetic: the cosine weights are 13-bit fractions,
// round(8192 * c(k) * cos(k*pi/16)); stage 1 keeps three fractional bits in
// the transpose buffer; stage 2 rounds to an integer. The weights are
// selected by folding the angle index (2n+1)k mod 32 onto cos(0..8*pi/16).
//
// Timing: a block's eight rows enter (in_valid, rows 0..7 in order) while
// in_ready is high; the block is handed to stage 2 when row 7 arrives, and
// stage 2 then emits 16 beats (columns 0..7, upper half first) on
// out_valid/out_col/out_half, starting the cycle after. The next block's rows
// may enter while stage 2 runs; in_ready drops only when a second block is
// complete before stage 2 is free. Block throughput is 16 cycles.
module mpeg2_idct8
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] in_row,
  input  coef_t      in_coef [8],
  output logic       in_ready,
  output logic       out_valid,
  output logic [2:0] out_col,
  output logic       out_half,
  output res4_t      out_res
);
  typedef logic signed [19:0] z_t;        // stage-1 result, 3 fractional bits

  z_t         tbuf  [8][8];               // filled by stage 1, [v][n]
  z_t         s2buf [8][8];               // read by stage 2
  logic       tbuf_full;
  logic       s2_busy;
  logic [3:0] s2_cnt;                     // {column, half}
  z_t         row_z [8];
  res4_t      out_res_d;

  // round(4096 * cos(k*pi/16)), k = 0..8
  localparam logic signed [13:0] CHALF [9] = '{14'sd4096, 14'sd4017, 14'sd3784, 14'sd3406,
                                               14'sd2896, 14'sd2276, 14'sd1567, 14'sd799, 14'sd0};

  // weight c(k) * cos((2n+1)k*pi/16) in 1/8192 units
  function automatic logic signed [13:0] wgt(input int k, input int n);
    int m;
    if (k == 0) return 14'sd2896;
    m = ((2 * n + 1) * k) % 32;
    if (m <= 8)       return CHALF[m];
    else if (m <= 16) return -CHALF[16 - m];
    else if (m <= 24) return -CHALF[m - 16];
    else              return CHALF[32 - m];
  endfunction

  // stage 1: 1-D IDCT of the incoming row
  always_comb begin
    for (int n = 0; n < 8; n++) begin
      logic signed [31:0] acc;
      acc = 32'sd512;                                   // rounding
      for (int u = 0; u < 8; u++) acc += 32'(in_coef[u]) * 32'(wgt(u, n));
      row_z[n] = z_t'(acc >>> 10);
    end
  end

  // stage 2: four outputs of the current column
  always_comb begin
    logic [2:0] col;
    col = s2_cnt[3:1];
    for (int i = 0; i < 4; i++) begin
      logic signed [39:0] acc;
      int m;
      m = 4 * int'(s2_cnt[0]) + i;
      acc = 40'sd32768;                                 // rounding
      for (int v = 0; v < 8; v++) acc += 40'(s2buf[v][col]) * 40'(wgt(v, m));
      out_res_d[i] = coef_t'(clip3(-32'sd256, 32'sd255, 32'(acc >>> 16)));
    end
  end
  assign in_ready = !tbuf_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbuf      <= '{default: '0};
      s2buf     <= '{default: '0};
      tbuf_full <= 1'b0;
      s2_busy   <= 1'b0;
      s2_cnt    <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_half  <= 1'b0;
      out_res   <= '{default: '0};
    end else begin
      out_valid <= s2_busy;
      if (s2_busy) begin
        out_res  <= out_res_d;
        out_col  <= s2_cnt[3:1];
        out_half <= s2_cnt[0];
        s2_cnt   <= s2_cnt + 4'd1;
      end
      if (s2_busy && s2_cnt == 4'd15) s2_busy <= 1'b0;

      if (in_valid && in_ready) begin
        tbuf[in_row] <= row_z;
        if (in_row == 3'd7) begin
          if (!s2_busy || s2_cnt == 4'd15) begin
            // hand the block to stage 2 directly
            for (int v = 0; v < 7; v++) s2buf[v] <= tbuf[v];
            s2buf[7] <= row_z;
            s2_busy  <= 1'b1;
            s2_cnt   <= '0;
          end else begin
            tbuf_full <= 1'b1;
          end
        end
      end else if (tbuf_full && (!s2_busy || s2_cnt == 4'd15)) begin
        s2buf     <= tbuf;
        tbuf_full <= 1'b0;
        s2_busy   <= 1'b1;
        s2_cnt    <= '0;
      end
    end
  end

endmodule

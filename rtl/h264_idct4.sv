// h264_idct4: H.264 4x4 inverse integer transform with column output.
//
// The 1-D kernel is the standard butterfly
//   e0 = d0 + d2, e1 = d0 - d2, e2 = (d1 >> 1) - d3, e3 = d1 + (d3 >> 1)
//   f0 = e0 + e3, f1 = e1 + e2, f2 = e1 - e2, f3 = e0 - e3
// applied first to every row (when the block is loaded, all four rows in
// parallel) and then to one column per cycle; each column leaves as four
// residuals r = (h + 32) >> 6. The row results sit in a 4x4 buffer of
// 18-bit words, the only storage between this stage and the next, which is
// what the 4x4-block pipeline needs.
//
// Timing: a block is accepted when in_valid and in_ready are both high;
// columns 0..3 leave on the four following cycles (out_valid, out_col).
// in_ready is high while the unit is idle or sending its last column, so
// blocks can follow each other every four cycles. A block flagged
// `in_zero` (coded_block_pattern says it has no coefficients) is not
// transformed: the row buffer is not written and four zero columns leave
// with the same timing.
module h264_idct4
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_zero,         // block known to be all zero: skip it
  input  coef_t      in_blk [16],     // raster order, row*4+col
  output logic       in_ready,
  output logic       out_valid,
  output logic [1:0] out_col,
  output res4_t      out_res          // rows 0..3 of column out_col
);
  typedef logic signed [17:0] t18_t;
  t18_t       rowbuf [16];
  t18_t       rows_d [16];
  logic       busy;
  logic       zero_blk;
  logic [1:0] col;
  res4_t      col_res;

  function automatic void idct1d(input logic signed [17:0] d0, input logic signed [17:0] d1,
                                 input logic signed [17:0] d2, input logic signed [17:0] d3,
                                 output logic signed [17:0] f0, output logic signed [17:0] f1,
                                 output logic signed [17:0] f2, output logic signed [17:0] f3);
    logic signed [17:0] e0, e1, e2, e3;
    e0 = d0 + d2;
    e1 = d0 - d2;
    e2 = (d1 >>> 1) - d3;
    e3 = d1 + (d3 >>> 1);
    f0 = e0 + e3;
    f1 = e1 + e2;
    f2 = e1 - e2;
    f3 = e0 - e3;
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++)
      idct1d(18'(in_blk[i*4]), 18'(in_blk[i*4+1]), 18'(in_blk[i*4+2]), 18'(in_blk[i*4+3]),
             rows_d[i*4], rows_d[i*4+1], rows_d[i*4+2], rows_d[i*4+3]);
  end

  always_comb begin
    t18_t h0, h1, h2, h3;
    idct1d(rowbuf[{2'd0, col}], rowbuf[{2'd1, col}], rowbuf[{2'd2, col}], rowbuf[{2'd3, col}],
           h0, h1, h2, h3);
    col_res[0] = coef_t'((h0 + 18'sd32) >>> 6);
    col_res[1] = coef_t'((h1 + 18'sd32) >>> 6);
    col_res[2] = coef_t'((h2 + 18'sd32) >>> 6);
    col_res[3] = coef_t'((h3 + 18'sd32) >>> 6);
  end

  assign in_ready = !busy || col == 2'd3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rowbuf    <= '{default: '0};
      zero_blk  <= 1'b0;
      busy      <= 1'b0;
      col       <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_res   <= '{default: '0};
    end else begin
      out_valid <= busy;
      if (busy) begin
        out_res <= zero_blk ? '{default: '0} : col_res;
        out_col <= col;
        col     <= col + 2'd1;
        if (col == 2'd3) busy <= 1'b0;
      end
      if (in_valid && in_ready) begin
        if (!in_zero) rowbuf <= rows_d;     // all-zero blocks leave the buffer idle
        zero_blk <= in_zero;
        busy     <= 1'b1;
        col      <= '0;
      end
    end
  end

endmodule

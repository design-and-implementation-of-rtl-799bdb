// runlevel_dec: run-level expansion and inverse scan for both standards.
//
// The entropy decoder (CAVLC for H.264, table VLC for MPEG-2) delivers
// (run, level) pairs. Starting from an all-zero block, this unit skips `run`
// scan positions, stores `level` at the next one, and on end-of-block
// releases the whole block in raster order. The scan position is mapped to
// a raster position by the H.264 4x4 zig-zag scan, or, for MPEG-2 8x8
// blocks, by the zig-zag (alternate_scan = 0) or the alternate
// (alternate_scan = 1) scan of the MPEG-2 standard.
//
// MPEG-2 intra DC: a `dc_valid` strobe carries dct_diff and the colour
// component cc; the coefficient is QFS[0] = dc_dct_pred[cc] + dct_diff and
// the predictor keeps the result. `dc_reset` returns all three predictors
// to 2^(7+intra_dc_precision) (start of slice, non-intra or skipped
// macroblock), the reset value of the MPEG-2 standard.
//
// Timing: one pair per cycle; `blk_valid` pulses the cycle after `eob`,
// and `blk` holds the block until the next `start`. `first_idx` lets an
// H.264 Intra16x16 AC block begin at scan position 1.
module runlevel_dec
  import vdec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  video_mode_e mode,
  input  logic        alt_scan,
  input  logic        start,            // clear block, begin at first_idx
  input  logic [5:0]  first_idx,
  input  logic        rl_valid,
  input  logic [5:0]  run,
  input  coef_t       level,
  input  logic        eob,
  input  logic        dc_valid,         // MPEG-2 intra DC differential
  input  coef_t       dct_diff,
  input  logic [1:0]  cc,
  input  logic [1:0]  intra_dc_precision,
  input  logic        dc_reset,
  output coef_t       blk [64],
  output logic        blk_valid
);
  logic [6:0] n;                         // next scan position
  coef_t      dc_pred [3];
  logic [6:0] pos;
  logic [5:0] rpos;

  function automatic logic [5:0] zz4(input logic [3:0] i);
    case (i)
      4'd0: return 6'd0;   4'd1: return 6'd1;   4'd2: return 6'd4;   4'd3: return 6'd8;
      4'd4: return 6'd5;   4'd5: return 6'd2;   4'd6: return 6'd3;   4'd7: return 6'd6;
      4'd8: return 6'd9;   4'd9: return 6'd12;  4'd10: return 6'd13; 4'd11: return 6'd10;
      4'd12: return 6'd7;  4'd13: return 6'd11; 4'd14: return 6'd14; default: return 6'd15;
    endcase
  endfunction

  // MPEG-2 zig-zag scan, computed: walk anti-diagonals d = u+v, alternating
  // direction (even d runs up-right, odd d runs down-left).
  function automatic logic [5:0] zz8(input logic [5:0] i);
    int k, d, u, v, len, first;
    k = 0; u = 0; v = 0;
    for (d = 0; d < 15; d++) begin
      first = (d < 8) ? 0 : d - 7;
      len   = (d < 8) ? d + 1 : 15 - d;
      if (int'(i) >= k && int'(i) < k + len) begin
        if (d % 2 == 0) begin v = d - first - (int'(i) - k); u = d - v; end
        else            begin u = d - first - (int'(i) - k); v = d - u; end
      end
      k += len;
    end
    return 6'(v * 8 + u);
  endfunction

  // MPEG-2 alternate scan, raster position (v*8+u) of each scan index.
  function automatic logic [5:0] alt8(input logic [5:0] i);
    logic [5:0] t [64];
    t = '{ 0,  8, 16, 24,  1,  9,  2, 10, 17, 25, 32, 40, 48, 56, 57, 49,
          41, 33, 26, 18,  3, 11,  4, 12, 19, 27, 34, 42, 50, 58, 35, 43,
          51, 59, 20, 28,  5, 13,  6, 14, 21, 29, 36, 44, 52, 60, 37, 45,
          53, 61, 22, 30,  7, 15, 23, 31, 38, 46, 54, 62, 39, 47, 55, 63};
    return t[i];
  endfunction

  always_comb begin
    pos = n + 7'(run);
    if (mode == MODE_H264) rpos = zz4(pos[3:0]);
    else if (alt_scan)     rpos = alt8(pos[5:0]);
    else                   rpos = zz8(pos[5:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk       <= '{default: '0};
      blk_valid <= 1'b0;
      n         <= '0;
      dc_pred   <= '{default: coef_t'(128)};
    end else begin
      blk_valid <= 1'b0;
      if (dc_reset) dc_pred <= '{default: coef_t'(16'sd128 <<< intra_dc_precision)};
      if (start) begin
        blk <= '{default: '0};
        n   <= {1'b0, first_idx};
      end else if (dc_valid) begin
        blk[0]      <= dc_pred[cc] + dct_diff;
        dc_pred[cc] <= dc_pred[cc] + dct_diff;
        n           <= 7'd1;
      end else if (rl_valid) begin
        // positions past the end of the block are dropped (corrupt stream)
        if ((mode == MODE_H264 && pos < 7'd16) || (mode == MODE_MPEG2 && pos < 7'd64))
          blk[rpos] <= level;
        n <= pos + 7'd1;
      end
      if (eob && !start) blk_valid <= 1'b1;
    end
  end

endmodule

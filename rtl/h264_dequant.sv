// h264_dequant: H.264 4x4 coefficient rescaling (de-quantiser).
//
// Every coefficient c[i][j] of a 4x4 block becomes
//   d[i][j] = (c[i][j] * LevelScale(qP % 6, i, j)) << (qP / 6)
// with the LevelScale table of the standard (vdec_pkg::level_scale). When
// `dc_bypass` is set (Intra16x16 luma or chroma blocks) position 0 already
// holds a DC value scaled by h264_dc_transform and passes unchanged.
// Results are clipped to 16 bits; a conforming stream stays inside them.
//
// Interface: block in raster order (i*4+j, i = row). Timing: one block per
// cycle, out_valid one cycle after in_valid. `en` low holds the output
// registers (a stall from the next stage); with in_valid low the data
// registers do not change, which is how an all-zero block skips the unit.
module h264_dequant
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_valid,
  input  coef_t      in_blk [16],
  input  logic [5:0] qp,
  input  logic       dc_bypass,
  output logic       out_valid,
  output coef_t      out_blk [16]
);
  logic [2:0] qp_mod;
  logic [3:0] qp_div;
  coef_t      d [16];

  assign qp_div = 4'(qp / 6);
  assign qp_mod = 3'(qp % 6);

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      logic signed [31:0] p;
      p = (32'(in_blk[k]) * $signed({27'd0, level_scale(qp_mod, k[2], k[0])})) <<< qp_div;
      d[k] = coef_t'(clip3(-32'sd32768, 32'sd32767, p));
    end
    if (dc_bypass) d[0] = in_blk[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '{default: '0};
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) out_blk <= d;
    end
  end

endmodule

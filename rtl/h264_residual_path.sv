// h264_residual_path: the H.264 residual recovery path of the 4x4-block
// pipeline: de-quantiser followed by the inverse integer transform, with
// the coded-block-pattern shortcut.
//
// A 4x4 block of levels (raster order, DC already scaled when dc_bypass)
// enters when in_valid and in_ready are high. Normal blocks are rescaled by
// h264_dequant, held in its output register (the one 4x4 buffer between the
// two stages) and transformed by h264_idct4, which sends the residuals out
// as four columns of four values. When the coded_block_pattern shows that
// the block carries no coefficients (`all_zero`), neither the de-quantiser
// nor the transform loads any data: the block travels only as a flag and
// the transform stage emits zero columns in its place. For high-QP video
// most blocks are of this kind, which is where the power saving comes from.
//
// Timing: two-stage valid/ready pipeline, one block every four cycles;
// the first column of a block leaves three cycles after it was accepted.
// `bypass` pulses for each block that took the shortcut.
module h264_residual_path
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  coef_t      in_blk [16],
  input  logic [5:0] qp,
  input  logic       dc_bypass,
  input  logic       all_zero,
  output logic       out_valid,
  output logic [1:0] out_col,
  output res4_t      out_res,
  output logic       bypass
);
  logic  s1_valid, s1_zero;
  logic  idct_ready;
  logic  dq_valid;
  coef_t dq_blk [16];

  assign in_ready = !s1_valid || idct_ready;
  assign bypass   = in_valid && in_ready && all_zero;

  h264_dequant u_dequant (
    .clk, .rst_n,
    .en        (in_ready),
    .in_valid  (in_valid && !all_zero),
    .in_blk,
    .qp,
    .dc_bypass,
    .out_valid (dq_valid),
    .out_blk   (dq_blk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_zero  <= 1'b0;
    end else if (in_ready) begin
      s1_valid <= in_valid;
      s1_zero  <= all_zero;
    end
  end

  h264_idct4 u_idct (
    .clk, .rst_n,
    .in_valid  (s1_valid),
    .in_zero   (s1_zero || !dq_valid),
    .in_blk    (dq_blk),
    .in_ready  (idct_ready),
    .out_valid,
    .out_col,
    .out_res
  );

endmodule

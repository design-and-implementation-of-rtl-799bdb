// h264_dc_transform: inverse Hadamard transform and scaling of the DC
// coefficients of H.264 Intra16x16 luma (4x4 DCs) and chroma (2x2 DCs).
//
// Luma:   f = H4 * c * H4, H4 = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]
//         QP >= 12: dcY = (f * LevelScale(QP%6,0,0)) << (QP/6 - 2)
//         QP <  12: dcY = (f * LevelScale(QP%6,0,0) + 2^(1-QP/6)) >> (2 - QP/6)
// Chroma: f = H2 * c * H2, H2 = [1 1; 1 -1]
//         QPc >= 6: dcC = (f * LevelScale(QPc%6,0,0)) << (QPc/6 - 1)
//         QPc <  6: dcC = (f * LevelScale(QPc%6,0,0)) >> 1
// (the rounding right shifts for small QP follow the H.264 standard).
//
// Interface: `dc_in` in raster order (4x4 luma, or entries 0..3 as a 2x2
// chroma block), `qp` is QP'Y or QP'C. Timing: result registered, one cycle
// after in_valid; unused outputs of the chroma case are zero.
module h264_dc_transform
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       is_chroma,
  input  logic [5:0] qp,
  input  coef_t      dc_in [16],
  output logic       out_valid,
  output coef_t      dc_out [16]
);
  logic signed [31:0] f [16];
  coef_t              s [16];
  logic [3:0]         qp_div;
  logic [4:0]         ls;

  assign qp_div = 4'(qp / 6);
  assign ls     = level_scale(3'(qp % 6), 1'b0, 1'b0);

  // entry (r, c) of H4 is -1 where the row's sign pattern says so
  localparam logic [15:0] H4_NEG = 16'b1010_0110_1100_0000;  // bit r*4+c set: -1
  function automatic logic signed [31:0] h4(input logic [1:0] r, input logic [1:0] c);
    return H4_NEG[{r, c}] ? -32'sd1 : 32'sd1;
  endfunction

  always_comb begin
    logic signed [31:0] t [16];
    logic signed [31:0] a, b, c, d, p, r;
    f = '{default: '0};
    t = '{default: '0};
    a = '0; b = '0; c = '0; d = '0; p = '0; r = '0;
    if (!is_chroma) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          for (int k = 0; k < 4; k++) t[i*4+j] += h4(2'(i), 2'(k)) * 32'(dc_in[k*4+j]);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          for (int k = 0; k < 4; k++) f[i*4+j] += t[i*4+k] * h4(2'(k), 2'(j));
    end else begin
      a = 32'(dc_in[0]); b = 32'(dc_in[1]); c = 32'(dc_in[2]); d = 32'(dc_in[3]);
      f[0] = a + b + c + d;
      f[1] = a - b + c - d;
      f[2] = a + b - c - d;
      f[3] = a - b - c + d;
    end
    for (int k = 0; k < 16; k++) begin
      p = f[k] * $signed({27'd0, ls});
      if (!is_chroma) begin
        if (qp >= 6'd12) r = p <<< (qp_div - 4'd2);
        else             r = (p + (32'sd1 <<< (4'd1 - qp_div))) >>> (4'd2 - qp_div);
      end else begin
        if (qp >= 6'd6)  r = p <<< (qp_div - 4'd1);
        else             r = p >>> 1;
      end
      s[k] = (is_chroma && k > 3) ? '0 : coef_t'(clip3(-32'sd32768, 32'sd32767, r));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dc_out    <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) dc_out <= s;
    end
  end

endmodule

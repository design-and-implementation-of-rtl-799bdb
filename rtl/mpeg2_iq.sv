// mpeg2_iq: MPEG-2 inverse quantiser for 8x8 blocks, one row per cycle.
//
// Each input row QF[v][0..7] is rescaled in three steps, as the MPEG-2
// standard defines them:
//   arithmetic  intra DC:   F'' = intra_dc_mult * QF, intra_dc_mult = 8 >> intra_dc_precision
//               intra AC:   F'' = (QF * W * quantiser_scale * 2) / 32
//               non-intra:  F'' = ((2*QF + Sign(QF)) * W * quantiser_scale) / 32
//               ('/' truncates toward zero)
//   saturation  F' = clamp(F'', -2048, 2047)
//   mismatch    if the sum of all 64 F' is even, the LSB of F[7][7] is
//               toggled (odd values step down by one, even values up).
// W is the intra or the non-intra weighting matrix from the shared
// parameter registers; quantiser_scale comes from quantiser_scale_code
// through the linear (q_scale_type = 0, 2*code) or the non-linear mapping.
// Only the parity of the sum matters, so a running parity bit is kept; row
// 7 is the last row of a block, so its own parity joins in the same cycle
// and no extra latency is needed.
//
// Timing: rows enter with in_valid and their row index (0..7, in order);
// each leaves one cycle later on out_row/out_valid.
module mpeg2_iq
  import vdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] in_row,
  input  coef_t      qf [8],
  input  logic       intra,               // macroblock_intra
  input  logic [1:0] intra_dc_precision,
  input  logic [4:0] quantiser_scale_code,
  input  logic       q_scale_type,
  input  logic [7:0] w_intra [64],
  input  logic [7:0] w_non_intra [64],
  output logic       out_valid,
  output logic [2:0] out_row_idx,
  output coef_t      out_row [8]
);
  logic [6:0] qscale;
  logic       parity;                       // running sum LSB of rows 0..in_row-1
  coef_t      sat [8];
  logic       row_par;

  function automatic logic [6:0] nonlinear_q(input logic [4:0] c);
    case (c)
      5'd0: return 7'd0;    5'd1: return 7'd1;    5'd2: return 7'd2;    5'd3: return 7'd3;
      5'd4: return 7'd4;    5'd5: return 7'd5;    5'd6: return 7'd6;    5'd7: return 7'd7;
      5'd8: return 7'd8;    5'd9: return 7'd10;   5'd10: return 7'd12;  5'd11: return 7'd14;
      5'd12: return 7'd16;  5'd13: return 7'd18;  5'd14: return 7'd20;  5'd15: return 7'd22;
      5'd16: return 7'd24;  5'd17: return 7'd28;  5'd18: return 7'd32;  5'd19: return 7'd36;
      5'd20: return 7'd40;  5'd21: return 7'd44;  5'd22: return 7'd48;  5'd23: return 7'd52;
      5'd24: return 7'd56;  5'd25: return 7'd64;  5'd26: return 7'd72;  5'd27: return 7'd80;
      5'd28: return 7'd88;  5'd29: return 7'd96;  5'd30: return 7'd104; default: return 7'd112;
    endcase
  endfunction

  // signed division by 32 truncating toward zero
  function automatic logic signed [31:0] div32(input logic signed [31:0] x);
    if (x < 0) return -((-x) >>> 5);
    else       return x >>> 5;
  endfunction

  assign qscale = q_scale_type ? nonlinear_q(quantiser_scale_code) : {1'b0, quantiser_scale_code, 1'b0};

  always_comb begin
    row_par = 1'b0;
    for (int u = 0; u < 8; u++) begin
      logic signed [31:0] q, w, f2;
      q = 32'(qf[u]);
      w = {24'd0, intra ? w_intra[{in_row, 3'(u)}] : w_non_intra[{in_row, 3'(u)}]};
      if (intra && in_row == 3'd0 && u == 0)
        f2 = q * (32'sd8 >>> intra_dc_precision);
      else if (intra)
        f2 = div32(q * w * $signed({25'd0, qscale}) * 2);
      else
        f2 = div32((q * 2 + ((q > 0) ? 32'sd1 : (q < 0) ? -32'sd1 : 32'sd0)) * w * $signed({25'd0, qscale}));
      sat[u] = coef_t'(clip3(-32'sd2048, 32'sd2047, f2));
      row_par ^= sat[u][0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      parity      <= 1'b0;
      out_valid   <= 1'b0;
      out_row_idx <= '0;
      out_row     <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_row_idx <= in_row;
        parity      <= (in_row == 3'd0) ? row_par : parity ^ row_par;
        out_row     <= sat;
        if (in_row == 3'd7 && !(parity ^ row_par))
          out_row[7] <= {sat[7][15:1], ~sat[7][0]};
      end
    end
  end

endmodule

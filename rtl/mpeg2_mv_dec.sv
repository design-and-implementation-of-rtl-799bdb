// mpeg2_mv_dec: MPEG-2 motion-vector decoder with its vector predictors.
//
// What it does: turns one decoded (motion_code, motion_residual) pair into a
// motion-vector component, using the predictor PMV[r][s][t] for vector r,
// direction s (forward/backward) and component t (horizontal/vertical), then
// writes the new vector back into PMV. The arithmetic is the standard MPEG-2
// vector reconstruction: r_size = f_code - 1, f = 1 << r_size,
// delta = (|motion_code| - 1) * f + motion_residual + 1 (sign of
// motion_code), vector = PMV + delta wrapped into [-16f, 16f - 1].
//
// How it works: the eight PMV registers are flops. The multiply by f is a
// shift. The result is registered, so `valid` rises one cycle after `in_valid`
// and PMV is updated in that same edge.
//
// Interface: `in_valid` with r/s/t, f_code (1..9) and motion_code
// (-16..16) plus motion_residual (r_size bits); `pmv_reset` clears all eight
// predictors (at the start of a slice, after an intra macroblock, or a skipped
// P macroblock - the caller decides when). `vec` is the reconstructed vector
// in half-sample units.
//
// Document vs. own choice: the reconstruction algorithm follows the document.
// Field/frame vector scaling and dual-prime arithmetic are not part of this
// block; the caller does them.
module mpeg2_mv_dec #(
  parameter int MVW = 13            // vector width: f_code 9 gives [-4096, 4095]
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pmv_reset,
  input  logic                  in_valid,
  input  logic                  r,
  input  logic                  s,
  input  logic                  t,
  input  logic [3:0]            f_code,
  input  logic signed [5:0]     motion_code,
  input  logic [7:0]            motion_residual,
  output logic                  valid,
  output logic signed [MVW-1:0] vec
);
  logic signed [MVW-1:0] pmv [2][2][2];
  logic signed [MVW+1:0] nv;

  always_comb begin
    logic [3:0] r_size;
    logic signed [MVW+1:0] f, high, low, range, delta, mag;
    r_size = (f_code == 4'd0) ? 4'd0 : f_code - 4'd1;
    f      = (MVW+2)'(1) <<< r_size;
    high   = (f <<< 4) - 1;
    low    = -(f <<< 4);
    range  = f <<< 5;
    mag    = (motion_code < 0) ? -(MVW+2)'(motion_code) : (MVW+2)'(motion_code);
    if (f == 1 || motion_code == 0)
      delta = (MVW+2)'(motion_code);
    else begin
      delta = ((mag - 1) <<< r_size) + (MVW+2)'(motion_residual) + 1;
      if (motion_code < 0) delta = -delta;
    end
    nv = (MVW+2)'(pmv[r][s][t]) + delta;
    if (nv < low)  nv = nv + range;
    if (nv > high) nv = nv - range;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pmv   <= '{default: '0};
      valid <= 1'b0;
      vec   <= '0;
    end else begin
      valid <= in_valid;
      if (pmv_reset) pmv <= '{default: '0};
      else if (in_valid) begin
        pmv[r][s][t] <= MVW'(nv);
        vec          <= MVW'(nv);
      end
    end
  end
endmodule

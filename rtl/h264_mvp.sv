// h264_mvp: H.264 motion-vector predictor and vector reconstruction.
//
// What it does: from the motion vectors and reference indices of the left
// (A), upper (B), upper-right (C) and upper-left (D) neighbour partitions it
// forms the prediction MVP and outputs mv = MVP + mvd. Rules implemented,
// as the standard specifies them for the baseline profile:
//   * C is replaced by D when C is unavailable;
//   * if B and C are both unavailable and A is available, A is used for all three;
//   * if exactly one neighbour uses the same reference index, its vector is MVP;
//   * otherwise MVP is the component-wise median of A, B, C;
//   * 16x8 and 8x16 partitions use the directional rule (B for the top 16x8,
//     A for the bottom 16x8 and left 8x16, C for the right 8x16) when that
//     neighbour has the same reference index;
//   * P_Skip gives a zero vector when A or B is unavailable or has a zero
//     vector with reference index 0.
// An unavailable neighbour has reference index -1 and a zero vector.
//
// How it works: all rules are one combinational decision; the result is
// registered, so `valid` follows `in_valid` by one cycle.
//
// Interface: neighbour vectors as mv_t structs (x, y in quarter samples),
// reference indices as signed 6-bit values, `part` selects the partition
// shape rule. The neighbour motion vectors come from the caller's
// neighbour buffers.
//
// Document vs. own choice: the document only says MVP is calculated from the
// neighbouring blocks' motion vectors held in shift registers and buffers;
// the rules themselves are the standard's.
module h264_mvp
  import vdec_pkg::*;
#(
  parameter int MVW = 14            // quarter-sample vector width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [2:0]            part,       // 0 normal, 1 16x8 top, 2 16x8 bottom, 3 8x16 left, 4 8x16 right
  input  logic                  p_skip,
  input  logic                  avail_a,
  input  logic                  avail_b,
  input  logic                  avail_c,
  input  logic                  avail_d,
  input  logic signed [MVW-1:0] mva_x, mva_y, mvb_x, mvb_y, mvc_x, mvc_y, mvd_nb_x, mvd_nb_y,
  input  logic signed [5:0]     ref_a, ref_b, ref_c, ref_d,
  input  logic signed [5:0]     ref_idx,
  input  logic signed [MVW-1:0] mvd_x, mvd_y,
  output logic                  valid,
  output logic signed [MVW-1:0] mvp_x, mvp_y,
  output logic signed [MVW-1:0] mv_x, mv_y
);
  function automatic logic signed [MVW-1:0] med3(input logic signed [MVW-1:0] a, b, c);
    logic signed [MVW-1:0] mx, mn;
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    return (c > mx) ? mx : (c < mn) ? mn : c;
  endfunction

  logic signed [MVW-1:0] px, py;

  always_comb begin
    logic signed [MVW-1:0] ax, ay, bx, by, cx, cy;
    logic signed [5:0] ra, rb, rc;
    logic ea, eb, ec, av_c;
    ax = avail_a ? mva_x : '0;  ay = avail_a ? mva_y : '0;  ra = avail_a ? ref_a : -6'sd1;
    bx = avail_b ? mvb_x : '0;  by = avail_b ? mvb_y : '0;  rb = avail_b ? ref_b : -6'sd1;
    av_c = avail_c || avail_d;
    if (avail_c) begin cx = mvc_x; cy = mvc_y; rc = ref_c; end
    else if (avail_d) begin cx = mvd_nb_x; cy = mvd_nb_y; rc = ref_d; end
    else begin cx = '0; cy = '0; rc = -6'sd1; end
    if (!avail_b && !av_c && avail_a) begin
      bx = ax; by = ay; rb = ra; cx = ax; cy = ay; rc = ra;
    end
    ea = (ra == ref_idx); eb = (rb == ref_idx); ec = (rc == ref_idx);
    if (p_skip && (!avail_a || !avail_b ||
                   (ref_a == 0 && mva_x == 0 && mva_y == 0) ||
                   (ref_b == 0 && mvb_x == 0 && mvb_y == 0))) begin
      px = '0; py = '0;
    end else if (part == 3'd1 && eb) begin px = bx; py = by; end
    else if (part == 3'd2 && ea) begin px = ax; py = ay; end
    else if (part == 3'd3 && ea) begin px = ax; py = ay; end
    else if (part == 3'd4 && ec) begin px = cx; py = cy; end
    else if (ea && !eb && !ec) begin px = ax; py = ay; end
    else if (!ea && eb && !ec) begin px = bx; py = by; end
    else if (!ea && !eb && ec) begin px = cx; py = cy; end
    else begin px = med3(ax, bx, cx); py = med3(ay, by, cy); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; mvp_x <= '0; mvp_y <= '0; mv_x <= '0; mv_y <= '0;
    end else begin
      valid <= in_valid;
      if (in_valid) begin
        mvp_x <= px; mvp_y <= py;
        mv_x  <= p_skip ? px : px + mvd_x;
        mv_y  <= p_skip ? py : py + mvd_y;
      end
    end
  end
endmodule

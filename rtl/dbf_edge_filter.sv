// dbf_edge_filter: combined H.264 in-loop / MPEG-2 post-loop edge filter.
//
// What it does: filters one line of pixels across one block edge per cycle
// (pixel-in, pixel-out). Five pixels are taken on each side; p[0] and q[0]
// touch the edge. Three data flows exist and `out_mode` reports which one
// ran:
//   * STRONG - the H.264 bS = 4 filter (up to three pixels per side).
//     In MPEG-2 mode it stands in for the MPEG-4 post-filter DC-offset mode
//     on flat areas (eq_cnt >= THR2 and max - min < 2*QP over v1..v8);
//   * WEAK   - the H.264 bS < 4 filter (tc-clipped delta), or in MPEG-2
//     mode the MPEG-4 default mode with the [2 -4 4 -2] kernel, which
//     changes v4 and v5 only;
//   * SKIP   - the line passes unchanged (bS = 0, the H.264 activity tests
//     fail, the MPEG-2 correction is zero, or the filter is disabled).
// `enable` low is the user low-power mode: every line is passed through.
//
// How it works: all three flows are computed combinationally from the same
// ten pixels and one is selected; the output is registered, so `out_valid`
// follows `in_valid` by one cycle at one line per cycle.
//
// Interface: `mode` selects the standard; `chroma` selects the H.264
// chroma rules (only p0/q0 change); bS, alpha, beta and tc0 are supplied
// by the caller for H.264 (they come from the standard's tables indexed by
// QP and the filter offsets); `qp` is the MPEG-2 quantiser scale for the
// post-filter. p[4]/q[4] are used by MPEG-2 mode only.
//
// Document vs. own choice: the triple-mode decision, the use of the bS = 4
// filter for the DC-offset mode and the [2 -4 4 -2] kernel follow the
// document. The MPEG-2 thresholds THR1 = 2 and THR2 = 6 and the default-mode
// equations are taken from the MPEG-4 post-filter the document builds on.
// In MPEG-2 strong mode the bS = 4 equations are applied without the
// H.264 alpha/beta gate, since the flatness test already selected it.
module dbf_edge_filter
  import vdec_pkg::*;
#(
  parameter int THR1 = 2,           // MPEG-2 flatness: |v_i - v_i+1| <= THR1 counts
  parameter int THR2 = 6            // MPEG-2 flatness: count >= THR2 selects strong mode
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,       // 0: low-power mode, filter bypassed
  input  video_mode_e mode,
  input  logic        in_valid,
  input  logic        chroma,
  input  logic [2:0]  bs,
  input  logic [7:0]  alpha,
  input  logic [7:0]  beta,
  input  logic [4:0]  tc0,
  input  logic [4:0]  qp,
  input  pixel_t      p [5],
  input  pixel_t      q [5],
  output logic        out_valid,
  output pixel_t      out_p [5],
  output pixel_t      out_q [5],
  output dbf_mode_e   out_mode
);
  pixel_t    np [5], nq [5];
  dbf_mode_e nmode;

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int imin(input int a, input int b);
    return (a < b) ? a : b;
  endfunction
  function automatic int imax(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    int p0, p1, p2, p3, q0, q1, q2, q3;
    int v [10];
    int ap, aq, tc, delta, eq_cnt, vmax, vmin;
    int a30, a31, a32, a30n, d, h, dq;
    logic strong_sel;
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    for (int i = 0; i < 5; i++) begin
      v[4 - i] = int'(p[i]);
      v[5 + i] = int'(q[i]);
    end
    np = p; nq = q; nmode = DBF_SKIP;
    ap = iabs(p2 - p0); aq = iabs(q2 - q0);
    tc = 0; delta = 0; a30 = 0; a31 = 0; a32 = 0; a30n = 0; d = 0; h = 0; dq = 0;
    eq_cnt = 0; vmax = v[1]; vmin = v[1];
    for (int i = 0; i < 9; i++) eq_cnt += (iabs(v[i] - v[i + 1]) <= THR1) ? 1 : 0;
    for (int i = 1; i < 9; i++) begin vmax = imax(vmax, v[i]); vmin = imin(vmin, v[i]); end
    strong_sel = 1'b0;
    if (!enable) begin
      nmode = DBF_SKIP;
    end else if (mode == MODE_H264) begin
      if (bs != 3'd0 && iabs(p0 - q0) < int'(alpha) && iabs(p1 - p0) < int'(beta)
          && iabs(q1 - q0) < int'(beta)) begin
        if (bs == 3'd4) begin
          nmode = DBF_STRONG;
          strong_sel = 1'b1;
        end else begin
          nmode = DBF_WEAK;
          tc = chroma ? int'(tc0) + 1
                      : int'(tc0) + ((ap < int'(beta)) ? 1 : 0) + ((aq < int'(beta)) ? 1 : 0);
          delta = clip3(-tc, tc, (((q0 - p0) <<< 2) + (p1 - q1) + 4) >>> 3);
          np[0] = clip1(p0 + delta);
          nq[0] = clip1(q0 - delta);
          if (!chroma && ap < int'(beta))
            np[1] = pixel_t'(p1 + clip3(-int'(tc0), int'(tc0), (p2 + ((p0 + q0 + 1) >>> 1) - (p1 <<< 1)) >>> 1));
          if (!chroma && aq < int'(beta))
            nq[1] = pixel_t'(q1 + clip3(-int'(tc0), int'(tc0), (q2 + ((p0 + q0 + 1) >>> 1) - (q1 <<< 1)) >>> 1));
        end
      end
    end else begin
      if (eq_cnt >= THR2 && (vmax - vmin) < 2 * int'(qp)) begin
        nmode = DBF_STRONG;
        strong_sel = 1'b1;
        ap = 0; aq = 0;                  // flatness already established
      end else begin
        a30 = (2 * v[3] - 4 * v[4] + 4 * v[5] - 2 * v[6] + 4) >>> 3;
        a31 = (2 * v[1] - 4 * v[2] + 4 * v[3] - 2 * v[4] + 4) >>> 3;
        a32 = (2 * v[5] - 4 * v[6] + 4 * v[7] - 2 * v[8] + 4) >>> 3;
        if (iabs(a30) < int'(qp)) begin
          a30n = imin(iabs(a30), imin(iabs(a31), iabs(a32)));
          if (a30 < 0) a30n = -a30n;
          dq = 5 * (a30n - a30);
          dq = (dq < 0) ? -((-dq + 4) >>> 3) : ((dq + 4) >>> 3);
          h = (v[4] - v[5]) / 2;
          d = clip3(imin(0, h), imax(0, h), dq);
          if (d != 0) begin
            nmode = DBF_WEAK;
            np[0] = pixel_t'(v[4] - d);
            nq[0] = pixel_t'(v[5] + d);
          end
        end
      end
    end
    if (strong_sel) begin
      if (mode == MODE_MPEG2 || (!chroma && ap < int'(beta) && iabs(p0 - q0) < ((int'(alpha) >>> 2) + 2))) begin
        np[0] = pixel_t'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3);
        np[1] = pixel_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
        np[2] = pixel_t'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >>> 3);
      end else
        np[0] = pixel_t'((2 * p1 + p0 + q1 + 2) >>> 2);
      if (mode == MODE_MPEG2 || (!chroma && aq < int'(beta) && iabs(p0 - q0) < ((int'(alpha) >>> 2) + 2))) begin
        nq[0] = pixel_t'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >>> 3);
        nq[1] = pixel_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
        nq[2] = pixel_t'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >>> 3);
      end else
        nq[0] = pixel_t'((2 * q1 + q0 + p1 + 2) >>> 2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_p     <= '{default: '0};
      out_q     <= '{default: '0};
      out_mode  <= DBF_SKIP;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_p    <= np;
        out_q    <= nq;
        out_mode <= nmode;
      end
    end
  end
endmodule

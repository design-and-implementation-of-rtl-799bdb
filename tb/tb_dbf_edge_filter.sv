// tb_dbf_edge_filter: random edge lines, biased towards small steps so that
// every data flow is taken, in both standards, luma and chroma, with all bS
// values and with the low-power bypass. The reference below is an
// independent rendering of the H.264 edge filter and of the MPEG-4 style
// post-filter with the [2 -4 4 -2] kernel and the bS = 4 strong flow.
module tb_dbf_edge_filter;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0, enable, in_valid, chroma, out_valid;
  video_mode_e mode; logic [2:0] bs; logic [7:0] alpha, beta; logic [4:0] tc0, qp;
  pixel_t p [5], q [5], out_p [5], out_q [5]; dbf_mode_e out_mode;
  int checks = 0, failures = 0;
  int cnt [2][3];          // [standard][mode]
  int n_bypass = 0;
  dbf_edge_filter dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int ab(int x); return x < 0 ? -x : x; endfunction
  function automatic int cl(int lo, int hi, int x); return x < lo ? lo : x > hi ? hi : x; endfunction

  // returns mode; edits P/Q in place
  function automatic int ref_filter(int md, bit en, bit ch, int bS, int al, int be, int t0, int QP,
                                    ref int P[5], ref int Q[5]);
    int R[5], S[5];
    R = P; S = Q;
    if (!en) return 0;
    if (md == 0) begin
      bit go = bS > 0 && ab(P[0] - Q[0]) < al && ab(P[1] - P[0]) < be && ab(Q[1] - Q[0]) < be;
      int a_p = ab(P[2] - P[0]), a_q = ab(Q[2] - Q[0]);
      if (!go) return 0;
      if (bS < 4) begin
        int tc = ch ? t0 + 1 : t0 + (a_p < be) + (a_q < be);
        int dl = cl(-tc, tc, (((Q[0] - P[0]) * 4) + (P[1] - Q[1]) + 4) >>> 3);
        R[0] = cl(0, 255, P[0] + dl); S[0] = cl(0, 255, Q[0] - dl);
        if (!ch && a_p < be) R[1] = P[1] + cl(-t0, t0, (P[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * P[1]) >>> 1);
        if (!ch && a_q < be) S[1] = Q[1] + cl(-t0, t0, (Q[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * Q[1]) >>> 1);
        P = R; Q = S; return 1;
      end
      if (!ch && a_p < be && ab(P[0] - Q[0]) < (al / 4 + 2)) begin
        R[0] = (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) / 8;
        R[1] = (P[2] + P[1] + P[0] + Q[0] + 2) / 4;
        R[2] = (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) / 8;
      end else R[0] = (2*P[1] + P[0] + Q[1] + 2) / 4;
      if (!ch && a_q < be && ab(P[0] - Q[0]) < (al / 4 + 2)) begin
        S[0] = (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) / 8;
        S[1] = (P[0] + Q[0] + Q[1] + Q[2] + 2) / 4;
        S[2] = (2*Q[3] + 3*Q[2] + Q[1] + Q[0] + P[0] + 4) / 8;
      end else S[0] = (2*Q[1] + Q[0] + P[1] + 2) / 4;
      P = R; Q = S; return 2;
    end else begin
      int v[10], eq = 0, mx = -1, mn = 999;
      for (int i = 0; i < 5; i++) begin v[4 - i] = P[i]; v[5 + i] = Q[i]; end
      for (int i = 0; i < 9; i++) if (ab(v[i] - v[i+1]) <= 2) eq++;
      for (int i = 1; i <= 8; i++) begin if (v[i] > mx) mx = v[i]; if (v[i] < mn) mn = v[i]; end
      if (eq >= 6 && mx - mn < 2 * QP) begin
        R[0] = (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) / 8;
        R[1] = (P[2] + P[1] + P[0] + Q[0] + 2) / 4;
        R[2] = (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) / 8;
        S[0] = (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) / 8;
        S[1] = (P[0] + Q[0] + Q[1] + Q[2] + 2) / 4;
        S[2] = (2*Q[3] + 3*Q[2] + Q[1] + Q[0] + P[0] + 4) / 8;
        P = R; Q = S; return 2;
      end else begin
        // a = round-down of (2a - 4b + 4c - 2d + 4) / 8 (arithmetic shift)
        int a0 = (2*v[3] - 4*v[4] + 4*v[5] - 2*v[6] + 4) >>> 3;
        int a1 = (2*v[1] - 4*v[2] + 4*v[3] - 2*v[4] + 4) >>> 3;
        int a2 = (2*v[5] - 4*v[6] + 4*v[7] - 2*v[8] + 4) >>> 3;
        int a0n, dd, h, lo, hi;
        real x;
        if (ab(a0) >= QP) return 0;
        a0n = ab(a0); if (ab(a1) < a0n) a0n = ab(a1); if (ab(a2) < a0n) a0n = ab(a2);
        if (a0 < 0) a0n = -a0n;
        x = 5.0 * (a0n - a0) / 8.0;                       // round half away from zero
        dd = (x < 0) ? -int'($floor(-x + 0.5)) : int'($floor(x + 0.5));
        h = (v[4] - v[5]) / 2;
        lo = h < 0 ? h : 0; hi = h < 0 ? 0 : h;
        dd = cl(lo, hi, dd);
        if (dd == 0) return 0;
        P[0] = v[4] - dd; Q[0] = v[5] + dd; return 1;
      end
    end
  endfunction

  initial begin
    enable = 1; in_valid = 0; chroma = 0; mode = MODE_H264; bs = 0; alpha = 0; beta = 0; tc0 = 0; qp = 1;
    foreach (p[i]) begin p[i] = 0; q[i] = 0; end
    foreach (cnt[i, j]) cnt[i][j] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      automatic int md = $urandom_range(0, 1), P[5], Q[5], m;
      automatic bit en = $urandom_range(0, 19) != 0, ch = (md == 0) && $urandom_range(0, 3) == 0;
      automatic int bS = $urandom_range(0, 4), al = $urandom_range(4, 255), be = $urandom_range(2, 18);
      automatic int t0 = $urandom_range(0, 25), QP = $urandom_range(1, 31);
      automatic int base = $urandom_range(20, 235), step = $urandom_range(0, 3) == 0 ? 40 : 6;
      automatic int stepq = $urandom_range(0, 1) ? step : 0;
      for (int i = 0; i < 5; i++) begin
        P[i] = cl(0, 255, base + $urandom_range(0, step) - step / 2);
        Q[i] = cl(0, 255, base + stepq + $urandom_range(0, step) - step / 2);
      end
      foreach (P[i]) begin p[i] = pixel_t'(P[i]); q[i] = pixel_t'(Q[i]); end
      mode = video_mode_e'(md); enable = en; chroma = ch; bs = 3'(bS); alpha = 8'(al); beta = 8'(be);
      tc0 = 5'(t0); qp = 5'(QP); in_valid = 1;
      m = ref_filter(md, en, ch, bS, al, be, t0, QP, P, Q);
      @(negedge clk); in_valid = 0;
      if (!en) n_bypass++; else cnt[md][m]++;
      checks++;
      if (!out_valid || int'(out_mode) != m) begin failures++; if (failures < 10) $display("FAIL n=%0d md=%0d mode got %0d exp %0d", n, md, out_mode, m); end
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (int'(out_p[i]) != P[i] || int'(out_q[i]) != Q[i]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d md=%0d m=%0d i=%0d got %0d/%0d exp %0d/%0d", n, md, m, i, out_p[i], out_q[i], P[i], Q[i]);
        end
      end
    end
    $display("H264 skip/weak/strong %0d/%0d/%0d  MPEG2 %0d/%0d/%0d  bypass %0d", cnt[0][0], cnt[0][1], cnt[0][2], cnt[1][0], cnt[1][1], cnt[1][2], n_bypass);
    foreach (cnt[i, j]) begin checks++; if (cnt[i][j] == 0) begin failures++; $display("FAIL flow %0d/%0d never taken", i, j); end end
    checks++; if (n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

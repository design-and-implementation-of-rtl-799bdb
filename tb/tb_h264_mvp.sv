// tb_h264_mvp: random neighbour sets (availability, reference indices drawn
// from a small range so matches are frequent, vectors) for every partition
// shape and P_Skip, checked against an independent model of the standard's
// prediction rules written as the standard orders them.
module tb_h264_mvp;
  logic clk = 0, rst_n = 0, in_valid, p_skip, avail_a, avail_b, avail_c, avail_d, valid;
  logic [2:0] part;
  logic signed [13:0] mva_x, mva_y, mvb_x, mvb_y, mvc_x, mvc_y, mvd_nb_x, mvd_nb_y, mvd_x, mvd_y;
  logic signed [13:0] mvp_x, mvp_y, mv_x, mv_y;
  logic signed [5:0] ref_a, ref_b, ref_c, ref_d, ref_idx;
  int checks = 0, failures = 0, n_median = 0, n_single = 0, n_dir = 0, n_skip0 = 0;
  h264_mvp dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int med(int a, int b, int c);
    return a + b + c - ((a > b ? a : b) > c ? (a > b ? a : b) : c) - ((a < b ? a : b) < c ? (a < b ? a : b) : c);
  endfunction

  initial begin
    in_valid = 0; part = 0; p_skip = 0; {avail_a, avail_b, avail_c, avail_d} = 0;
    {mva_x, mva_y, mvb_x, mvb_y, mvc_x, mvc_y, mvd_nb_x, mvd_nb_y, mvd_x, mvd_y} = '0;
    {ref_a, ref_b, ref_c, ref_d, ref_idx} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      automatic int A[2], B[2], C[2], rA, rB, rC, ex, ey, mx, my;
      automatic int pt = $urandom_range(0, 4), sk = ($urandom_range(0, 7) == 0);
      automatic bit aa = $urandom_range(0, 3) != 0, ab = $urandom_range(0, 3) != 0;
      automatic bit ac = $urandom_range(0, 2) != 0, ad = $urandom_range(0, 1) != 0;
      automatic int ri = $urandom_range(0, 2);
      automatic int rv[4], vv[4][2];
      if (sk) begin pt = 0; ri = 0; end
      foreach (rv[i]) begin
        rv[i] = $urandom_range(0, 2);
        vv[i][0] = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(0, 400) - 200;
        vv[i][1] = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(0, 400) - 200;
      end
      // model
      A = aa ? vv[0] : '{0, 0}; rA = aa ? rv[0] : -1;
      B = ab ? vv[1] : '{0, 0}; rB = ab ? rv[1] : -1;
      if (ac) begin C = vv[2]; rC = rv[2]; end
      else if (ad) begin C = vv[3]; rC = rv[3]; end
      else begin C = '{0, 0}; rC = -1; end
      if (!ab && !(ac || ad) && aa) begin B = A; C = A; rB = rA; rC = rA; end
      if (sk && (!aa || !ab || (rv[0] == 0 && vv[0][0] == 0 && vv[0][1] == 0) ||
                 (rv[1] == 0 && vv[1][0] == 0 && vv[1][1] == 0))) begin ex = 0; ey = 0; n_skip0++; end
      else if (pt == 1 && rB == ri) begin ex = B[0]; ey = B[1]; n_dir++; end
      else if ((pt == 2 || pt == 3) && rA == ri) begin ex = A[0]; ey = A[1]; n_dir++; end
      else if (pt == 4 && rC == ri) begin ex = C[0]; ey = C[1]; n_dir++; end
      else if ((rA == ri) + (rB == ri) + (rC == ri) == 1) begin
        n_single++;
        if (rA == ri) begin ex = A[0]; ey = A[1]; end
        else if (rB == ri) begin ex = B[0]; ey = B[1]; end
        else begin ex = C[0]; ey = C[1]; end
      end else begin ex = med(A[0], B[0], C[0]); ey = med(A[1], B[1], C[1]); n_median++; end
      mx = $urandom_range(0, 100) - 50; my = $urandom_range(0, 100) - 50;
      // drive
      in_valid = 1; part = 3'(pt); p_skip = sk[0]; avail_a = aa; avail_b = ab; avail_c = ac; avail_d = ad;
      mva_x = 14'(vv[0][0]); mva_y = 14'(vv[0][1]); mvb_x = 14'(vv[1][0]); mvb_y = 14'(vv[1][1]);
      mvc_x = 14'(vv[2][0]); mvc_y = 14'(vv[2][1]); mvd_nb_x = 14'(vv[3][0]); mvd_nb_y = 14'(vv[3][1]);
      ref_a = 6'(rv[0]); ref_b = 6'(rv[1]); ref_c = 6'(rv[2]); ref_d = 6'(rv[3]); ref_idx = 6'(ri);
      mvd_x = 14'(mx); mvd_y = 14'(my);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!valid || int'(mvp_x) != ex || int'(mvp_y) != ey ||
          int'(mv_x) != (sk ? ex : ex + mx) || int'(mv_y) != (sk ? ey : ey + my)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d pt=%0d sk=%0d got (%0d,%0d) exp (%0d,%0d)", n, pt, sk, mvp_x, mvp_y, ex, ey);
      end
    end
    checks++; if (n_median == 0 || n_single == 0 || n_dir == 0 || n_skip0 == 0) begin failures++; $display("FAIL rule coverage"); end
    $display("median=%0d single=%0d directional=%0d skip-zero=%0d", n_median, n_single, n_dir, n_skip0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

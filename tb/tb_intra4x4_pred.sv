// tb_intra4x4_pred: all nine Intra4x4 modes with random neighbours, against
// the per-mode equations of the H.264 standard written out here in terms of
// p[x,-1] (row above), p[-1,y] (left column) and p[-1,-1] (corner). Blocks
// are issued back to back to check the four-cycle rate.
module tb_intra4x4_pred;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0, start, up_avail, left_avail, busy, out_valid;
  i4_mode_e mode; pixel_t up [8], left [4], corner; logic [1:0] out_col; pix4_t out_pix;
  int checks = 0, failures = 0;
  localparam int N = 450;
  int expb [N][4][4]; int nout = 0, first_out = -1, last_out = 0, cyc = 0;
  intra4x4_pred dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int U [-1:7]; int L [-1:3];
  function automatic int P(int x, int y);   // p[x, y] with x or y = -1
    if (y == -1) return U[x];
    return L[y];
  endfunction

  function automatic int refp(i4_mode_e m, int x, int y, bit ua, bit la);
    int z;
    case (m)
      I4_VERT: return P(x, -1);
      I4_HOR:  return P(-1, y);
      I4_DC: begin
        int s = 0;
        if (ua && la) begin for (int i = 0; i < 4; i++) s += P(i, -1) + P(-1, i); return (s + 4) >> 3; end
        if (la) begin for (int i = 0; i < 4; i++) s += P(-1, i); return (s + 2) >> 2; end
        if (ua) begin for (int i = 0; i < 4; i++) s += P(i, -1); return (s + 2) >> 2; end
        return 128;
      end
      I4_DDL: if (x == 3 && y == 3) return (P(6, -1) + 3 * P(7, -1) + 2) >> 2;
              else return (P(x + y, -1) + 2 * P(x + y + 1, -1) + P(x + y + 2, -1) + 2) >> 2;
      I4_DDR: if (x > y) return (P(x - y - 2, -1) + 2 * P(x - y - 1, -1) + P(x - y, -1) + 2) >> 2;
              else if (x < y) return (P(-1, y - x - 2) + 2 * P(-1, y - x - 1) + P(-1, y - x) + 2) >> 2;
              else return (P(0, -1) + 2 * P(-1, -1) + P(-1, 0) + 2) >> 2;
      I4_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return (P(x - (y >> 1) - 1, -1) + P(x - (y >> 1), -1) + 1) >> 1;
        if (z > 0) return (P(x - (y >> 1) - 2, -1) + 2 * P(x - (y >> 1) - 1, -1) + P(x - (y >> 1), -1) + 2) >> 2;
        if (z == -1) return (P(-1, 0) + 2 * P(-1, -1) + P(0, -1) + 2) >> 2;
        return (P(-1, y - 1) + 2 * P(-1, y - 2) + P(-1, y - 3) + 2) >> 2;
      end
      I4_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return (P(-1, y - (x >> 1) - 1) + P(-1, y - (x >> 1)) + 1) >> 1;
        if (z > 0) return (P(-1, y - (x >> 1) - 2) + 2 * P(-1, y - (x >> 1) - 1) + P(-1, y - (x >> 1)) + 2) >> 2;
        if (z == -1) return (P(-1, 0) + 2 * P(-1, -1) + P(0, -1) + 2) >> 2;
        return (P(x - 1, -1) + 2 * P(x - 2, -1) + P(x - 3, -1) + 2) >> 2;
      end
      I4_VL: if (y == 0 || y == 2) return (P(x + (y >> 1), -1) + P(x + (y >> 1) + 1, -1) + 1) >> 1;
             else return (P(x + (y >> 1), -1) + 2 * P(x + (y >> 1) + 1, -1) + P(x + (y >> 1) + 2, -1) + 2) >> 2;
      default: begin // HU
        z = x + 2 * y;
        if (z == 0 || z == 2 || z == 4) return (P(-1, y + (x >> 1)) + P(-1, y + (x >> 1) + 1) + 1) >> 1;
        if (z == 1 || z == 3) return (P(-1, y + (x >> 1)) + 2 * P(-1, y + (x >> 1) + 1) + P(-1, y + (x >> 1) + 2) + 2) >> 2;
        if (z == 5) return (P(-1, 2) + 3 * P(-1, 3) + 2) >> 2;
        return P(-1, 3);
      end
    endcase
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      automatic int b = nout / 4;
      automatic int x = nout % 4;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      checks++; if (int'(out_col) != x) begin failures++; $display("FAIL col"); end
      for (int y = 0; y < 4; y++) begin
        checks++;
        if (int'(out_pix[y]) != expb[b][x][y]) begin failures++; if (failures < 10) $display("FAIL blk %0d x=%0d y=%0d got %0d exp %0d", b, x, y, out_pix[y], expb[b][x][y]); end
      end
      nout++;
    end
  end

  initial begin
    start = 0; mode = I4_VERT; up_avail = 1; left_avail = 1; corner = 0;
    foreach (up[i]) up[i] = 0; foreach (left[i]) left[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < N; b++) begin
      automatic i4_mode_e m = i4_mode_e'(b % 9);
      automatic bit ua = (m != I4_DC) || (b % 4 != 1);
      automatic bit la = (m != I4_DC) || (b % 4 != 2 && b % 4 != 3);
      for (int i = -1; i < 8; i++) U[i] = $urandom_range(0, 255);
      for (int i = 0; i < 4; i++) L[i] = $urandom_range(0, 255);
      L[-1] = U[-1];
      if (b % 10 == 0) begin for (int i = -1; i < 8; i++) U[i] = 255; for (int i = 0; i < 4; i++) L[i] = 255; end
      for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) expb[b][x][y] = refp(m, x, y, ua, la);
      for (int i = 0; i < 8; i++) up[i] = pixel_t'(U[i]);
      for (int i = 0; i < 4; i++) left[i] = pixel_t'(L[i]);
      corner = pixel_t'(U[-1]); mode = m; up_avail = ua; left_avail = la;
      start = 1;
      if (b == 0) @(negedge clk); else repeat (4) @(negedge clk);
    end
    start = 0;
    repeat (8) @(negedge clk);
    checks++; if (nout != 4 * N) begin failures++; $display("FAIL outputs %0d", nout); end
    checks++; if (last_out - first_out + 1 != 4 * N) begin failures++; $display("FAIL rate %0d", last_out - first_out + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

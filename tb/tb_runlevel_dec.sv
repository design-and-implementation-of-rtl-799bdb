// tb_runlevel_dec: random run-level blocks in H.264 (4x4 zig-zag) and MPEG-2
// (zig-zag and alternate scan) modes plus MPEG-2 DC prediction. The zig-zag
// orders are generated here by a walking procedure; the alternate scan is
// checked against entries listed in the MPEG-2 standard.
module tb_runlevel_dec;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0;
  video_mode_e mode; logic alt_scan, start, rl_valid, eob, dc_valid, dc_reset, blk_valid;
  logic [5:0] first_idx, run; coef_t level, dct_diff; logic [1:0] cc, intra_dc_precision;
  coef_t blk [64];
  int checks = 0, failures = 0;
  int zz [2][64];   // [0]: 4x4 (16 used) [1]: 8x8
  runlevel_dec dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // zig-zag by walking: move up-right / down-left, bouncing at edges
  task automatic gen_zz(input int nn, input int sel);
    int x = 0, y = 0, up = 1;
    for (int i = 0; i < nn * nn; i++) begin
      zz[sel][i] = y * nn + x;
      if (up) begin
        if (x == nn - 1) begin y++; up = 0; end
        else if (y == 0) begin x++; up = 0; end
        else begin x++; y--; end
      end else begin
        if (y == nn - 1) begin x++; up = 1; end
        else if (x == 0) begin y++; up = 1; end
        else begin x--; y++; end
      end
    end
  endtask

  task automatic run_block(input video_mode_e m, input bit alt, input int fidx, input bit use_dc, output int expb[64]);
    int n, ncoef, r, lv, p, nn;
    nn = (m == MODE_H264) ? 16 : 64;
    foreach (expb[i]) expb[i] = 0;
    @(negedge clk); mode = m; alt_scan = alt; first_idx = 6'(fidx); start = 1;
    @(negedge clk); start = 0;
    n = fidx;
    ncoef = $urandom_range(0, 8);
    for (int k = 0; k < ncoef; k++) begin
      r = $urandom_range(0, 5); lv = $urandom_range(1, 200) * (($urandom & 1) ? -1 : 1);
      if (n + r >= nn) break;
      p = (m == MODE_H264) ? zz[0][n + r] : (alt ? -1 : zz[1][n + r]);
      if (p >= 0) expb[p] = lv; else expb[n + r] = lv;  // alt: scan index kept, mapped by caller
      rl_valid = 1; run = 6'(r); level = coef_t'(lv); @(negedge clk); rl_valid = 0;
      n = n + r + 1;
    end
    eob = 1; @(negedge clk); eob = 0;
  endtask

  initial begin
    int expb[64]; int alt_tab[64]; int dcp[3]; int d; int prec;
    alt_tab = '{0,8,16,24,1,9,2,10,17,25,32,40,48,56,57,49,41,33,26,18,3,11,4,12,19,27,34,42,50,58,35,43,
                51,59,20,28,5,13,6,14,21,29,36,44,52,60,37,45,53,61,22,30,7,15,23,31,38,46,54,62,39,47,55,63};
    gen_zz(4, 0); gen_zz(8, 1);
    mode = MODE_H264; alt_scan = 0; start = 0; rl_valid = 0; eob = 0; dc_valid = 0; dc_reset = 0;
    first_idx = 0; run = 0; level = 0; dct_diff = 0; cc = 0; intra_dc_precision = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic video_mode_e m = video_mode_e'(t % 2);
      automatic bit alt = (m == MODE_MPEG2) && (t % 4 == 3);
      automatic int f = (m == MODE_H264 && t % 3 == 0) ? 1 : 0;
      run_block(m, alt, f, 0, expb);
      if (alt) begin
        int tmp[64]; foreach (tmp[i]) tmp[i] = 0;
        foreach (expb[i]) if (expb[i] != 0) tmp[alt_tab[i]] = expb[i];
        expb = tmp;
      end
      checks++;
      if (!blk_valid) begin failures++; $display("FAIL no blk_valid"); end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (blk[i] != coef_t'(expb[i])) begin failures++; if (failures < 10) $display("FAIL t=%0d pos %0d got %0d exp %0d", t, i, blk[i], expb[i]); end
      end
    end
    // MPEG-2 DC prediction across three components
    prec = 2;
    @(negedge clk); intra_dc_precision = 2'(prec); dc_reset = 1; @(negedge clk); dc_reset = 0;
    dcp = '{512, 512, 512};
    for (int t = 0; t < 30; t++) begin
      mode = MODE_MPEG2; start = 1; @(negedge clk); start = 0;
      cc = 2'(t % 3); d = $urandom_range(0, 100) - 50; dct_diff = coef_t'(d);
      dc_valid = 1; @(negedge clk); dc_valid = 0;
      eob = 1; @(negedge clk); eob = 0;
      dcp[t % 3] += d;
      checks++;
      if (blk[0] != coef_t'(dcp[t % 3])) begin failures++; $display("FAIL dc t=%0d got %0d exp %0d", t, blk[0], dcp[t % 3]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

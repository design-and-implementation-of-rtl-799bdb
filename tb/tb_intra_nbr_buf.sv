// tb_intra_nbr_buf: walks a random picture of two macroblock rows of three
// macroblocks through the neighbour store, block by block in the standard
// 4x4 order, and checks every available upper, upper-right, left and corner
// neighbour against the picture itself. Also checks the load and write-back
// cycle counts (5 and 4 busy cycles).
module tb_intra_nbr_buf;
  import vdec_pkg::*;
  localparam int W = 48, H = 32;
  logic clk = 0, rst_n = 0;
  logic mb_start, busy, blk_valid;
  logic [6:0] mb_x;
  logic [3:0] blk_n;
  logic [1:0] q_x, q_y;
  pixel_t blk_pix [16];
  pix4_t nb_up, nb_upright, nb_left;
  pixel_t nb_corner;
  int checks = 0, failures = 0;
  pixel_t pic [H][W];

  intra_nbr_buf dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic void chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endfunction

  task automatic wait_idle(input int expect_cycles, input string what);
    int n = 0;
    while (busy) begin @(negedge clk); n++; end
    chk(n == expect_cycles, $sformatf("%s took %0d cycles", what, n));
  endtask

  initial begin
    mb_start = 0; mb_x = 0; blk_valid = 0; q_x = 0; q_y = 0;
    foreach (blk_pix[i]) blk_pix[i] = 0;
    foreach (pic[y, x]) pic[y][x] = pixel_t'($urandom);
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int r = 0; r < 2; r++) begin
      for (int m = 0; m < 3; m++) begin
        bit done [4][4];
        foreach (done[i, j]) done[i][j] = 0;
        mb_x = 7'(m); mb_start = 1; @(negedge clk); mb_start = 0;
        wait_idle(5, "load");
        for (int n = 0; n < 16; n++) begin
          automatic int bx = ((n >> 2) & 1) * 2 + (n & 1);
          automatic int by = ((n >> 3) & 1) * 2 + ((n >> 1) & 1);
          automatic int x0 = m * 16 + bx * 4, y0 = r * 16 + by * 4;
          chk(int'(blk_n) == n, $sformatf("block index %0d", blk_n));
          q_x = 2'(bx); q_y = 2'(by); #1;
          for (int i = 0; i < 4; i++) begin
            if (y0 > 0) chk(nb_up[i] == pic[y0-1][x0+i], $sformatf("up r%0d m%0d n%0d i%0d", r, m, n, i));
            if (x0 > 0) chk(nb_left[i] == pic[y0+i][x0-1], $sformatf("left r%0d m%0d n%0d i%0d", r, m, n, i));
            if (y0 > 0 && bx < 3 && (by == 0 || done[bx+1][by-1]))
              chk(nb_upright[i] == pic[y0-1][x0+4+i], $sformatf("upright r%0d m%0d n%0d i%0d", r, m, n, i));
          end
          if (x0 > 0 && y0 > 0) chk(nb_corner == pic[y0-1][x0-1], $sformatf("corner r%0d m%0d n%0d", r, m, n));
          for (int i = 0; i < 16; i++) blk_pix[i] = pic[y0 + i / 4][x0 + i % 4];
          blk_valid = 1; @(negedge clk); blk_valid = 0;
          done[bx][by] = 1;
        end
        wait_idle(4, "write-back");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

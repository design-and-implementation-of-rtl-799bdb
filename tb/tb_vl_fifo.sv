// tb_vl_fifo: the two paths deliver the same sequence of words with
// independent random gaps, in phases where the prediction path runs ahead,
// the residual path runs ahead, and both are random. Every reconstructed
// word is checked in order; direct adds, storage from each side and a full
// FIFO stall must all occur.
module tb_vl_fifo;
  import vdec_pkg::*;
  localparam int DEPTH = 8;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic pred_valid, pred_ready, res_valid, res_ready, out_valid, ev_direct, ev_store_pred, ev_store_res;
  pix4_t pred, out_pix; res4_t res; logic [$clog2(DEPTH+1)-1:0] level; logic side_pred;
  int checks = 0, failures = 0;
  int pw [N][4], rw [N][4];
  int np = 0, nr = 0, no = 0, n_dir = 0, n_sp = 0, n_sr = 0, n_stall = 0;
  vl_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int phase_gap(int idx, bit is_pred);
    int ph = (idx * 3) / N;      // 0: pred ahead, 1: residual ahead, 2: random
    if (ph == 0) return is_pred ? 0 : $urandom_range(0, 3);
    if (ph == 1) return is_pred ? $urandom_range(0, 3) : 0;
    return $urandom_range(0, 1);
  endfunction

  initial begin
    for (int k = 0; k < N; k++) for (int i = 0; i < 4; i++) begin
      pw[k][i] = $urandom_range(0, 255);
      rw[k][i] = int'($urandom_range(0, 700)) - 350;
    end
  end

  // producers
  initial begin
    pred_valid = 0; foreach (pred[i]) pred[i] = 0;
    @(posedge rst_n);
    while (np < N) begin
      @(negedge clk);
      if (pred_valid && pred_ready) np++;   // accepted at the previous edge
      if (pred_valid && !pred_ready) continue;
      pred_valid = 0;
      if (np < N) begin
        repeat (phase_gap(np, 1)) @(negedge clk);
        pred_valid = 1;
        for (int i = 0; i < 4; i++) pred[i] = pixel_t'(pw[np][i]);
      end
    end
    pred_valid = 0;
  end
  always @(posedge clk) if (rst_n && pred_valid && !pred_ready) n_stall++;

  initial begin
    res_valid = 0; foreach (res[i]) res[i] = 0;
    @(posedge rst_n);
    while (nr < N) begin
      @(negedge clk);
      if (res_valid && res_ready) nr++;
      if (res_valid && !res_ready) continue;
      res_valid = 0;
      if (nr < N) begin
        repeat (phase_gap(nr, 0)) @(negedge clk);
        res_valid = 1;
        for (int i = 0; i < 4; i++) res[i] = coef_t'(rw[nr][i]);
      end
    end
    res_valid = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_direct) n_dir++;
    if (ev_store_pred) n_sp++;
    if (ev_store_res) n_sr++;
    if (out_valid) begin
      for (int i = 0; i < 4; i++) begin
        automatic int e = pw[no][i] + rw[no][i];
        e = e < 0 ? 0 : e > 255 ? 255 : e;
        checks++;
        if (int'(out_pix[i]) != e) begin failures++; if (failures < 10) $display("FAIL word %0d lane %0d got %0d exp %0d", no, i, out_pix[i], e); end
      end
      no++;
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (no == N || $time > 2500000);
    repeat (3) @(negedge clk);
    checks++; if (no != N) begin failures++; $display("FAIL outputs %0d of %0d", no, N); end
    checks++; if (n_dir == 0) begin failures++; $display("FAIL no direct add"); end
    checks++; if (n_sp == 0) begin failures++; $display("FAIL prediction never stored"); end
    checks++; if (n_sr == 0) begin failures++; $display("FAIL residual never stored"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL FIFO never full"); end
    $display("direct=%0d stored_pred=%0d stored_res=%0d stall_cycles=%0d", n_dir, n_sp, n_sr, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

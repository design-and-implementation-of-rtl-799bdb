// tb_stage_ctrl: units with random work lengths; checks that a stage starts
// exactly in the cycle after the last unit finishes (never earlier, never
// later), that the enables follow busy, and that the stage, bubble and
// per-unit wait counters agree with counts kept here.
module tb_stage_ctrl;
  localparam int NU = 2;
  logic clk = 0, rst_n = 0, pending, advance;
  logic [NU-1:0] busy, unit_en; logic [31:0] stage_cnt, bubble_cnt, unit_wait [NU];
  int checks = 0, failures = 0;
  int left [NU];
  int n_stage = 0, n_bub = 0, n_wait [NU];
  logic adv;
  stage_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always_comb for (int i = 0; i < NU; i++) busy[i] = left[i] > 0;

  initial begin
    pending = 0; foreach (left[i]) begin left[i] = 0; n_wait[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      pending = $urandom_range(0, 4) != 0;
      #1;
      checks++;
      if (advance != (pending && busy == '0)) begin failures++; $display("FAIL advance at cycle %0d", cyc); end
      checks++;
      if (unit_en != (busy | {NU{advance}})) begin failures++; $display("FAIL unit_en"); end
      if (busy != '0 && busy != '1) n_bub++;
      for (int i = 0; i < NU; i++) if (!busy[i] && busy != '0) n_wait[i]++;
      adv = advance;
      @(posedge clk);
      #1;                       // change the units' state after the flops sampled it
      if (adv) begin
        n_stage++;
        for (int i = 0; i < NU; i++) left[i] = $urandom_range(1, 12);
      end else
        for (int i = 0; i < NU; i++) if (left[i] > 0) left[i]--;
      @(negedge clk);
    end
    checks++; if (stage_cnt != 32'(n_stage)) begin failures++; $display("FAIL stage count %0d vs %0d", stage_cnt, n_stage); end
    checks++; if (bubble_cnt != 32'(n_bub)) begin failures++; $display("FAIL bubble count %0d vs %0d", bubble_cnt, n_bub); end
    for (int i = 0; i < NU; i++) begin
      checks++; if (unit_wait[i] != 32'(n_wait[i])) begin failures++; $display("FAIL wait count %0d", i); end
    end
    checks++; if (n_bub == 0 || n_stage < 100) failures++;
    $display("stages %0d bubbles %0d", n_stage, n_bub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

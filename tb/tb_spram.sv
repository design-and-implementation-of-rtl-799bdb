// tb_spram: random writes and reads against an array model at the default
// (content-memory) size; checks the one-cycle read latency and that a
// cycle with `en` low neither writes nor changes the read data.
module tb_spram;
  localparam int DEPTH = (16 + 8) * 4;
  logic clk = 0, en, we; logic [6:0] addr; logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH]; bit known [DEPTH];
  spram dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    foreach (known[i]) begin known[i] = 0; model[i] = 0; end
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      automatic int a = $urandom_range(0, DEPTH - 1), op = $urandom_range(0, 3);
      automatic logic [31:0] d = $urandom, prev_rd = rdata;
      addr = 7'(a); wdata = d;
      if (op == 0) begin en = 0; we = $urandom_range(0, 1); end
      else if (op == 1) begin en = 1; we = 1; end
      else begin en = 1; we = 0; end
      @(negedge clk);
      if (op == 0) begin checks++; if (rdata != prev_rd) begin failures++; $display("FAIL rdata changed while disabled"); end end
      else if (op == 1) begin model[a] = d; known[a] = 1; end
      else if (known[a]) begin
        checks++;
        if (rdata != model[a]) begin failures++; if (failures < 10) $display("FAIL read %0d got %h exp %h", a, rdata, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

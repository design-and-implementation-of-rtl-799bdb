// tb_expgolomb_dec: feeds random Exp-Golomb codes bit by bit and checks
// ue/se/te values and code lengths against values encoded in the testbench.
module tb_expgolomb_dec;
  logic clk = 0, rst_n = 0;
  logic start, te_one, bit_in, bit_valid, bit_ready, valid;
  logic [31:0] ue, te;
  logic signed [31:0] se;
  logic [5:0] len;
  int checks = 0, failures = 0;

  expgolomb_dec dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_code(input logic [31:0] v, input bit te1, input bit gaps);
    logic [32:0] x;
    int lz, cycles;
    x = {1'b0, v} + 33'd1;
    lz = 0;
    for (int i = 32; i >= 0; i--) if (x[i]) begin lz = i; break; end
    @(negedge clk); start = 1; te_one = te1; @(negedge clk); start = 0;
    cycles = 0;
    if (te1) begin
      bit_in = ~v[0]; bit_valid = 1; @(negedge clk); bit_valid = 0;
    end else begin
      for (int i = 0; i < 2*lz+1; i++) begin
        if (gaps && ($urandom_range(0,3) == 0)) begin bit_valid = 0; @(negedge clk); end
        bit_in = (i < lz) ? 1'b0 : x[2*lz - i];
        bit_valid = 1; @(negedge clk); bit_valid = 0;
      end
    end
    // valid must have pulsed at the negedge just passed: sample
    while (!valid && cycles < 5) begin @(negedge clk); cycles++; end
    checks++;
    if (!valid || ue != v || len != (te1 ? 1 : 2*lz+1) || cycles != 0) begin
      failures++;
      $display("FAIL v=%0d ue=%0d len=%0d valid=%0b cycles=%0d", v, ue, len, valid, cycles);
    end
    checks++;
    if (!te1) begin
      automatic logic signed [31:0] exp_se = v[0] ? $signed((v + 1) >> 1) : -$signed(v >> 1);
      if (se != exp_se) begin failures++; $display("FAIL se v=%0d se=%0d", v, se); end
    end
  endtask

  initial begin
    start = 0; te_one = 0; bit_in = 0; bit_valid = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int v = 0; v < 40; v++) send_code(v, 0, 0);
    for (int n = 0; n < 200; n++) send_code($urandom_range(0, 1 << $urandom_range(1, 20)), 0, 1);
    send_code(32'd65535, 0, 0);
    send_code(0, 1, 0);
    send_code(1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

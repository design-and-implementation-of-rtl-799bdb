// tb_param_regs: random writes from both parsers in both modes; a shadow
// model keeps only the writes the current mode allows.
module tb_param_regs;
  import vdec_pkg::*;
  logic clk = 0, rst_n = 0;
  video_mode_e mode;
  logic m2_en, m2_we, h_en, h_we;
  logic [6:0] m2_addr, h_addr; logic [7:0] m2_data, h_data;
  logic [7:0] regs [128];
  logic [7:0] model [128];
  int checks = 0, failures = 0;
  param_regs dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    mode = MODE_H264; m2_en = 0; m2_we = 0; h_en = 0; h_we = 0; m2_addr = 0; h_addr = 0; m2_data = 0; h_data = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) mode = video_mode_e'(n / 500 % 2);
      m2_en = 1'($urandom); m2_we = 1'($urandom); m2_addr = 7'($urandom); m2_data = 8'($urandom);
      h_en = 1'($urandom); h_we = 1'($urandom); h_addr = 7'($urandom); h_data = 8'($urandom);
      @(posedge clk);
      if (mode == MODE_MPEG2 && m2_en && m2_we) model[m2_addr] = m2_data;
      if (mode == MODE_H264 && h_en && h_we) model[h_addr] = h_data;
      #1;
      checks++;
      if (regs != model) begin failures++; if (failures < 5) $display("FAIL at step %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nal_header_parser: streams SPS, PPS and slice NAL units with start
// codes and emulation prevention bytes, then checks the decoded headers,
// the unit enables and the recovered payload bytes.
module tb_nal_header_parser;
  logic clk = 0, rst_n = 0;
  logic [7:0] byte_in; logic byte_valid, slice_hdr_done;
  logic hdr_valid, forbidden_err, sps_en, pps_en, slice_hdr_en, slice_data_en, rbsp_valid;
  logic [4:0] nal_unit_type; logic [1:0] nal_ref_idc; logic [7:0] rbsp_byte;
  int checks = 0, failures = 0;
  byte unsigned got[$];
  int n_hdr = 0, sps_cyc = 0, pps_cyc = 0, sh_cyc = 0, sd_cyc = 0;
  logic [4:0] types[$];

  nal_header_parser dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    if (rbsp_valid) got.push_back(rbsp_byte);
    if (hdr_valid) begin n_hdr++; types.push_back(nal_unit_type); end
    if (sps_en) sps_cyc++;
    if (pps_en) pps_cyc++;
    if (slice_hdr_en) sh_cyc++;
    if (slice_data_en) sd_cyc++;
    if ((int'(sps_en) + int'(pps_en) + int'(slice_hdr_en) + int'(slice_data_en)) > 1) begin
      failures++; $display("FAIL two units enabled at once");
    end
  end

  task automatic put(input byte unsigned b);
    @(negedge clk); byte_in = b; byte_valid = 1; @(negedge clk); byte_valid = 0;
  endtask

  function automatic void chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  initial begin
    byte unsigned exp_sps[$] = '{8'h42, 8'h00, 8'h00, 8'h01, 8'h1f, 8'h00, 8'h00, 8'h02, 8'hE0};
    byte_in = 0; byte_valid = 0; slice_hdr_done = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // SPS: payload 42 00 00 [03] 01 1f 00 00 [03] 02 e0
    put(8'h00); put(8'h00); put(8'h00); put(8'h01); put(8'h67);
    put(8'h42); put(8'h00); put(8'h00); put(8'h03); put(8'h01); put(8'h1f);
    put(8'h00); put(8'h00); put(8'h03); put(8'h02); put(8'hE0);
    // PPS
    put(8'h00); put(8'h00); put(8'h01);
    chk(got.size() == exp_sps.size(), $sformatf("sps payload size %0d", got.size()));
    for (int i = 0; i < exp_sps.size() && i < got.size(); i++) chk(got[i] == exp_sps[i], $sformatf("sps byte %0d = %h", i, got[i]));
    chk(sps_cyc > 0 && pps_cyc == 0, "sps enable");
    got.delete();
    put(8'h68); put(8'hCE); put(8'h38); put(8'h80);
    // IDR slice
    put(8'h00); put(8'h00); put(8'h01);
    chk(got.size() == 3 && got[0] == 8'hCE && got[2] == 8'h80, "pps payload");
    chk(pps_cyc > 0, "pps enable");
    put(8'h65); put(8'h88); put(8'h84);
    @(negedge clk); chk(slice_hdr_en && !slice_data_en, "slice header enabled first");
    slice_hdr_done = 1; @(negedge clk); slice_hdr_done = 0;
    @(negedge clk); chk(!slice_hdr_en && slice_data_en, "slice data after acknowledge");
    chk(nal_ref_idc == 2'd3 && nal_unit_type == 5'd5 && !forbidden_err, "idr header fields");
    put(8'h21); put(8'h00); put(8'h00); put(8'h01); put(8'h41);
    @(negedge clk);
    chk(!slice_data_en && slice_hdr_en && nal_unit_type == 5'd1 && nal_ref_idc == 2'd2, "non-idr slice");
    chk(n_hdr == 4 && types[0] == 7 && types[1] == 8 && types[2] == 5 && types[3] == 1, "header sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

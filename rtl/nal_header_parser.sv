// nal_header_parser: first level of the hierarchical H.264 syntax parser.
//
// Bytes of an Annex B byte stream enter one per cycle. The unit finds the
// start code prefix 0x000001, decodes the one-byte NAL unit header that
// follows (forbidden_zero_bit, nal_ref_idc, nal_unit_type) and then wakes
// exactly one of the next-level units with a level enable that stays high
// until the next start code: the SPS unit (type 7), the PPS unit (type 8) or
// the slice layer unit (types 1 and 5). Inside the slice layer the enable is
// handed first to the slice header unit and, when that unit acknowledges
// with `slice_hdr_done`, to the slice data unit. All units not enabled can
// have their clocks gated off, which is how the parser saves power.
//
// Payload (RBSP) bytes leave on rbsp_byte/rbsp_valid. They pass through a
// two-byte delay line so that the zero bytes of the next start code can be
// withdrawn before they leave, and an emulation prevention byte (0x03 after
// two zero bytes) is dropped. Payload therefore leaves two input bytes late.
// Removing emulation prevention bytes is taken from the H.264 standard.
module nal_header_parser (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] byte_in,
  input  logic       byte_valid,
  input  logic       slice_hdr_done,   // acknowledge from slice header unit
  output logic       hdr_valid,        // one-cycle pulse: header decoded
  output logic [4:0] nal_unit_type,
  output logic [1:0] nal_ref_idc,
  output logic       forbidden_err,
  output logic       sps_en,
  output logic       pps_en,
  output logic       slice_hdr_en,
  output logic       slice_data_en,
  output logic [7:0] rbsp_byte,
  output logic       rbsp_valid
);
  logic [7:0] dl_byte [2];   // delay line, [1] is the older entry
  logic       dl_vld  [2];
  logic       expect_hdr;
  logic       in_nal;
  logic       is_start, is_epb;

  // start code: 0x01 with two zero bytes still in the delay line
  assign is_start = byte_valid && byte_in == 8'h01 && dl_vld[0] && dl_vld[1] &&
                    dl_byte[0] == 8'h00 && dl_byte[1] == 8'h00;
  assign is_epb   = byte_valid && in_nal && !expect_hdr && byte_in == 8'h03 &&
                    dl_vld[0] && dl_vld[1] && dl_byte[0] == 8'h00 && dl_byte[1] == 8'h00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_byte       <= '{default: '0};
      dl_vld        <= '{default: 1'b0};
      expect_hdr    <= 1'b0;
      in_nal        <= 1'b0;
      hdr_valid     <= 1'b0;
      nal_unit_type <= '0;
      nal_ref_idc   <= '0;
      forbidden_err <= 1'b0;
      sps_en        <= 1'b0;
      pps_en        <= 1'b0;
      slice_hdr_en  <= 1'b0;
      slice_data_en <= 1'b0;
      rbsp_byte     <= '0;
      rbsp_valid    <= 1'b0;
    end else begin
      hdr_valid  <= 1'b0;
      rbsp_valid <= 1'b0;
      if (slice_hdr_done && slice_hdr_en) begin
        slice_hdr_en  <= 1'b0;
        slice_data_en <= 1'b1;
      end
      if (is_start) begin
        // withdraw the start code zeros and close the current unit
        dl_vld        <= '{default: 1'b0};
        expect_hdr    <= 1'b1;
        in_nal        <= 1'b0;
        sps_en        <= 1'b0;
        pps_en        <= 1'b0;
        slice_hdr_en  <= 1'b0;
        slice_data_en <= 1'b0;
      end else if (byte_valid && expect_hdr) begin
        expect_hdr    <= 1'b0;
        in_nal        <= 1'b1;
        hdr_valid     <= 1'b1;
        forbidden_err <= byte_in[7];
        nal_ref_idc   <= byte_in[6:5];
        nal_unit_type <= byte_in[4:0];
        sps_en        <= (byte_in[4:0] == 5'd7);
        pps_en        <= (byte_in[4:0] == 5'd8);
        slice_hdr_en  <= (byte_in[4:0] == 5'd1) || (byte_in[4:0] == 5'd5);
      end else if (byte_valid && !is_epb) begin
        dl_byte[0] <= byte_in;
        dl_vld[0]  <= 1'b1;
        dl_byte[1] <= dl_byte[0];
        dl_vld[1]  <= dl_vld[0];
        rbsp_byte  <= dl_byte[1];
        rbsp_valid <= dl_vld[1] && in_nal;
      end else if (is_epb) begin
        // drop the 0x03; the two zeros ahead of it may no longer start a code
        dl_byte[0] <= 8'hFF;
        dl_byte[1] <= dl_byte[0];
        dl_vld[1]  <= dl_vld[0];
        rbsp_byte  <= dl_byte[1];
        rbsp_valid <= dl_vld[1] && in_nal;
        dl_vld[0]  <= 1'b0;
      end
    end
  end

endmodule

// param_regs: system-wide parameter registers shared by the MPEG-2 and the
// H.264 syntax parsers.
//
// Only one standard is decoded at a time, so one parser's registers would
// always sit idle. The largest and most regular group, the MPEG-2 intra and
// non-intra 8x8 quantiser matrices (2 x 64 x 8 bits), is therefore one bank
// that the H.264 parser uses for its own parameters when the decoder runs in
// H.264 mode. A multiplexer controlled by the decoder's mode input picks
// which parser's write port reaches the bank; writes from the other parser
// are ignored. Each parser port also carries its unit enable, so a bank
// write happens only while that parsing unit is awake (the clock-gating
// condition of the hierarchical parser).
//
// Interface: byte-wide write ports, full bank visible on `regs`; entries
// 0..63 hold the intra matrix and 64..127 the non-intra matrix in MPEG-2
// mode, each in raster order (v*8+u). Writes take effect at the next edge.
// The bank resets to zero; loading the standards' default matrices is left
// to the parser.
module param_regs
  import vdec_pkg::*;
#(
  parameter int unsigned NBYTES = 128          // 2 x 512 shared register bits
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  video_mode_e               mode,
  input  logic                      m2_en,      // MPEG-2 parser unit enable
  input  logic                      m2_we,
  input  logic [$clog2(NBYTES)-1:0] m2_addr,
  input  logic [7:0]                m2_data,
  input  logic                      h_en,       // H.264 parser unit enable
  input  logic                      h_we,
  input  logic [$clog2(NBYTES)-1:0] h_addr,
  input  logic [7:0]                h_data,
  output logic [7:0]                regs [NBYTES]
);
  logic                      we;
  logic [$clog2(NBYTES)-1:0] addr;
  logic [7:0]                data;

  // sharing multiplexer
  always_comb begin
    if (mode == MODE_MPEG2) begin
      we = m2_en && m2_we; addr = m2_addr; data = m2_data;
    end else begin
      we = h_en && h_we;   addr = h_addr;  data = h_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '{default: '0};
    else if (we) regs[addr] <= data;
  end

endmodule

// expgolomb_dec: serial Exp-Golomb (UVLC) decoder shared by all H.264
// syntax parsing units.
//
// A parsing unit raises `start` (the requests of all units are OR-ed into
// this one pin, only one unit asks at a time) and then the decoder takes one
// bitstream bit per cycle in which `bit_valid` is high. An up/down counter
// first counts the leading zero bits (up), then counts the suffix bits down
// while an accumulator shifts them in. The code value is
// 2^leadingZeroBits - 1 + suffix, where the power of two comes straight from
// the counter. Output converters give ue(v), se(v) and te(v) at once; for
// te(v) with a range of one (`te_one`) the code is a single inverted bit.
//
// Timing: `valid` pulses for one cycle, in the cycle after the last bit of
// the code was taken; a code of L bits therefore takes L cycles of
// bit_valid plus one. `bit_ready` is high while bits are being consumed.
// `len` is the code length in bits. me(v) (coded_block_pattern mapping) is
// not produced: it needs a mapping table this design does not hold.
// Lint note: the top bit of the 32-bit code accumulator is never read; it
// only exists so that a 31-zero prefix still fits, and is left unused.
module expgolomb_dec
  import vdec_pkg::*;
#(
  parameter int unsigned MAX_LZ = 31   // longest prefix accepted
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,      // UVLC_start
  input  logic                te_one,     // te(v) with range 1
  input  logic                bit_in,
  input  logic                bit_valid,
  output logic                bit_ready,
  output logic                valid,      // Output valid
  output logic [31:0]         ue,
  output logic signed [31:0]  se,
  output logic [31:0]         te,
  output logic [5:0]          len
);
  typedef enum logic [1:0] {S_IDLE, S_ZEROS, S_SUFFIX} state_e;
  state_e      state;
  logic [5:0]  cnt;        // up/down counter
  logic [5:0]  nbits;      // bits consumed so far
  logic [31:0] pow2;       // 2^leadingZeroBits
  logic [31:0] acc;        // suffix accumulator
  logic        te1;
  logic [31:0] code;       // value being completed this cycle

  assign bit_ready = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      nbits <= '0;
      pow2  <= '0;
      acc   <= '0;
      te1   <= 1'b0;
      valid <= 1'b0;
      code  <= '0;
      len   <= '0;
    end else begin
      valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_ZEROS;
          cnt   <= '0;
          nbits <= '0;
          acc   <= '0;
          te1   <= te_one;
        end
        S_ZEROS: if (bit_valid) begin
          nbits <= nbits + 6'd1;
          if (te1) begin
            code  <= {31'd0, ~bit_in};
            len   <= 6'd1;
            valid <= 1'b1;
            state <= S_IDLE;
          end else if (!bit_in) begin
            if (cnt < 6'(MAX_LZ)) cnt <= cnt + 6'd1;   // count up
          end else if (cnt == '0) begin
            code  <= '0;
            len   <= 6'd1;
            valid <= 1'b1;
            state <= S_IDLE;
          end else begin
            pow2  <= 32'd1 << cnt;
            state <= S_SUFFIX;
          end
        end
        S_SUFFIX: if (bit_valid) begin
          nbits <= nbits + 6'd1;
          acc   <= {acc[30:0], bit_in};
          cnt   <= cnt - 6'd1;                          // count down
          if (cnt == 6'd1) begin
            code  <= pow2 - 32'd1 + {acc[30:0], bit_in};
            len   <= nbits + 6'd1;
            valid <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Output converters
  always_comb begin
    ue = code;
    te = code;
    if (code[0]) se = $signed({1'b0, code[31:1]}) + 32'sd1;
    else         se = -$signed({1'b0, code[31:1]});
  end

endmodule

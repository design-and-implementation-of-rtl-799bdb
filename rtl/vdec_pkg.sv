// vdec_pkg: types, constants and small arithmetic helpers shared by the
// MPEG-2 / H.264 dual mode decoder.
//
// The decoder moves pixels four at a time (one 1x4 column of a 4x4 block per
// cycle), so most stream ports carry a pix4_t or res4_t. The video mode
// selects the standard being decoded; it drives every shared unit.
package vdec_pkg;

  typedef logic [7:0]         pixel_t;   // 8-bit luma/chroma sample
  typedef logic signed [15:0] coef_t;    // transform coefficient / residual
  typedef pixel_t             pix4_t [4];
  typedef coef_t              res4_t [4];

  typedef enum logic {MODE_H264 = 1'b0, MODE_MPEG2 = 1'b1} video_mode_e;

  // Intra4x4 prediction modes, numbered as in the H.264 standard.
  typedef enum logic [3:0] {
    I4_VERT = 4'd0, I4_HOR = 4'd1, I4_DC = 4'd2, I4_DDL = 4'd3, I4_DDR = 4'd4,
    I4_VR = 4'd5, I4_HD = 4'd6, I4_VL = 4'd7, I4_HU = 4'd8
  } i4_mode_e;

  // Intra16x16 prediction modes.
  typedef enum logic [1:0] {I16_VERT = 2'd0, I16_HOR = 2'd1, I16_DC = 2'd2, I16_PLANE = 2'd3} i16_mode_e;

  // Exp-Golomb output forms.
  typedef enum logic [1:0] {EG_UE = 2'd0, EG_SE = 2'd1, EG_TE = 2'd2} eg_kind_e;

  // Deblocking filter decision.
  typedef enum logic [1:0] {DBF_SKIP = 2'd0, DBF_WEAK = 2'd1, DBF_STRONG = 2'd2} dbf_mode_e;

  // Prediction source of one prediction command in the top level.
  typedef enum logic [1:0] {PSRC_I4 = 2'd0, PSRC_I16 = 2'd1, PSRC_MC = 2'd2} psrc_e;

  // One prediction command: a 4x4 block (intra 4x4 or motion compensation)
  // or a whole 16x16 luma / 8x8 chroma intra block.
  typedef struct {
    psrc_e     src;
    logic      i16_chroma;
    i4_mode_e  i4_mode;
    i16_mode_e i16_mode;
    pixel_t    up [16];        // intra 4x4 uses up[0..7] and left[0..3]
    pixel_t    left [16];
    pixel_t    corner;
    logic      up_avail;
    logic      left_avail;
    logic [1:0] frac_x;        // quarter-sample fraction (MPEG-2: 0 or 2)
    logic [1:0] frac_y;
    pixel_t    win [9][9];     // reference window, block origin at [2][2]
  } pcmd_t;

  // One residual command: a 4x4 (H.264) or 8x8 (MPEG-2) transform block.
  typedef struct packed {
    logic       coded;         // coded-block-pattern bit: 0 = all zero
    logic [5:0] qp;            // H.264 QP
    logic       dc_bypass;     // H.264 DC already scaled by the DC transform
    logic       intra;         // MPEG-2 macroblock_intra
    logic [4:0] qscale_code;   // MPEG-2 quantiser_scale_code
    logic       q_scale_type;
    logic [1:0] intra_dc_precision;
  } rcmd_t;

  // Edge-filter settings of the top level.
  typedef struct packed {
    logic [2:0] bs;
    logic [7:0] alpha;
    logic [7:0] beta;
    logic [4:0] tc0;
    logic [4:0] qp;            // MPEG-2 post-filter quantiser
  } dbf_cfg_t;

  // Clip an integer to the 8-bit pixel range.
  function automatic pixel_t clip1(input logic signed [31:0] v);
    if (v < 0) return 8'd0;
    else if (v > 255) return 8'd255;
    else return v[7:0];
  endfunction

  // Clip v to [lo, hi].
  function automatic logic signed [31:0] clip3(input logic signed [31:0] lo,
                                               input logic signed [31:0] hi,
                                               input logic signed [31:0] v);
    if (v < lo) return lo;
    else if (v > hi) return hi;
    else return v;
  endfunction

  // H.264 LevelScale(m, i, j): v[m][0] at even/even positions, v[m][1] at
  // odd/odd positions, v[m][2] elsewhere. Only the parities of i and j matter.
  function automatic logic [4:0] level_scale(input logic [2:0] m, input logic i_odd,
                                             input logic j_odd);
    logic [4:0] v0, v1, v2;
    case (m)
      3'd0: begin v0 = 5'd10; v1 = 5'd16; v2 = 5'd13; end
      3'd1: begin v0 = 5'd11; v1 = 5'd18; v2 = 5'd14; end
      3'd2: begin v0 = 5'd13; v1 = 5'd20; v2 = 5'd16; end
      3'd3: begin v0 = 5'd14; v1 = 5'd23; v2 = 5'd18; end
      3'd4: begin v0 = 5'd16; v1 = 5'd25; v2 = 5'd20; end
      default: begin v0 = 5'd18; v1 = 5'd29; v2 = 5'd23; end
    endcase
    if (!i_odd && !j_odd) return v0;
    else if (i_odd && j_odd) return v1;
    else return v2;
  endfunction

endpackage

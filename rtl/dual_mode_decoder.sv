// dual_mode_decoder: top level of the MPEG-2 / H.264 dual mode decoder core.
//
// What it does: reconstructs pixels four at a time (one 1x4 column of a 4x4
// block per cycle) for either standard, selected by `mode`. Two decoding
// paths run side by side and meet in the variable-length FIFO:
//   * prediction path - intra 4x4 predictor, intra 16x16 / chroma predictor
//     or the shared H.264 / MPEG-2 motion-compensation interpolator;
//   * residual path - run-level expansion into a coefficient block, then
//     either H.264 de-quantisation + 4x4 integer IDCT (with coded-block-
//     pattern bypass of both for an all-zero block), or MPEG-2 inverse
//     quantisation + 8x8 IDCT (an uncoded MPEG-2 block emits zeros directly).
// The VL-FIFO adds prediction and residual, storing whichever side is ahead.
// Reconstructed columns go to the `rec_*` port, into the content memory
// and through the combined edge filter, which filters the vertical edge
// between consecutive 4x4 blocks of the output stream. The bitstream-level
// units (NAL header parser, Exp-Golomb decoder, shared parameter registers,
// both motion-vector decoders, the H.264 DC transform) sit beside the
// datapath on their own ports. The luma intra neighbour store follows the
// reconstructed stream and offers the neighbours of any block position.
//
// How it works: prediction and residual work is issued in stages by
// stage_ctrl: a new stage starts in the cycle after both paths have emitted
// every word of the current stage (instantaneous switching); finished units
// wait, and those bubbles are counted. A command is accepted only if the
// VL-FIFO has room for all of its words on the side it would be stored,
// because none of the datapath units can be stalled at their outputs; an
// assertion checks that the FIFO never refuses a word. A stage carries at
// most one prediction command and one residual command; the caller orders
// them so that the two word streams match (MPEG-2: four 4x4 motion-
// compensated blocks in the order top-left, bottom-left, top-right,
// bottom-right per 8x8 residual block; the 8x8 IDCT output is reordered into
// that order by a 16-word buffer).
//
// Low-power mode (`low_power` high): the edge filter passes every line
// unchanged and the content memory is disabled.
//
// Interface and timing:
//   * pcmd_valid/pcmd_ready, rcmd_valid/rcmd_ready - command handshakes;
//     ready may depend on valid, and a command is taken in the cycle both are high.
//   * rl_* - run-level pairs into the coefficient register; `coef_ready` is
//     high when the register is free for the next coded block.
//   * rec_valid/rec_pix - reconstructed columns in stream order.
//   * dbf_valid/dbf_p/dbf_q/dbf_mode - one filtered edge line per cycle.
//   * cm_rd_* - read port of the content memory (one-cycle latency; writes
//     take priority).
// `mode` may change only while both paths are idle.
//
// Lint notes: the units' busy flags, column and block indices and the H.264
// path's in_ready are left unconnected on purpose - the stage controller
// counts words instead, and a residual block is only issued when the path is
// idle. rst_n is seen both as the asynchronous reset and as the disable of
// the handshake assertions.
//
// Document vs. own choice: the pairing of the paths through the VL-FIFO,
// stage switching, CBP bypass, the shared units and the low-power mode
// follow the document. The command interfaces, the issue gating on FIFO
// room, the 8x8 reorder buffer and the single-row edge filtering are this
// design's. The full hybrid edge schedule with slice memories, the entropy
// decoders and the frame-buffer interface are not part of this top.
module dual_mode_decoder
  import vdec_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 96,          // VL-FIFO words (one 4:2:0 macroblock)
  parameter int unsigned CM_DEPTH   = (16 + 8) * 4, // content memory words
  parameter int unsigned MB_W       = 80           // macroblocks across (intra slice memory)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  video_mode_e mode,
  input  logic        low_power,

  // NAL unit header parser (H.264 byte stream)
  input  logic        nal_byte_valid,
  input  logic [7:0]  nal_byte,
  input  logic        slice_hdr_done,
  output logic        nal_hdr_valid,
  output logic [4:0]  nal_unit_type,
  output logic [1:0]  nal_ref_idc,
  output logic        nal_slice_data_en,
  output logic        rbsp_valid,
  output logic [7:0]  rbsp_byte,

  // Exp-Golomb decoder
  input  logic        eg_start,
  input  logic        eg_te_one,
  input  logic        eg_bit,
  input  logic        eg_bit_valid,
  output logic        eg_bit_ready,
  output logic        eg_valid,
  output logic [31:0] eg_ue,
  output logic signed [31:0] eg_se,
  output logic [31:0] eg_te,
  output logic [5:0]  eg_len,

  // shared quantiser-matrix registers (MPEG-2 and H.264 writers)
  input  logic        m2_we,
  input  logic        h_we,
  input  logic [6:0]  qm_addr,
  input  logic [7:0]  qm_data,

  // run-level coefficients
  input  logic        rl_start,
  input  logic        rl_alt_scan,
  input  logic [5:0]  rl_first_idx,
  input  logic        rl_valid,
  input  logic [5:0]  rl_run,
  input  coef_t       rl_level,
  input  logic        rl_eob,
  input  logic        rl_dc_valid,
  input  coef_t       rl_dct_diff,
  input  logic [1:0]  rl_cc,
  input  logic [1:0]  rl_intra_dc_precision,
  input  logic        rl_dc_reset,
  output logic        coef_ready,

  // commands
  input  logic        pcmd_valid,
  output logic        pcmd_ready,
  input  pcmd_t       pcmd,
  input  logic        rcmd_valid,
  output logic        rcmd_ready,
  input  rcmd_t       rcmd,

  // MPEG-2 motion vector decoder
  input  logic        m2mv_reset,
  input  logic        m2mv_valid,
  input  logic [2:0]  m2mv_rst,            // {r, s, t}
  input  logic [3:0]  m2mv_f_code,
  input  logic signed [5:0] m2mv_code,
  input  logic [7:0]  m2mv_residual,
  output logic        m2mv_out_valid,
  output logic signed [12:0] m2mv_vec,

  // H.264 motion vector predictor
  input  logic        hmv_valid,
  input  logic [2:0]  hmv_part,
  input  logic        hmv_skip,
  input  logic [3:0]  hmv_avail,           // {D, C, B, A}
  input  logic signed [13:0] hmv_nb [8],   // A.x A.y B.x B.y C.x C.y D.x D.y
  input  logic signed [5:0]  hmv_ref [4],  // A B C D
  input  logic signed [5:0]  hmv_ref_idx,
  input  logic signed [13:0] hmv_mvd [2],
  output logic        hmv_out_valid,
  output logic signed [13:0] hmv_mvp [2],
  output logic signed [13:0] hmv_mv [2],
  // H.264 DC transform (Intra16x16 luma / chroma DC): results are returned
  // by the caller as coefficient 0 of AC blocks issued with dc_bypass
  input  logic        hdc_valid,
  input  logic        hdc_chroma,
  input  logic [5:0]  hdc_qp,
  input  coef_t       hdc_in [16],
  output logic        hdc_out_valid,
  output coef_t       hdc_out [16],

  // luma intra neighbour store, fed with reconstructed blocks while nbr_luma
  input  logic        nbr_mb_start,
  input  logic [$clog2(MB_W)-1:0] nbr_mb_x,
  input  logic        nbr_luma,
  output logic        nbr_busy,
  output logic [3:0]  nbr_blk_n,
  input  logic [1:0]  nbr_q_x,
  input  logic [1:0]  nbr_q_y,
  output pix4_t       nbr_up,
  output pix4_t       nbr_upright,
  output pix4_t       nbr_left,
  output pixel_t      nbr_corner,

  // edge filter
  input  dbf_cfg_t    dbf_cfg,
  input  logic        dbf_new_row,         // next block starts a new row: no edge to its left

  // reconstruction and filter outputs
  output logic        rec_valid,
  output pix4_t       rec_pix,
  output logic        dbf_valid,
  output pixel_t      dbf_p [5],
  output pixel_t      dbf_q [5],
  output dbf_mode_e   dbf_mode,

  // content memory read port
  input  logic        cm_rd_en,
  input  logic [$clog2(CM_DEPTH)-1:0] cm_rd_addr,
  output logic [31:0] cm_rd_data,

  // events and counters
  output logic        ev_cbp_bypass,
  output logic        ev_direct,
  output logic        ev_store_pred,
  output logic        ev_store_res,
  output logic        stage_advance,
  output logic [31:0] stage_cnt,
  output logic [31:0] bubble_cnt,
  output logic [31:0] pred_wait_cnt,       // cycles the prediction path waited for the residual path
  output logic [31:0] res_wait_cnt,        // and the other way round
  output logic [1:0]  unit_en,             // {residual, prediction} path clock enables
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level
);
  localparam int LW = $clog2(FIFO_DEPTH + 1);

  // ---------------------------------------------------------------- parser side
  logic unused_nal_ref, unused_fe, unused_sps, unused_pps, unused_sh;
  nal_header_parser u_nal (
    .clk, .rst_n, .byte_in(nal_byte), .byte_valid(nal_byte_valid), .slice_hdr_done,
    .hdr_valid(nal_hdr_valid), .nal_unit_type, .nal_ref_idc, .forbidden_err(unused_fe),
    .sps_en(unused_sps), .pps_en(unused_pps), .slice_hdr_en(unused_sh),
    .slice_data_en(nal_slice_data_en), .rbsp_byte, .rbsp_valid
  );

  expgolomb_dec u_eg (
    .clk, .rst_n, .start(eg_start), .te_one(eg_te_one), .bit_in(eg_bit),
    .bit_valid(eg_bit_valid), .bit_ready(eg_bit_ready), .valid(eg_valid),
    .ue(eg_ue), .se(eg_se), .te(eg_te), .len(eg_len)
  );

  logic [7:0] qm_regs [128];
  logic [7:0] w_intra [64], w_non_intra [64];
  param_regs u_regs (
    .clk, .rst_n, .mode,
    .m2_en(mode == MODE_MPEG2), .m2_we, .m2_addr(qm_addr), .m2_data(qm_data),
    .h_en(mode == MODE_H264), .h_we, .h_addr(qm_addr), .h_data(qm_data),
    .regs(qm_regs)
  );
  always_comb
    for (int i = 0; i < 64; i++) begin
      w_intra[i]     = qm_regs[i];
      w_non_intra[i] = qm_regs[64 + i];
    end

  mpeg2_mv_dec u_m2mv (
    .clk, .rst_n, .pmv_reset(m2mv_reset), .in_valid(m2mv_valid),
    .r(m2mv_rst[2]), .s(m2mv_rst[1]), .t(m2mv_rst[0]), .f_code(m2mv_f_code),
    .motion_code(m2mv_code), .motion_residual(m2mv_residual),
    .valid(m2mv_out_valid), .vec(m2mv_vec)
  );

  h264_dc_transform u_hdc (
    .clk, .rst_n, .in_valid(hdc_valid), .is_chroma(hdc_chroma), .qp(hdc_qp),
    .dc_in(hdc_in), .out_valid(hdc_out_valid), .dc_out(hdc_out)
  );

  h264_mvp u_hmvp (
    .clk, .rst_n, .in_valid(hmv_valid), .part(hmv_part), .p_skip(hmv_skip),
    .avail_a(hmv_avail[0]), .avail_b(hmv_avail[1]), .avail_c(hmv_avail[2]), .avail_d(hmv_avail[3]),
    .mva_x(hmv_nb[0]), .mva_y(hmv_nb[1]), .mvb_x(hmv_nb[2]), .mvb_y(hmv_nb[3]),
    .mvc_x(hmv_nb[4]), .mvc_y(hmv_nb[5]), .mvd_nb_x(hmv_nb[6]), .mvd_nb_y(hmv_nb[7]),
    .ref_a(hmv_ref[0]), .ref_b(hmv_ref[1]), .ref_c(hmv_ref[2]), .ref_d(hmv_ref[3]),
    .ref_idx(hmv_ref_idx), .mvd_x(hmv_mvd[0]), .mvd_y(hmv_mvd[1]),
    .valid(hmv_out_valid), .mvp_x(hmv_mvp[0]), .mvp_y(hmv_mvp[1]), .mv_x(hmv_mv[0]), .mv_y(hmv_mv[1])
  );

  // ---------------------------------------------------------------- coefficients
  coef_t rl_blk [64];
  logic  rl_blk_valid;
  runlevel_dec u_rl (
    .clk, .rst_n, .mode, .alt_scan(rl_alt_scan), .start(rl_start), .first_idx(rl_first_idx),
    .rl_valid, .run(rl_run), .level(rl_level), .eob(rl_eob),
    .dc_valid(rl_dc_valid), .dct_diff(rl_dct_diff), .cc(rl_cc),
    .intra_dc_precision(rl_intra_dc_precision), .dc_reset(rl_dc_reset),
    .blk(rl_blk), .blk_valid(rl_blk_valid)
  );

  // coefficient register: holds one coded block until its residual command runs
  coef_t cblk [64];
  logic  cblk_full, cblk_release;
  assign coef_ready = !cblk_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cblk      <= '{default: '0};
      cblk_full <= 1'b0;
    end else begin
      if (cblk_release) cblk_full <= 1'b0;
      if (rl_blk_valid) begin
        cblk      <= rl_blk;
        cblk_full <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- stage issue
  logic [LW-1:0] level;
  logic          side_pred;
  logic [6:0]    p_words, r_words;
  logic          p_ok, r_ok, advance, p_issue, r_issue;
  logic [6:0]    p_cnt, r_cnt;
  logic [31:0]   unit_wait [2];

  always_comb begin
    unique case (pcmd.src)
      PSRC_I16: p_words = pcmd.i16_chroma ? 7'd16 : 7'd64;
      default:  p_words = 7'd4;
    endcase
    r_words = (mode == MODE_H264) ? 7'd4 : 7'd16;
  end

  // room for every word on the side that would be stored
  assign p_ok = pcmd_valid && (!(side_pred || level == '0) ||
                               32'(level) + 32'(p_words) <= FIFO_DEPTH);
  assign r_ok = rcmd_valid && (!rcmd.coded || cblk_full) &&
                (side_pred || 32'(level) + 32'(r_words) <= FIFO_DEPTH);

  stage_ctrl #(.NU(2)) u_stage (
    .clk, .rst_n, .busy({r_cnt != '0, p_cnt != '0}), .pending(p_ok || r_ok),
    .advance, .unit_en, .stage_cnt, .bubble_cnt, .unit_wait
  );
  assign p_issue       = advance && p_ok;
  assign r_issue       = advance && r_ok;
  assign pcmd_ready    = p_issue;
  assign rcmd_ready    = r_issue;
  assign stage_advance = advance;
  assign pred_wait_cnt = unit_wait[0];
  assign res_wait_cnt  = unit_wait[1];

  // registered commands; the units start one cycle after issue
  pcmd_t       p_reg;
  rcmd_t       r_reg;
  logic        p_go, r_go;
  video_mode_e r_mode;
  logic        pred_valid, res_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_reg <= '{src: PSRC_I4, i4_mode: I4_VERT, i16_mode: I16_VERT, up: '{default: '0},
                 left: '{default: '0}, win: '{default: '0}, default: '0};
      r_reg  <= '0;
      p_go   <= 1'b0;
      r_go   <= 1'b0;
      r_mode <= MODE_H264;
      p_cnt  <= '0;
      r_cnt  <= '0;
    end else begin
      p_go <= p_issue;
      r_go <= r_issue;
      if (p_issue) p_reg <= pcmd;
      if (r_issue) begin
        r_reg  <= rcmd;
        r_mode <= mode;
      end
      if (p_issue)         p_cnt <= p_words;
      else if (pred_valid) p_cnt <= p_cnt - 7'd1;
      if (r_issue)         r_cnt <= r_words;
      else if (res_valid)  r_cnt <= r_cnt - 7'd1;
    end
  end

  // ---------------------------------------------------------------- prediction path
  logic  i4_busy, i4_valid, i16_busy, i16_valid, mc_busy, mc_valid;
  logic [1:0] i4_col, i16_col, mc_col;
  logic [3:0] i16_blk;
  pix4_t i4_pix, i16_pix, mc_pix, pred_pix;
  pixel_t i4_up [8], i4_left [4];

  always_comb begin
    for (int i = 0; i < 8; i++) i4_up[i] = p_reg.up[i];
    for (int i = 0; i < 4; i++) i4_left[i] = p_reg.left[i];
  end

  intra4x4_pred u_i4 (
    .clk, .rst_n, .start(p_go && p_reg.src == PSRC_I4), .mode(p_reg.i4_mode),
    .up(i4_up), .left(i4_left), .corner(p_reg.corner),
    .up_avail(p_reg.up_avail), .left_avail(p_reg.left_avail),
    .busy(i4_busy), .out_valid(i4_valid), .out_col(i4_col), .out_pix(i4_pix)
  );

  intra16_pred u_i16 (
    .clk, .rst_n, .start(p_go && p_reg.src == PSRC_I16), .is_chroma(p_reg.i16_chroma),
    .mode(p_reg.i16_mode), .up(p_reg.up), .left(p_reg.left), .corner(p_reg.corner),
    .up_avail(p_reg.up_avail), .left_avail(p_reg.left_avail),
    .busy(i16_busy), .out_valid(i16_valid), .out_blk(i16_blk), .out_col(i16_col), .out_pix(i16_pix)
  );

  mc_interp u_mc (
    .clk, .rst_n, .start(p_go && p_reg.src == PSRC_MC), .mode,
    .frac_x(p_reg.frac_x), .frac_y(p_reg.frac_y), .win(p_reg.win),
    .busy(mc_busy), .out_valid(mc_valid), .out_col(mc_col), .out_pix(mc_pix)
  );

  assign pred_valid = i4_valid || i16_valid || mc_valid;
  always_comb
    for (int i = 0; i < 4; i++)
      pred_pix[i] = i4_valid ? i4_pix[i] : i16_valid ? i16_pix[i] : mc_pix[i];

  // ---------------------------------------------------------------- residual path: H.264
  logic  h_in_ready, h_valid, h_bypass;
  logic [1:0] h_col;
  res4_t h_res;
  coef_t h_blk [16];
  always_comb
    for (int i = 0; i < 16; i++) h_blk[i] = cblk[i];

  h264_residual_path u_hres (
    .clk, .rst_n, .in_valid(r_go && r_mode == MODE_H264), .in_ready(h_in_ready),
    .in_blk(h_blk), .qp(r_reg.qp), .dc_bypass(r_reg.dc_bypass), .all_zero(!r_reg.coded),
    .out_valid(h_valid), .out_col(h_col), .out_res(h_res), .bypass(h_bypass)
  );

  // ---------------------------------------------------------------- residual path: MPEG-2
  logic       m2_feed, m2_zero, m2_zero_arm;
  logic [2:0] m2_row;
  logic [4:0] m2_zcnt;
  coef_t      m2_qf [8];
  logic       iq_valid;
  logic [2:0] iq_row;
  coef_t      iq_out [8];
  logic       idct_ready, idct_valid, idct_half;
  logic [2:0] idct_col;
  res4_t      idct_res;
  res4_t      rob [16];
  logic [4:0] rob_wcnt;
  logic       rob_rd;
  logic [3:0] rob_rptr;

  always_comb
    for (int i = 0; i < 8; i++) m2_qf[i] = cblk[{m2_row, 3'(i)}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m2_feed  <= 1'b0;
      m2_row   <= '0;
      m2_zero  <= 1'b0;
      m2_zero_arm <= 1'b0;
      m2_zcnt  <= '0;
      rob      <= '{default: '0};
      rob_wcnt <= '0;
      rob_rd   <= 1'b0;
      rob_rptr <= '0;
    end else begin
      if (r_go && r_mode == MODE_MPEG2 && r_reg.coded) begin
        m2_feed <= 1'b1;
        m2_row  <= '0;
      end
      // zeros start one cycle later, in step with the motion compensator's
      // first column, so that both words are added without being stored
      m2_zero_arm <= r_go && r_mode == MODE_MPEG2 && !r_reg.coded;
      if (m2_zero_arm) begin m2_zero <= 1'b1; m2_zcnt <= '0; end
      if (m2_feed) begin
        m2_row <= m2_row + 3'd1;
        if (m2_row == 3'd7) m2_feed <= 1'b0;
      end
      if (m2_zero) begin
        m2_zcnt <= m2_zcnt + 5'd1;
        if (m2_zcnt == 5'd15) m2_zero <= 1'b0;
      end
      if (idct_valid) begin
        rob[{idct_col[2], idct_half, idct_col[1:0]}] <= idct_res;
        rob_wcnt <= rob_wcnt + 5'd1;
      end
      if (rob_wcnt == 5'd16) begin
        rob_wcnt <= '0;
        rob_rd   <= 1'b1;
        rob_rptr <= '0;
      end
      if (rob_rd) begin
        rob_rptr <= rob_rptr + 4'd1;
        if (rob_rptr == 4'd15) rob_rd <= 1'b0;
      end
    end
  end

  // H.264 takes the block at r_go, MPEG-2 after its last row is fed
  assign cblk_release = (r_go && r_mode == MODE_H264 && r_reg.coded) || (m2_feed && m2_row == 3'd7);

  mpeg2_iq u_iq (
    .clk, .rst_n, .in_valid(m2_feed), .in_row(m2_row), .qf(m2_qf),
    .intra(r_reg.intra), .intra_dc_precision(r_reg.intra_dc_precision),
    .quantiser_scale_code(r_reg.qscale_code), .q_scale_type(r_reg.q_scale_type),
    .w_intra, .w_non_intra,
    .out_valid(iq_valid), .out_row_idx(iq_row), .out_row(iq_out)
  );

  mpeg2_idct8 u_idct8 (
    .clk, .rst_n, .in_valid(iq_valid), .in_row(iq_row), .in_coef(iq_out), .in_ready(idct_ready),
    .out_valid(idct_valid), .out_col(idct_col), .out_half(idct_half), .out_res(idct_res)
  );

  // ---------------------------------------------------------------- VL-FIFO
  res4_t res_word;
  logic  pred_ready, res_ready;

  assign res_valid = h_valid || rob_rd || m2_zero;
  always_comb
    for (int i = 0; i < 4; i++)
      res_word[i] = h_valid ? h_res[i] : rob_rd ? rob[rob_rptr][i] : '0;

  vl_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .pred_valid, .pred_ready, .pred(pred_pix),
    .res_valid, .res_ready, .res(res_word),
    .out_valid(rec_valid), .out_pix(rec_pix),
    .ev_direct, .ev_store_pred, .ev_store_res, .level, .side_pred
  );
  assign fifo_level    = level;
  assign ev_cbp_bypass = h_bypass || (r_go && r_mode == MODE_MPEG2 && !r_reg.coded);

  // Words are issued only when the FIFO has room, so it never refuses one.
  a_pred_accepted: assert property (@(posedge clk) disable iff (!rst_n) pred_valid |-> pred_ready);
  a_res_accepted:  assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> res_ready);
  a_one_pred_src:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({i4_valid, i16_valid, mc_valid}));
  a_idct_ready:    assert property (@(posedge clk) disable iff (!rst_n) iq_valid |-> idct_ready);

  // ---------------------------------------------------------------- content memory
  logic [$clog2(CM_DEPTH)-1:0] cm_wptr;
  logic cm_we;
  assign cm_we = rec_valid && !low_power;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cm_wptr <= '0;
    else if (cm_we) cm_wptr <= (32'(cm_wptr) == CM_DEPTH - 1) ? '0 : cm_wptr + 1'b1;
  end

  spram #(.DEPTH(CM_DEPTH), .WIDTH(32)) u_cm (
    .clk, .en(cm_we || (cm_rd_en && !low_power)), .we(cm_we),
    .addr(cm_we ? cm_wptr : cm_rd_addr),
    .wdata({rec_pix[3], rec_pix[2], rec_pix[1], rec_pix[0]}), .rdata(cm_rd_data)
  );

  // ---------------------------------------------------------------- intra neighbours
  // A reconstructed 4x4 block (the edge filter's column collector below plus
  // the arriving fourth column) is handed to the neighbour store one cycle
  // after it completes, while nbr_luma marks the stream as luma blocks of
  // the current macroblock in standard order.
  pix4_t      cur [4], prv [4], ep [4], eq [4];
  logic [1:0] col_cnt, ln;
  logic   nbr_blk_valid;
  pixel_t nbr_blk [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbr_blk_valid <= 1'b0;
      nbr_blk       <= '{default: '0};
    end else begin
      nbr_blk_valid <= rec_valid && col_cnt == 2'd3 && nbr_luma;
      if (rec_valid && col_cnt == 2'd3)
        for (int r = 0; r < 4; r++) begin
          nbr_blk[r*4 + 0] <= cur[0][r];
          nbr_blk[r*4 + 1] <= cur[1][r];
          nbr_blk[r*4 + 2] <= cur[2][r];
          nbr_blk[r*4 + 3] <= rec_pix[r];
        end
    end
  end

  intra_nbr_buf #(.MB_W(MB_W)) u_nbr (
    .clk, .rst_n, .mb_start(nbr_mb_start), .mb_x(nbr_mb_x), .busy(nbr_busy),
    .blk_valid(nbr_blk_valid), .blk_pix(nbr_blk), .blk_n(nbr_blk_n),
    .q_x(nbr_q_x), .q_y(nbr_q_y), .nb_up(nbr_up), .nb_upright(nbr_upright),
    .nb_left(nbr_left), .nb_corner(nbr_corner)
  );

  // ---------------------------------------------------------------- edge filter
  logic       have_prev, ln_act;
  pixel_t     fp [5], fq [5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '{default: '0};
      prv       <= '{default: '0};
      ep        <= '{default: '0};
      eq        <= '{default: '0};
      col_cnt   <= '0;
      ln        <= '0;
      have_prev <= 1'b0;
      ln_act    <= 1'b0;
    end else begin
      if (dbf_new_row) have_prev <= 1'b0;
      if (ln_act) begin
        ln <= ln + 2'd1;
        if (ln == 2'd3) ln_act <= 1'b0;
      end
      if (rec_valid) begin
        cur[col_cnt] <= rec_pix;
        col_cnt      <= col_cnt + 2'd1;
        if (col_cnt == 2'd3) begin
          prv       <= '{cur[0], cur[1], cur[2], rec_pix};
          have_prev <= 1'b1;
          if (have_prev && !dbf_new_row) begin
            ep     <= prv;
            eq     <= '{cur[0], cur[1], cur[2], rec_pix};
            ln     <= '0;
            ln_act <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      fp[i] = ep[3 - i][ln];
      fq[i] = eq[i][ln];
    end
    fp[4] = ep[0][ln];          // outer samples repeat the block's last column
    fq[4] = eq[3][ln];
  end

  dbf_edge_filter u_dbf (
    .clk, .rst_n, .enable(!low_power), .mode, .in_valid(ln_act), .chroma(1'b0),
    .bs(dbf_cfg.bs), .alpha(dbf_cfg.alpha), .beta(dbf_cfg.beta), .tc0(dbf_cfg.tc0),
    .qp(dbf_cfg.qp), .p(fp), .q(fq),
    .out_valid(dbf_valid), .out_p(dbf_p), .out_q(dbf_q), .out_mode(dbf_mode)
  );
endmodule

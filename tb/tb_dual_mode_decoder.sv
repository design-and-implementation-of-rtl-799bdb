// tb_dual_mode_decoder: end-to-end test of the dual mode decoder top level
// with every parameter at its default.
//
// The bitstream-side units are exercised first (a NAL unit with an
// emulation-prevention byte, Exp-Golomb codes, both motion-vector
// decoders, the DC transform). Then prediction commands and residual
// commands are driven from two independent threads, so either path can run
// ahead, through six phases:
//   N  H.264, one luma macroblock of 16 blocks into the intra neighbour
//      store; its buffers, corners and the written-back slice memory row
//      are compared with the reconstructed pixels, and the load/write-back
//      cycle counts (5 + 4) are checked;
//   A  H.264, 4x4 intra / motion-compensated blocks with random residuals
//      (coded and CBP-bypassed), edge filter at bS = 4;
//   B  H.264, a 16x16 luma and two chroma intra blocks issued before their
//      residuals - the VL-FIFO fills with predictions and further
//      prediction commands wait for room;
//   C  MPEG-2, half-sample motion compensation with 8x8 residual blocks
//      through the MPEG-2 inverse quantiser and 8x8 IDCT (weights loaded into
//      the shared registers; writes from the H.264 side must be ignored);
//   D  H.264 in low-power mode (edge filter bypassed, content memory off);
//   E  H.264 again with the filter on at bS = 2.
// Every reconstructed word is compared with Clip1(prediction + residual)
// computed here: H.264 residuals exactly, MPEG-2 residuals within 1
// (the 8x8 IDCT is an approximation of the real transform). The content
// memory is read back and compared with the words written while not in
// low-power mode. Each mechanism is counted and a mechanism that never
// happened counts as a failure. Phases A and C also report the measured
// cycles per 4:2:0 macroblock; the H.264 figure must stay within the 518
// cycles that 720p at 30 fps leaves on a 56 MHz clock.
module tb_dual_mode_decoder;
  import vdec_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  video_mode_e mode;
  logic low_power;
  logic nal_byte_valid, slice_hdr_done, nal_hdr_valid, nal_slice_data_en, rbsp_valid;
  logic [7:0] nal_byte, rbsp_byte; logic [4:0] nal_unit_type; logic [1:0] nal_ref_idc;
  logic eg_start, eg_te_one, eg_bit, eg_bit_valid, eg_bit_ready, eg_valid;
  logic [31:0] eg_ue, eg_te; logic signed [31:0] eg_se; logic [5:0] eg_len;
  logic m2_we, h_we; logic [6:0] qm_addr; logic [7:0] qm_data;
  logic rl_start, rl_alt_scan, rl_valid, rl_eob, rl_dc_valid, rl_dc_reset, coef_ready;
  logic [5:0] rl_first_idx, rl_run; coef_t rl_level, rl_dct_diff; logic [1:0] rl_cc, rl_intra_dc_precision;
  logic pcmd_valid, pcmd_ready, rcmd_valid, rcmd_ready; pcmd_t pcmd; rcmd_t rcmd;
  logic m2mv_reset, m2mv_valid, m2mv_out_valid; logic [2:0] m2mv_rst; logic [3:0] m2mv_f_code;
  logic signed [5:0] m2mv_code; logic [7:0] m2mv_residual; logic signed [12:0] m2mv_vec;
  logic hmv_valid, hmv_skip, hmv_out_valid; logic [2:0] hmv_part; logic [3:0] hmv_avail;
  logic signed [13:0] hmv_nb [8], hmv_mvd [2], hmv_mvp [2], hmv_mv [2];
  logic nbr_mb_start, nbr_luma, nbr_busy; logic [6:0] nbr_mb_x; logic [3:0] nbr_blk_n;
  logic [1:0] nbr_q_x, nbr_q_y; pix4_t nbr_up, nbr_upright, nbr_left; pixel_t nbr_corner;
  logic hdc_valid, hdc_chroma, hdc_out_valid; logic [5:0] hdc_qp; coef_t hdc_in [16], hdc_out [16];
  logic signed [5:0] hmv_ref [4], hmv_ref_idx;
  dbf_cfg_t dbf_cfg; logic dbf_new_row;
  logic rec_valid, dbf_valid; pix4_t rec_pix; pixel_t dbf_p [5], dbf_q [5]; dbf_mode_e dbf_mode;
  logic cm_rd_en; logic [6:0] cm_rd_addr; logic [31:0] cm_rd_data;
  logic ev_cbp_bypass, ev_direct, ev_store_pred, ev_store_res, stage_advance;
  logic [31:0] stage_cnt, bubble_cnt, pred_wait_cnt, res_wait_cnt; logic [1:0] unit_en;
  logic [6:0] fifo_level;

  dual_mode_decoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #20ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endfunction

  // ------------------------------------------------------------ expected streams
  typedef int word_t [4];
  word_t pw [$];                 // prediction words in issue order
  word_t rw [$];                 // residual words in issue order
  bit    rtol [$];               // residual word compared within 1
  int    nrec = 0;
  word_t recw [$];               // every reconstructed word, as received
  int    cm_model [96]; bit cm_written [96]; int cm_wp = 0;
  int    n_bypass_h = 0, n_bypass_m = 0, n_direct = 0, n_sp = 0, n_sr = 0, n_room = 0;
  int    n_dbf [3], n_lp_lines = 0, n_mode_sw = 0, n_ign = 0, n_fifo_max = 0;

  int    n_nbr_busy = 0, n_m2_mb_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (nbr_busy) n_nbr_busy++;
    if (ev_cbp_bypass) begin if (mode == MODE_H264) n_bypass_h++; else n_bypass_m++; end
    if (ev_direct) n_direct++;
    if (ev_store_pred) n_sp++;
    if (ev_store_res) n_sr++;
    if (int'(fifo_level) > n_fifo_max) n_fifo_max = int'(fifo_level);
    if (pcmd_valid && !pcmd_ready && !rcmd_valid && dut.u_stage.busy == '0) n_room++;
    if (dbf_valid) begin
      if (low_power) begin
        n_lp_lines++;
        chk(dbf_mode == DBF_SKIP, "low-power line filtered");
      end else n_dbf[int'(dbf_mode)]++;
    end
    if (rec_valid) begin
      if (nrec >= pw.size() || nrec >= rw.size()) chk(0, "unexpected reconstructed word");
      else begin
        for (int i = 0; i < 4; i++) begin
          automatic int e = pw[nrec][i] + rw[nrec][i];
          automatic int g = int'(rec_pix[i]);
          e = e < 0 ? 0 : e > 255 ? 255 : e;
          checks++;
          if (rtol[nrec] ? (g - e > 1 || e - g > 1) : (g != e)) begin
            failures++;
            if (failures < 20) $display("FAIL rec word %0d[%0d] got %0d exp %0d (pred %0d res %0d)", nrec, i, g, e, pw[nrec][i], rw[nrec][i]);
          end
        end
      end
      recw.push_back('{int'(rec_pix[0]), int'(rec_pix[1]), int'(rec_pix[2]), int'(rec_pix[3])});
      if (!low_power) begin
        cm_model[cm_wp] = {rec_pix[3], rec_pix[2], rec_pix[1], rec_pix[0]};
        cm_written[cm_wp] = 1; cm_wp = (cm_wp + 1) % 96;
      end
      nrec++;
    end
  end

  // ------------------------------------------------------------ command lists
  typedef struct { pcmd_t c; } pitem_t;
  typedef struct { rcmd_t c; int n; int pos [3]; int lev [3]; } ritem_t;
  pitem_t plist [$];
  ritem_t rlist [$];

  localparam int ZZ4 [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  function automatic pcmd_t blank_pcmd();
    pcmd_t c;
    c.src = PSRC_I4; c.i16_chroma = 0; c.i4_mode = I4_DC; c.i16_mode = I16_DC;
    foreach (c.up[i]) begin c.up[i] = 0; c.left[i] = 0; end
    c.corner = 0; c.up_avail = 0; c.left_avail = 0; c.frac_x = 0; c.frac_y = 0;
    foreach (c.win[i, j]) c.win[i][j] = 0;
    return c;
  endfunction

  // 4x4 prediction: intra vertical, intra DC without neighbours, or
  // integer / half-sample motion compensation; pushes 4 expected words.
  task automatic add_pred4(input video_mode_e md, input int kind, input int base, input int spread);
    pitem_t it; word_t w;
    it.c = blank_pcmd();
    foreach (it.c.win[i, j]) it.c.win[i][j] = pixel_t'(base + $urandom_range(0, spread));
    foreach (it.c.up[i]) it.c.up[i] = pixel_t'(base + $urandom_range(0, spread));
    if (md == MODE_MPEG2) kind = 3;
    case (kind)
      0: begin it.c.src = PSRC_I4; it.c.i4_mode = I4_VERT; it.c.up_avail = 1;
               for (int c = 0; c < 4; c++) begin foreach (w[y]) w[y] = int'(it.c.up[c]); pw.push_back(w); end end
      1: begin it.c.src = PSRC_I4; it.c.i4_mode = I4_DC;
               for (int c = 0; c < 4; c++) begin foreach (w[y]) w[y] = 128; pw.push_back(w); end end
      2: begin it.c.src = PSRC_MC;
               for (int c = 0; c < 4; c++) begin foreach (w[y]) w[y] = int'(it.c.win[2 + y][2 + c]); pw.push_back(w); end end
      default: begin it.c.src = PSRC_MC; it.c.frac_x = 2'd2;
               for (int c = 0; c < 4; c++) begin
                 foreach (w[y]) w[y] = (int'(it.c.win[2 + y][2 + c]) + int'(it.c.win[2 + y][3 + c]) + 1) / 2;
                 pw.push_back(w);
               end end
    endcase
    plist.push_back(it);
  endtask

  // H.264 4x4 residual block: random coefficients or an uncoded block.
  task automatic add_res_h264(input bit coded, input int qp);
    ritem_t it; int c[16], d[16], r[16]; word_t w; int last = -1;
    it.c = '0; it.c.coded = coded; it.c.qp = 6'(qp); it.n = 0;
    foreach (c[i]) c[i] = 0;
    if (coded) begin
      it.n = $urandom_range(1, 3);
      for (int k = 0; k < it.n; k++) begin
        it.pos[k] = last + 1 + $urandom_range(0, 3);
        if (it.pos[k] > 15) it.pos[k] = 15 - (it.n - 1 - k);
        if (it.pos[k] <= last) it.pos[k] = last + 1;
        last = it.pos[k];
        it.lev[k] = $urandom_range(0, 1) ? $urandom_range(1, 6) : -$urandom_range(1, 6);
        c[ZZ4[it.pos[k]]] = it.lev[k];
      end
      dequant(c, qp, 0, d); idct(d, r);
    end else foreach (r[i]) r[i] = 0;
    for (int col = 0; col < 4; col++) begin
      foreach (w[y]) w[y] = r[y * 4 + col];
      rw.push_back(w); rtol.push_back(0);
    end
    rlist.push_back(it);
  endtask

  // MPEG-2 8x8 non-intra residual: a DC coefficient or an uncoded block.
  task automatic add_res_m2(input bit coded);
    ritem_t it; word_t w; int L, code, f;
    it.c = '0; it.c.coded = coded; it.n = 0;
    L = $urandom_range(1, 4); code = $urandom_range(2, 6);
    it.c.qscale_code = 5'(code);
    if (coded) begin it.n = 1; it.pos[0] = 0; it.lev[0] = L; end
    f = coded ? (2 * L + 1) * code : 0;          // F[0][0] with flat weight 16
    for (int k = 0; k < 16; k++) begin
      foreach (w[y]) w[y] = (f + 4) / 8;
      rw.push_back(w); rtol.push_back(coded);
    end
    rlist.push_back(it);
  endtask

  // ------------------------------------------------------------ drivers
  task automatic drive_pred();
    while (plist.size() > 0) begin
      pitem_t it = plist.pop_front();
      pcmd = it.c; pcmd_valid = 1;
      do @(posedge clk); while (!pcmd_ready);
      @(negedge clk); pcmd_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  task automatic drive_res();
    while (rlist.size() > 0) begin
      ritem_t it = rlist.pop_front();
      if (it.c.coded) begin
        int prev = -1;
        while (!coef_ready) @(negedge clk);
        rl_start = 1; rl_first_idx = 0; @(negedge clk); rl_start = 0;
        for (int k = 0; k < it.n; k++) begin
          rl_valid = 1; rl_run = 6'(it.pos[k] - prev - 1); rl_level = coef_t'(it.lev[k]);
          prev = it.pos[k];
          @(negedge clk); rl_valid = 0;
        end
        rl_eob = 1; @(negedge clk); rl_eob = 0;
        @(negedge clk);
      end
      rcmd = it.c; rcmd_valid = 1;
      do @(posedge clk); while (!rcmd_ready);
      @(negedge clk); rcmd_valid = 0;
    end
  endtask

  // standard 4x4 luma block index of block column x, row y
  function automatic int nidx(input int x, input int y);
    return ((y >> 1) << 3) | ((x >> 1) << 2) | ((y & 1) << 1) | (x & 1);
  endfunction

  task automatic run_phase();
    fork drive_pred(); drive_res(); join
    while (nrec < pw.size()) @(negedge clk);
    repeat (12) @(negedge clk);
    chk(fifo_level == 0, "FIFO empty after phase");
  endtask

  task automatic switch_mode(input video_mode_e m);
    if (m != mode) n_mode_sw++;
    mode = m; dbf_new_row = 1; @(negedge clk); dbf_new_row = 0;
  endtask

  // ------------------------------------------------------------ bitstream units
  task automatic nal_put(input logic [7:0] b);
    nal_byte = b; nal_byte_valid = 1; @(negedge clk); nal_byte_valid = 0;
  endtask

  task automatic eg_send(input int v);
    logic [32:0] x = 33'(v) + 33'd1; int lz = 0;
    for (int i = 32; i >= 0; i--) if (x[i]) begin lz = i; break; end
    eg_start = 1; @(negedge clk); eg_start = 0;
    for (int i = 0; i < 2 * lz + 1; i++) begin
      eg_bit = (i < lz) ? 1'b0 : x[2 * lz - i]; eg_bit_valid = 1;
      @(negedge clk); eg_bit_valid = 0;
    end
    chk(eg_valid && eg_ue == 32'(v) && int'(eg_len) == 2 * lz + 1, $sformatf("exp-golomb %0d got %0d", v, eg_ue));
  endtask

  logic [7:0] rbsp_got [$];
  always @(posedge clk) if (rst_n && rbsp_valid) rbsp_got.push_back(rbsp_byte);

  initial begin
    mode = MODE_H264; low_power = 0;
    nal_byte_valid = 0; nal_byte = 0; slice_hdr_done = 0;
    eg_start = 0; eg_te_one = 0; eg_bit = 0; eg_bit_valid = 0;
    m2_we = 0; h_we = 0; qm_addr = 0; qm_data = 0;
    rl_start = 0; rl_alt_scan = 0; rl_first_idx = 0; rl_valid = 0; rl_run = 0; rl_level = 0; rl_eob = 0;
    rl_dc_valid = 0; rl_dct_diff = 0; rl_cc = 0; rl_intra_dc_precision = 0; rl_dc_reset = 0;
    pcmd_valid = 0; pcmd = blank_pcmd(); rcmd_valid = 0; rcmd = '0;
    m2mv_reset = 0; m2mv_valid = 0; m2mv_rst = 0; m2mv_f_code = 1; m2mv_code = 0; m2mv_residual = 0;
    nbr_mb_start = 0; nbr_luma = 0; nbr_mb_x = 0; nbr_q_x = 0; nbr_q_y = 0;
    hdc_valid = 0; hdc_chroma = 0; hdc_qp = 0; foreach (hdc_in[i]) hdc_in[i] = 0;
    hmv_valid = 0; hmv_skip = 0; hmv_part = 0; hmv_avail = 0; hmv_ref_idx = 0;
    foreach (hmv_nb[i]) hmv_nb[i] = 0; foreach (hmv_ref[i]) hmv_ref[i] = 0; hmv_mvd = '{0, 0};
    dbf_cfg = '{bs: 3'd4, alpha: 8'd50, beta: 8'd12, tc0: 5'd3, qp: 5'd12}; dbf_new_row = 0;
    cm_rd_en = 0; cm_rd_addr = 0;
    foreach (n_dbf[i]) n_dbf[i] = 0;
    foreach (cm_written[i]) begin cm_written[i] = 0; cm_model[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    // NAL unit: IDR slice whose payload holds an emulation-prevention byte
    nal_put(8'h00); nal_put(8'h00); nal_put(8'h01); nal_put(8'h65);
    nal_put(8'h88); nal_put(8'h00); nal_put(8'h00); nal_put(8'h03); nal_put(8'h01); nal_put(8'h9A);
    nal_put(8'h00); nal_put(8'h00); nal_put(8'h01); nal_put(8'h41);
    slice_hdr_done = 1; @(negedge clk); slice_hdr_done = 0;
    chk(rbsp_got.size() >= 5 && rbsp_got[0] == 8'h88 && rbsp_got[1] == 8'h00 && rbsp_got[2] == 8'h00 &&
        rbsp_got[3] == 8'h01 && rbsp_got[4] == 8'h9A, "NAL payload with 0x03 removed");
    chk(nal_unit_type == 5'd1, "second NAL unit type");
    // Exp-Golomb codes
    eg_send(0); eg_send(1); eg_send(2); eg_send(7); eg_send(100); eg_send(1000);
    // MPEG-2 vectors: f_code 2, codes 3 then -2
    m2mv_reset = 1; @(negedge clk); m2mv_reset = 0;
    m2mv_valid = 1; m2mv_f_code = 2; m2mv_code = 3; m2mv_residual = 1; @(negedge clk); m2mv_valid = 0;
    chk(m2mv_out_valid && m2mv_vec == 6, "MPEG-2 vector 6");
    m2mv_valid = 1; m2mv_code = -2; m2mv_residual = 0; @(negedge clk); m2mv_valid = 0;
    chk(m2mv_out_valid && m2mv_vec == 3, "MPEG-2 vector 3");
    // H.264 median prediction
    hmv_valid = 1; hmv_avail = 4'b0111; hmv_nb = '{4, 8, -2, 6, 10, -4, 0, 0}; hmv_ref = '{0, 0, 0, 0};
    hmv_mvd = '{1, 1}; @(negedge clk); hmv_valid = 0;
    chk(hmv_out_valid && hmv_mvp[0] == 4 && hmv_mvp[1] == 6 && hmv_mv[0] == 5 && hmv_mv[1] == 7, "H.264 median MVP");
    // H.264 DC transform, QP 28 (LevelScale 16, shift 2): a lone DC term
    // spreads evenly; a lone (0,1) term follows Hadamard row 1
    hdc_qp = 6'd28; hdc_in[1] = 16'sd4; hdc_valid = 1; @(negedge clk); hdc_valid = 0;
    for (int i = 0; i < 16; i++)
      chk(hdc_out_valid && hdc_out[i] == ((i % 4 < 2) ? 16'sd256 : -16'sd256), $sformatf("luma DC transform %0d = %0d", i, hdc_out[i]));
    hdc_in[1] = 0; hdc_in[0] = 16'sd8; hdc_chroma = 1; hdc_valid = 1; @(negedge clk); hdc_valid = 0;
    for (int i = 0; i < 4; i++) chk(hdc_out_valid && hdc_out[i] == 16'sd1024, $sformatf("chroma DC transform %0d = %0d", i, hdc_out[i]));
    hdc_chroma = 0; hdc_in[0] = 0;

    // ---- intra neighbour store: one luma macroblock of 16 blocks, then the
    // buffers and (after a reload) the slice memory hold its edge pixels
    begin
      int base;
      nbr_mb_x = 7'd5; nbr_mb_start = 1; @(negedge clk); nbr_mb_start = 0;
      while (nbr_busy) @(negedge clk);
      base = recw.size(); nbr_luma = 1;
      for (int b = 0; b < 16; b++) begin
        add_pred4(MODE_H264, $urandom_range(0, 2), $urandom_range(40, 180), 30);
        add_res_h264($urandom_range(0, 1), $urandom_range(16, 36));
      end
      run_phase();
      nbr_luma = 0;
      while (nbr_busy) @(negedge clk);
      chk(n_nbr_busy == 5 + 4, $sformatf("neighbour load + write-back cycles %0d", n_nbr_busy));
      chk(nbr_blk_n == 4'd0, "neighbour store took 16 blocks");
      for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) begin
        automatic int kb = nidx(x, 3), kr = nidx(3, y);
        nbr_q_x = 2'(x); nbr_q_y = 2'(y); #1;
        for (int i = 0; i < 4; i++) begin
          chk(int'(nbr_up[i]) == recw[base + 4 * kb + i][3], $sformatf("neighbour up x%0d[%0d]", x, i));
          chk(int'(nbr_left[i]) == recw[base + 4 * kr + 3][i], $sformatf("neighbour left y%0d[%0d]", y, i));
        end
        if (x > 0 && y > 0)
          chk(int'(nbr_corner) == recw[base + 4 * nidx(x - 1, y - 1) + 3][3], $sformatf("neighbour corner %0d,%0d", x, y));
        @(negedge clk);
      end
      // the same macroblock column one row down reloads the written-back row
      nbr_mb_start = 1; @(negedge clk); nbr_mb_start = 0;
      while (nbr_busy) @(negedge clk);
      chk(n_nbr_busy == 5 + 4 + 5, $sformatf("neighbour reload cycles %0d", n_nbr_busy));
      for (int x = 0; x < 4; x++) begin
        automatic int kb = nidx(x, 3);
        nbr_q_x = 2'(x); nbr_q_y = 0; #1;
        for (int i = 0; i < 4; i++)
          chk(int'(nbr_up[i]) == recw[base + 4 * kb + i][3], $sformatf("slice memory up x%0d[%0d]", x, i));
        @(negedge clk);
      end
    end

    // ---- phase A: H.264 4x4 blocks
    for (int b = 0; b < 48; b++) begin
      add_pred4(MODE_H264, $urandom_range(0, 2), $urandom_range(40, 180), $urandom_range(0, 1) ? 4 : 60);
      add_res_h264($urandom_range(0, 1), $urandom_range(16, 36));
    end
    begin
      // throughput: a 4:2:0 macroblock is 24 such blocks; 720p at 30 fps
      // on a 56 MHz clock leaves 518 cycles per macroblock
      longint t0 = longint'($time);
      int cyc;
      run_phase();
      cyc = int'((longint'($time) - t0) / 10) - 12;
      $display("throughput: 48 blocks in %0d cycles, %0d cycles per 24-block macroblock", cyc, cyc / 2);
      chk(cyc / 2 < 518, $sformatf("macroblock takes %0d cycles", cyc / 2));
    end

    // ---- phase B: 16x16 luma + two chroma intra blocks ahead of their residuals
    begin
      pitem_t it; word_t w; int s = 0;
      it.c = blank_pcmd(); it.c.src = PSRC_I16; it.c.i16_mode = I16_DC; it.c.up_avail = 1; it.c.left_avail = 1;
      foreach (it.c.up[i]) begin it.c.up[i] = pixel_t'($urandom_range(50, 200)); it.c.left[i] = pixel_t'($urandom_range(50, 200)); s += int'(it.c.up[i]) + int'(it.c.left[i]); end
      plist.push_back(it);
      for (int k = 0; k < 64; k++) begin foreach (w[y]) w[y] = (s + 16) >> 5; pw.push_back(w); end
      for (int ch = 0; ch < 2; ch++) begin
        it.c = blank_pcmd(); it.c.src = PSRC_I16; it.c.i16_chroma = 1; it.c.i16_mode = I16_DC;
        plist.push_back(it);
        for (int k = 0; k < 16; k++) begin foreach (w[y]) w[y] = 128; pw.push_back(w); end
      end
      for (int k = 0; k < 4; k++) add_pred4(MODE_H264, 2, 100, 30);
      for (int k = 0; k < 28; k++) add_res_h264($urandom_range(0, 3) == 0, 28);
    end
    // predictions first, residuals after a delay: the FIFO holds predictions
    fork
      drive_pred();
      begin repeat (120) @(negedge clk); drive_res(); end
    join
    while (nrec < pw.size()) @(negedge clk);
    repeat (12) @(negedge clk);

    // ---- phase C: MPEG-2
    switch_mode(MODE_MPEG2);
    for (int a = 0; a < 128; a++) begin
      m2_we = 1; qm_addr = 7'(a); qm_data = 8'd16; @(negedge clk);
      m2_we = 0; h_we = 1; qm_data = 8'd99; @(negedge clk); h_we = 0; n_ign++;
    end
    dbf_cfg.qp = 5'd12;
    for (int b = 0; b < 10; b++) begin
      for (int k = 0; k < 4; k++) add_pred4(MODE_MPEG2, 3, $urandom_range(60, 160), (b % 3 == 0) ? 40 : 2);
      add_res_m2(b % 4 != 0);         // uncoded first: both paths start together
    end
    begin
      // throughput: a 4:2:0 macroblock is six 8x8 blocks
      longint t0 = longint'($time);
      int cyc;
      run_phase();
      cyc = int'((longint'($time) - t0) / 10) - 12;
      $display("throughput: 10 MPEG-2 8x8 blocks in %0d cycles, %0d cycles per 6-block macroblock", cyc, cyc * 6 / 10);
      n_m2_mb_cycles = cyc * 6 / 10;
    end

    // ---- phase D: H.264 in low-power mode
    switch_mode(MODE_H264);
    low_power = 1;
    for (int b = 0; b < 12; b++) begin
      add_pred4(MODE_H264, $urandom_range(0, 2), $urandom_range(40, 180), 20);
      add_res_h264($urandom_range(0, 1), 30);
    end
    run_phase();
    low_power = 0;

    // ---- phase E: H.264, weak filtering
    dbf_cfg.bs = 3'd2; dbf_cfg.alpha = 8'd60; dbf_cfg.beta = 8'd20;
    for (int b = 0; b < 24; b++) begin
      add_pred4(MODE_H264, 2, $urandom_range(60, 160), 8);
      add_res_h264($urandom_range(0, 1), 30);
    end
    run_phase();

    // content memory read-back
    for (int a = 0; a < 96; a++) begin
      cm_rd_en = 1; cm_rd_addr = 7'(a); @(negedge clk); cm_rd_en = 0;
      if (cm_written[a]) chk(int'(cm_rd_data) == cm_model[a], $sformatf("content memory word %0d", a));
    end

    chk(nrec == pw.size() && nrec == rw.size(), $sformatf("word count %0d of %0d/%0d", nrec, pw.size(), rw.size()));
    $display("mechanisms: H.264 CBP bypass %0d, MPEG-2 uncoded %0d, direct add %0d, FIFO stores pred %0d / res %0d (max level %0d)",
             n_bypass_h, n_bypass_m, n_direct, n_sp, n_sr, n_fifo_max);
    $display("            room stalls %0d, stages %0d, bubbles %0d (pred waited %0d, res waited %0d), mode switches %0d",
             n_room, stage_cnt, bubble_cnt, pred_wait_cnt, res_wait_cnt, n_mode_sw);
    $display("            edge filter skip/weak/strong %0d/%0d/%0d, low-power lines %0d, ignored matrix writes %0d",
             n_dbf[0], n_dbf[1], n_dbf[2], n_lp_lines, n_ign);
    chk(n_bypass_h > 0, "H.264 CBP bypass never happened");
    chk(n_bypass_m > 0, "MPEG-2 uncoded block never happened");
    chk(n_direct > 0, "direct add never happened");
    chk(n_sp > 0, "FIFO never stored predictions");
    chk(n_sr > 0, "FIFO never stored residuals");
    chk(n_room > 0, "FIFO-room stall never happened");
    chk(bubble_cnt > 0 && pred_wait_cnt > 0 && res_wait_cnt > 0, "stage bubbles on both paths");
    chk(n_mode_sw >= 2, "mode switches");
    chk(n_dbf[0] > 0 && n_dbf[1] > 0 && n_dbf[2] > 0, "every edge-filter flow");
    chk(n_lp_lines > 0, "low-power mode never filtered a line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

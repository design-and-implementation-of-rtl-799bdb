// intra_nbr_buf: neighbour-pixel store for H.264 luma intra prediction.
//
// What it does: supplies the upper, upper-right, left and corner neighbours
// of the 4x4 luma block about to be predicted, and keeps them current as
// reconstructed blocks come back. Pixels of the macroblock row above live in
// a slice memory of MB_W*4 words of 32 bits (four pixels per word, one word
// per 4-pixel column of the picture width).
//
// How it works: `mb_start` (with `mb_x`) loads the four words above the
// macroblock into four 4-pixel upper buffers, one word per cycle (4 read
// cycles plus one of read latency). Each reconstructed block then
// overwrites the upper buffer of its column with its bottom row and the
// left buffer of its row with its right column, so the buffers always hold
// the neighbours of the blocks that come next. Blocks are taken in the
// standard 4x4 luma order (n = 0..15: x = {n[2], n[0]}, y = {n[3], n[1]}).
// After the 16th block the upper buffers, now the macroblock's bottom row,
// are written back to the same four words (4 cycles). The left buffers
// carry over to the next macroblock without any memory access.
// Corners: the corners of the top block row come from the loaded words (and,
// for the leftmost, from the previous load); the corners of the left block
// column come from the previous macroblock's right column; inner corners
// are the bottom-right pixels of finished blocks. They are kept in twenty
// one-pixel registers. Lint note: entry 0 of crn_left and r_crn is never
// used (the left column's top corner comes from the loaded row), and
// rst_n is seen both as the asynchronous reset and as the assertion's
// disable.
//
// Interface and timing: `busy` is high during load and write-back; assert
// `mb_start` only while it is low, and give blocks only after the load.
// blk_valid/blk_pix take one finished block (row-major, pix[r*4+c]) per
// cycle. q_x/q_y select a block position; nb_up/nb_upright/nb_left/
// nb_corner are combinational from registers. Up-right pixels of blocks in
// the right-hand column (x = 3) are the replicated last upper pixel;
// availability is decided by the caller.
//
// Document vs. own choice: the slice memory size (N = MBs across x 4 words
// of 32 bits), the 4-cycle load and store, the per-block updating upper and
// left buffers follow the document. The corner registers (twenty instead
// of a swapped set of eight) and the block-level handshake are this design's.
module intra_nbr_buf
  import vdec_pkg::*;
#(
  parameter int unsigned MB_W = 80                // macroblocks across (1280 / 16, 720p)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mb_start,
  input  logic [$clog2(MB_W)-1:0] mb_x,
  output logic       busy,
  input  logic       blk_valid,
  input  pixel_t     blk_pix [16],
  output logic [3:0] blk_n,                       // index of the next block expected
  input  logic [1:0] q_x,
  input  logic [1:0] q_y,
  output pix4_t      nb_up,
  output pix4_t      nb_upright,
  output pix4_t      nb_left,
  output pixel_t     nb_corner
);
  localparam int unsigned DEPTH = MB_W * 4;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_STORE} state_e;
  state_e state;
  logic [2:0] step;                                // load: 0..4, store: 0..3
  logic [AW-1:0] base;
  pix4_t  up_buf   [4];
  pix4_t  left_buf [4];
  pixel_t crn_top  [4];                            // corners of blocks (x, 0)
  pixel_t crn_left [4];                            // corners of blocks (0, y), y >= 1
  pixel_t r_crn    [4];                            // this MB's right-column corners
  pixel_t inner    [9];                            // corners of blocks (x, y), x, y >= 1
  pixel_t saved_crn;

  logic        m_en, m_we;
  logic [AW-1:0] m_addr;
  logic [31:0] m_wdata, m_rdata;

  spram #(.DEPTH(DEPTH), .WIDTH(32)) u_slice (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  assign busy = state != S_IDLE;

  always_comb begin
    m_en = 1'b0; m_we = 1'b0; m_addr = base; m_wdata = '0;
    if (state == S_LOAD && step < 3'd4) begin
      m_en = 1'b1; m_addr = base + AW'(step);
    end else if (state == S_STORE) begin
      m_en = 1'b1; m_we = 1'b1; m_addr = base + AW'(step);
      m_wdata = {up_buf[step[1:0]][3], up_buf[step[1:0]][2], up_buf[step[1:0]][1], up_buf[step[1:0]][0]};
    end
  end

  logic [1:0] bx, by;
  assign bx = {blk_n[2], blk_n[0]};
  assign by = {blk_n[3], blk_n[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; step <= '0; base <= '0; blk_n <= '0; saved_crn <= '0;
      up_buf <= '{default: '0}; left_buf <= '{default: '0};
      crn_top <= '{default: '0}; crn_left <= '{default: '0};
      r_crn <= '{default: '0}; inner <= '{default: '0};
    end else begin
      case (state)
        S_IDLE: begin
          if (mb_start) begin
            state <= S_LOAD; step <= '0; blk_n <= '0;
            base  <= AW'(mb_x) * AW'(4);
            crn_left <= r_crn;
          end else if (blk_valid) begin
            up_buf[bx]   <= '{blk_pix[12], blk_pix[13], blk_pix[14], blk_pix[15]};
            left_buf[by] <= '{blk_pix[3], blk_pix[7], blk_pix[11], blk_pix[15]};
            if (bx != 2'd3 && by != 2'd3) inner[int'(by) * 3 + int'(bx)] <= blk_pix[15];
            if (bx == 2'd3) r_crn[by + 2'd1] <= blk_pix[15];
            blk_n <= blk_n + 4'd1;
            if (blk_n == 4'd15) begin state <= S_STORE; step <= '0; end
          end
        end
        S_LOAD: begin
          step <= step + 3'd1;
          if (step != 3'd0) begin
            up_buf[step[1:0] - 2'd1] <= '{m_rdata[7:0], m_rdata[15:8], m_rdata[23:16], m_rdata[31:24]};
            if (step != 3'd4) crn_top[step[1:0]] <= m_rdata[31:24];
          end
          if (step == 3'd4) begin
            state     <= S_IDLE;
            crn_top[0] <= saved_crn;
            saved_crn <= m_rdata[31:24];
          end
        end
        S_STORE: begin
          step <= step + 3'd1;
          if (step == 3'd3) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    nb_up      = up_buf[q_x];
    nb_left    = left_buf[q_y];
    nb_upright = (q_x == 2'd3) ? '{default: up_buf[3][3]} : up_buf[q_x + 2'd1];
    if (q_y == 2'd0)      nb_corner = crn_top[q_x];
    else if (q_x == 2'd0) nb_corner = crn_left[q_y];
    else                  nb_corner = inner[int'(q_y) * 3 + int'(q_x) - 4];
  end

  // blocks are only accepted between load and write-back
  assert property (@(posedge clk) disable iff (!rst_n) blk_valid |-> state == S_IDLE);
endmodule

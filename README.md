# A dual-mode MPEG-2 / H.264 reconstruction core

This is the pixel-reconstruction core of a video decoder that plays both MPEG-2
and H.264 (baseline) streams, as used in digital TV receivers. It uses one
datapath for both standards, and it works in 4x4 pixel blocks at a fixed rate
of **four pixels per clock**: one 1x4 column of a 4x4 block per cycle.

The point of the design is to keep both standards on small, block-sized
buffers instead of macroblock-sized ones. H.264 works natively on 4x4 blocks.
MPEG-2 uses 8x8 blocks, so they are cut into four 4x4 quarters on the way
through. The units that can be shared between the standards are shared:
- the motion-compensation interpolator;
- the edge filter;
- the parameter registers.

The architecture follows the thesis *Design and Implementation of Dual Mode
Video Decoder for Digital TV Applications*. This RTL is an independent
implementation of that architecture. Where it departs from the thesis, it
says so below and in each file's opening comment.

Reconstruction is `prediction + residual`, clipped to 0..255, and the core is
organised around that sum. Two paths run side by side:

```
 run/level pairs ─► runlevel_dec ─► coefficient block ─┬─► H.264: dequant ─► 4x4 IDCT ─┐
                                                       └─► MPEG-2: IQ ─► 8x8 IDCT ─► reorder ─┤ residual
                                                                                      │
 prediction cmd ─► intra 4x4 │ intra 16x16/chroma │ MC interpolator ──────────────────┤ prediction
                                                                                      ▼
                                                                   VL-FIFO (store / add / clip)
                                                                                      │
                                         rec_* port ◄─┬───────────────────────────────┘
                                                      ├─► content memory (96 x 32)
                                                      └─► triple-mode edge filter ─► dbf_* port
```

## The two paths, and the variable-length FIFO between them

The prediction path and the residual path take different, data-dependent
amounts of time per block. For example:
- an intra-16x16 luma prediction produces 64 columns at once;
- a block with no coefficients produces its residual immediately;
- the 8x8 MPEG-2 IDCT has several cycles of latency.

Neither path can stall mid-block: none of the arithmetic units has
backpressure on its output. The two output streams therefore meet in a
**variable-length FIFO** (`vl_fifo`) instead of a fixed-delay adder:

* A column that arrives at the same time as its partner from the other path is
  added, clipped and sent out at once. This is the *direct add* case, and
  nothing is stored.
* A column that arrives alone is stored. The FIFO remembers which side it
  holds (`side_pred`). Later columns from the same side queue behind it, and
  columns from the other side are added to the stored ones in order.
* The FIFO only ever holds one side at a time. Its depth (96 words, one 4:2:0
  macroblock) is the largest imbalance the two paths can build up.

Since nothing can be refused, the top **gates the issue of commands**. A
prediction or residual command is accepted only if the FIFO has room for
every word it will produce on the side where those words would be stored:
- an intra-16x16 luma command produces 64 words;
- a chroma command produces 16;
- a 4x4 block produces 4;
- an MPEG-2 residual block produces 16.

If there is no room, the command waits. These waits are the "room stalls"
counted by the top testbench. An assertion in the top checks that the FIFO
never sees a word it cannot take.

## Stage switching in the 4x4-block pipeline

Work is issued in **stages**. A stage carries at most one prediction command
and one residual command. `stage_ctrl` starts the next stage in the cycle
after every unit of the current stage has finished. This is the "instantaneous
switching" rule: a stage switches only once all the pipelined units have
finished. A unit that finishes early waits. Those idle cycles are counted per
unit (`pred_wait_cnt`, `res_wait_cnt`) and as `bubble_cnt`, so the cost of
unbalanced stages can be measured. The caller orders the commands so that the
two word streams correspond:
* for H.264, each 4x4 block is paired with its prediction;
* for MPEG-2, one 8x8 residual block is paired with four 4x4 motion-compensated
  quarters, in the order top-left, bottom-left, top-right, bottom-right. A
  16-word reorder buffer puts the 8x8 IDCT output into that order.

## Skipping empty blocks (coded-block-pattern bypass)

Most residual blocks in real streams have no coefficients at all. The
coded-block-pattern says so before any coefficient is decoded. A residual
command with `coded = 0` therefore does not enable the de-quantiser or the
IDCT. Zeros go straight to the FIFO instead, four words for H.264 and sixteen
for MPEG-2. This saves both power and time. In MPEG-2 the zero words are
delayed by one cycle so that they line up with the motion-compensation
latency and hit the direct-add case.

## Residual arithmetic

* **H.264** (`h264_residual_path`): `h264_dequant` rescales all 16
  coefficients in one cycle. It uses the LevelScale table and the QP/6 shift,
  and results are clipped to 16 bits. `h264_idct4` is the 4x4 integer
  transform and outputs one column per cycle. The luma and chroma DC blocks
  go through `h264_dc_transform` first. That unit sits beside the path (see
  below).
* **MPEG-2**: `mpeg2_iq` processes one row of eight coefficients per cycle.
  It applies the intra DC multiplier and the weighting matrix with
  quantiser scale (linear or non-linear table), then saturates to
  [-2048, 2047] and applies mismatch control on coefficient [7][7].
  `mpeg2_idct8` is a row-column 8x8 IDCT. It is built from two
  parallel-in/parallel-out 1-D IDCTs with a transpose buffer between them,
  and its accuracy is checked against a double-precision reference.
* `runlevel_dec` expands run/level pairs into a coefficient block. It applies
  the inverse scan: the H.264 4x4 zig-zag, or the MPEG-2 zig-zag or alternate
  scan. It also does MPEG-2 intra DC prediction.

## Prediction

* `intra4x4_pred`: the nine H.264 4x4 modes. Each directional mode reduces
  to "select up to three neighbours, add, round". This lets all eight
  angular modes share one small adder network.
* `intra16_pred`: the 16x16 luma modes (vertical, horizontal, DC, plane) and
  the chroma modes. The plane mode computes its slopes `b` and `c` once, and
  then steps the plane one column at a time. The slope accumulator is shared
  with the DC sum.
* `mc_interp`: one interpolator for both standards. For H.264 it computes
  half-sample positions with the 6-tap filter (1, -5, 20, 20, -5, 1) and
  quarter-sample positions by averaging. For MPEG-2 it computes bilinear
  half-sample positions. It takes a 9x9 reference window and produces one
  1x4 column per cycle after two cycles.
* `h264_mvp` and `mpeg2_mv_dec` produce the motion vectors.
  - `h264_mvp` is the H.264 median predictor, with the C→D substitution, the
    single-matching-reference rule, the 16x8/8x16 directional rules and the
    P_Skip zero rule. It also adds the MVD.
  - `mpeg2_mv_dec` decodes MPEG-2 motion codes. It keeps the PMV registers and
    wraps the result into the f_code range.

## One edge filter for both standards

`dbf_edge_filter` filters one edge line per cycle, four pixels on each side.
It has three data flows:

| flow | H.264 in-loop | MPEG-2 post filter |
|---|---|---|
| strong | bS = 4 equations | same bS = 4 equations, chosen when the 10 pixels are flat (at least `THR2`=6 neighbour differences of at most `THR1`=2) and max−min < 2·QP |
| weak | bS 1..3, clipped by tc0 | default mode: a 4-tap kernel **[2 −4 4 −2]** (shifts only) measures the edge, and the correction is clipped to half the step |
| skip | bS = 0, or the alpha/beta test fails | correction of zero |

Two details differ from the usual MPEG-4-style post filter. First, the DC
offset mode is replaced by the H.264 bS=4 filter, so the strong hardware is
shared. Second, the kernel [2 −5 5 −2] is simplified to [2 −4 4 −2], which
needs no multiplier. In the top, the filter is applied to the vertical edge
between each pair of consecutive 4x4 blocks of the output stream. `dbf_new_row`
marks a block that has no left neighbour.

## Low-power mode and the content memory

Reconstructed columns are also written into the **content memory**, a
single-port `(16+8)*4 x 32` SRAM (`spram`, 96 words, one macroblock of 4:2:0
samples). It keeps the current macroblock for the loop filter. The loop filter
is the largest power consumer. If the user accepts an unsmoothed picture,
setting `low_power` turns the filter into a pass-through and disables the
content memory, whose only purpose is to feed the filter. The edge lines still
come out, unchanged.

## Intra neighbours and the slice memory

Intra prediction needs, for each 4x4 block, the four pixels above it, the
four above-right, the four to its left and the corner pixel. `intra_nbr_buf`
keeps these for luma without re-reading memory for every block:

* The pixel row above the macroblock row sits in a **slice memory**. It holds
  MB_W·4 words of 32 bits (`MB_W` = 80 macroblocks across for 1280-pixel
  720p), one word per four pixels of picture width.
* At the start of a macroblock, its four upper words are loaded into four
  4-pixel **upper buffers**. This takes 4 reads plus one cycle of latency.
* Each finished block overwrites the upper buffer of its column with its
  bottom row, and the **left buffer** of its row with its right column.
  Because blocks are decoded in the standard order (each 8x8 quadrant in
  turn), the buffers always hold the neighbours of the next block.
* After the 16th block the upper buffers hold the macroblock's bottom row.
  They are written back to the same four words, which takes 4 cycles. The
  left buffers are already the left neighbours of the next macroblock.
* Corner pixels come from three places, all kept in small registers:
  - the loaded row, for the top blocks;
  - the previous macroblock's right column, for the left blocks;
  - the finished blocks, for the inner corners.

In the top, the store follows the reconstructed stream. While `nbr_luma` is
high, every complete 4x4 block is handed to it. The `nbr_q_*` ports select
a block position, and `nbr_up`, `nbr_upright`, `nbr_left` and `nbr_corner`
return its neighbours.

## Bitstream-side units

These units sit beside the datapath on their own ports:
* `nal_header_parser`: finds the `00 00 01` start codes and removes
  emulation-prevention bytes (`00 00 03`). It decodes the NAL header and
  enables one lower parsing unit at a time: SPS, PPS, slice header, then
  slice data after `slice_hdr_done`.
* `expgolomb_dec`: decodes ue(v), se(v) and te(v) codes at one bit per cycle.
  A single up/down counter counts the leading zeros up and the suffix bits
  down.
* `h264_dc_transform`: the inverse Hadamard transform and scaling of the
  luma DC block of an intra-16x16 macroblock (4x4) and of each chroma DC
  block (2x2), in one cycle. The caller returns each result as coefficient 0
  of the matching AC block. It issues that block with `dc_bypass` set, so the
  de-quantiser leaves the coefficient unscaled.
* `param_regs`: one 128-byte register file shared between the standards. In
  MPEG-2 mode it holds the intra and non-intra quantiser matrices, which feed
  `mpeg2_iq` directly. In H.264 mode the same registers hold H.264
  parameters. Writes from the mode that is not selected are ignored.

## What is not here

This core reconstructs pixels from already-parsed symbols. It does not
contain:
- the entropy decoders (CAVLC for H.264, the MPEG-2 VLC tables);
- the syntax parser units below the NAL level (SPS, PPS, slice header,
  macroblock layer; MPEG-2 sequence to macroblock headers);
- the chroma neighbour buffers, and a direct connection from the luma
  neighbour store to the intra predictors (the caller copies the
  neighbours into each prediction command);
- the full loop-filter schedule, with its four SRAMs and its order of
  horizontal and vertical edges;
- the frame-buffer interface.

These parts appear as ports instead:
- intra neighbours and the motion-compensation window come with each
  prediction command (`pcmd_t`);
- coefficients come as run/level pairs;
- filter strengths come as `dbf_cfg`.

The edge filter in this top filters only the vertical edges between
consecutive blocks of the output stream. It does not filter macroblock
edges in picture order.

## Throughput against video formats

At four samples per cycle, a 4:2:0 macroblock (384 samples) needs at least
96 cycles of reconstruction. The achieved rate is lower, because each stage
carries one prediction command and one residual command and the next stage
waits for both. The end-to-end testbench measures it:

| stream | measured cycles per macroblock | budget at the original chip's clock | fits |
|---|---|---|---|
| H.264, 4x4 blocks | 321 (48 blocks in 642 cycles) | 720p30 at 56 MHz: 518; SXGA30 at 79.64 MHz: 518 | yes |
| MPEG-2, 8x8 blocks | 1110 (10 blocks in 1851 cycles) | 720p30 at 35.7 MHz: 330; 1080i30 at 80.92 MHz: 330 | no |

MPEG-2 is slow here for three reasons:
- each 8x8 block needs four single-command motion-compensation stages;
- its coefficients are fed one per cycle before the residual command is
  issued;
- the testbench inserts random gaps in the command feed.

Allowing several prediction commands per stage would close most of the
gap. That change is not made here. Entropy decoding is outside this core
and is not counted in either figure.

## Files

* `rtl/vdec_pkg.sv`: shared types: pixel and coefficient types, the command
  structs `pcmd_t`, `rcmd_t` and `dbf_cfg_t`, and the rounding and clipping
  helpers.
* `rtl/dual_mode_decoder.sv`: the top. Every other module in `rtl/` is
  instantiated by it, directly or through `h264_residual_path`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=N failures=M`.
* `tb/h264_ref_pkg.sv`: reference models (LevelScale, IDCT and so on) that
  the H.264 testbenches share.

## Simulating

All parameters default to the sizes of the original design. Example, for the
end-to-end testbench, run from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dual_mode_decoder \
  -y rtl -y tb +libext+.sv -Irtl rtl/vdec_pkg.sv tb/h264_ref_pkg.sv \
  tb/tb_dual_mode_decoder.sv -o sim
./obj_dir/sim
```

The same works for any other `tb_<module>`. `tb_dual_mode_decoder` runs the
top at its default parameters. It takes a few seconds and goes through these
steps:
1. It checks the NAL parser, the Exp-Golomb decoder and both vector
   decoders.
2. It runs one luma macroblock through the neighbour store. It then
   checks the upper, left and corner buffers and the written-back slice
   memory row against the reconstructed pixels.
3. It runs 48 H.264 4x4 blocks.
4. It runs an intra-16x16 luma macroblock with both chroma blocks.
5. It loads MPEG-2 matrices and runs ten 8x8 blocks, some uncoded.
6. It repeats H.264 blocks in low-power mode and with bS=2.
7. It reads back the content memory.

It counts each mechanism and fails if any count is zero:
- CBP bypass;
- MPEG-2 uncoded blocks;
- direct adds;
- stored prediction and stored residual;
- room stalls;
- pipeline bubbles;
- mode switches;
- each filter flow;
- low-power lines.

## How far to trust it

Every module is checked by its testbench against a model written
independently in the testbench, using random stimulus over the full range of
modes and QPs. A deliberately broken copy of each module was run against its
testbench and was caught each time. The simulations are two-state, with
registers started at random values.

Known limits:
- The H.264 dequantiser clips to 16 bits, which is ample for conforming
  streams.
- The MPEG-2 post filter's flatness thresholds (THR1 = 2, THR2 = 6) are the
  values of the MPEG-4 deblocking filter that the post filter is based on.
- The command interfaces, the issue gating, the 8x8 reorder buffer and the
  single-row edge filtering are choices of this implementation, not of the
  original design.

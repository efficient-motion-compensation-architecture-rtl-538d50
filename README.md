# Motion compensation with embedded rate-distortion optimisation (H.264/AVC)

An H.264 encoder picks a coding mode for every macroblock. Rate-distortion
optimisation (RDO) makes that choice by actually coding each candidate mode:
predict, subtract, transform, quantize, dequantize, inverse transform,
reconstruct. It then measures the distortion D and the bit count R, and keeps
the candidate with the smallest Lagrangian cost J = D + λ·R. Coding every
candidate is expensive: a luma macroblock has nine intra 4x4 modes for each of
its 16 blocks, four 16x16 modes, and any number of inter candidates.

This RTL implements a motion compensation (MC) unit built around that loop. It
is based on a published architecture for H.264/AVC, which widens "motion
compensation" to cover intra prediction, RDO and the deblocking filter. There
are two main ideas:

* **One shared pre-coding pipeline.** Intra 4x4, intra 16x16 and inter
  candidates all go through the same five stages, one 4x4 block per cycle:
  prediction, MC- (subtract), DQ (transform/quantize and back, two cycles),
  MC+ (reconstruct and measure distortion) and COST.
* **Fewer candidates.** Intra 4x4 uses a 3-step decision tree that pre-codes
  5 of the 9 modes, plus a threshold check that adds modes back when the
  result looks poor. The choice of intra 16x16 modes is predicted from the
  16 intra 4x4 decisions.

The unit decides the luma mode of one macroblock at a time. Chroma, the
deblocking filter, motion estimation and the variable length coder (VLC) are
outside it; their connection points are ports (see "What is not here").

## The pre-coding pipeline

```
 cycle   t          t+1          t+2          t+3           t+4          t+5
         ISSUE      MC-          DQ cycle 1   DQ cycle 2    MC+ -> reg   COST
         pred  ->   cur - pred   FDCT + Q     IQ + IDCT     rec, SSD     J = SSD + λ·bits
         regfile    (mc_sub)     -> levels    -> residual'  (mc_add)     cost visible at t+5
         cur_buf rd              (dq)         (dq)                       (rdo_cost)
```

* **ISSUE.** The prediction comes from the INTRA interpolation logic
  (`intra4_interp`, `intra16_interp`) or from the inter buffer (`inter_buf`). It is
  loaded into the 8-bit x 16 prediction register file (`pred_regfile`). In
  the same cycle the 16 current pixels are read from the four-bank current
  data buffer (`cur_buf`).
* **MC-.** Sixteen parallel subtractors (`mc_sub`) form the residual.
* **DQ** (`dq`) takes two cycles and accepts a new block every cycle:
  * cycle 1: H.264 forward core transform and quantization;
  * cycle 2: dequantization and inverse core transform with `(x+32)>>6`
    rounding.

  The quantized levels leave the unit on `vlc_lvl` so that an external VLC
  can count their bits.
* **MC+** (`mc_add`) adds the decoded residual to the prediction, clips the
  result to 0..255 and computes the sum of squared differences against the
  current block.
* **COST** (`rdo_cost`) takes the bit count on `vlc_bits` in the same cycle
  as `vlc_valid` and forms `J = SSD + lambda*bits`.

A block's cost is visible to the controller five cycles after the block was
issued. Every control decision in this design follows from that latency.

## Intra 4x4: the 3-step search and threshold compensation

This is the part most worth understanding. The nine intra 4x4 modes fall into
a vertical group (0, 7, 5, 3) and a horizontal group (1, 8, 6, 4). Mode 2 (DC)
stands apart. For each block, `intra4_modesel` drives the search:

1. Modes 0, 1 and 2 are always pre-coded. They issue on three consecutive
   cycles.
2. If `cost0 < cost1`, the vertical group continues with mode 7. Otherwise
   the horizontal group continues with mode 8.
3. Vertical group: if `cost0 < cost7`, mode 5 is pre-coded, otherwise mode 3.
   Horizontal group: if `cost1 < cost8`, mode 6, otherwise mode 4.
4. **Compensation.** The threshold is TH = β · average(best cost of the block
   above, best cost of the block to the left), with β = 1. If the best cost
   so far exceeds TH, the remaining modes are pre-coded one at a time, lowest
   mode number first. This stops as soon as the best cost drops to TH or
   below, or when all nine modes are done.

The chosen mode is the one with the lowest cost among all pre-coded modes,
mode 2 included. On equal costs, the mode evaluated first wins.

Steps 2 and 3 depend on costs that are five cycles away, so they cannot
overlap. A block's next block also cannot start early: it predicts from this
block's reconstructed pixels. The schedule is therefore:

```
cycle  0  1  2  3  4  5  6  7  ...  11 12 ... 16 17
issue  m0 m1 m2             s2           s3          commit (write reconstruction)
cost               c0 c1 c2          cs2          cs3
```

This gives **18 cycles per 4x4 block, 288 per macroblock**, the figure the
original architecture quotes. Each compensation mode adds 5 cycles, so the
worst case is 16 · (18 + 4·5) = 608 cycles. The threshold uses only the
neighbours inside the macroblock:

* one neighbour: its cost is used directly;
* no neighbour (block 0): no compensation.

With β = 1, real content often triggers compensation. In the test
macroblocks, about half of the blocks of textured content pre-code one or more
extra modes.

The best mode's reconstruction is written to the reference (reconstruction)
buffer `recon_buf`. This buffer supplies each block's neighbours:

* inside the macroblock, from already reconstructed blocks;
* at the macroblock edges, from the `mb_top`, `mb_left` and `mb_corner`
  ports.

It applies the H.264 rule for above-right pixels: when they are not yet
decoded, they are replaced by the last pixel of the row above.

## Intra 16x16: predicted candidates

After the 16 intra 4x4 decisions, `intra16_modesel` counts how many blocks
chose mode 0 (N0), mode 1 (N1) and mode 2 (N2):

| condition (checked in this order) | 16x16 modes pre-coded |
|---|---|
| N0 + N1 + N2 < 8 | none (16x16 skipped) |
| N0 > 12 | 0 (vertical) |
| 9 < N0 < 12 | 0 and 3 (plane) |
| N1 > 12 | 1 (horizontal) |
| 9 < N1 < 12 | 1 and 3 |
| otherwise | 2 (DC) and 3 |

The comparisons are exactly as in the source chart, so a count of exactly 12
falls through to the next row. The prose of the original description says
instead that all modes are tried in the last case; this design follows the
chart. Each candidate streams its 16 blocks through the pipeline, predicted by
`intra16_interp` from the macroblock's neighbours, in 16 + 5 cycles. It is
costed with the 4x4 transform only. The separate Hadamard transform of the
16x16 DC coefficients is not modelled.

## Inter candidates

Motion estimation loads one candidate's interpolated 16x16 prediction into
`inter_buf` (16 writes of one 4x4 block each) and then pulses `inter_go` with
an id (0..15). The candidate streams like a 16x16 candidate (21 cycles), and
`inter_ready` rises again. `mb_finish` ends the search, and `done` pulses.
Inter blocks use the inter rounding offset in quantization.

## Keeping the winner: the Differential/Reference double buffer

`resref_buf` has two sets. Each set holds a Differential buffer (residuals)
and a Reference buffer (predictions) for the 16 blocks of a macroblock. Each
buffer is four banks, one per block row, so a whole block moves in one cycle.

While candidates are evaluated, one set (the work set) receives the candidate
under test, and the other holds the best candidate so far:

* **Intra 4x4:** the work set keeps each block's best mode.
* **Other candidates:** every block is written.

When a candidate finishes with a lower total cost than the best, the two sets
swap roles; nothing is copied. The intra 4x4 result is the first complete
candidate. Ties keep the earlier candidate: intra 4x4 before 16x16 before
inter. After `done`:

* `out_rd_*` reads the winner's residual and prediction (one cycle latency);
* `rec_rd_*` reads the intra 4x4 reconstruction.

## Current data buffer

`cur_buf` is four SRAM banks of 64 words x 32 bits. The DMA writes four pixels
per cycle: 96 words for one 4:2:0 macroblock. Words 0..63 are luma (word =
row·4 + column/4); words 64..95 are Cb then Cr (word = 64 + c·16 + row·2 +
column/4).

Luma row r goes to bank r mod 4, so the four rows of any 4x4 block sit at the
same address in four different banks. That address is `by*4 + bx` for block
column `bx` and block row `by`. One read therefore returns the 16 pixels of a
block. Chroma occupies addresses 16..23: address `16 + c*4 + (row/4)*2 +
column/4`, bank `row % 4`.

Each bank holds two pages of 32 words, so the buffer keeps two macroblocks.
The DMA always writes the page that is not being coded, and `start` switches
pages. The next macroblock can therefore be loaded while the present one is
still being searched, as in the memory/compute overlap of the timing diagram.

## Top-level interface (`mc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `cur_wr_en`, `cur_wr_idx[6:0]`, `cur_wr_data[31:0]` | in | DMA write of the next macroblock (any time; goes to the page not being coded) |
| `mb_top[20]`, `mb_left[16]`, `mb_corner` | in | reconstructed neighbours: 16 above plus 4 above-right, 16 left, above-left |
| `inter_wr_en`, `inter_wr_blk`, `inter_wr_data[16]` | in | inter candidate prediction, one 4x4 block per write |
| `qp[5:0]`, `lambda[15:0]` | in | quantizer and Lagrange multiplier |
| `start` | in | begin a macroblock (accepted while `busy` is low) |
| `inter_go`, `inter_id`, `mb_finish` | in | accepted while `inter_ready` is high |
| `busy`, `inter_ready`, `done` | out | status; `done` is a one-cycle pulse |
| `vlc_valid`, `vlc_tag`, `vlc_lvl[16]` | out | levels of the block in the COST stage |
| `vlc_bits[11:0]` | in | their bit count, same cycle (combinational) |
| `mb_type` | out | `MB_I4`, `MB_I16` or `MB_INTER` |
| `i4_modes[16]`, `i4_cost` | out | intra 4x4 modes (z-scan order) and total |
| `i16_valid`, `i16_mode`, `i16_cost` | out | best 16x16 candidate, if any was evaluated |
| `inter_valid`, `inter_best_id`, `inter_cost` | out | best inter candidate, if any |
| `best_cost` | out | cost of the decision |
| `out_rd_*`, `rec_rd_*` | in/out | readout (see above) |

Blocks are addressed in H.264 z-scan order: block index `{by[1],bx[1],by[0],bx[0]}`.
Results stay valid until the next `start`.

Parameters:

* `BETA_Q4` (default 16): β in 1/16 units.
* `CUR_DEPTH` (default 64): words per current buffer bank (two pages of half that).

An assertion in `mc_top` flags a write to the inter buffer while the pipeline
is reading it.

## What is not here, and other differences

* **Deblocking filter:** not built. The original design reuses a published
  filter architecture (about 200 cycles per macroblock) without describing it.
* **Chroma:** not processed. Chroma pixels are stored in the current buffer,
  but no chroma mode search exists; only its cycle budget (230) is known.
* **Motion estimation, DMA, VLC, VLD, rate control:** outside the unit. They
  appear only as ports.
* **Cycle counts:**
  * Intra 4x4 matches the quoted 288 cycles.
  * Intra 16x16 (quoted: 332) and inter (quoted: 97) follow this design's own
    schedule: 21 cycles per candidate, with 0 to 2 candidates for 16x16.
* **Distortion:** the sum of squared differences. The original does not name
  its measure.
* **Transform and quantization:** the standard H.264 arithmetic.
  * Rounding offsets: 2^qbits/3 (intra) and 2^qbits/6 (inter).
  * The all-zero-block shortcut of the original is not built. It would not
    change the results.
* **Frame edges:** all neighbouring pixels of the macroblock are assumed
  available (an interior macroblock). Frame-edge availability is not handled.
* **Inter partitions:** smaller partitions than 16x16 are covered only in
  that motion estimation supplies a complete 16x16 prediction per candidate.
* **Buffer sizes:** they differ from the original's reported 48,320 SRAM
  bits. Here:
  * current buffer: 8,192 bits;
  * double buffer: 8,704 bits;
  * inter and reconstruction buffers: 2,048 bits each, in registers.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. The
testbenches share the reference models in `tb/mc_ref_pkg.sv` (transform,
predictors, the 3-step search, and a stand-in bit count of
2 + Σ(3 + 2·⌊log2|level|⌋) over non-zero levels). They print
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/mc_pkg.sv tb/mc_ref_pkg.sv tb/tb_mc_top.sv --top-module tb_mc_top -o sim
./obj_dir/sim
```

`tb_mc_top` runs the whole unit at its default parameters on eleven
macroblocks: noise, stripes, ramps, a plane and flat areas, with 0 to 3 inter
candidates. It recomputes every decision independently and checks:

* modes, costs and macroblock type;
* the readout and the reconstruction;
* the intra 4x4 cycle count, including exactly 288 cycles for a macroblock
  that needs no compensation.

It also counts threshold compensations, skipped 16x16 searches, one- and
two-candidate 16x16 searches, 16x16 and inter winners (each swaps the double
buffer), above-right substitutions and DMA writes of the next macroblock that
overlap the present one. It fails if any of these never
occurred. The whole run takes well under a minute.

# Encoder cores for 7680x4320 video: HEVC fractional motion estimation and H.264 8x8 intra mode decision

At 7680x4320 (8k) resolution, an encoder has to handle about 1 Gpixel/s at 30 fps and 2 Gpixel/s
at 60 fps. The two most data-dependent parts of an encoder are the hardest to scale:

- **Fractional motion estimation (FME)**, which interpolates sub-pel references and compares many
  candidates.
- **Intra mode decision**, where each block's prediction needs the reconstructed pixels of the
  block before it.

This repository contains synthesizable SystemVerilog for one core of each kind. They sit side by
side in `uhd_top`:

- **FME core (`fme_top`)**: HEVC quarter-pel refinement of a 32x32 block. It uses eight-tap half
  pels, bilinear quarter pels computed in the transform domain, a 5-transform / 12-search
  candidate pattern, and an exhaustive-size Hadamard cost (ES-HAD) that also picks the transform
  size.
- **Intra core (`intra_md8`)**: H.264 8x8 luma mode decision in two stages. A cheap preliminary
  decision on original pixels feeds a fine decision on reconstructed pixels. One prediction
  generator is shared by both stages, and an early result is ready after the first two
  candidates.

The two cores share no data. They have separate ports on the top (`fme_*`, `intra_*`).

## FME core

### Why transforms are computed only five times

A quarter-pel search normally needs 25 candidates around the integer vector (a 5x5 quarter-pel
grid). Each candidate needs interpolation, a residual and a Hadamard transform. This core
reduces that cost in three ways:

1. **Half pels only through the 8-tap filter.** The HEVC half-sample filter (-1,4,-11,40,40,-11,4,-1)
   produces the half-pel planes. Quarter pels are never interpolated.
2. **Bilinear quarter pels in the transform domain.** A quarter pel is taken as the average of
   two neighbouring integer/half pels. Residual and Hadamard transform are both linear, so the
   transform of a quarter-pel candidate is the average of the transforms of its two
   neighbours. Only the *transform candidates* (TCs) go through difference generation and the
   Hadamard transform. Each *search candidate* (SC) at a quarter position costs only an adder
   per coefficient.
3. **Corner-directed pattern (5T12S).** The integer search's costs of the left/right and up/down
   neighbours pick the likely quadrant: sign `sx` is + when right is no worse than left, and
   `sy` is + when down is no worse than up. Five TCs and twelve SCs are placed towards that
   corner. In quarter pels, scaled by (sx, sy):

   | SC | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
   |----|---|---|---|---|---|---|---|---|---|---|----|----|
   | x  | 0 | 2 | 0 | 2 |-2 | 1 | 0 | 1 | 2 | 1 | -1 | -1 |
   | y  | 0 | 0 | 2 | 2 | 0 | 0 | 1 | 1 | 1 | 2 |  0 |  1 |

   SC0..4 are the TCs themselves. SC5..11 are averages of TC pairs (`SC_A`/`SC_B` in
   `fme_cost_calc`). The exact placement is this design's reading of the pattern; the tables
   are the only place to change it.

### Exhaustive-size Hadamard cost with data reuse

In natural (Sylvester) order, the 2Nx2N Hadamard transform of a block follows from the
transforms of its four NxN quadrants T11 T12 / T21 T22 with two butterfly layers:

    TL = T11+T12+T21+T22   TR = T11-T12+T21-T22
    BL = T11+T12-T21-T22   BR = T11-T12-T21+T22

`fme_ht_merge` is exactly this. Only 8x8 transforms are computed from pixels (`fme_dg_ht8`).
`fme_eshad` then builds the 16x16 transforms from four 8x8 transforms, and the 32x32 transform
from four 16x16 transforms. The cost of a 32x32 candidate is chosen recursively:

    cost = min(HAD32, sum over quadrants of min(HAD16, sum of its four HAD8))

Here HAD8 = (S+2)>>2, HAD16 = (S+4)>>3 and HAD32 = (S+8)>>4, where S is the sum of absolute
coefficients. The choice also reports which transform size won (`use32`, `use16[3:0]`). The
normalisation shifts are this design's choice.

Timing inside `fme_eshad`:

- Each 16x16 merge runs in the cycle that delivers its fourth 8x8 block.
- The 32x32 merge runs over eight cycles, with 32 single-coefficient butterflies per cycle.
- An assertion requires 8x8 blocks to arrive no faster than one per four cycles.

### Data flow and memory

`fme_top` runs these phases for one 32x32 block:

1. **Interpolation** (9 cycles). `fme_hpel_interp` takes two reference rows per cycle. Its two
   16-pel horizontal units and a row of vertical units give integer, horizontal-half,
   vertical-half and diagonal-half pels. The results go into an interpolation buffer.
2. **DG & HT8** (8 cycles per 16x8 strip). Five `fme_dg_ht8` units, one per TC, each take
   16 pels per cycle: the residual row, then the row transform. The column transform runs on
   the eighth row.
3. **C8 buffer.** The 8x8 coefficients (C8) of each TC go to its own `fme_c8_sram`: 128 words
   of 240 bits, i.e. 16 coefficients of 15 bits per word. Each memory holds two 32x32 blocks
   (ping-pong halves). The address is `{bank, z-index of the 8x8 block, row pair}`, so the
   sixteen 8x8 blocks of a 32x32 come out in Z order and feed the merges in sequence.
4. **Cost.** `fme_cost_calc` reads all five memories in lockstep. It forms the twelve SC
   coefficient sets (`(Ca+Cb)>>>1`), runs twelve `fme_eshad` units, and picks the cheapest SC.
   On a tie the lower index wins.

Outputs: `best_sc`, the quarter-pel offset `mv_qx/mv_qy` (signed, -2..2), `best_cost`, the
transform-size flags, and all twelve SC costs.

Interface: hold `ref_win` (40x40 integer pels, block at offset 4,4), `org` (32x32) and
`ime_cost` (left, right, up, down) stable from `start` until `done`.

Timing: `done` comes **228 cycles** after `start`.

### Where the FME core departs from the full architecture

- **The phases run one after another.** The ping-pong bank switches per block, but
  interpolation, transform, write-back, read and cost are not overlapped. The full architecture
  pipelines them at 8 cycles per 16x8 strip (64 cycles per 32x32). This core is about 3.5x
  slower per block: 844 Mpixel/s at 188 MHz against the 995 Mpixel/s needed for 8k at 30 fps.
- **Only the 32x32 block shape is handled.** The other HEVC prediction-unit shapes of a 64x64
  coding tree block are not.
- **Quarter-pel error is not modelled.** The interpolation rounds and clips each 8-tap pass to
  8 bits. It does not keep the wider intermediate precision of HEVC motion compensation.
  Motion estimation only needs a cost, not the final prediction.

## Intra core

### Preliminary and fine decision

Intra prediction of a block needs the reconstructed pixels of its neighbours. This serialises
mode decision against reconstruction. `intra_md8` splits the decision into two stages:

- **Preliminary decision (PD).** All nine 8x8 modes are predicted from the *original*
  neighbouring pixels. These have no dependency, so PD can run ahead. Modes are ranked by SAD.
  Modes that need an unavailable neighbour are excluded, using the standard H.264 rules. The
  four cheapest modes become candidates, in ascending cost order.
- **Fine decision (FD).** Only the four candidates are predicted again from the
  *reconstructed* neighbours. Each is costed as SATD + λ·R, where SATD is the sum of absolute
  coefficients of the H.264 8x8 integer DCT (`intra_dct8`). R is 0 for the most probable mode
  and 4 for the others.
- **Early result.** Because the candidates are in PD order, the best of the first two is usually
  the final one. `early_valid`/`early_mode` are raised after the second candidate, so
  reconstruction could start at that point. `final_miss` flags blocks where a later candidate
  won.
- **One shared generator.** PD and FD use a single combinational prediction generator
  (`intra_pred8x8`), which predicts a whole 8x8 block in one cycle, including the
  reference filtering of 8x8 modes.

Timing: one mode per cycle, 9 PD cycles + sort + 4 FD cycles. `done` comes **15 cycles** after
`start`.

Interface: hold the inputs stable until `done`.

Outputs: `best_mode`, `best_cost` and the DCT coefficients of the winning mode.

### What the intra core does not contain

The full 8k intra encoder of which this is the mode-decision heart also has:

- 16x16 and chroma prediction;
- quantisation, inverse transform and reconstruction;
- the upper-line and source buffers;
- the interlaced block order that lets decision and reconstruction of neighbouring blocks
  overlap;
- the overlapped pipelines that reach 33 cycles per macroblock.

None of these are here. A 4k intra design with macroblock/block co-reordering is also not
implemented. At 15 cycles per 8x8 (60 per macroblock, luma decision only), the core gives
4550 K macroblocks/s at 273 MHz. That is enough for 1080p or 2160p, but not for the 7776 K
macroblocks/s of 8k at 60 fps.

## Files

| file | contents |
|------|----------|
| `rtl/fme_pkg.sv` | widths, pixel/coefficient/cost types, 8-tap half-pel function |
| `rtl/fme_hpel_interp.sv` | two-row half-pel interpolator |
| `rtl/fme_dg_ht8.sv` | residual + 8x8 Hadamard, 16 pels/cycle |
| `rtl/fme_ht_merge.sv` | four NxN Hadamard results to one 2Nx2N |
| `rtl/fme_c8_sram.sv` | 128x240 two-port coefficient memory |
| `rtl/fme_eshad.sv` | exhaustive-size Hadamard cost of one SC |
| `rtl/fme_cost_calc.sv` | twelve SC units and best-candidate selection |
| `rtl/fme_top.sv` | FME core control and buffers |
| `rtl/intra_pred8x8.sv` | nine-mode 8x8 luma prediction |
| `rtl/intra_dct8.sv` | 8x8 integer DCT and SATD |
| `rtl/intra_md8.sv` | PD/FD intra mode decision |
| `rtl/uhd_top.sv` | both cores side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

All sequential modules use an asynchronous active-low reset `rst_n`. Every start and valid
signal is a one-cycle pulse.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog counts a
failure if the design hangs. Example with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_uhd_top rtl/fme_pkg.sv tb/tb_uhd_top.sv
    ./obj_dir/Vtb_uhd_top

`tb_uhd_top` runs both cores at their default sizes:

- two FME blocks, covering both corner signs, with a diagonal and a horizontal half-pel winner;
- two intra blocks, one early-decision hit and one miss.

It fails if any of these cases does not happen. The block testbenches compare against
independent models:

- matrix-product Hadamard and DCT;
- loop-based 8-tap filters;
- hand-worked prediction values.

Build times are about a minute for the testbenches that contain `fme_eshad` (12 instances in
the cost unit). The simulations themselves take well under a second.

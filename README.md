# Binary pyramid motion estimation core

This core finds motion vectors for 16x16 macroblocks (MBs) of a video encoder. Each MB
gets one 16x16 vector and four 8x8 vectors, over a search range of [-16,+15] pixels. It
can search forward only (P-frames) or forward and backward at the same time (B-frames).

The main idea is to match one-bit pictures instead of 8-bit pixels:

- Every pixel is replaced by one bit: is it darker than the mean of its four neighbours
  or not.
- The matching cost of a position is then the number of bits that differ between the
  current block and the reference block, an XOR followed by a population count. This
  count is called the SOD (sum of differences) below.
- The search runs coarse to fine on a three-level pyramid of such bit pictures.

Because the reference data are one bit per pixel, the on-chip window memories and the
bus traffic are small. The whole core holds 8400 bits of on-chip memory. Per MB it moves
4016 bits over the bus for a P-frame and 5104 for a B-frame. An 8-bit full-search design
needs 8784 and 15520 bits.

The algorithm is a hardware-oriented version of "all-binary motion estimation" (ABME).
The architecture follows a published low-power ME IP core built on it. Where this RTL
departs from that design, or had to fill in what it leaves open, is listed in
[Departures and open points](#departures-and-open-points).

## The binary pyramid

Three binary layers are made from each MB:

| layer | block | resolution | range searched |
|---|---|---|---|
| LV1 | 4x4 | quarter | full search of [-4,+3] (= [-16,+15] at full size) |
| LV2 | 8x8 | half | +/-1 around two candidates from LV1 |
| LV3 | 16x16 | full | +/-1 around the best LV2 vector; 16x16 and 8x8 together |

**Binarization** (module `mbppu`). The filter is the 4-neighbour mean
`H = 1/4 [0 1 0; 1 0 1; 0 1 0]`. A bit is 1 when `up + down + left + right >= 4 * centre`.
The comparison is done on integer sums, with no division.

**Downsampling and padding.** LV2 pixels are 2x2 sums of LV3 pixels, and LV1 pixels are
2x2 sums of LV2 pixels. Sums are not normalised, because the binarization test does not
depend on scale.

The current block is binarized per MB, not per frame. The core therefore reads only an
18x18 pixel block: the MB plus a one-pixel ring, just enough for every LV3 pixel to have
four neighbours. The LV2 and LV1 blocks also need a ring of neighbours. Those pixels are
not fetched: they are filled by repeating the block's own edge pixels. So the current
block's LV2/LV1 bits near the block edge differ slightly from a frame-level binarization.
This costs a little quality in exchange for 324 instead of 900 pixels per MB.

The same binary rows that are searched also leave the core on the `bin_*` port. The
system stores them as the binary reference picture for later frames, so the reference
frames never need to be binarized again.

**Matching cost.** The cost of a position is

    cost = SOD + lambda * (|mvx - pmvx| + |mvy - pmvy|)

where `pmv` is a predicted vector supplied per MB and scaled to the layer. Setting
`lambda = 0` gives a pure minimum-SOD search. Equal costs go to the position that comes
first in raster order (smaller dy, then smaller dx).

## Search schedule

The search works in **passes**. A pass is one vertical offset `dy` of the block. For L
cycles (L = 4, 8, 16, one block row per cycle), a SOD unit compares the current row
with a reference row at eight horizontal offsets at once (lanes). It keeps separate
counts for the four quadrants of the block.

| layer | passes | lanes used | positions |
|---|---|---|---|
| LV1 | 8 (dy = -4..+3) | 8 (dx = -4..+3) | 64 |
| LV2 | 2 candidates x 3 (dy = c-1..c+1) | 3 (dx = c-1..c+1) | 18 |
| LV3 | 3 (dy = c-1..c+1) | 3 | 9 (16x16) + 4 x 9 (8x8) |

**From LV1 to LV2.** The comparator keeps the best and second-best LV1 positions. Both
are doubled and become the two LV2 centres. Both are searched +/-1 unconditionally, as
one list of six passes.

**From LV2 to LV3.** The best LV2 vector is doubled and becomes the LV3 centre.

**8x8 vectors.** At LV3 the four quadrant counts of each position give the four 8x8
SODs, so the 8x8 search runs over the same nine positions as the 16x16 search. It uses
no extra cycles and no extra window data. Each 8x8 block keeps its own best position.

Between layers there are two gap cycles:

1. The comparator takes the last pass.
2. The next layer's centres are latched and the comparator is cleared.

## Two search paths: B-frames and split P-frames

There are two identical datapaths, each with a SOD unit and a vector generator. Path 0
reads the forward window memories and path 1 the backward ones. Both take the same
current-block row each cycle, so the current block is read once for both directions.

- **B-frame** (`bframe = 1`): path 0 searches forward and path 1 backward, pass for
  pass. Each layer takes its full number of passes: `8*4 + 6*8 + 3*16 + 3*2 + 1 = 135`
  cycles from `start` to `done`.
- **P-frame** (`bframe = 0`): there is only a forward search, so one path would sit
  idle. Instead:
  - every write to the forward window is also written into the backward memories
    (mirroring);
  - the passes of each layer are dealt out alternately: path 0 takes passes 1, 3, 5, ...
    and path 1 takes passes 2, 4, 6, ...;
  - the comparator merges both paths' candidates.

  A layer then takes half the steps, rounded up: `4*4 + 3*8 + 2*16 + 3*2 + 1 = 79`
  cycles. Both output directions then carry the forward result.

The raster-order tie-break makes the split search pick exactly the vector a one-path
search would. The result does not depend on which path saw a position first.

## Reference windows and horizontal reuse

For a layer with block side L, the window is 3L rows by 3L columns. It covers vertical
offsets [-L, L-1] and horizontal offsets [-L, L-1] around the MB, plus the lanes that run
past the right edge.

Each window memory holds 3L rows of **four** column stripes of L bits, used as a circular
buffer:

| memory | layer | rows x bits | stripes |
|---|---|---|---|
| S01 / S11 | LV1 | 12 x 16 | 4 of 4 bits |
| S02 / S12 | LV2 | 24 x 32 | 4 of 8 bits |
| S03 / S13 | LV3 | 48 x 64 | 4 of 16 bits |

`win_base` names the stripe that holds the column to the left of the MB. The MB's own
column is in stripe `win_base+1`, and the column to the right is in `win_base+2` (all
mod 4). Window row `r` is reference picture row `16*mby - 16 + r` (in LV3 units). Column
indices wrap at the memory width.

Moving one MB to the right reuses two of the three stripes, so only one new column (48
LV3 rows + 24 LV2 rows + 12 LV1 rows, 1008 bits) is written per MB and per direction.
It goes into the fourth stripe while the current MB is still being searched.

The simplest driving scheme:

- Put picture tile column `t` (t = -1 .. 22 for CIF) in stripe `t mod 4`.
- Start MB column `c` with `win_base = (c - 1) mod 4`.
- Load column `c + 2` during its search.

Rows of the window above or below the picture, and columns left or right of it, are
whatever the system writes there. The core does no picture-edge handling of its own.
Use `pmv`/`lambda`, or a padded reference picture, at picture edges.

The core keeps the current block in C1 (4x4), C2 (8x8) and C3 (16x16), written by the
MBPPU. Total storage: `16 + 64 + 256 + 2 * (12*16 + 24*32 + 48*64) = 8400` bits.

## Blocks

| module | role |
|---|---|
| `me_top` | top: MBPPU, C1-C3, two window sets, controller, AG, two SOD units and VGs, comparator |
| `mbppu` | 18x18 pixel input, binarization of LV3/LV2/LV1, 28 binary rows out |
| `bin_mem` | bit-row memory: written a stripe at a time, read a whole row per cycle |
| `me_ctrl` | layer / pass / row sequencer, gap cycles, `done` |
| `me_ag` | address generator: current row, reference row and start column per path, search centres |
| `sod_unit` | XOR and popcount of one row at 8 lanes, per-quadrant accumulators |
| `mv_gen` | vector generator: vector, range check and rate cost of each lane |
| `mv_cmp` | comparator: best and second best per path, best per 8x8 quadrant, P-frame merge |
| `me_pkg` | shared types (`layer_e`, `mv_t`, `cand_t`), constants, candidate ordering |

Each file opens with a comment on its function, interface and timing.

## Interface and timing (`me_top`)

All signals are synchronous to `clk`; `rst_n` is an active-low asynchronous reset.

| port | dir | meaning |
|---|---|---|
| `px_valid/px_ready/px_data[31:0]` | in/out/in | 18x18 pixels of the next MB, raster order, 4 per beat (81 beats), pixel k in bits `8k+7:8k` |
| `bin_valid, bin_layer, bin_row, bin_data[15:0]` | out | binarized rows: LV3 0-15, LV2 0-7, LV1 0-3, one per cycle, LSB = column 0 |
| `ref_we, ref_set, ref_layer, ref_row, ref_stripe, ref_data[15:0]` | in | write one stripe of one window row (`ref_set` 0 forward, 1 backward; L data bits) |
| `bframe` | in | 1 = B-frame (two directions), 0 = P-frame (split search, mirrored writes); hold it for a frame |
| `start` | in | start a search; accepted when `cur_ready` is high and `busy` is low |
| `win_base, pmv_f, pmv_b, lambda` | in | window start stripe, predicted vectors (full-pel), rate weight; hold until `done` |
| `cur_ready` | out | C1-C3 hold a binarized MB not yet searched |
| `busy`, `done` | out | search running; one-cycle pulse when results are valid |
| `mv16[2], cost16[2], mv8[2][4]` | out | per direction (0 forward, 1 backward): 16x16 vector and cost, 8x8 vectors (0 TL, 1 TR, 2 BL, 3 BR) |

Results hold until the next `done`. Vectors are signed full-pel values in [-16,+15].

**MB pipelining.**

- The pixels of MB n+1 can be loaded while MB n is searched.
- Binarization (28 cycles) overwrites C1-C3, so it begins only once the search of MB n
  has finished.
- In a steady stream one MB starts every **112 cycles** in P-frames and every **169
  cycles** in B-frames. The window column refill runs in parallel on its own port.
- At 30 CIF frames/s (11880 MBs/s), that is 1.33 MHz for a P-only stream. For an
  alternating P/B stream it is 1.67 MHz (140.5 cycles per MB on average).

## Departures and open points

- **Cycle counts.** The published core quotes 148 cycles per MB for P and 177 for B,
  with 1.67 MHz (IPPPP) and 1.94 MHz (IPBPB) for CIF at 30 frames/s. Its schedule is
  not spelled out. The schedule here is this design's own, and it is faster: 79 / 135
  search cycles, 112 / 169 cycles MB to MB.

  The published numbers do not agree with each other: 1.67 MHz leaves only 140 cycles
  per MB, fewer than 148. This design meets both frequency budgets, the B/P budget on
  the P/B average. A stream of B-frames alone needs 2.01 MHz.
- **LV2 flow.** The reduced LV2 search is described only as checking fewer candidates,
  with no conditional check. The exact flow is not given. Here it is read as the two
  best LV1 positions, each refined +/-1.
- **P-frame split.** "SOD1 takes the odd positions, SOD2 the even ones" is implemented
  at pass granularity: path 0 runs passes 1, 3, 5, ... and path 1 runs passes 2, 4, 6, ...
- **Rate cost.** The comparator is said to use a vector cost from the vector
  generator, with no formula. The weighted L1 distance to a predicted vector is this
  design's choice.
- **Tie-break.** Raster-order tie-breaking is this design's choice.
- **Padding and downsampling.** Edge-repeat padding and the 2x2-sum downsample are
  this design's reading of "pad the boundary pixels" and "downsampled by two".
- **Memory.** 8400 bits against 8.64 kbit quoted. The difference is not accounted for;
  it could be, for example, output or pipeline registers.
- **Not included:**
  - the external frame memory and bus master that feed `px_*`/`ref_*` and store
    `bin_*`;
  - the joint bi-directional optimisation that the parallel outputs make possible;
  - the rest of the encoder.

  PSNR results therefore cannot be reproduced with the core alone.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_mbppu`: random and extreme pixel blocks against a model of the filter, downsample
  and padding; ready/valid stalls.
- `tb_bin_mem`, `tb_sod_unit`, `tb_mv_gen`, `tb_mv_cmp`, `tb_me_ctrl`, `tb_me_ag`: each
  against values computed independently in the testbench. This includes the exact row
  sequence and the 79 / 135 cycle counts of the controller.
- `tb_me_top`: full design at default parameters, end to end.
  - 16 MBs, alternating P and B, against a behavioural model of the whole search
    (`tb/me_model_pkg.sv`), which also gives the 8x8 vectors and costs.
  - Covers window wrap-around, vectors at the range limits, predicted-vector costs and
    pixel loading overlapped with the search.
  - Counts each mechanism and fails if one never occurred.
- `tb_me_cif_row`: one CIF MB row (22 MBs) in P and then in B mode, driven as a system
  would.
  - Reuses windows horizontally and refills stripes during the search.
  - Checks every vector against the model.
  - Measures the MB period against the CIF budgets.
  - Counts the bits moved per MB (2592 pixel + 1008 window + 336 binarized per
    direction).

## Simulating

With Verilator 5 (the package must come first):

    verilator --binary --timing -Wno-fatal \
        rtl/me_pkg.sv $(ls rtl/*.sv | grep -v me_pkg) \
        tb/me_model_pkg.sv tb/tb_me_top.sv --top-module tb_me_top -Mdir obj
    ./obj/Vtb_me_top

Replace `tb_me_top` by any other testbench name. Every simulation finishes within seconds.

## Changing it

- `BEAT_PIX` (pixels per input beat) is the top's parameter.
- The search constants live in `me_pkg`:
  - `SR`: range;
  - `NLANE`: SOD lanes;
  - `NSTRIPE`: window stripes;
  - `NCAND2`: LV2 candidates;
  - cost and SOD widths.

  The schedule in `me_ctrl`/`me_ag` and the memory sizes in `me_top` are written for
  the default range of [-16,+15]. Changing `SR` means revisiting them too.

# Intra predictor for an H.264/AVC High Profile encoder

An H.264 encoder that picks intra modes by rate-distortion must try every
intra mode of every block. For one macroblock that means:

- the nine Intra4x4 modes for each of 16 blocks;
- the nine Intra8x8 modes for each of 4 blocks, with reference prefiltering;
- V/H/DC/plane for 16x16 luma;
- V/H/DC/plane for the two chroma components.

A block's prediction needs the *reconstructed* samples of its left and upper
neighbours, and in an encoder those come back from the
transform/quantisation/reconstruction loop only after a delay. This
design produces all those predictions for one macroblock at a time. It
keeps the prediction datapath busy while it waits for the loop, using
three ideas taken from a published architecture (Roszkowski and Pastuszak,
"Intra Prediction for the Hardware H.264/AVC High Profile Encoder"):

1. **16 samples per clock.** A whole 4x4 block is predicted in one cycle,
   in any mode. One shared combinational core does this for every block
   size.
2. **Reordering.** The 4x4 blocks are not taken in the standard's zig-zag
   order. The order is changed so that consecutive blocks seldom depend on
   each other.
3. **Interleaving.** The 8x8, 16x16 and chroma predictions are slotted
   between the 4x4 blocks. They fill the time a 4x4 block would otherwise
   spend waiting for its neighbour's reconstruction.

The encoder can also ask for 4x4 and 8x8 predictions for up to seven
quantisation parameters (QPs). In that case every 4x4/8x8 step is repeated
once per QP, each repetition using the reconstruction made at that QP.

The RTL is synthesizable SystemVerilog (`rtl/`), with self-checking
testbenches (`tb/`) that compare every prediction with an independent model
written from the equations of the standard. The scope is 8-bit samples and
4:2:0 chroma.

## The block schedule

Each macroblock is one pass over this 28-step list (B4/B8 = 4x4/8x8 luma
block with its luma4x4BlkIdx/luma8x8BlkIdx, L16/C = one 16x16 luma / chroma
mode):

```
B4(0)  B8(0)  B4(1)  L16(H)  L16(V) B4(2)  B4(4)  B8(1)  B4(3)  B4(5)
L16(DC) B4(8) B4(6)  L16(PL) B4(9)  B4(7)  C(H)   C(V)   B4(10) B4(12)
B8(2)  B4(11) B4(13) C(DC)   C(PL)  B4(14) B8(3)  B4(15)
```

Example: B4(2) is the block under B4(0), and it needs B4(0)'s reconstruction.
Between the two steps, B8(0), B4(1) and two 16x16 modes are generated. With
a loop delay of a few dozen cycles, the reconstruction of B4(0) has usually
arrived by the time B4(2) starts.

A 4x4/8x8 step goes through these states (in `intra_ctrl`), once per QP:

| state | cycles | what happens |
|---|---|---|
| NEXT | 1 | selects the step; if the neighbours are ready, the first two RAM reads leave in this cycle |
| WAIT | 0 or more | waits until every 4x4 block of this macroblock whose edge the block reads has come back from the loop (same block size, same QP); the first reads leave in its last cycle |
| FETCH | 1 (4x4), 3 (8x8) | the remaining neighbour words, two per cycle, one per RAM port (4 words for 4x4, 7 for 8x8) |
| DRAIN | 1 | the last captured word lands in the registers |
| FILT0/FILT1 | 2, 8x8 only | the core prefilters the 25 neighbours, 16 per cycle |
| GEN | 1 per output | all available modes back to back (8x8: four 4x4 quarters per mode) |

An 8x8 DC adds one cycle in which the first half of its sum is taken.

The block registers have two banks. While one block, or a 16x16 or chroma
mode, is being generated, the controller already reads the neighbours of the
next 4x4/8x8 block into the other bank. The next block is the same block at
the next QP, or else the next enabled 4x4/8x8 step. These reads leave as soon
as that block's neighbours have come back from the loop, on cycles without a
reconstruction write. If the prefetch is complete when the block's turn
comes, NEXT (or WAIT) goes straight to FILT0 or GEN and the banks swap.
Otherwise the block fetches as in the table.

Modes whose neighbours are unavailable are skipped, as are whole 16x16 and
chroma steps that cannot be predicted. Examples: 16x16 V at the top of the
picture, and plane without all three neighbours. DC is always generated.

Each returned reconstruction (`rec_valid`) is written to RAM at once,
using both RAM ports. It has priority over fetches, so a fetch stalls for
that cycle.

## One neighbour array for all modes

This is the least obvious part of the datapath. Every block's neighbours sit in one
33-entry array of samples, `edge_t`:

```
index:   0 ... 15-y ... 15   16      17 ... 17+x ... 32
sample:  p[-1,15] .. p[-1,0] p[-1,-1] p[0,-1] .. p[15,-1]
```

The left column runs backwards into the corner, and the corner runs into
the upper row (upper-right included). Along this array, every directional
formula of the standard becomes a window of two or three consecutive
entries. Only the position of the window changes with (x, y). Examples for
an N×N block (N = 4 or 8):

- vertical-left, even rows: a two-tap filter on entries `17+x+y/2` and the
  entry after it;
- diagonal-down-left: a three-tap filter centred on `18+x+y`.

The special end cases of the standard come out of one rule: clamp the
window to the block's neighbour range, `16-N .. 16+2N`. Two examples are
the `p[6]+3·p[7]` corner of diagonal-down-left and the flat tail of
horizontal-up.

`pred_core` therefore has 16 identical lanes. Each lane computes its window
position from the mode, its (x, y) and the block offset. It selects two or
three entries and applies `(a+b+1)>>1` or `(a+2b+c+2)>>2`. The same lanes
also produce:

- **16x16 and chroma V/H**: a single entry;
- **DC**: the value from `dc_unit`;
- **plane**: `clip((seed + b·x + c·y) >> 5)`, x and y from 0 to 3;
- **the 8x8 prefilter**: lane l filters entry `8 + 16·pass + l`, with the
  standard's availability rules at the two ends. Two passes cover all 25
  neighbours, and the result goes to a separate filtered register set.

An 8x8 block is generated as four 4x4 quarters. The lanes add the quarter
offset to (x, y), so no value needs to be carried from one quarter to the
next.

Upper-right substitution is applied where the block registers are read
(`ref_regs`). When the upper-right samples are unavailable, entries
`17+N .. 16+2N` repeat `p[N-1,-1]`. In the schedule, availability inside
the macroblock follows the standard: the upper-right block must exist and
have a lower index.

## DC and plane

**DC.** `dc_unit` adds one group of four upper samples and one group of four
left samples per cycle, so a DC takes:

- 1 cycle for a 4x4 block;
- 2 cycles for an 8x8 block;
- 4 cycles for a 16x16 block.

The rounded mean of the last cycle (`dc_now`) is used at once, so the first
DC output does not wait. A separate register keeps the 16x16 DC while the
4x4 blocks interleaved with it use the unit. Chroma DC follows the
standard's per-4x4 rules: corner blocks use both sides, the other blocks
prefer one side.

**Plane.** `plane_gen` computes H and V as sums of `(i+1)·d`. Each term is
built from at most four shifted copies of the difference d, one term per
clock. The luma terms are multiplied by 5, the 4:2:0 chroma terms by 34,
using shifts and adds. The results are rounded to b and c; a comes from the
two corner-most samples. All three components are done in 32 cycles,
started as soon as the macroblock's neighbours are loaded, well before the
first plane step of the schedule.

A plane step uses one cycle to load the seed of its first 4x4 block:

    seed = a + b·(x0−7) + c·(y0−7) + 16    (luma)

After that it steps the seed by +4b along a row and by +4c at a row end. It
then outputs one 4x4 block per cycle: 16 for luma, 4+4 for chroma.

## Memory and registers

The RAM (`ref_ram`) is dual-ported, with 2048 words of four samples
(8 KB). Each port reads or writes four samples per cycle, and reads have a
one-cycle latency.

| words | contents |
|---|---|
| 0 .. 479 | luma picture line, 4 words per macroblock column (120 columns = 1920 samples) |
| 512 .. 751 | Cb picture line, 2 words per column |
| 1024 .. 1263 | Cr picture line |
| 1536 .. 1983 | inner edges: bottom row and right column of every reconstructed 4x4 block, for 2 block sizes × 7 QPs × 16 blocks |
| 1984 .. 1991 | right column of the previous (left) macroblock: 4 luma words, 2 Cb, 2 Cr |

The registers (`ref_regs`) hold four sets in the edge layout above:

- the current 4x4/8x8 block's neighbours, in two banks (one in use, one
  being filled for the next block);
- the macroblock neighbours of Y, of Cb and of Cr;
- the prefiltered 8x8 neighbours;
- one corner register per component.

The corner register exists because the final writeback of a macroblock
overwrites the picture-line word that holds the next macroblock's upper-left
sample. Before writing, the writeback reads the old word and saves its last
sample. That sample becomes `p[-1,-1]` of the next macroblock.

## Interface and timing

Per macroblock:

1. **Start.** While `fin_ready`, pulse `mb_start` with `mb_x`, the four
   availability flags (left, top, top-left, top-right) and the
   configuration. The configuration is `cfg_nqp` (1..7) and the enables
   `cfg_en4`, `cfg_en8` and `cfg_en_plane`.
2. **Predictions.** They leave on `pred_valid`/`pred_info`/`pred_samples`,
   one registered 4x4 block per cycle. `pred_info` gives:
   - kind, mode, component;
   - 4x4 position (bx, by);
   - QP index;
   - `last`, the last output of a block.
3. **Reconstruction loop.** After the `last` output of a 4x4 (8x8) block at
   QP q, the loop returns the reconstruction on `rec_*`. This is one 4x4
   block per beat, tagged with size, QP and luma4x4BlkIdx; an 8x8 block
   takes four beats. The delay can be anything, and later blocks wait for
   what they need.
4. **Writeback.** After `mb_done`, send the chosen final reconstruction with
   one `fin_valid` pulse per component. Each pulse carries the bottom row and
   right column (chroma uses 8 of the 16 entries) and must come while
   `fin_ready`. Each writeback takes 3 (chroma) or 5 (luma) cycles.

`mb_busy` is high from `mb_start` to `mb_done`.

## Measured cycles per macroblock

The table gives cycles from `mb_start` to `mb_done` for a macroblock with all
neighbours available and one QP, measured by `tb_intra_predictor_cycles`.
The reference numbers are those the published architecture reports.

| loop delay | 4x4 + 8x8 | 4x4 only | 8x8 only | reference (4x4+8x8 / 4x4 / 8x8) |
|---|---|---|---|---|
| 0  | 443 | | | |
| 10 | 443 | 317 | 301 | 448 / 340 / 318 |
| 20 | 451 | | | |
| 30 | 481 | | | |
| 40 | 536 | 524 | 337 | 608 / 599 / 392 |
| 60 | 704 | 704 | 381 | |

These configurations produce 384, 240 and 240 predictions of 16 samples.
With several QPs at delay 40, the counts for 2 to 7 QPs are 776, 1057, 1343,
1643, 1943 and 2243 cycles: about 300 more per extra QP.

1080p at 30 frames/s is 8160 macroblocks per frame, which leaves 817 cycles
per macroblock at 200 MHz. The design meets that budget at every delay
shown for one QP.

At small delays the count is set by the outputs themselves (384 predictions)
plus the prefilter, DC and plane set-up cycles, because the neighbour reads
of most blocks are hidden behind the previous step's outputs. With only
4x4 blocks at delay 40 or more, the waiting for reconstructions dominates:
there is little other work left to fill it, as in the reference.

## Where this design departs from the published architecture

- **Core structure.** The reference core computes a pool of 15 two- and
  three-tap results from nine intermediate registers. An output
  multiplexer then picks the 10 a mode needs, and an auxiliary register
  covers two 8x8 directions. Here every lane picks its own taps from the
  full neighbour array. The samples are the same, but the wiring differs
  and is likely larger.
- **Plane seeds.** The reference keeps eight seeds for two columns and
  forms the other samples with two levels of +2b adders. Here one seed per
  4x4 block is kept, and each lane adds its own multiple of b and c.
- **DC sums.** These are formed in `dc_unit` instead of by reconfiguring
  the core's first adder level.
- **Second block register bank.** The reference has one LEFT/UPPER set,
  and its core reads from nine intermediate registers loaded out of it,
  so LEFT/UPPER is free to be refilled while a block is generated. This
  design has no intermediate registers. A second bank gives the same
  freedom: the next block's neighbours are read during the current
  outputs. Without it the count at delay 10 was 493 cycles rather than
  443. The resulting counts are a little below the reference's.
- **Chroma formats.** Only 4:2:0 chroma is implemented. The reference
  claims all chroma formats but describes only the 4:2:0 plane factor.
- **Encoder interface.** The interfaces to the encoder (command, output,
  reconstruction return and writeback) and the RAM map are this design's
  own. The reference does not describe them.
- **Corner registers.** They are read as one register per colour component.

## Files

| file | contents |
|---|---|
| `rtl/intra_pkg.sv` | types (`edge_t`, `blk16_t`, `pred_info_t`...), RAM map, helper functions |
| `rtl/intra_predictor.sv` | top: wiring, neighbour-set multiplexer, DC input selection, output register |
| `rtl/intra_ctrl.sv` | main FSM: schedule, QP loop, dependency wait, fetch, mode sequencing, RAM writes |
| `rtl/pred_core.sv` | 16-lane combinational prediction core and prefilter |
| `rtl/ref_ram.sv` | 2048 × 32 dual-port RAM |
| `rtl/ref_regs.sv` | neighbour register sets, corner registers, upper-right substitution |
| `rtl/dc_unit.sv` | DC accumulation and registers |
| `rtl/plane_gen.sv` | plane parameters (H, V, a, b, c) and seeds |
| `tb/intra_ref_pkg.sv` | behavioural model: all intra predictions from the standard's equations, and a synthetic picture |
| `tb/intra_tb_body.svh` | shared end-to-end test: loop model, writeback, checks, mechanism counters |
| `tb/tb_*.sv` | one test per module, plus the end-to-end tests |

## Verification

Each module has its own self-checking test:

| test | what it checks |
|---|---|
| `tb_pred_core` | all modes and prefilter against the model, random and extreme neighbours |
| `tb_dc_unit` | DC for 1/2/4-cycle sums and all availabilities |
| `tb_plane_gen` | b, c, each block seed, and the 32-cycle latency |
| `tb_ref_ram` | random two-port traffic |
| `tb_ref_regs` | layout, corner registers, substitution |
| `tb_intra_ctrl` | schedule order, prediction counts, dependency wait with random loop delays and 1..7 QPs, RAM write addresses and data |

The end-to-end tests check every predicted sample against the model, for
every macroblock of a synthetic picture. They also check:

- the schedule order;
- the number of predictions;
- that the modes of a 4x4 block leave back to back.

Each end-to-end test counts that every mechanism actually happened, and
counts a failure for any that did not:

- dependency stalls;
- RAM port conflicts;
- several QPs;
- prefiltering;
- plane;
- corner registers;
- upper-right substitution;
- skipped steps;
- 16x16 DC register;
- writeback;
- 8x8 outputs;
- blocks started from prefetched neighbours.

The end-to-end tests are:

- `tb_intra_predictor`: a 4×3 macroblock picture, with varied delays, QP
  counts and enables;
- `tb_intra_predictor_full`: two full 1920-sample macroblock rows at the
  default parameters, with 1 to 7 QPs;
- `tb_intra_predictor_cycles`: the cycle measurements above.

To run one with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Itb -Irtl \
  rtl/intra_pkg.sv tb/intra_ref_pkg.sv rtl/ref_ram.sv rtl/ref_regs.sv \
  rtl/dc_unit.sv rtl/plane_gen.sv rtl/pred_core.sv rtl/intra_ctrl.sv \
  rtl/intra_predictor.sv tb/tb_intra_predictor.sv --top-module tb_intra_predictor
./obj_dir/Vtb_intra_predictor
```

Each test ends with `TB_RESULT checks=N failures=M`. A unit test needs only
`intra_pkg.sv`, its module and its test. `tb_pred_core` also needs
`intra_ref_pkg.sv`.

The synthetic picture's reconstruction for QP index q is its original plus
37·q. Different QPs therefore see different neighbours, and a mix-up between
QPs shows up as a mismatch.

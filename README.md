# Quarter-pel motion-vector refinement for H.264

An H.264 encoder usually finds motion in two steps. A cheap integer-pel
search first finds the best whole-pixel displacement of a block. Then a
refinement step searches the sub-pixel positions around that match. This RTL
is the refinement step, and it works as a coprocessor.

For one block it evaluates every quarter-pel offset from -3/4 to +3/4 pixel
in both directions around the integer match: a 7x7 grid of 49 positions.
For each position it computes

    cost(dy,dx) = SAD(dy,dx) + lambda * R(mvd + (dx,dy))

and returns the cheapest offset. SAD is the sum of absolute differences
against the H.264-interpolated reference. R is the number of bits the
motion-vector difference would take in the bitstream.

The main idea is to interpolate without storing anything. The integer
reference window streams in once, in raster order, P pixels per clock. The
quarter-pel samples are computed from it on the fly, and each sample is
consumed in the same cycle by every PE (processing element) that needs it.
To make that possible, the SAD array is organised the other way round from a
classic integer-search array: the dense sub-pel reference is spread to the
PEs, and the sparse current block is the data that moves through delay
registers. As a result:

- the number of delay registers does not depend on the sub-pel accuracy;
- the costs become ready in four groups at different times, so one
  16-input comparator tree is enough;
- block size (4, 8 or 16 per side) is a run-time input and needs no change
  to the hardware.

## Data flow

```
 host ──► input_buffer (reference window, 22x22) ──P px/cycle──► interp_filter ──16·P samples──► pe_matrix ──49 costs──► decision_tree ──► result
 host ──► input_buffer (current block, 16x16) ──P px/cycle, aligned with the window beat───────────┘   ▲
 start, mvd, lambda ──► lagrange_cost (rate term, 14 cycles) ──loads every PE accumulator─────────────┘
```

| file | role |
|---|---|
| `rtl/fme_pkg.sv` | widths, types, the 6-tap kernel, rounding, Exp-Golomb length |
| `rtl/fme_coprocessor.sv` | top: host port, beat sequencer, wiring |
| `rtl/input_buffer.sv` | host-written pixel buffer with P synchronous read ports |
| `rtl/interp_filter.sv` | line buffers + column window + one `qpel_cell` per lane |
| `rtl/qpel_cell.sv` | 6x6 integer patch -> 16 quarter-pel samples |
| `rtl/pe_matrix.sv` | 7x7 PEs in four quadrants, current-block delays |
| `rtl/pe.sv` | P absolute differences, adder, cost-initialised accumulator |
| `rtl/lagrange_cost.sv` | rate cost of all 49 candidates with one multiplier |
| `rtl/decision_tree.sv` | shared 16-input min tree + running-optimum comparator |

## The reference window and the "one pixel, sixteen samples" schedule

Coordinates below are relative to the integer best match. The block covers
pixels `(0..h-1, 0..w-1)`. The window covers integer pixels
`(-3..h+2, -3..w+2)`, which is `(h+6) x (w+6)` pixels. That is exactly what
the 6-tap filter needs to produce every sample within 3/4 pel of the block.

Take the 4x4 square of the quarter-pel grid whose bottom-right corner is the
integer pixel `W(u,v)`. That square holds the samples at quarter offsets
`1..4` below and to the right of `W(u-1,v-1)`. All 16 of these samples depend
only on the 6x6 integer patch `W(u-3..u+2, v-3..v+2)`. In a raster stream,
that patch is complete at the moment pixel `W(u+2, v+2)` arrives. So every
arriving pixel, once five rows and five columns have been read, completes
exactly one square of 16 samples.

`interp_filter` builds that patch with two structures:

- Five line buffers hold the previous five rows. They store one P-pixel word
  per column group. Each buffer is read and rewritten at the column group of
  the incoming beat, so it behaves like a single-port RAM.
- A shift register holds the last `5+P` six-pixel columns.

Lane `l` takes columns `l..l+5`. Beats near the left edge of a row, and beats
in the first five rows, complete positions outside the search area, and the
top discards them.

`qpel_cell` applies the H.264 luma rules:

- Half-pel samples `b` and `s` (horizontal), and `h` and `m` (vertical), use
  the kernel `(1,-5,20,20,-5,1)`, then `(x+16)>>5`, then clipping.
- The centre sample `j` is the 6-tap filter applied to the unrounded
  horizontal intermediates, then `(x+512)>>10`, then clipping.
- Quarter-pel samples are rounded means of the two nearest samples. That
  includes the diagonal pairs `b/h`, `b/m`, `h/s` and `m/s`.

## The PE matrix: four quadrants and a moving current block

This part is the least obvious. Write a candidate offset in quarter pels as
`dy = 4*di + g` and `dx = 4*dj + h`, where `di, dj ∈ {0,1}` and
`g, h ∈ {-3..0}`. Then the SAD term that pairs current pixel `x1(k,l)` with
reference sample `x2(4k+dy, 4l+dx)` is the same as the term that pairs
reference square `(u,v) = (k+di, l+dj)` with current pixel `x1(u-di, v-dj)`.

So when the square of position `(u,v)` arrives, PE `(dy,dx)` takes sample
`(g+3, h+3)` of that square and one of four current pixels:

| quadrant | di,dj | offsets dy × dx | PEs | current pixel | delay |
|---|---|---|---|---|---|
| 0 | 0,0 | -3..0 × -3..0 | 16 | `x1(u,v)` | none |
| 1 | 0,1 | -3..0 × 1..3 | 12 | `x1(u,v-1)` | one position |
| 2 | 1,0 | 1..3 × -3..0 | 12 | `x1(u-1,v)` | one window row |
| 3 | 1,1 | 1..3 × 1..3 | 9 | `x1(u-1,v-1)` | one row + one position |

The current pixel for each position is read from the current-block buffer in
the same beat as the window pixel that completes the position. It travels
with the interpolation pipeline and carries an enable bit that is set only
inside the block.

- **One-position delay.** Inside a beat this is simply the neighbouring lane.
  For lane 0 it is the last lane of the previous beat.
- **One-row delay.** This is a line memory with one word per column group,
  read and then rewritten at the incoming group.

Because the enables move with the pixels, each PE adds exactly `h·w`
differences, whatever the block size. Offsets with `dy = 4` or `dx = 4` do
not exist, which is why quadrants 1, 2 and 3 are smaller.

Quadrants 0 and 1 are final once window row `h+4` has been read. At that
point their last current pixel, `x1(h-1,·)`, has passed. Quadrants 2 and 3
are final after the last beat.

Each PE (`pe.sv`) forms P absolute differences, adds them, and accumulates.
The accumulator does not start from zero. It is loaded with the candidate's
rate cost, so it ends holding the full Lagrangian cost.

## Rate cost

R is the length of the signed Exp-Golomb codes of the two components of the
motion-vector difference. The difference is `mvd + offset` in quarter pels,
where `mvd` is the integer vector minus its predictor, supplied by the host.

The rate splits into an x part and a y part. So `lagrange_cost` multiplies
`lambda` by 7 x-lengths and 7 y-lengths with a single multiplier, one product
per cycle, 14 cycles in all. The cost of each candidate is then one addition.
This fits within the fill time of the interpolation pipeline. The costs are
loaded into the PEs 15 cycles after `start`. The first block pixel reaches
the PEs no earlier than 20 cycles after `start` (P=4, 4x4 block), and 30 or
more at P=2. An assertion in the top checks this ordering.

## Decision

`decision_tree` has one 16-input, 4-level comparator tree that is shared in
time by the four quadrants:

1. Quadrants 0 and 1 are compared on the two cycles after they are final.
2. Quadrants 2 and 3 are compared on the two cycles after the last beat.
3. A registered comparator keeps the running optimum across the quadrants.
4. `done` pulses once quadrant 3 has been compared.

Slots that hold no candidate are forced to the maximum cost. On equal costs,
the earlier candidate wins. Within a quadrant "earlier" means row-major
order; across quadrants it means quadrant order.

## Timing

A refinement reads `(h+6)·ceil((w+6)/P)` beats, one per cycle, and then runs
an 8-cycle tail:

| stage | cycles |
|---|---|
| buffer read | 1 |
| column window | 1 |
| half-pel | 1 |
| quarter-pel | 1 |
| PE accumulate | 1 |
| decision | 3 |

Counting the cycle that samples `start` as cycle 1, `done` is high in cycle
`(h+6)·ceil((w+6)/P) + 8`.

| block | P=1 | P=2 (default) | P=4 |
|---|---|---|---|
| 8x8 | 204 | 106 | 64 |
| 16x16 | 492 | 250 | 140 |

For 8x8 blocks, the published implementation of this architecture takes 209,
112 and 70 cycles for P = 1, 2 and 4. The input phase is the same; this RTL
has a shorter tail. At 133 MHz and P=2, an 8x8 block takes 0.80 µs. A
1280x720 frame has 14400 such blocks, so 60 frames/s needs 864 k blocks/s,
and this design delivers 1.25 M blocks/s. For 16x16 blocks, 60 frames/s
needs 216 k blocks/s and the design delivers 532 k. Per frame, that is
11.5 ms (8x8) and 6.8 ms (16x16) of refinement. The published FPGA
implementation reports 12 ms and 7 ms. Host transfer time is not included.
No clock rate was measured for this RTL.

## Using it

1. Write the reference window through the host port with `wr_sel=1`, row
   `0..h+5`, column `0..w+5`. Window pixel `(r,c)` is integer pixel
   `(r-3, c-3)` relative to the integer match.
2. Write the current block with `wr_sel=0`.
3. Pulse `start` together with `blk_w`, `blk_h` (4, 8 or 16), `mvd_x`,
   `mvd_y` (signed, quarter pels) and `lambda`.
4. `busy` stays high until `done` pulses. Then `result` holds:
   - `dy`, `dx`: the best offset, -3..3 quarter pels;
   - `cost`: its SAD + rate cost;
   - `mvd_x`, `mvd_y`: the refined difference, `mvd + offset`.

`start` is ignored while the coprocessor is busy. Only one block is in flight
at a time, and the buffers must not be rewritten until `done`.

Parameters:

- `P`: pixels per cycle, default 2. Values 1 and 4 are tested.
- `MAX_W`: largest block side, default 16.
- `fme_pkg`: widths. Pixels are 8 bits, costs 32, mvd and lambda 16.

## Simulation

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Each one compares against `tb/fme_ref_pkg.sv`. That model computes
every quarter-pel sample straight from the H.264 rules, using the integer
position, the fractional phase and the standard's sample names, with no code
shared with the RTL.

```
verilator --binary --timing --assert --top-module tb_fme_coprocessor \
    rtl/fme_pkg.sv tb/fme_ref_pkg.sv rtl/*.sv tb/tb_fme_coprocessor.sv
./obj_dir/Vtb_fme_coprocessor
```

Benches with helper files also need those files on the command line:
`tb_fme_input_width` needs `tb/fme_harness.sv`.

| bench | what it shows |
|---|---|
| `tb_fme_coprocessor` | End to end, at default parameters. 33 blocks of all sizes (4x4, 8x8, 16x16, 8x16, 16x8). Exact and noisy matches, random lambda and mvd. Checks that the cost equals the true minimum, the reported offset, the refined mvd, and the exact cycle count. Fails unless each quadrant wins at least once, the rate term changes a decision, and a start during a busy period is ignored. |
| `tb_fme_input_width` | P=1 and P=4 instances on 8x8 and 16x16 blocks; prints the cycle counts above. |
| `tb_fme_720p` | A synthetic 1280x720 frame refined as 14400 8x8 blocks and as 3600 16x16 blocks, each block checked. Smooth true motion; the left block's integer vector is the predictor. Measures 11.48 ms (8x8) and 6.77 ms (16x16) of refinement per frame at 133 MHz, and checks both against the 16.7 ms frame period. Runs for about 25 s. |
| `tb_interp_filter` | Every valid lane of 8x8, 4x4 and 16x16 windows with idle gaps, against the model. |
| `tb_qpel_cell` | Random and saturating patches (clipping paths). |
| `tb_pe_matrix` | All 49 sums for five block shapes, with random initial costs. |
| `tb_pe`, `tb_lagrange_cost`, `tb_decision_tree`, `tb_input_buffer` | Unit checks, including the 14-cycle cost latency and the 3-cycle decision latency. |

## Where this RTL goes beyond or departs from the source design

- **Window size.** `(h+6)x(w+6)` is derived from the filter length and the
  search range. It reproduces the published input-phase cycle counts, but it
  is not stated explicitly.
- **Pipeline depth.** The stage split is this design's own, which is why the
  tail is 8 cycles rather than 14 (13 at P=1).
- **Current-block row delay.** It is a column-group-indexed line memory, not
  a chain of n registers, so one structure serves every block width.
- **Rate model and multiplier.** The rate model (Exp-Golomb code lengths) is
  this design's. Its multiplier is 16x6 bits, where the source design used a
  32x32 one.
- **Host side.** The buffers, the host write port and start/busy/done stand
  in for a DSP-to-FPGA transfer path that is not specified.
- **Not included.** The bilinear-filter variant is not included. It trades
  accuracy for a shorter start-up.
- **Reset.** Control, valid and enable state is reset. The input buffers,
  the interpolation line buffers and the PE accumulators are not reset; they
  are written (or loaded with the rate cost) before they are used.

Tool warnings:

- Verilator reports `SYNCASYNCNET` on `rst_n`. The reset is asynchronous
  everywhere, and the only other use of `rst_n` is the assertion's
  `disable iff`.
- The unused bit of `lane_valid` is expected: all lanes run in step.

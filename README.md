# 2-D 5/3 lifting DWT with dual data scan

A single-level two-dimensional discrete wavelet transform (the reversible
5/3 filter of JPEG 2000) for an N x N image, built so that the only line
storage is 2N words. Pixels are read from a dual-port frame memory two at a
time, and the read alternates every clock between the two rows of a
*stripe* (rows 2m and 2m+1). The row filter therefore produces coefficients
of two neighbouring rows together. A vertical pair of row coefficients is
exactly what one step of the column filter consumes, so column filtering runs
alongside row filtering instead of waiting for the whole frame. No multipliers or shifters are
used: the scaling by 1/2 and 1/4 is wiring, and each 1-D filter has four
adders.

Throughput is two pixels in and two subband coefficients out per clock. The
defaults are N = 256 and signed 8-bit pixels.

```
            +-----------+   2 pixels   +-----+  (L,H) of   +-----+  column  +-----+  (LL,LH) or
 load ----->| frame_ram |------------->| RPU |------------>| TU  |--------->| CPU |-----------> out
            | dual port |   per clock  |     |  row 2m,    |     |  pair    |     |  (HL,HH)
            +-----------+              +-----+  row 2m+1   +-----+          +-----+
                  ^  addresses             row unit        transpose    column unit
            +-----------+                                  unit         2 x N-word buffers
            | scan_ctrl |
            +-----------+
```

## The lifting step and its two-word state

For a line x[0..L-1] (a row, or a column of row coefficients) the transform is

```
d[k] = x[2k+1] - floor((x[2k] + x[2k+2]) / 2)      high band (predict, factor 1/2)
s[k] = x[2k]   + floor((d[k-1] + d[k] + 2) / 4)    low band  (update,  factor 1/4)
```

Boundaries use **zero extension**: every sample outside the line is 0. At the
left edge this gives d[-1] = -floor(x[0]/2). At the right edge x[L] = 0.
This is not the symmetric extension of JPEG 2000, so the coefficients next
to the image edges differ from a JPEG 2000 codec's.

Samples arrive as pairs (x[2k], x[2k+1]). d[k] needs x[2k+2], the first
sample of the *next* pair. So the step that receives pair k completes
pair k-1. Every 1-D unit here is therefore one pair behind its input, and
none of them needs a look-ahead buffer.

What the step has to remember about a line between pairs is folded into two
words (`lift53_core`):

```
P = 2*x[2k-1] + 1 - x[2k-2]     ->   d[k-1] = floor((P - x[2k]) / 2)
Q = 4*x[2k-2] + 2 + d[k-2]      ->   s[k-1] = floor((Q + d[k-1]) / 4)
next state:  P' = 2*x[2k+1] + 1 - x[2k],   Q' = 4*x[2k] + 2 + d[k-1]
```

Both identities are exact in integer arithmetic. The terms 2x+1 and 4x+2
are concatenations (`{b,1'b1}`, `{a,2'b10}`), and the divisions are
sign-extended bit selections (`hsu`, the hardwired scaling unit). So a step
needs four adders: P-a, Q+d, P' and Q'. The longest path is two adders.
A zero-extended line starts from P = 1 and Q = 2.

When a new line starts in the same unit (`first`), the step does two jobs
in one clock:

- It emits the old line's last pair. This uses x[L] = 0, so d = floor(P/2).
- It loads the new line's state, including d[-1].

The four adders are shared between the two jobs through two multiplexers.
Lines can therefore follow each other with no idle clock.

Widths: with B-bit signed input, one 5/3 level fits exactly in B+1 bits.
Row coefficients are 9 bits and subband coefficients 10 bits. The state
words are B+3 bits wide.

## Dual scan and the row unit

`scan_ctrl` addresses the two memory ports with neighbouring pixels of one
row, port A the even pixel and port B the odd one. The row alternates every
clock:

| clock | row  | port A    | port B    | (N = 256 addresses) |
|-------|------|-----------|-----------|---------------------|
| 1     | 2m   | 2k        | 2k+1      | 0 / 1               |
| 2     | 2m+1 | 2k        | 2k+1      | 256 / 257           |
| 3     | 2m   | 2k+2      | 2k+3      | 2 / 3               |
| 4     | 2m+1 | 2k+2      | 2k+3      | 258 / 259           |

`row_proc_unit` holds the (P, Q) state of both rows in a two-deep rotating
register. The state it reads in a clock was written two clocks earlier by
the same row. Its output is one L/H pair per clock, with upper and lower
rows alternating.

## Transpose unit

`transpose_unit` turns two consecutive row results, (L_u, H_u) then
(L_l, H_l), into two vertical pairs: (L_u, L_l) for an L column and then
(H_u, H_l) for the matching H column. It does this with five data registers:

- `r_l1` and `r_h1` hold the upper row's L and H.
- `r_h2` holds the lower row's H.
- Two output registers feed the column unit. Two 2:1 multiplexers choose
  what they load.

The multiplexer select is the half-rate phase, which is the row slot of the
incoming pair. Timing:

- The L pair leaves one clock after the lower row's input.
- The H pair leaves on the next clock.
- A continuous input stream gives a continuous output stream.

## Column unit and its 2N buffers

Column pairs reach `col_proc_unit` in the same order in every stripe:
L0, H0, L1, H1, ..., N columns in all. So each column's (P, Q) state can
live in two N-word shift registers that work like FIFOs:

- The word at the end of a buffer is the state the same column left one
  stripe earlier.
- The new state enters at the front.

This is the design's whole line memory: 2N words of PIX_W+4 bits.

The buffers are cleared at reset. On stripe 0 of every frame each column
restarts from the zero-extension state, and nothing is emitted. Stripe m
emits the coefficients of stripe m-1:

- For an L column: out_lo = LL, out_hi = LH.
- For an H column: out_lo = HL, out_hi = HH.

## Draining a frame

Each stage is one pair (rows) or one stripe (columns) behind its input. The
last coefficients of a frame would therefore stay in the pipeline. After
the N/2 image stripes, `scan_ctrl` reads N+2 more clocks with the pixel data
forced to 0:

- one whole stripe (rows N and N+1 of the zero-extended frame), then
- one more pair for each of its two rows.

A sideband tag (`dwt_pkg::scan_tag_t`) travels with every pair. It tells
each stage:

- which row of the stripe the pair belongs to;
- whether a result is due for it (no result comes from the first pair of a
  frame);
- whether that result lies in stripe 0;
- whether it is the frame's last result.

## Interface and timing (`dwt2d_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous reset, active low |
| ld_en, ld_addr, ld_data | in | 1, 2·log2(N), PIX_W | write one signed pixel at row*N+col; ignored while busy |
| start | in | 1 | transform the stored frame |
| busy | out | 1 | from start until the last output |
| frame_done | out | 1 | pulse after the last output pair |
| out_valid | out | 1 | a coefficient pair is on out_lo/out_hi |
| out_hcol | out | 1 | 0: (LL, LH), 1: (HL, HH) |
| out_lo, out_hi | out | PIX_W+2 | signed subband coefficients |

Outputs come stripe by stripe: subband row m of every band, in the order
(LL,LH)[m][0], (HL,HH)[m][0], (LL,LH)[m][1], ... up to column N/2-1. Timing
is counted from the clock edge that samples `start`:

- The memory is read for N²/2 + N + 2 clocks.
- out_valid first rises N + 8 clocks after that edge.
- The stream then runs without a gap for N²/2 clocks.
- The last pair appears N²/2 + N + 7 clocks after the edge.

There is no back-pressure. A new frame may be loaded and started once `busy`
is low.

Size after coarse synthesis at the defaults: about 6,350 flip-flop bits, of
which 6,144 are the column buffers. There are about 640 word-level cells,
plus the 65,536 x 8-bit frame memory.

## Where this design departs from its source description

The architecture follows a published description:

- the dual scan;
- a row unit with two inputs and two outputs serving two rows on alternate
  clocks;
- a five-register, two-multiplexer transpose unit;
- a column unit with N-long zero-initialised shift-register buffers;
- hardwired scaling;
- zero extension.

These points are this design's own:

- **Latency.** The description claims 2-D results three clocks after the
  first pixels. A 5/3 high-pass coefficient needs the next pixel pair, and
  a low-pass row result needs the next stripe, so that is not reachable by
  a causal design. Here the first output comes after N + 8 clocks.
- **Frame time.** The drain adds N + 2 clocks per frame to the N²/2 of
  the description.
- **Lifting equations.** The printed predict/update equations index their
  neighbours inconsistently. The design uses the standard reversible 5/3
  with the low band on even positions. Its rounding is floor, plus 2 in
  the update.
- **Stored state.** The folded two-word state is this design's own. It is
  what makes the line memory exactly 2N words and each 1-D unit exactly
  four adders.
- **Critical path.** It is two adders without extra pipeline stages. The
  description reaches two adders by adding pipeline stages to a four-adder
  path.
- **Half-rate clock.** The transpose unit runs on the system clock, with
  the half-rate phase used as a multiplexer select instead of a second
  clock.
- **Frame memory.** It sits inside the top, with a load port, so the design
  is self-contained. The source treats the frame store as external memory.
  It is a plain dual-port array with one clock of read latency.
- **Not covered.** Multi-level decomposition and the 9/7 filter are
  mentioned in the source but are not part of this single-level 5/3 design.
- **Frame shape.** Frames are square N x N. A 1920x1080 HD frame needs a
  different frame memory and a non-square scan.

## Verification

Every testbench checks itself against an independent reference model in
`tb/dwt_ref_pkg.sv`. The model evaluates the two equations above directly,
with explicit floor division and explicit zero extension, and does not use
the folded state. Each testbench ends with a `TB_RESULT checks=... failures=...`
line.

| testbench | what it checks |
|-----------|----------------|
| tb_hsu | all 1,024 values of a 10-bit input against floor(x/2), floor(x/4) |
| tb_lift53_core | 41 lines of lengths 2..18, random and ±extreme, back to back |
| tb_row_proc_unit | dual-scan input over 5 stripes, pair values, one-clock delay, tags |
| tb_transpose_unit | 60 row pairs with a gap; L/H pair order and timing, tag/last |
| tb_col_proc_unit | two back-to-back frames, stripe-0 restart, bottom zero stripe |
| tb_scan_ctrl | every address and flag of two 8x8 frames, burst length, done |
| tb_frame_ram | dual-port reads, one-clock latency, read-during-write |
| tb_dwt2d_top | four 16x16 frames (random, checkerboards ±max, small), all coefficients, latency, frame time, gap-free output, and that every mechanism (row alternation, row-end flush, L and H column pairs, column restart, drain) occurs |
| tb_dwt2d_full | one random 256x256 frame at the default parameters, all 65,536 coefficients, latency and frame time |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt2d_full.sv --top-module tb_dwt2d_full
./obj_dir/Vtb_dwt2d_full
```

Replace the testbench name for the others. The full-size frame simulates in
a few seconds.

## Files

- `rtl/dwt_pkg.sv`: default sizes, the sideband tag type, the start state
- `rtl/hsu.sv`: hardwired scaling by 1/2 and 1/4
- `rtl/lift53_core.sv`: one lifting step on a pair, with the folded state
- `rtl/row_proc_unit.sv`, `rtl/transpose_unit.sv`, `rtl/col_proc_unit.sv`:
  the three pipeline stages
- `rtl/scan_ctrl.sv`: dual scan addresses, drain and tags
- `rtl/frame_ram.sv`: dual-port frame memory
- `rtl/dwt2d_top.sv`: the top level
- `tb/`: the testbenches above and the reference model

To change the frame size, set `N` on `dwt2d_top`. It must be even and at
least 2 (tested from 2 to 32 and at 256); the frame memory and the column buffers scale with it. `PIX_W`
sets the pixel width, and every internal width follows from it.

# HEVC fractional motion estimation interpolator: one filter bank, two rounds

Fractional motion estimation (FME) in an HEVC encoder refines an integer
motion vector in two steps: first the eight half-pixel positions around it
are evaluated, then the eight quarter-pixel positions around the best half
position. Every candidate needs interpolated reference samples from 8-tap
luma filters. A quarter sample off both axes (for example `e`) is made by
filtering horizontally, then filtering those results vertically. A simple
design therefore stores the horizontal half-pixel results of a whole block
between the two steps. For a 64x64 coding unit that store is about 131 kbit.

This RTL takes the other route, following the reused three-level data path of
"High-Throughput Power-Efficient VLSI Architecture of Fractional Motion
Estimation". The design has three horizontal filters and eight vertical
filters. The same filters serve both rounds, and a round re-filters the
reference rows instead of reading back stored intermediates. Which filters
run, and which inputs the vertical filters get, depends on the round and on
the best half-pixel motion vector (MV). Filters that a round does not need
hold their output registers and do not toggle.

## Sample positions

Around each integer pixel `A` there are 15 fractional positions. The RTL
numbers all 16 (`fme_pkg::pos_e`) as follows: the column gives the horizontal
phase and the row gives the vertical phase, both in quarter pixels.

| vertical \ horizontal | 0 | 1/4 | 1/2 | 3/4 |
|---|---|---|---|---|
| 0   | A (0)  | a (1)  | b (2)  | c (3)  |
| 1/4 | d (4)  | e (5)  | f (6)  | g (7)  |
| 1/2 | h (8)  | i (9)  | j (10) | k (11) |
| 3/4 | n (12) | p (13) | q (14) | r (15) |

So `pos = 4*vertical_phase + horizontal_phase`.

## The three levels

Each filter in the table below is `LANES` (default 8) filters wide. The design
works on a strip of 8 anchor columns, one anchor row per clock.

| level | filter(s) | input | gives | round 1 (half) | round 2 (quarter) |
|---|---|---|---|---|---|
| 1 | H_F1/4, H_F2/4, H_F3/4 | integer row | a, b, c | only H_F2/4 (b) | all three |
| 2 | V_F1/4, V_F3/4 | a | e, p | off | on |
| 2 | V_F1/4, V_F3/4 | c | g, r | off | on |
| 3 left | 2 x V_F2/4 behind a MUX | (A, b) or (a, c) | h, j or i, k | (A, b) gives h, j | (a, c) gives i, k, only if the best half MV has a nonzero vertical component |
| 3 right | V_F1/4, V_F3/4 behind a MUX | A or b | d, n or f, q | off | A gives d, n if the best half MV's horizontal component is zero; otherwise b gives f, q |

The outputs of each round are:

- **Half round:** A, b, h and j.
- **Quarter round:** A, a, b, c, e, g, p and r. It adds i and k if the vertical
  component is nonzero. It adds d and n, or f and q, depending on the
  horizontal component.

`interp_ctrl` derives the enables, the MUX selects and the 16-bit mask of
valid positions from the job's `rnd`, `mvx_nz` and `mvy_nz` fields. Positions
outside the mask read as 0.

### How the vertical filters get their taps

A vertical 8-tap filter for anchor row `y` needs rows `y-3 .. y+4` of its
input. The rows arrive one per clock, so each vertically filtered stream has
an eight-row window (`vtap_window`). There are four windows: A, a, b and c.
The anchor row sits at window index 3.

This is the only storage the data path holds. It amounts to
8x8x8 + 3x8x8x16 = 3,584 flip-flops at the default size. It is not a
block-sized buffer. In the half round the a and c windows are frozen.

## Arithmetic

- **Filter taps.** The taps are the HEVC luma DCT-IF taps (`fme_pkg::coef`):
  - 1/4: `-1 4 -10 58 17 -5 1 0`
  - 2/4: `-1 4 -11 40 40 -11 4 -1`
  - 3/4: `0 1 -5 17 58 -10 4 -1`
- **Sample widths.** Samples are 8 bits. The horizontal sums are kept
  unscaled as signed 16-bit intermediates, whose range is -6120 .. 22440.
- **One-pass samples** (a, b, c from a row; d, h, n from a column of integer
  pixels): `clip((sum + 32) >> 6)` to 0..255 (`rnd1`).
- **Two-pass samples** (e, f, g, i, j, k, p, q, r): the vertical sum over
  intermediates is first shifted right by 6, then rounded as above (`rnd2`).
  This matches HEVC uni-prediction for 8-bit video.
- **Adders.** `luma_fir8` writes the filter as constant products. Synthesis
  chooses the adder structure.

## Running a job

`fme_interp_top` ports:

- **Starting a job.** Pulse `start` for one clock while `busy` is low. At the
  same time present `cfg`, a `job_cfg_t` with these fields:
  - `rnd`: `ROUND_HALF` or `ROUND_QUARTER`.
  - `mvx_nz` and `mvy_nz`: whether each component of the best half MV is
    nonzero.
  - `rows`: the number of anchor rows, 1..`MAX_ROWS`.
- **Input stream.** Send `rows+7` reference rows on `row_in`, using the
  `in_valid`/`in_ready` handshake. Each row holds `LANES+7` pixels, for
  columns -3 .. `LANES`+3 of the strip. The rows run from -3 to `rows`+3.
  At most one row is accepted per clock, and the stream may stall at any time.
- **Output.** For each anchor row `y` the design raises `out_valid` for one
  clock, with `out_row = y` and `out_smp[pos][lane]`. This happens exactly
  3 clocks after reference row `y+4` was accepted. The three stages are the
  level-1 register, the window push, and the level-2/3 output register.
- **Completion.** `done` pulses together with the last output row.

The cost of a round is `rows + 7` row clocks, plus one clock for `start` and
three to drain. A 64-row strip takes 75 clocks per round. A wider block is
covered by several strips. A block needing 65 columns of half positions,
like a 64x64 CU with its -1/2 column, takes 9 strips.

## Mode cost unit

`satd_cost` sits beside the interpolator in the top module, with its own
ports (`cost_*`).

- **Formula.** It computes `Cost = SATD + lambda(QP) * R`. SATD is the sum of
  absolute values of the 4x4 Hadamard transform of `cur - pre`, and it is not
  halved. R is 0 for the most probable mode and 4 otherwise.
- **Lambda.** `lambda` is an input, because its function of QP is left to
  the user.
- **Timing.** Two pipeline stages: the result follows 2 clocks after
  `cost_in_valid`, and a new block can enter every clock.

The unit is not wired to the interpolator. Choosing the best half MV from the
interpolated samples and the original block is left to the surrounding
encoder; `tb_fme_cu64_search` shows one way to do it with this unit.

## Throughput against 8K video

Take 8K (7680x4320) luma at 78 frames/s and a 240 MHz clock. That budget is
240e6/78 = 3.08 M clocks per frame. With the default `LANES = 8`, both rounds
over every pixel of a frame take 64,800 strips x 150 clocks = 9.7 M clocks.
That is about 25 frames/s per engine.

Reaching the 78 frames/s target needs `LANES = 32` (about 2.6 M clocks) or
several engines. `LANES` is a parameter; only the widths of `row_in` and
`out_smp` change with it.

## Where this RTL goes beyond or departs from the published architecture

The following choices are not given by the architecture description and were
made here:

- **Parallelism.** Each filter is `LANES` = 8 columns wide. This is read from
  the "8-pixel interpolation unit" of the architecture.
- **Widths and rounding.** 8-bit samples, the HEVC tap values, the 16-bit
  intermediates and the rounding rules come from the HEVC standard.
- **Row windows.** The eight-row windows in front of the vertical filters are
  not described, but a vertical 8-tap filter over a row stream needs them.
- **Idle filters.** A filter that is "closed" in a round holds its register.
  This RTL implements no clock gating cell.
- **Control.** The job interface, the handshake, the asynchronous active-low
  reset and the 3-clock latency are this design's own.
- **Cost unit.** The 4x4 Hadamard block size of the cost unit is a choice; a
  DCT-based SATD would also fit the formula.
- **Not implemented:** the reference-pixel memory organisation, and any block
  of the rest of the encoder. Only their names are available. The top takes
  reference rows on a port instead.
- **Throughput.** The default size does not reach the 8K 78 frames/s target
  (see above).

## Files

| file | content |
|---|---|
| `rtl/fme_pkg.sv` | widths, position enum, job and control structs, taps, rounding functions |
| `rtl/luma_fir8.sv` | one 8-tap filter, `PHASE` 1/2/3 |
| `rtl/level1_hfilters.sv` | level 1, three horizontal filters per lane |
| `rtl/vtap_window.sv` | eight-row vertical window |
| `rtl/level2_vfilters.sv` | level 2 (e, p, g, r) |
| `rtl/level3_vfilters.sv` | level 3 with its two MUXes (h/i, j/k, d/f, n/q) |
| `rtl/interp_ctrl.sv` | job sequencer, enables, selects, mask, pipeline strobes |
| `rtl/satd_cost.sv` | SATD + lambda*R mode cost |
| `rtl/fme_interp_top.sv` | top: interpolator plus cost unit |
| `tb/fme_ref_pkg.sv` | reference model: samples from the definition, SATD by matrices |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fme_cu64_search.sv` | full two-round search of a 64x64 coding unit through the top |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It
also has a cycle watchdog that counts a failure if the run hangs. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/fme_pkg.sv tb/fme_ref_pkg.sv tb/tb_fme_interp_top.sv \
  --top-module tb_fme_interp_top -o sim
./obj_dir/sim
```

`tb_fme_interp_top` runs the top at its default parameters. It streams
reference patches with random stalls, and the patches include flat and
checkerboard areas so that rounding clips at both ends. It runs:

- a 64-row half round and 64-row quarter rounds for all four best-half-MV
  cases;
- 1-row jobs;
- random jobs;
- a burst of cost computations.

Every sample of every lane is compared with the reference model, and the
latency of every row is checked. The testbench also counts each mechanism and
fails if one never happened:

- the half round;
- i/k on and off;
- the d/n and f/q paths;
- input stalls;
- clipping to 0 and to 255;
- MPM and non-MPM cost.

`tb_fme_cu64_search` runs a whole search for one 64x64 coding unit. The
current block is made by interpolating a reference area at a known
quarter-pixel offset, and the search then runs these steps:

1. The half round covers 9 strips.
2. All nine half candidates are scored with the top's SATD unit, summed over
   the 256 4x4 blocks.
3. The quarter round runs with the chosen best half MV.
4. The quarter candidates around that MV are scored the same way.

The testbench checks three things:

- every sample a candidate needs was marked valid by one of the two rounds;
- every cost equals the reference-model cost;
- the search returns the known offset.

The first check confirms that the MV-dependent choice of i/k and d/n or f/q
covers all eight quarter candidates.

The unit testbenches check the filters against the reference taps, the
windows, each level with every MUX setting and enable, the controller's
enables, mask, row count, latency and `done`, and the cost unit's value and
2-clock latency.

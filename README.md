# k-parallel cell-averaging CFAR detector

A CFAR (constant false alarm rate) detector decides, sample by sample, whether a
radar or communication signal holds a target. It does not use a fixed
threshold: it works out a threshold for each sample from the samples around it.
In the cell-averaging form (CA-CFAR) a window slides along the sample stream.
The cell in the middle of the window is the *test cell* `x_z`. The other `n`
cells are the *learning cells*. Their sum `r` estimates the local noise and
interference level. The threshold is `Hd = TA * r`, where `TA` is a factor
computed in advance for the wanted false-alarm probability. The test cell is
declared a detection when `Hd <= x_z`. A pulse of interference that is wide
enough to fill part of the learning window raises `r` and so raises its own
threshold. A fixed threshold would have flagged it.

One such unit makes one decision per clock. This design places **K identical
CA-CFAR units side by side on K consecutive test cells**. It feeds them K new
samples per clock, so it makes K decisions per clock. The units do not each keep
a copy of their window. Neighbouring windows overlap in all but one cell, so
all K windows are cut from one shared shift line of `W + K - 1` samples, where
`W = n + 1` is the window length. Each sample is stored once and read by up to
`W` units. Throughput grows linearly with K: at K = 32 with 16-bit samples, the
design takes 512 bits per clock, and 16 Gbit/s (1 Gsample/s) needs a clock of
only 31.25 MHz.

Default configuration: 16-bit samples, 16 learning cells plus one test cell,
K = 32 units.

## Files

| file | contents |
|---|---|
| `rtl/cfar_pkg.sv` | default sizes and the sum-width function |
| `rtl/cfar_window_buffer.sv` | the shared sample line that all K windows read |
| `rtl/cfar_noise_sum.sv` | sum of the learning cells (noise estimate `r`) |
| `rtl/cfar_threshold.sv` | `Hd = TA * r` and the decision `Hd <= x_z` |
| `rtl/ca_cfar.sv` | one CA-CFAR unit: window split, noise sum, threshold and compare |
| `rtl/ca_cfar_parallel.sv` | **top**: shared line plus K units |
| `tb/cfar_tb_pkg.sv` | stimulus generator and reference CA-CFAR model |
| `tb/cfar_par_harness.sv` | stimulus and scoreboard for one top instance of any K |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a sweep over K |

## The shared window line and which sample each decision belongs to

This is the part that takes most care when you connect the detector.

`cfar_window_buffer` holds `L = W + K - 1` samples in `line[0..L-1]`.
`line[0]` is the oldest. An input beat brings K consecutive samples, with
`in_data[0]` the oldest of them. On a beat the line shifts down by K, and the
K new samples fill `line[L-K..L-1]`. Unit `j` (for `j = 0..K-1`) reads
`line[j .. j+W-1]` as its window. Its test cell is `line[j + TEST_POS]`.

Number the samples of the stream from 0 and the accepted beats from 1. Beat
`b` completes a state of the line whose oldest cell is sample `b*K - L`. So the
decision `det[j]` that comes out for beat `b` concerns sample

    b*K - (W + K - 1) + j + TEST_POS

With the defaults (`K = 32`, `W = 17`, `TEST_POS = 8`), beat `b` gives the
decisions for samples `32b - 40 .. 32b - 9`.

**Start of the stream.** No decision is reported until the line holds
nothing but real samples. That takes `ceil(L/K)` beats: 2 beats at the
defaults. The earlier beats are absorbed and produce no output. So test cells
whose window would reach back before sample 0 are never reported. The
first-reported test cell is sample `ceil(L/K)*K - L + TEST_POS`, which is 24
at the defaults. The cells from `TEST_POS` up to that one have complete
windows but are skipped too, because the line only moves in steps of K. There
is no flush at the end: the last `W - 1 - TEST_POS` samples are still waiting
for their newer learning cells when the stream stops, so they get no decision.

**Flow control.** `in_valid` may drop on any clock. The line simply holds its
state, and decisions keep their order. There is no back-pressure (`ready`):
the detector accepts a beat on every clock.

## Arithmetic

| quantity | width at defaults | rule |
|---|---|---|
| sample `x` | 16 | `DATA_W` |
| sum `r` of n = 16 cells | 20 | `DATA_W + ceil(log2 N)`, which equals `ceil(log2(N*(2^DATA_W - 1)))`: it can never overflow |
| factor `TA` | 16, of which 12 are fraction bits | `TA = ta / 2^TA_FRAC`, unsigned, range 0 to just under 16 |
| threshold `Hd` | 36 | `TA_W + SUM_W`, the full product |

The compare is exact. The test cell is shifted left by `TA_FRAC` bits and
compared with the full product. Equality counts as a detection. For a typical
setting, a threshold of about 2.3 times the mean cell level with 16 learning
cells, `TA = 2.3/16 = 0.144`, so `ta = 590`.

`TA` is an input port, and one value is shared by all K units. Keeping the
pre-computed table of factors is left to whatever drives the port.

## Pipeline and timing

    beat -> [line reg] -> split + sum -> [r, x_z] -> TA*r -> [Hd, x_z] -> compare -> [det]
              clock 1                      clock 2            clock 3                 clock 4

`det` / `out_valid` follow the input beat by **4 clocks**. All K units run in
lock step, and an assertion checks that. The top's `out_valid` is the valid of
unit 0. A new beat can enter every clock, so the design delivers K decisions
per clock. Each unit module also has a `thresh` output that carries `Hd`, one
clock ahead of its `det`. The top leaves it unconnected.

Reset `rst_n` is active low and synchronous. It clears the valid bits and the
line's fill counter. Data registers are not reset, because nothing reads them
before a valid has passed through.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 16 | sample width |
| `N` | 16 | learning cells per window (window `W = N + 1`) |
| `TEST_POS` | 8 | index of the test cell in the window (cells below it are older) |
| `K` | 32 | parallel units = samples and decisions per clock |
| `TA_W` | 16 | width of `ta` |
| `TA_FRAC` | 12 | fraction bits of `ta` (must not exceed `TA_W`) |

All modules take their defaults from `cfar_pkg`.

## What comes from the published scheme and what is this design's own

These follow the published k-parallel CA-CFAR scheme:

* the CA-CFAR rule `r = sum`, `Hd = TA*r`, detection on `Hd <= x_z`;
* the sizes (16-bit data, a 17-cell window of 16 learning cells and one test cell, up to 32 units);
* K identical units on consecutive positions, with K samples in and K decisions out per clock;
* the reuse of data across the windows;
* the bus widths of the sum and the product.

These are this design's own choices:

* **Test cell in the middle**, with 8 cells on each side and no guard cells.
  `TEST_POS` moves the test cell,
  for example `TEST_POS = 0` or `TEST_POS = N`.
* **TA format.** Unsigned 16-bit fixed point with 12 fraction bits.
* **Pipeline.** Three register stages per unit, plus the line register.
  Without these stages the flip-flop count would be lower: the published
  implementation reports about 330 flip-flops for one unit and 2780 for 32.
  Synthesis of this RTL gives about 370 and 3620 flip-flop bits.
* **Plain sum.** The sum is formed directly from the N cells every clock, not
  as a running sum.
* **Start-up rule.** Decisions are suppressed while the line fills, as
  described above.

## Simulating

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M` and
stops, and each has a watchdog. For example:

    verilator --binary --timing --assert --top-module tb_ca_cfar_parallel \
        -y rtl -y tb +libext+.sv rtl/cfar_pkg.sv tb/cfar_tb_pkg.sv tb/tb_ca_cfar_parallel.sv
    ./obj_dir/Vtb_ca_cfar_parallel

| testbench | what it shows |
|---|---|
| `tb_cfar_noise_sum` | the sum equals a direct sum, including the all-ones (widest) case; one-clock latency |
| `tb_cfar_threshold` | the exact product; equality and one-below cases of the compare; two-clock latency |
| `tb_ca_cfar` | one unit slid over a generated stream: decision and threshold against the reference, 3-clock latency |
| `tb_cfar_window_buffer` | K = 5, W = 17, a case where K does not divide L: line contents after every beat and the fill rule |
| `tb_ca_cfar_parallel` | the top at its defaults (K = 32). 400 beats with idle clocks, each of the 32 decisions per beat checked, 4-clock latency |
| `tb_cfar_k_sweep` | the top at K = 1, 2, 4, 8, 10, 12, 16, 18 and 32 side by side, on independent streams |

The generated stream mixes three parts:

* noise: a sum of four uniform variates, with mean about 2000;
* pulse interference: 3% of samples, adding 6000 to 30000;
* targets: 2% of samples, adding 12000 to 24000.

The end-to-end test requires each mechanism to occur at least once, or it
counts a failure:

* an idle input clock;
* a beat absorbed while the line fills;
* a detection, and a non-detection;
* a pulse above a fixed level of 8000 that the adaptive threshold rejects;
* back-to-back output beats.

The reference model in `cfar_tb_pkg` computes each decision straight from the
stored sample array, independent of the line and the pipeline.

## Limits

* Only timing in clock cycles is verified. No clock frequency is claimed for
  any technology.
* The table of `TA` values (for the false-alarm probabilities and the
  interference statistics) is not part of the design.

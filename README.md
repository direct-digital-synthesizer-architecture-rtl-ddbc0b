# Amplitude-sequencing direct digital synthesizer

A conventional DDS accumulates phase and turns it into amplitude with a
sine lookup table. The table size forces phase truncation, and phase
truncation produces spurs. This synthesizer has no phase accumulator and no
table. A small integer state machine walks a point around a circle, one grid
unit per step, and the point's coordinates are the cosine and sine outputs.
The walk takes unequal phase steps, so each sample is held back for a time
proportional to its phase advance. The samples then land on a uniform phase
ramp in time, and the output frequency is set by how fast that time base
runs.

The logic grows linearly with the word width: a few adders, one magnitude
compare and some up/down counters. Sine and cosine come out of the same
state, so the quadrature outputs always match exactly.

```
            ftw ──► dds_freq_counter ──tick──► dds_phase_comp ──step_en──► dds_amp_core ──► cos_o, sin_o
                                        │            ▲  (two delay counters)     │  (circle walk)
                                        │            └──── dir, new x/y ─────────┘
                                        └──────────► dds_phase_counter ◄── wrap ──┘  ──► phase_o, period_o
```

## The circle walk (`dds_amp_core`)

The state is a grid point (x, y) and the circle function
F = x² + y² − R² at that point. The core also keeps the two partial
derivatives, PDFx = 2x and PDFy = 2y. The walk runs counter-clockwise. A
step along x moves by dx = −1 while y ≥ 0 and by +1 otherwise. A step along
y moves by dy = +1 while x ≥ 0 and by −1 otherwise. For each step both
candidates are scored without a multiplier:

```
NextFx = F + PDFx·dx + 1        (value of F after a step along x)
NextFy = F + PDFy·dy + 1        (value of F after a step along y)
```

Because dx and dy are ±1, each candidate is a single add or subtract. The
move whose |NextF| is smaller wins; on a tie the y move is taken. The winner
updates F, moves x or y by one, and moves the matching PDF by ±2. The point
never leaves the band |F| ≤ 2R. Every revolution has exactly 8R steps: R
along each axis in each quadrant. The walk returns exactly to (R, 0).

`restart` loads (x, y) = (radius, 0) with F = 0. `radius` is the output
amplitude and can be changed at every restart. After reset the core sits at
the origin and nothing is generated until the first restart.

## Why and how samples are delayed (`dds_phase_comp`)

If one step were taken per time-base tick, the phase would not advance
evenly. A unit step along x moves the point about |y|/R along the circle, so
it advances the phase by about |y|/R² radians. A unit step along y advances
it by about |x|/R². Near the axes the steps along the axis direction are
large in phase. Near 45° every step is smaller. In time, uniform stepping
gives a phase error of about 0.03 to 0.04 rad, whatever the value of R.

The fix is to make each step wait a number of ticks proportional to its
phase advance:

* a step along y waits `(|x| >> TRUNC) + 1` ticks;
* a step along x waits `(|y| >> TRUNC) + 1` ticks.

Two down counters hold these delays. `cnt_x` is loaded with |x| >> TRUNC and
`cnt_y` with |y| >> TRUNC. Both are reloaded on the same clock edge that
writes a new point into the core, from the values being written, so no
cycle is lost. On each tick the counter that the core's next direction
(`dir`) selects is tested. If it is zero, `step_en` is raised for that one
clock and the core steps on the same edge. Otherwise both counters count
down, stopping at zero. The `+1` sets the minimum spacing between samples
to one tick.

One revolution then takes

```
T_rev ≈ 2·π·R² / 2^TRUNC + 8R   ticks
```

(somewhat less when TRUNC > 0, because the shift rounds each delay down)

and the phase of every sample is within a small error of 2π·t/T_rev. In the
test at R = 2047 and TRUNC = 0 the worst error is 2·10⁻⁵ rad. With uniform
stepping it is 0.033 rad. At R = 40 and TRUNC = 1 the worst error is
0.002 rad, against 0.039 rad for uniform stepping. Dropping delay bits with
`TRUNC` shortens the revolution, which raises the top output frequency, at
the cost of more phase ripple.

## Time base and frequency (`dds_freq_counter`)

A down counter reloaded from the frequency tuning word gives one tick every
FTW+1 clocks. The output frequency is

```
f_out = f_clk / ((FTW + 1) · T_rev)
```

so for a fixed R it is inversely proportional to FTW+1. Writing `ftw` with
`ftw_wr` reloads the counter at once. The first tick at the new rate comes
FTW+1 clocks after the write. The point on the circle is not touched, so a
frequency hop (FSK) is phase-continuous and takes effect within one tick
period. A write can arrive at any time, including in the middle of a
revolution or of a sample delay.

For a given clock there are three ways to reach a higher frequency: a
smaller R (fewer, coarser samples), a larger TRUNC (more ripple), or
FTW = 0. For example, R = 15 with TRUNC = 3 gives a 224-tick revolution,
about 0.9 MHz from a 200 MHz clock. At the default sizes (R = 2047,
TRUNC = 0) a revolution is exactly 26,344,136 ticks.

## Phase reference (`dds_phase_counter`)

Once the steps are compensated, phase is proportional to elapsed ticks. The
phase counter counts ticks from the start of the current revolution. It is
cleared on `restart` and each time the walk lands back on the positive x
axis (`wrap`). At every wrap it latches the length of the revolution just
completed into `period`. The fraction of a turn is then `phase/period`.

## Top level (`dds_top`) interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `restart` | in | 1 | synchronous start/restart at (radius, 0); takes priority |
| `radius` | in | WIDTH−1 | amplitude R, unsigned, sampled on `restart` |
| `ftw_wr`, `ftw` | in | 1, FTW_W | load a frequency tuning word |
| `cos_o`, `sin_o` | out | WIDTH | two's complement amplitude words (to the DACs) |
| `sample_valid` | out | 1 | one-clock strobe in the cycle a new sample appears |
| `wrap_o` | out | 1 | with `sample_valid`: this sample closes a revolution |
| `phase_o` | out | PH_W | ticks since the start of the revolution |
| `period_o`, `period_valid_o` | out | PH_W, 1 | ticks in the last complete revolution |

A step is released in a tick cycle, and the new sample is visible, with
`sample_valid`, in the next cycle. `restart` also produces one
`sample_valid` carrying (radius, 0).

Parameters, with the defaults used by the full-size test:

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 12 | amplitude word width; R ≤ 2^(WIDTH−1) − 1 |
| `FTW_W` | 16 | tuning word width |
| `TRUNC` | 0 | delay LSBs dropped |
| `PH_W` | 2·WIDTH+1 | phase counter width (holds T_rev for the largest R) |

The internal F and PDF registers are WIDTH+3 bits wide. Shared types and
default sizes live in `dds_pkg`. The DACs are not part of the RTL: `cos_o`,
`sin_o` and `sample_valid` are where they connect.

## What is this design's own choice

The published architecture fixes the following: the circle generator and its
update equations; delays proportional to the current coordinates, counted
by two counters; a loadable counter for frequency tuning; delay truncation
as a speed/accuracy trade-off; and an optional phase counter. Everything
below was chosen here:

* All widths and defaults. No word length, amplitude or clock rate was
  published.
* The direction convention (counter-clockwise) and the tie rule (y move).
* The exact delay, `(|coord| >> TRUNC) + 1` ticks, and loading both
  counters on the edge that writes the new point.
* The tuning counter period of FTW+1 and the immediate reload on a write.
* Amplitude as a run-time input taken on `restart`; nothing runs after
  reset until a restart.
* The phase counter's insides: a tick count cleared at each revolution,
  plus the latched `period`.
* The candidate scores. Both NextFx and NextFy are computed in parallel:
  two add/subtracts and one magnitude compare per step. The published
  description mentions a single addition, so a minimal-area version could
  share one adder over two clocks. This design favours one step per tick.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_dds_amp_core` compares the walk step by step with a reference walk
  that scores candidates with exact multiplications. It covers R = 1, 5, 37,
  1000 and 2047 under a random step enable. It checks 8R steps per
  revolution, the wrap strobe, the |F| ≤ 2R band and restart.
* `tb_dds_freq_counter` checks the tick spacing cycle by cycle over many
  tuning words, including writes in the middle of a count.
* `tb_dds_phase_comp` runs two instances (TRUNC 0 and 2) and checks the
  ticks from load to step for random coordinates, axes and tick patterns.
* `tb_dds_phase_counter` compares phase and period with a model under
  random ticks, wraps and restarts.
* `tb_dds_top` runs the whole synthesizer at 8-bit words with TRUNC = 1,
  R = 40 and then R = 100. It checks every sample's value and its exact tick
  spacing against an independent model of the time base, walk and delays.
  It also checks `phase_o`, `period_o` and `wrap_o`, and it bounds the
  phase error against a uniform-rate sinusoid. It makes frequency hops in
  mid revolution, a restart with a new amplitude in mid revolution, several
  complete revolutions and truncated delays happen, counts each, and fails
  if any of them never happened.
* `tb_dds_trunc_sweep` runs four synthesizers at R = 64 with TRUNC = 0 to
  3 side by side. It checks each revolution length against the testbench's
  own walk of the circle. It also checks that more truncation gives a
  shorter revolution and a larger worst phase error. The measured values
  are 26296, 13296, 6776 and 3512 ticks, with worst errors of 0.0007,
  0.0008, 0.0026 and 0.0061 rad.
* `tb_dds_top_full` runs the same checks on `dds_top` at its defaults. It
  completes one revolution at R = 2047 (16376 samples, about 26 million
  clocks) with two frequency hops, in roughly 20 s of simulation.

Example with plain Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/dds_pkg.sv rtl/dds_amp_core.sv rtl/dds_freq_counter.sv \
    rtl/dds_phase_comp.sv rtl/dds_phase_counter.sv rtl/dds_top.sv \
    tb/tb_dds_top.sv --top-module tb_dds_top -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run the others. The
package must come first on the command line.

## Known limits

* The compensation is first order. A sample's delay uses the coordinate of
  the point it leaves, not the mean over the step. The remaining phase
  error shrinks as R grows (measured 2·10⁻³ rad at R = 40 with TRUNC = 1,
  2·10⁻⁵ rad at R = 2047 with TRUNC = 0), plus the truncation ripple when
  TRUNC > 0.
* The output frequency also depends on R (T_rev ∝ R²). A change of
  amplitude at a fixed tuning word changes the frequency. Pairs of
  (R, FTW) have to be worked out outside the design.
* A frequency hop takes effect at the next tick of the new rate. The delay
  already partly counted for the current sample keeps the ticks it has
  already counted.

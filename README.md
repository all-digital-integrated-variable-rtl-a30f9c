# High-resolution variable-frequency, variable-duty-cycle modulator

## The idea

A half-bridge needs two complementary gate signals. In this design both the
switching period and the on-time can be set to within one gate delay, and no
fast clock is used. The time base is a ring oscillator of 2^P identical delay
elements (DEs). Each of its taps is the same slow clock, shifted by a whole
number of element delays.

Each switching cycle has two segments: a high-side time `hs_in` and a
low-side time `ls_in`. Both are given in element delays. Each segment is
measured in two parts:

- the **coarse** part is a whole number of ring half-periods, counted by
  ordinary edge counters;
- the **fine** part, below one half-period, is made by choosing *which tap*
  clocks those counters.

Every segment then lasts exactly `x · t_de`. There is no accumulated error and
no dependence on a reference clock. Two identical counter sets take turns, so
a new command takes effect in the very next cycle: single-cycle convergence.

```
 hs_in, ls_in ─► dithering_logic ─► pointer_threshold_calc ──► s1..s4, thresholds
                                          ▲ (latched at each hs fall)      │
 ring_oscillator ── 2^P taps ──────────────┼────────────► mux_array ◄──────┘
                                          │                 │ p1,p2      │ p3,p4
                                          │     counter_comparator   counter_comparator
                                          │        (mode 0)              (mode 1)
                                          │            └──── hs_on/hs_off ──┘
                                          └──────── output_logic (on_trg, off_trg, mode, hs_i)
                                                         │
                                                     dead_time ─► hs, ls
```

Defaults: K = 6 and P = 7 give 13-bit commands and a 128-element ring.
t_de = 200 ps, so one half-period of the ring is 25.6 ns.

## Ring oscillator and tap arithmetic

`ring_oscillator` closes a `delay_line` of 2^P elements through an inverting
enable gate. While enabled, the ring's half period is H = 2^P·t_de.

Tap *i* is tap 0 delayed by *i* elements. Because of the inversion, a
hypothetical tap *i + 2^P* would be the inverse of tap *i*. This has a useful
effect. A counter pair that counts both the rising and the falling edges of
any tap sees exactly one event every H, with a phase of *i*·t_de. The chosen
tap therefore acts as a phase offset of 0..2^P−1 elements on a grid of step H.

The element delay is not synthesizable. It is modelled as a transport delay
of `T_DE_PS` per element, and the ring and the line are behavioural models.
Reset turns the ring off and flushes it to zeros, so it always starts from a
known state.

## Walking pointers: how the fine part is carried over

A segment starts at an edge of some tap *a* and must end `x` elements later.
It therefore ends on tap `(a + x) mod 2^P`, at the `ceil(x / 2^P)`-th event of
that tap after the start. Every segment starts where the one before it ended,
so the tap indices form a running sum modulo 2^P. Four pointers hold this sum:

| pointer | meaning | recomputed when |
|---|---|---|
| s1 | tap that ends the high-side time in mode 0 | mode 1 is running |
| s2 | tap that ends the cycle in mode 0 | mode 1 is running |
| s3 | tap that ends the high-side time in mode 1 | mode 0 is running |
| s4 | tap that ends the cycle in mode 1 | mode 0 is running |

When mode 0 is about to finish, the calculator prepares
mode 1 from the tap that ends mode 0's cycle (s2):

```
s3 = s2 + hs_fine            s4 = s2 + hs_fine + ls_fine          (mod 2^P)
```

When mode 1 is about to finish, it prepares mode 0 from s4:

```
s1 = s4 + hs_fine            s2 = s4 + hs_fine + ls_fine          (mod 2^P)
```

Here `hs_fine` and `ls_fine` are the low P bits of the commands. The
addition is P bits wide and wraps on its own. `mux_array` is four
`tap_mux`es that turn s1..s4 into the tap signals p1..p4.

In the RTL the pointers are numbered s[0]..s[3]. The formulas compute
"a + x" with "a" being the previous end tap, because the segment boundary
*is* an edge of that tap.

## Two alternating modes and the counting rule

This is the core of the design and the hardest part to get right.

**The counting rule.** `counter_comparator` counts events strictly after the
segment start. One counter pair counts the rising edges and the other the
falling edges of the same tap, and their sum is the event count. The first
event that can end a segment of `x` elements is event number

```
thr(x) = ceil(x / 2^P) = x[K+P-1:P] + (x[P-1:0] != 0)
```

For example, x = 128 ends on event 1 of the same tap, one half-period later.
x = 129 ends on event 2 of the next tap, one element later. x = 1 ends on
event 1 of the next tap.

A plain `floor` rule would be off by a whole half-period whenever the fine
part is not zero. This is exactly the fault that the calculator's fault copy
injects.

**Two counter sets.** Each mode has two counter pairs:

- the *off* pair is clocked by p1 (or p3) and raises `hs_off` when it reaches
  thr(hs);
- the *end* pair is clocked by p2 (or p4) and starts counting only after its
  own `hs_off`. It raises `hs_on` at thr(ls), which is the start of the next
  cycle.

The two modes alternate. While one mode times the current cycle, the other
holds its counters in clear and receives its new pointers and thresholds.

**Cross-mode clear.** A mode's counters are cleared by the *other*
mode's `hs_off`. This is logically the same as "off_trg while the other mode
is active". Taking it from the other mode's flag keeps a counter's own output out of
its clear path. A structural tool still sees a loop through both modes; see
the last section. `hs_off` is gated by "this mode is active", so
a cleared mode can never fire. `hs_on` stays high until the mode is cleared
at the next cycle's hs fall.

**Timing margins.** The idle mode is loaded at the fall of `hs_i`. That is
`ls` elements before the idle mode starts counting, so its mux and threshold
inputs are settled long before they are used. This is where single-cycle
convergence comes from: the command sampled at one hs fall governs the next
cycle in full.

## Output logic

`output_logic` forms:

- `on_trg` as the OR of both modes' `hs_on`;
- `off_trg` as the OR of both modes' `hs_off`;
- the mode flip-flop, which toggles on each rising `on_trg`;
- `hs_i`, a set-reset element: set by `on_trg`, reset by `off_trg`.

The set-reset element is written as a level-sensitive latch with reset
priority. At a cycle start `on_trg` rises while the old `off_trg` is still
high, until the mode flips and clears the old counters. The output `ls_i` is
`~hs_i`. The latch is intended, and it is the only one in the design.

## Dead time

`dead_time` delays `hs_i` through a line of 2^D elements and picks tap
`dt` with a `tap_mux`, so `hs_d` is `hs_i` delayed by (dt+1) elements. The
outputs are:

```
hs = hs_i & hs_d             ls = ~hs_i & ~hs_d
```

`hs` rises (dt+1) elements after `ls` falls, and `ls` rises (dt+1)
elements after `hs` falls. `dt` is sampled together with the commands. With D = 6,
`dt = 62` gives the 63-element dead time of the logic-simulation example.
A pulse shorter than the dead time disappears on that side.

## Dithering

`dithering_logic` sits before the calculator. It works on cycle counts at
each hs fall.

- **Frequency dither** (`nfrac_f = n`): in the last cycle of each group of
  |n| cycles, `ls` changes by +1 element (or by −1 when n < 0). The average
  period then moves by 1/|n| of an element.
- **Duty dither** (`nfrac_d`): in that cycle one element moves from `ls` to
  `hs` (or back when n < 0). The period stays the same.

A factor of 0 turns dithering off and restarts the group counter. Results
are clamped to the command range. The factors are 4-bit two's complement.
Flags `dither_f` and `dither_d` mark the modified cycle.

## Limiter, flags and start-up

`pointer_threshold_calc` holds the command registers. A sample is refused if
any of these holds:

- `hs + ls < lim`;
- `hs = 0`;
- `ls = 0`.

A refused sample keeps the previous command, sets `flags.lim_reject`, and the
next cycle repeats the previous one.

`flags` also carries:

- `cycle_start` (on_trg);
- `hs_fall` (off_trg), the sampling edge;
- `mode`.

`rst` is asynchronous and active high. It stops and flushes the ring,
clears all counters, and loads a safe command of 2^P / 2^P. Hold it for at
least 2^P element delays. The first cycle after release is a start-up cycle
with `hs_i` low.

## Parameters

| name | default | meaning |
|---|---|---|
| K | 6 | coarse bits of a command |
| P | 7 | fine bits; ring of 2^P elements |
| D | 6 | dead-time select bits; line of 2^D elements |
| NFRAC_W | 4 | width of the signed dither factors |
| T_DE_PS | 200 | element delay in ps (simulation only) |

The switching frequency is `1 / ((hs_in + ls_in) · t_de)`. With the
defaults this covers about 305 kHz (two full-scale segments) up to the
limit the user sets with `lim`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself.
Plain verilator 5 with timing support is enough. From the repository root:

```
verilator --binary --timing -Irtl rtl/vfvdm_pkg.sv tb/hr_vfvdm_tb.sv \
          --top-module hr_vfvdm_tb -o sim
./obj_dir/sim
```

Replace `hr_vfvdm_tb` with any other file name from `tb/`. Modules are found
through `-Irtl`. The package must be named first because it is imported.
The RTL works with any initial values, so it can also be run with
`+verilator+rand+reset+2`.

| testbench | what it checks |
|---|---|
| hr_vfvdm_tb | full-size top: published command pairs, steps, 150 random commands, dither, limiter, dead time; every edge time checked exactly against a reference |
| hr_vfvdm_linearity_tb | full-range hs sweep, two +100-element steps, ±1 triangle sweep at a constant period; width, slope and period exact |
| hr_vfvdm_dither_tb | 64-element ring (P = 6): frequency and duty dither for n = ±2..±7, spacing and size of every modified cycle |
| hr_vfvdm_steps220_tb | 220 ps elements: steps between 1.47, 1.12 and 1.05 MHz at duty 0.5, 0.616, 0.784; every cycle exact |
| ring_oscillator_tb, delay_line_tb | element delays, period, tap phases, flush on disable |
| tap_mux_tb, mux_array_tb | every select value |
| counter_comparator_tb | thresholds across the coarse/fine boundary, clear behaviour |
| pointer_threshold_calc_tb | pointer recursion, ceiling thresholds, limiter |
| dithering_logic_tb | group length, sign, clamping, n = 0 |
| output_logic_tb | mode toggling, set/reset priority |
| dead_time_tb | edge separation, levels and pulse counts for every dt |

## Departures and limits

- **Delays are ideal.** Every element has exactly `T_DE_PS`. Mismatch,
  temperature drift and wiring are not modelled.
- **No glitch filter.** The published block diagram names a glitch filter on
  the comparator outputs but does not describe it. Here the comparators
  compare rising counters against a stable threshold, so in simulation their
  outputs cannot glitch.
- **No converter controller.** The closed-loop controller that computes the
  commands for a resonant converter is outside this design. The commands are
  plain inputs.
- **Dead-time encoding.** The dead time is (dt+1) elements; dt = 0 still
  gives one element.
- **Short segments.** A segment shorter than the dead time is swallowed on
  that output. `hs_i`/`ls_i` still carry it.
- **Intended loops.** The ring oscillator and the cross-mode clear are
  combinational loops that structural tools report. The cross-mode loop
  cannot close in operation, because only one mode is active at a time.
  `hs_i` is a deliberate latch.
- **Choices not fixed by the published design:** D, the dither-factor width,
  the reset command, the limiter's zero-segment rule and the flag set.

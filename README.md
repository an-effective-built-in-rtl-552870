# Built-in self-test for a charge-pump PLL

A charge-pump PLL is hard to test in production. Its interesting nodes are
analog, and probing them loads them. A plain "does it lock?" check also misses
many transistor faults, because the negative feedback hides them: a damaged
loop often still settles at the right frequency.

This self-test never opens the loop and never touches an analog node. It
switches the PLL's feedback between the VCO output and the VCO output divided
by four. Each switch makes the loop unlock and settle again, once at four times
the reference frequency and once back at the reference. During these large
transitions every block of the PLL (phase detector, charge pump, loop filter,
VCO) is driven hard. A fault that slows or distorts a transition leaves the VCO
at the wrong frequency when it is measured, a fixed time after the switch. All
measurement is digital. Counters count the reference, the feedback and the VCO
output over a window, and the verdict is a comparison of counts. The self-test
needs only the reference clock and a test-enable pin, and it connects to the
PLL at two points: the VCO output and the feedback input of the phase detector.

## Block structure

```
              fref ──────────────┬──────────────────► PLL (PFD, pump, filter, VCO)
                                 │        ffb ──────►        │ fvco
                                 │         ▲                 │
   ┌─────────────────────────────┼─────────┼─────────────────┼──────────┐
   │ pll_bist_top                │      fb_mux ◄── fvco ◄────┤          │
   │                             │       ▲  ▲                │          │
   │                             │  c_clk│  └─ clk_div_n ◄───┤ (÷4)     │
   │                             ▼       │                   ▼          │
   │   fref_ffb_counter ◄─ ffb   bist_control ◄──────────── fvco        │
   │     ref_cnt[7:0] ─────────►  (sequencer, Fvco counter,             │
   │     fb_cnt[7:0]  ─────────►   lock decision, evaluation) ──► test_out[7:0],
   │            ◄──── init, cnt_en                                lock, done, pass
   └──────────────────────────────────────────────────────────────────────┘
```

| module | role |
|---|---|
| `pll_bist_top` | the self-test: wires the four blocks below; the PLL stays outside |
| `bist_control` | sequencer in the `fref` domain, the VCO counter, the lock decision, R1..R3 and the verdict |
| `fref_ffb_counter` | counts `fref` and `ffb` over a window; the `fref` count also times the window |
| `clk_div_n` | divides the VCO output by `N` (4) |
| `fb_mux` | 2:1 multiplexer: `ffb = c_clk ? fvco/N : fvco` |
| `edge_counter` | helper: gated edge counter with an enable synchronizer and an overflow flag |
| `bist_pkg` | the enums for the test step and the window sub-step |

## The measurement window

There is no system clock. `bist_control` runs on the reference `fref`. The
`ffb` and `fvco` counters run on the signals they count. Every measurement is
one window:

| sub-step | length (fref cycles) | what happens |
|---|---|---|
| `W_INIT` | 1 | `init` high: all three counters are cleared asynchronously |
| `W_RUN` | `WIN` (20) | `cnt_en` high: the `fref` counter counts to `WIN` and closes the window |
| `W_SETTLE` | `SETTLE` (4) | `cnt_en` low; the `ffb` and `fvco` counters stop two of their own edges later |
| `W_EVAL` | 1 | the counts no longer change and are read |

A window therefore takes `WIN + SETTLE + 2` = 26 reference cycles, which is
1.04 µs at 25 MHz. Windows follow each other without a gap, whatever the test
is doing.

The enable reaches the `ffb` and `fvco` counters through a two-flop
synchronizer in their own domain. The gate therefore opens and closes the same
number of their edges after `cnt_en` changes, and each count covers `WIN`
reference periods to within one edge. The counts are read only in `W_EVAL`,
when they are static. This assumes the counted signal has at least two edges
in the four settle cycles, i.e. above about 12.5 MHz at a 25 MHz reference. A
slower signal can at worst be read one count late. The PLL is far from lock
when that happens, so the decision does not change.

Each counter holds 7 bits. Bit 7 of every bus is a sticky overflow flag, and
once it is set the count holds at 127. An overflowed count is never "in range"
and never "locked".

At the default `WIN = 20` and a 25 MHz reference, one count of the VCO counter
is 1.25 MHz, and 150 MHz reads 120. This covers a 20-150 MHz VCO range with
7-bit counters at roughly 1 % resolution.

**Lock.** A window is *matched* when the `ffb` count is within `LOCK_TOL` (1)
of the `fref` count. `lock` rises after `LOCK_COUNT` (2) matched windows in a
row, and it falls at the first window that does not match. Because matching
compares frequencies, this is a frequency-lock indicator, not a phase-lock
indicator. At the defaults it accepts 19-21 counts, i.e. a VCO within about
±1.25 MHz of a 25 MHz reference.

## The test procedure

Raising `test_en` runs the procedure once. `test_en` is synchronised to
`fref`. The step (`state`) advances only at the end of a window:

1. **`T_FLT`, frequency lock test.** `c_clk = 0`, so `ffb = fvco`, and the
   block waits for `lock`. The VCO count of the locking window is stored as
   **R1**, which should be `WIN` because the VCO runs at the reference. Then
   `c_clk` rises. With no lock within `FLT_TIMEOUT` (64) windows, the test ends
   with `flt_timeout = 1` and `pass = 0`.
2. **`T_CHARGE`, charge test.** `c_clk = 1`, so `ffb = fvco/4`. The loop loses
   lock and must pump the loop filter up until the VCO runs at 4 × `fref`.
   After exactly `STROBE_WINDOWS` (4) windows, the last window's VCO count is
   stored as **R2** (expected 4 × `WIN` = 80), together with that window's lock
   state. Then `c_clk` falls.
3. **`T_DISCHARGE`, discharge test.** `c_clk = 0`, so `ffb = fvco` again. The
   loop must discharge back to the reference frequency. After `STROBE_WINDOWS`
   windows the last count is stored as **R3** (expected `WIN`), with its lock
   state.
4. **`T_DONE`.** `done = 1`. `pass = 1` needs all of the following:
   - lock held at the end of both strobe halves;
   - R1 and R3 within `EVAL_TOL` (1 count) of `WIN`;
   - R2 within `EVAL_TOL` of 4 × `WIN`.

   With `STROBE_CYCLES` above 1, the charge and discharge tests repeat that
   many times before `T_DONE`. The test passes only if every period meets
   these conditions, and R2 and R3 show the last period's counts. The default
   is 1.

   The block stays in `T_DONE` until `test_en` falls. Dropping `test_en` at any
   point returns the block to `T_IDLE` and lowers `c_clk` at the end of the
   current window.

The fixed strobe half period is what makes the test structural rather than a
lock check. The test asks whether the loop reached the right frequency *within
a given time* after a large step, not merely whether it locks eventually. A
fault that only slows charging or discharging gets through a plain lock test
but fails here.

**Timing.** Starting from a locked PLL, `done` rises between 9 and 10 windows
after `test_en` (at the defaults: up to one window to see `test_en`, one lock
test window, two halves of four windows). Add one window for each extra window
the first lock takes.

**On-line monitoring.** With `test_en` low, `c_clk` stays low, so the PLL runs
normally with `ffb = fvco`. The windows keep running, so `lock` and `test_out`
show the running PLL's frequency-lock state and VCO frequency.

## Interface (`pll_bist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `fref` | in | 1 | reference clock; also clocks the control logic |
| `fvco` | in | 1 | VCO output of the PLL |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `test_en` | in | 1 | high: run the test once; low: on-line monitoring |
| `ffb` | out | 1 | feedback input of the PLL's phase detector |
| `c_clk` | out | 1 | strobe / feedback select (1 = divided) |
| `lock` | out | 1 | frequency lock indicator |
| `test_out` | out | 8 | VCO count of the last window, `{overflow, count[6:0]}`; frequency = count × `fref` / `WIN` |
| `done`, `pass` | out | 1 | verdict |
| `flt_timeout` | out | 1 | the lock test never locked |
| `r1`, `r2`, `r3` | out | 8 | stored counts |
| `state` | out | `test_state_e` | current test step |

Parameters (all on `pll_bist_top` and `bist_control`): `CNT_BITS = 7`,
`DIV_N = 4`, `WIN = 20`, `SETTLE = 4`, `LOCK_TOL = 1`, `LOCK_COUNT = 2`,
`STROBE_WINDOWS = 4`, `STROBE_CYCLES = 1`, `FLT_TIMEOUT = 64`,
`EVAL_TOL = 1`. Elaboration
assertions reject a `WIN` or `DIV_N` for which 4 × `WIN` would not fit the
counters.

If you change the reference frequency, scale `WIN` to keep the same MHz per
count. If you change the PLL, size `STROBE_WINDOWS` so that a good PLL has
settled, with margin, before the end of each strobe half. The fault detection
depends on this time.

After coarse synthesis the self-test is about 250 word-level cells and 94
flip-flop bits, mostly in the control block. The published estimate for a
design of this kind is about 600 gates.

## What comes from the method and what is this design's own

Taken from the method:
- the five blocks and how they connect;
- the divide-by-4 feedback switched by a strobe through a 2:1 multiplexer;
- `init` clearing the counters;
- 7-bit counters on 8-bit buses;
- the procedure order: lock test and R1, charge test and R2, discharge test and
  R3, range evaluation;
- counting the VCO inside the control block;
- the 1 % pass/fail resolution;
- on-line lock monitoring;
- a single test-enable pin.

This design's own choices, where the method says nothing:
- The window structure and its lengths (`WIN`, `SETTLE`).
- The lock rule (`LOCK_TOL`, `LOCK_COUNT`).
- Measuring R2 and R3 at a fixed `STROBE_WINDOWS` after each strobe edge.
  The method's flowchart instead loops until lock in every step. Here the
  charge and discharge steps require lock by the end of their fixed time and
  fail otherwise, so the test always ends.
- The lock-test timeout.
- The overflow flag.
- The synchronizers.
- An asynchronous reset of the divider.
- The extra outputs (`done`, `pass`, `flt_timeout`, `r1`..`r3`, `state`).

Known differences from the method:
- The method describes the charge/discharge switching as repeating at every
  strobe edge, but its test flow ends after R3. By default this design runs
  one charge/discharge cycle per rise of `test_en`. `STROBE_CYCLES` sets more
  cycles.
- `fb_mux` is a plain combinational multiplexer. A select change can produce
  one short pulse on `ffb`. The phase detector sees it as part of the phase
  step that the test applies anyway.
- The lock indicator compares frequencies over a window. It does not detect
  phase lock.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_clk_div_n`: the output after every input edge for N = 4 and N = 5, one
  rising edge per N, and asynchronous reset.
- `tb_fb_mux`: every input combination.
- `tb_fref_ffb_counter`: windows of 20-100 cycles with `ffb` at 1/4 to 5 times
  `fref`. The `fref` count is exact and the `ffb` count within one of the
  expected value. Also checked: overflow, and clearing by `init`.
- `tb_bist_control`: against an ideal frequency source whose relock delay and
  final frequency the testbench sets. It checks:
  - window length and strobe high time, in cycles;
  - R1..R3 after a fast relock (pass);
  - a relock later than the strobe half period (fail);
  - a VCO settling at 4.15 × `fref`, which is locked by the count rule but has
    R2 out of range (fail);
  - abort on `test_en` falling;
  - the lock-test timeout and its cycle count.
- `tb_pll_bist_top`: the whole self-test at its default parameters, around
  `cp_pll_model` (below) with a 25 MHz reference. Runs:
  - on-line monitoring;
  - a dead VCO, which must time out;
  - a fault-free test from an unlocked PLL, which must pass with R1 = R3 = 20
    and R2 = 80 (±1) and the strobe high for exactly 4 windows;
  - a PLL whose UP pump current is cut to 10 %, which must fail (R2 reads 63
    instead of 80).

  It counts each mechanism (first lock, strobe rise and fall, loss of lock and
  relock after each edge, pass, fail, timeout, monitoring lock) and fails if
  any never happened.
- `tb_pll_bist_repeat`: three strobe periods (`STROBE_CYCLES = 3`) with the
  PLL model. The fault-free run passes. A weak UP current applied only in the
  second charge test fails.
- `tb_vco_range`: the default self-test in monitoring mode, measuring a VCO
  stand-in at 20-160 MHz. Each reading must be within one count of
  f × 20 / 25 MHz, lock must agree with the count rule, and 160 MHz must set
  the overflow flag.

`tb/cp_pll_model.sv` is a behavioural, non-synthesizable PLL:
- an ideal three-state phase-frequency detector;
- a time-stepped (1 ns) charge pump and loop filter, as an integrating
  frequency state plus a smoothed proportional term;
- a square-wave VCO limited to 10-160 MHz.

Its loop constants are invented: they make the loop settle in about 2 µs at
25 MHz. Two inputs inject faults: a weak UP current and a dead VCO. It is
enough to exercise the self-test's logic. It says nothing about which real
transistor faults the method detects. That coverage claim rests on
transistor-level simulation, which is not reproduced here.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bist_pkg.sv tb/tb_pll_bist_top.sv --top-module tb_pll_bist_top -Mdir obj
./obj/Vtb_pll_bist_top
```

Replace `tb_pll_bist_top` with any other testbench name. Every testbench
finishes in well under a second.

# Multi-phase-clock digital frequency-locked loop (m + n/k divider)

A frequency-locked loop (FLL) makes an output clock whose frequency equals that
of an input signal. Unlike a PLL it does not try to line up the phases, so it
settles within a couple of input periods and does not care about phase jumps on
its input. This design is all-digital. Its output is a K-phase reference clock
(frequency `f_mp`, K equally spaced phases) divided by a fractional ratio

    R = m + n/K          f_out = f_mp / (m + n/K)

and the loop sets `m` and `n` from a direct measurement of the input and
output periods, counted in *phase differences* (`T_mp / K`). One phase
difference is therefore both the measurement resolution and the step of the
output period. After lock, each output period is within one phase difference
of the input period.

The wide lock range comes from the integer part `m`. A divider that can only
stretch a fixed number of clock periods by `1/K` has a range of about
`1 + 1/K`. Here `m` may move anywhere between `M_MIN` and `M_MAX`:

    f_mp / (M_MAX + (K-1)/K)  <=  f_in  <=  f_mp / M_MIN

The default configuration is `f_mp = 2 MHz`, `K = 7`, `M_MIN = 50` and
`M_MAX = 100`. That gives 19.8 kHz to 40 kHz. A `1 + 1/K` divider with the same
upper limit would cover only 35 kHz to 40 kHz.

## Time base

All RTL is synchronous to one master clock `clk` at `K * f_mp`: 14 MHz by
default. One `clk` cycle is one phase difference. The K-phase clock is a
modulo-K counter (`mp_clock_gen`). The rising edge of phase `i` appears as a
one-cycle enable `rise[i]`. Every block that would be clocked by a phase, or
would count its edges, uses that enable instead. This keeps the design a single
clock domain and fixes the timing resolution at exactly one phase difference.
In silicon the K phases would come from a ring oscillator or delay line, and the
same structure would run on the real phase edges.

`fin` must be synchronous to `clk`. Add a synchroniser in front of it for a real
asynchronous input.

## The loop

```
 fin ──► freq_comparator ──Q, xfer──► fec ──delta──► ud_counter_n ──carry/borrow──► ud_counter_m
            ▲        ▲                 │ clr            │ n                             │ m
            │        └── rise[K] ◄── mp_clock_gen       ▼                               ▼
            └───────────── fout ◄──────────────── mpc_divider (DC1, DC2, counter z, onek_divider)
```

### Measuring the frequency error (`freq_comparator`, `tff`, `dfc_logic_gate`, `ud_counter_phase`)

This is the least obvious part of the design. Two T flip-flops toggle on the
rising edges of the input and of the output. Their XOR is high from an edge of
one signal to the next edge of the other, so each XOR pulse lasts as long as
the phase gap between the two signals. A third T flip-flop on the XOR splits the
pulses into alternate pairs. That gives four states, decoded by
`dfc_logic_gate`:

| state | XOR | T-FF3 | action |
|-------|-----|-------|--------|
| I     | 1   | 1     | counters count the gap up (gap 1 = Y) |
| II    | 0   | 1     | hold |
| III   | 1   | 0     | counters count the gap down (gap 2 = Z) |
| IV    | 0   | 0     | `xfer`: the FEC takes Q; the counters go back to their start value |

There are K counters, one per phase, and counter `i` counts only the edges of
phase `i`. Exactly one phase rises in every phase difference, so the sum of the
counters (the adder output `Q`) counts the pulse length in phase differences.
Each counter starts at `XC = 20`, so the adder rests at `X = K * XC = 140`. At
the transfer:

    Q - X = gap1 - gap2 = T_in - T_out      (in phase differences)

because the gap changes from one period to the next by the period difference.

The up/down direction also depends on which signal opened the pulse. If the
output edge came first, the gap counts as negative. `Q - X` then stays
`T_in - T_out` when the output leads, and across the moment the two signals
slip past each other. The basic description covers only the input-leading case;
the sign swap is this implementation's addition.

### Turning the error into a ratio (`fec`, `ud_counter_n`, `ud_counter_m`)

The FEC passes `e = Q - X` to U/D-counter_n. That counter holds the fractional
part of the ratio in an offset form, with `X-K < nreg <= X`. It adds `e`, then
steps back into range one step of K per clock. Every step down by K carries +1
into `m`, and every step up borrows −1. The net effect is

    m*K + n  +=  T_in - T_out

so the next output period equals the measured input period. `m` saturates at
`M_MIN` and `M_MAX`. At a limit, U/D-counter_n clamps to the end of its range.

Two details deserve attention.

* **The range test includes X.** A flow chart with both bounds strict,
  `X-K < n < X`, would step forever when `n == X`, and `n == X` is exactly the
  zero-error case. The range here is `X-K < n <= X`.
* **The phase-wrap fold.** When the phase gap wraps through a whole period, one
  measurement reads about one output period too much or too little. The FEC
  therefore folds `e` into `(-P/2, P/2]`, where `P = m*K + n` is the present
  output period. As a result, a single step of the input period larger than
  `P/2` is misread. Acquisition from reset (`m = 75`) still covers the whole
  range, since 350 and 706 are both within 262 of 525. An input that jumps from
  one end of the range to the other in one step may not lock.

### The m + n/k divider (`mpc_divider`, `onek_divider`)

`onek_divider` passes one selected phase. In divide mode, each output edge moves
the selection (a one-hot ring counter) to the next phase. The edge of that
phase one phase difference later is masked, so the period grows to
`T_mp * (1 + 1/K)`: K+1 cycles instead of K.

`mpc_divider` counts these edges in `z`:

* DC1 compares `z` with `n`. While `z < n` (DC1 low) the `1+1/K` divider
  divides.
* DC2 compares `z` with `m`. When `z` reaches `m`, `z` restarts and a new
  output period begins.

One output period is therefore `n*(K+1) + (m-n)*K = m*K + n` cycles. `m` and
`n` are sampled at the start of each period, so every period is whole. While
U/D-counter_n is still stepping, the old values are kept. The output is high
for the first `floor(m/2)` edges of a period; only its rising edge matters to
the loop.

## Loop timing

* One measurement spans two input periods (states I–IV).
* The correction takes 2 cycles, plus one cycle per K-step of the error.
* A correction applies from the next output period.
* After a step of the input frequency, the loop relocks within at most 8
  output periods; the testbench's worst case is 7. A step that lands inside a
  measurement spoils that measurement, so up to three measurements can be
  needed. From reset, the testbench likewise sees lock within a few
  measurements.
* Once locked, each output period differs from the input period by at most one
  phase difference. With a fractional input period the ratio dithers between
  the two neighbouring values, so the average is right.

## Where this RTL departs from, or adds to, the design description

* The K-phase clock is a counter on a `K * f_mp` master clock, not an
  oscillator. Its phases are high for `(K+1)/2` of `K` cycles.
* The `1+1/k` divider keeps the selector and the rotating ring counter. Masking
  the next phase's edge after a rotation stands in for the internal 1/2 divider
  and second selector, whose timing is not specified.
* U/D-counter_n accumulates the error rather than being overwritten by it.
  Overwriting would discard the fractional part at every measurement, and the
  loop would not settle to one phase difference.
* Direction of the m update: a longer input period (`Y > Z`) increases `m`.
  This is the flow-chart reading, which gives negative feedback. One equation
  in the description has the opposite sign.
* The signed gap when the output leads, the phase-wrap fold, the `n == X` range
  fix and the clamp at the `m` limits are additions.
* Reset puts `m` at 75 and `n` at 0. Widths are 10-bit signed per phase
  counter, 14-bit signed adder and error path, and 8-bit `m`.
* Outside the lock range `m` reaches its limit but does not stay there: the
  phase keeps slipping and some measurements alias.
* Not built: the conventional `1 + 1/k`-only FLL, which appears only as a
  comparison.

## Files

| file | contents |
|------|----------|
| `rtl/dfll_pkg.sv` | default parameters, widths, measurement-state enum |
| `rtl/dfll_top.sv` | the loop |
| `rtl/mp_clock_gen.sv` | K-phase clock (edge enables and waveforms) |
| `rtl/freq_comparator.sv` | T-FFs, XOR, logic gate, K phase counters, adder |
| `rtl/tff.sv`, `rtl/dfc_logic_gate.sv`, `rtl/ud_counter_phase.sv` | its parts |
| `rtl/fec.sv` | error extraction, phase-wrap fold, counter reset |
| `rtl/ud_counter_n.sv`, `rtl/ud_counter_m.sv` | fractional and integer ratio |
| `rtl/mpc_divider.sv`, `rtl/onek_divider.sv` | m + n/k divider and its 1 + 1/k stage |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dfll_lock_range.sv` | sweep across the lock range |

Parameters of `dfll_top`: `K` (7), `XC` (20), `M_MIN` (50), `M_MAX` (100) and
`M_INIT` (75). The widths in `dfll_pkg` cover the default range. Widen `MW` if
`M_MAX` exceeds 255, and `QW`/`CW` if `M_MAX * K` grows past about 1000.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends. To build
and run the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/dfll_pkg.sv tb/tb_dfll_top.sv \
          --top-module tb_dfll_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv` the same way; `-Irtl` finds the modules it uses.

What the tests cover:

* `tb_dfll_top` runs at the default parameters. It acquires 28.6, 40, 19.83 and
  30 kHz from reset, then tracks a moving input without reset. For each in-range
  input it checks every output period and the mean against the input period to
  within one phase difference. For inputs just outside the range it checks that
  `m` reaches its limit and never leaves 50..100. It also confirms that states
  I–IV, carry, borrow, the `1+1/K` division, both count directions and both `m`
  limits each occurred.
* `tb_dfll_lock_range` steps the input across the whole range in both
  directions and checks lock at each step.
* The block testbenches compare each module with an independent reference
  model. They check the period of every divided edge, the adder value for known
  edge gaps, the stepping and carries of U/D-counter_n, and so on.

# Asynchronous-sampling duty cycle corrector (AS-DCC)

Sub-rate clocking uses both edges of a clock. A half-rate or quadrature
clock whose duty cycle is not 50% therefore shortens every other data
interval. Buffers with unequal rise and fall times distort the duty cycle,
and the distortion gets worse as frequency rises. The usual correctors
measure duty with analog integrators or fine time-to-digital converters.
Those measurements are large, need power, and are sensitive to offset.

This corrector measures duty with a single flip-flop. The multi-GHz clock is
used as *data* and sampled by an unrelated slow clock (about 88 MHz). When
the slow period is not an integer multiple of the fast one, successive
samples fall at ever-changing phases of the fast clock. The fraction of ones
among the samples then equals the fast clock's duty cycle. An up/down
counter integrates the sample stream, and its upper bits steer a
duty-adjustment buffer. The loop settles when ones and zeros arrive at the
same rate, i.e. at 50% duty. All digital logic runs at the slow clock rate.

The weak point of the scheme is the ratio between the two clock periods.
Near certain ratios the samples stop being spread evenly over the fast
period, and the loop never settles. The design therefore adds a small
controller that detects this and moves the ratio by slowing the sampling
oscillator. Most of this document is about that problem.

## The correction loop

```
            clk_in ──► duty_adjust ──┬──────────────────────────► clk_out
                          ▲ code[3:0] │
                          │           ▼ (data)
                      dcc_counter ◄── async_sampler ◄── clk_async
                        cnt[7:4]        (D flip-flop)       ▲
                          │                                 │
                          └──► settling_fsm ──► osc_code ──► async_osc
```

* `async_sampler` is one flip-flop. On each rising edge of `clk_async` it
  captures the level of `clk_out`, the corrected clock. The sampled clock is
  therefore the loop's output, so the loop is closed.
* `dcc_counter` is an 8-bit up/down counter, also clocked by `clk_async`.
  It counts up for a sampled 1 and down for a sampled 0.
* The upper 4 bits of the counter are `code`. `duty_adjust` lowers the duty
  of `clk_out` as `code` rises, because a larger code strengthens the
  pull-down. A clock that is high too long produces more ones. More ones
  raise the code, and a higher code removes high time, so the feedback is
  negative.
* `settling_fsm` watches `code` and may raise `osc_code`. `async_osc`
  lengthens its period by one step for each unit of `osc_code`.

### Four code bits over four filter bits

The counter is 8 bits wide, but only the top 4 bits leave it. The lower
4 bits act as a filter. Short runs of identical samples are absorbed there
instead of moving the adjuster at every sample. From the reset value
`8'b1000_1000`, the code first changes after 8 net ups
(`1000_1000 → 1001_0000`) or 9 net downs (`→ 0111_1111`). The 16 codes cover
the expected process, voltage and temperature spread with a fine step. Code
8 is neutral. In steady state the code toggles between two neighbouring
values, because of quantisation.

This is a trade-off. Fewer counter bits settle faster but pass more
sample-stream noise to the clock. More bits filter better but settle more
slowly.

The counter saturates at 0 and 255 instead of wrapping. If it wrapped, a
long burst could flip the code from one end of its range to the other. This
is a choice made for this RTL.

## Why some sampling ratios fail

Write the sampling period as

```
T_async = (N + α) · T_clk,      N integer, 0 ≤ α < 1
```

Only the fractional part α matters. Each sample lands α·T_clk later in the
fast clock's cycle than the one before.

* **α close to 0.** The sampling phase barely moves. The flip-flop returns
  long runs of identical bits: hundreds of ones, then hundreds of zeros. The
  counter follows each run, so the code wanders over its whole range.
* **α close to k/o with o odd**, so α = k/o + β with small β. Every o
  samples, the phases nearly repeat, spaced T_clk/o apart. With an odd
  number of phases over a 50% clock, one phase more falls in the high half
  than in the low half, or the reverse. So each group of o samples adds a
  net ±(o−1)/2 to the counter, and only the slow drift β moves the pattern.
  The counter therefore drifts in one direction for a long time before the
  pattern reverses.
* **α close to k/e with e even.** The repeating phases split evenly between
  high and low, so the net count per group is zero. These ratios are
  harmless whatever β is.

For the odd case, consider one "middle" phase that sits next to a clock
edge. The number of o-sample groups during which that phase stays on the
same side of the edge is

```
O'(o, β) = ( T_clk/2 − (o−1)/2 · T_clk/o − (o−1)/2 · β·T_clk ) / (o·β·T_clk) + 1
```

The code stays put if this burst fits into the filter margin that the hidden
counter bits leave:

```
O'(o, β) ≤ (2^(m−1) − 1) − (o−1)/2      (m hidden bits; 7 − (o−1)/2 here)
```

Solving for β gives the smallest safe offset. It is β > 0.00455 for o = 5
and β > 0.002977 for o = 7. Both numbers are reproduced by
`tb_sampling_sweep`. With more hidden bits the margin grows and the unsafe
band around each odd fraction narrows. The cost is slower settling.

The open-loop sweep (`tb_sampling_sweep`) uses a perfect 50% clock at
T_clk = 100 ps, N = 5, aligned first edges, and 30 000 samples. Without
feedback, any movement of the code is a fluctuation:

| fraction | β | O' | 8-bit counter (4 hidden bits) | 10-bit counter (6 hidden bits) |
|---|---|---|---|---|
| 1/5 | 0.0002 | 100.6 | 8 … 14 | 8 … 10 |
| 2/5 | 0.000217 | 92.8 | 8 … 14 | 8 … 9 |
| 1/5 | 0.001 | 20.6 | 8 … 9 | 8 (still) |
| 2/5 | 0.002 | 10.6 | 8 … 9 | 8 (still) |
| 3/5 | 0.01 | 2.6 | 8 (still) | 8 (still) |
| 3/7 | 0.0002 | 51.6 | 8 … 11 | 8 … 9 |
| 3/7 | 0.001 | 10.8 | 8 … 9 | 8 (still) |
| 2/7 | 0.006 | 2.3 | 8 (still) | 8 (still) |
| 1/4 | 0.0002, 0.001 | — | 8 (still) | 8 (still) |
| 3/4 | 0.008 | — | 8 (still) | 8 (still) |

The 10-bit counter is the same `dcc_counter` with `W = 10` and
`INIT = 10'b1000_100000`. With m = 6 hidden bits, the margin grows from 7 to
31 net counts.

The last even case uses β = 0.008 rather than 0.01, because 3/4 + 0.01 =
0.76 = 19/25 is itself an odd-denominator fraction. In general, every α
lies near *some* odd fraction. What matters is how large o is compared with
the margin, and how small β is.

With the loop closed and the controller off (`tb_closed_loop_sweep`), the
input is 50% at 100 ps. Ratios 0.0002 away from 1/5 and from 3/7 leave the
code wandering over 4 … 11 and 6 … 10. For 1/5 that is an output duty of
48.5% … 52%. With β = 0.0083 (near 2/5) or β = 0.006 (near 3/7), and for both
even cases, the code holds or toggles between two neighbours, and the output
stays within 49.5% … 50%.

## The settling controller (`settling_fsm`)

A settled loop toggles its code between two adjacent values. A loop caught
near a bad ratio moves its code over a wider range. The controller uses
this difference:

1. `ST_SETTLE`: wait `SETTLE` (4096) sampling cycles, so that acquisition
   from reset is not judged.
2. `ST_MONITOR`: for `WINDOW` (8192) cycles, record the smallest and largest
   code. The window is longer than the slowest fluctuation of interest, which
   is about 1/β samples.
3. If max − min > 1, the window is *unstable*. `ST_SLOW` then raises
   `osc_code` by one, which adds `T_STEP_PS` (0.81 ps) to T_async, and the
   FSM returns to step 1. Each step moves α by 0.81 ps / T_clk.
4. Otherwise the window is *settled*. `stable_win` pulses and the next
   window starts at once, so the loop stays under watch.

`osc_code` only ever increases, and it saturates at 15. With `ctrl_en` low,
the FSM sits in `ST_OFF` and holds `osc_code`. The window verdict is given on
the window's last cycle, and `osc_code` steps one cycle later.

The controller cannot tell a large acquisition step from instability. If
the loop is still acquiring when a window is judged, the oscillator is
slowed once more than it needed to be. That is harmless, but it explains
the slow-down counts in the tests below.

Worked example, with the settings of `tb_as_dcc`: T_clk = 100 ps and
T_async = 520.0217 ps, so α = 0.200217. That is β = 0.000217 away from 1/5.
With the controller off, the code swings between 5 and 11, and the output
duty swings between 48.5% and 51.5%. After one slow-down, T_async is
520.8317 ps and β is 0.008317. The code then toggles between 8 and 9, and
the duty toggles between 49.5% and 50%.

## Modules

| file | kind | what it is |
|---|---|---|
| `rtl/as_dcc_pkg.sv` | package | counter width 8, code width 4, reset value `8'h88`, stable spread 1, FSM state enum |
| `rtl/async_sampler.sv` | RTL | sampling flip-flop; `valid` rises with the first sample after reset |
| `rtl/dcc_counter.sv` | RTL | saturating up/down counter; `code = cnt[7:4]`; `sat` flag |
| `rtl/settling_fsm.sv` | RTL | settling controller described above |
| `rtl/async_osc.sv` | behavioural model | sampling oscillator, period `T_BASE_PS + osc_code·T_STEP_PS` |
| `rtl/duty_adjust.sv` | behavioural model | duty adjuster, `STEP_PS` of high time per code |
| `rtl/as_dcc.sv` | top (simulation model) | the closed loop of all of the above |

`async_sampler`, `dcc_counter` and `settling_fsm` are synthesizable. The
oscillator and the adjuster are analog circuits in a real chip. Here they
are timed behavioural models that use real-valued delays at 1 fs precision.
As a result, the top `as_dcc` is a model of the whole mixed-signal loop, not
a netlist. To build the digital part alone, instantiate the three RTL
blocks and connect the real oscillator and adjuster outside them.

Top-level ports of `as_dcc`: `clk_in` (uncorrected clock), `rst_n` (active
low, asynchronous), `ctrl_en` (settling controller on), `clk_out`,
`clk_async`, `sample`, `cnt[7:0]`, `code[3:0]`, `cnt_sat`,
`osc_code[OSC_BITS-1:0]`, `unstable`, `slow_pulse`, `stable_win`, and
`fsm_state`.

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `T_BASE_PS` | 11332.7 | sampling period, about 88.24 MHz |
| `T_STEP_PS` | 0.81 | lengthening per `osc_code` step |
| `DUTY_STEP_PS` | 0.5 | high time removed per code step |
| `SETTLE` | 4096 | wait before each observation window, in sampling cycles |
| `WINDOW` | 8192 | observation window, in sampling cycles |
| `OSC_BITS` | 4 | width of `osc_code` |

**Timing.** Everything digital runs on `clk_async`, with one sample per
period. A sample is captured on one edge and counted on the next. The code
reaches the adjuster directly from the counter flops, and the adjuster
applies it from the next edge of `clk_in`. Because the loop adds at most one
count per sampling period, moving the code by one value takes at least 16
periods. Near 50% it takes many more, since the net count per sample is
2·(duty − 0.5).

## Where the numbers come from

These values are taken from the design:

* the 8-bit counter with 4 code bits and reset value `8'b1000_1000`;
* the count direction (up for a 1) and that the pull-down strengthens as the
  code rises;
* the sampling clock at about 88.24 MHz for an 8 GHz input, and below
  100 MHz in general;
* the 4–8 GHz operating range;
* the rule that a code spread of more than one value means instability, and
  that the response is to slow the oscillator;
* the example periods 520.0217 ps → 520.8317 ps;
* the goal of a duty error below 0.8%.

These values are choices made for this RTL:

* **Adjuster step of 0.5 ps per code.** It is inferred from the settled
  example toggling between 49.5% and 50% at 100 ps. This gives ±4 ps of
  correction range: ±3.2% at 8 GHz and ±1.6% at 4 GHz. The change is split
  equally between the two edges, and the propagation delay is 20 ps.
* **Oscillator step of 0.81 ps.** The example's whole change is taken to be
  one step. The step is linear in the code, 16 steps are available, the
  clock has a 50% duty, and a new code applies from the next period.
* **Controller timing.** The window and settle lengths, the increment of
  one step per unstable window, and the saturation of `osc_code` are
  choices made here.
* **Counter and sampler details.** The counter saturates. The sampler
  outputs `valid`. There is no synchroniser after the sampling flop, because
  the flop has a whole ~11 ns period to resolve.

Not modelled: the clock generator that produces `clk_in` (the testbenches
generate it), and power, area and jitter.

## Verification

Each block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_async_sampler` | Every sample equals the analytically computed level of a 100 ps clock at the sampling instant. The long-run fraction of ones is 50 ± 2%. Reset behaviour is correct. |
| `tb_dcc_counter` | Reset value; the code moves on the 8th up and the 9th down; `en` holds the count; saturation at both ends; a 5000-step random stream matches a reference count. |
| `tb_settling_fsm` | Exact cycle timing of the first slow-down (SETTLE + WINDOW + 2 cycles after enable) and of later ones; no action for 1-bit toggling or when disabled; swings during the settle wait are ignored; a single outlier is caught; `osc_code` saturates. |
| `tb_async_osc` | Periods and high times are within 2 fs for several codes; no drift over 2000 periods; the default frequency is 88.24 MHz. |
| `tb_duty_adjust` | For all 16 codes and two input duties: high time, rise delay and fall delay are within 2 fs, and duty falls monotonically as the code rises. |
| `tb_as_dcc` | Closed loop at 100 ps: the odd-ratio example above, with the controller off and then on; a 47.2% input corrected to 50 ± 0.5% (code 2/3) with no slow-down; a 42% input saturating at code 0 (46% out). Each mechanism is counted and must occur: code updates, counter saturation, unstable window, slow-down, settled window. |
| `tb_as_dcc_full` | Three tops at default parameters, sampled at about 88.24 MHz. 8 GHz at 47.5%: the code settles to 1–2 and the output duty to 49.9–50.3%. 4 GHz at 48.88%: α = 0.331, near 1/3, so the controller slows the oscillator (3 steps); the code then toggles 2/3 and the duty stays within 49.9–50.1%. 6 GHz at 49%: α = 0.996, nearly harmonic, so the controller takes 9 steps to reach α ≈ 0.04; the code then toggles 4/5 and the duty stays within 49.9–50.2%. All three keep per-cycle duty error below 0.8%. About 1.5 minutes of simulation. |
| `tb_sampling_sweep` | The open-loop table above, for the 8-bit and the 10-bit counter, and the two β thresholds. |
| `tb_closed_loop_sweep` | The closed-loop steady state near 1/5, 2/5, 3/7 and 1/4, 3/4, with the controller off. Wide code swings occur only for the small-β odd cases. The settled cases stay within one step of 50%. |

## Simulating

A testbench uses the package, the testbench file and the search paths, for
example:

```
verilator --binary --timing --sched-zero-delay -Irtl -y rtl -y tb \
    rtl/as_dcc_pkg.sv tb/tb_as_dcc.sv --top-module tb_as_dcc
./obj_dir/Vtb_as_dcc
```

`--sched-zero-delay` is needed because the behavioural models compute their
delays at run time, and the oscillator's first edge can be a zero delay.
Without this option, verilator stops on its `ZERODLY` warning. Every module
declares `timeunit 1ps; timeprecision 1fs;`, which the sub-picosecond
periods require. The testbenches that end with `_full` or `_sweep`, and
`tb_as_dcc`, also need `tb/dcc_probe.sv`. That helper measures the average
and per-cycle duty and the code range over a window, and `-y tb` finds it.

The simulator has only two states, so a flop that is never reset starts at
a random value. `rst_n` acts on a falling edge, or on a `clk_async` edge
while it is low. A testbench that starts with `rst_n` already low must
therefore hold it over at least one sampling edge. The testbenches here do
that.

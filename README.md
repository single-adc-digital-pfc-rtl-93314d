# Single-ADC digital PFC controller with pre-calculated duty cycles

A boost power-factor-correction (PFC) stage normally needs three sensors:
input voltage, input current and output voltage. This controller needs only
two:

- one low-rate ADC on the output voltage;
- one comparator that detects the zero crossings of the mains.

Instead of closing a fast current loop, it plays back duty-cycle values that
were calculated off line for the nominal operating point. There is one value
per switching cycle of a rectified mains half-period: 1000 values at 100 kHz
switching and 50 Hz mains. Two slow loops, updated once per half-period,
correct the stored values when conditions move away from nominal:

- an **average-voltage loop** follows changes of the input voltage. It uses
  the mean output voltage over a half-period.
- a **ripple loop** follows changes of the load. It uses the peak-to-peak
  output ripple over a half-period, which is proportional to the output power.

The RTL is SystemVerilog-2017 and was written for a 100 MHz clock.

## How a duty cycle is split

For a boost converter in continuous conduction, the duty cycle that makes
the inductor current follow a sinusoid is

    d(k) = (vout(k) - vg(k)) / vout(k)  +  (L/Tsw) * (iL(k+1) - iL(k)) / vout(k)
           \_______ d1 _______________/    \____________ d2 = dc ___________/

Here k is the switching cycle within the half-period. vout(k) = Vout -
ripple(k) contains the 100 Hz output ripple. The controller splits this
further into three stored components (method 3, the default):

| component | definition | depends on | regulated by |
|-----------|------------|------------|--------------|
| da | (Vout - vg) / Vout | input/output voltage ratio only; symmetric in the half-period | k (average loop) |
| db | d1 - da | output ripple, i.e. the load; zero mean over a half-period | k, then r (ripple loop) |
| dc | inductor-current term (= d2) | load and input voltage; zero mean | 1/k, then r |

The component tables are stored as **complements** wherever the loop
multiplies them: 1-da and 1-d1. Scaling 1-d by k keeps the regulated duty at
1 at the zero crossings, where d must be 1. Scaling d itself would pull the
ends of the waveform away from 1 and distort the current. The duty composed
for each switching cycle (`duty_m3`) is

    da* = 1 - k*(1-da)
    d1* = 1 - k*(1-d1)
    db* = d1* - da*
    dc* = (1/k)*dc          with 1/k approximated as 1 - delta
    d*  = da* + r*(db* + dc*)

with k = 1 + delta from the average loop and r = 1 + delta_r from the
ripple loop. Since delta stays near 0, 1/(1+delta) is replaced by 1-delta. A
10 % input-voltage error then costs about 1 % in the scaling of dc, and the
design needs no divider.

Only da changes the mean of the duty cycle over a half-period, because db
and dc average to zero. That is why the average loop acts almost entirely
through da, and why the load needs its own loop.

Two simpler compositions are kept, selectable with the `METHOD` parameter:

- `METHOD_D` (1): one table 1-d, and d* = 1 - k(1-d). This does not react to
  load changes.
- `METHOD_D1D2` (2): tables 1-d1 and d2, and d* = 1 - k(1-d1) + r(1/k)d2.

Method 2 scales d2 with the ripple but ignores the ripple component inside
d1, which is larger. In practice it does no better than method 1, and method
3 is the one to use.

## Data flow

```
 zc comparator ─► zc_debounce ─sync─┬─► duty_sequencer ─addr─► duty_table x3 ─┐
                                    │          ▲ tick                          │
                                    ▼          │                               ▼
 sigma-delta  ─► sd_adc ─sample─► vout_monitor │         k, 1-delta      duty_m3 ─duty─► dpwm ─► gate
 comparator/RC ◄─fb                 │ mean ──► pid_reg (average) ─────────►  ▲              │
                                    │ ripple ► pid_reg (ripple)  ── r ───────┘              │
                                    └──────────────────────────────────────── tick ◄───────┘
```

| module | role |
|--------|------|
| `pfc_top` | wires everything; brings out analog interface, table-load port, references, status and event pulses |
| `pfc_pkg` | number formats (`duty_t`, `gain_t`, `adc_t`, `err_t`), `method_e`, the fixed-point multiply `mul_gain` |
| `zc_debounce` | 2-flop synchroniser and stable-count filter on the comparator; one `sync_pulse` per half-period |
| `sd_adc` | digital half of a first-order sigma-delta ADC: feedback flip-flop plus ones counter over 1000 clocks |
| `vout_monitor` | per half-period: sum, count, max, min of the samples; mean by `seq_divider`, ripple = max - min |
| `seq_divider` | unsigned restoring divider, one bit per clock |
| `pid_reg` | PID once per half-period; outputs k = 1 + delta and 1 - delta, clamped |
| `duty_table` | 1000 x 16-bit memory of one component, loaded through a write port |
| `duty_sequencer` | table address per switching cycle; restart at zero crossing; spreads repeats or skips evenly |
| `duty_m1`, `duty_m2`, `duty_m3` | duty composition for methods 1, 2, 3 |
| `dpwm` | 1000-clock counter/compare PWM with 5-bit first-order dither and a look-ahead tick |

## Synchronisation and the table sequencer

The zero-crossing comparator outputs '1' while the input voltage is below
about 10 V, a window of roughly 200 µs around each crossing at 230 V. Its
output is noisy at the edges, so `zc_debounce` changes its filtered level
only after 500 stable clocks (5 µs).

The crossing itself is the centre of the window, and the timing matters
more than one might expect. Starting the tables at the opening edge of the
window, about ten switching cycles early, leaves a volt-second error that
distorts the whole half-period of current: in closed-loop simulation the
power factor fell from 0.985 to 0.80. So `zc_debounce` measures the width of
every window and, when the next one opens, waits half the previous width
before it pulses `sync`. The filter delay appears on both edges of the
window and cancels out. The wait is shortened by `SYNC_LEAD` (500 clocks, half a
switching period) because the sequencer restarts only at the next switching
period after the pulse, on average half a period later. Without this lead
the simulated power factor was 0.955.

The first window after reset has no previous width. It is only measured, so
the first `sync` comes one half-period later. `pfc_top` keeps the gate off
until the sequencer has made its first restart, so the converter never
receives a duty sequence that is out of phase with the mains.

The mains half-period is not exactly 1000 switching cycles. `duty_sequencer`
counts the switching cycles N of each half-period and steps through the
table in the next half-period at DEPTH/N entries per cycle. It does this with
a DDA, so that address(j) = floor(j·1000/N):

- when N > 1000, single entries are repeated (`rep_evt`);
- when N < 1000, single entries are skipped (`skip_evt`);
- either way, the repeats or skips are spread evenly over the half-period.

N is clamped to 500..2000. The address stops at 999 if the next zero crossing
is late. The table restarts at the first switching period after the sync
pulse, 0 to 10 µs later (see `SYNC_LEAD` above).

## The two loops

`vout_monitor` accumulates every ADC sample (100 kS/s, so about 1000 per
half-period). At each sync it freezes the sum, count, maximum and minimum.
The mean comes out of the divider 24 clocks later, together with the
ripple, as `meas_valid`. The first sync after reset only starts the
accumulation. Both regulators update on `meas_valid`:

- average loop: error = mean - `vavg_ref`, with positive gains. When the
  input voltage drops, the output sags, the error turns negative and delta <
  0. Then k < 1, so (1-da)* shrinks, da* grows, and the boost ratio rises.
- ripple loop: error = `vrip_ref` - ripple, with **negative** gains. A larger
  load gives more ripple and so r > 1, scaling up the load-dependent db and
  dc.

`pid_reg` computes

    I     <- clamp(I + KI*e)
    delta <- clamp(I + KP*e + KD*(e - e_prev))      clamp = +-DELTA_LIM

Gains are integers in units of 2^-14 per ADC LSB, and k has 14 fractional
bits. `sat` pulses when the integrator or delta hits the clamp. The
average-loop integral gain KI = 8 (2^-11) and the 14-bit resolution of k
satisfy the no-limit-cycling conditions for this converter: q_k = 2^-14 is
well below the 0.0012 bound, and the integral gain is far below the dynamic
bound.

The default gains of `pfc_top` are:

- average loop: integral only (KP_A = KD_A = 0);
- ripple loop: proportional only (KP_R = -60, so r ≈ 1 + (ripple - ref)·60/2^14).

Both were chosen in closed-loop simulation. The loop gain of the converter
is about 400 V per unit of k. A 2^-9 proportional term therefore gives a
loop gain above 1 per half-period, and it oscillated. An integrator in the
ripple loop winds up, because the measured ripple is not a clean measure of
load: distortion of the input current also raises it. Any converter will
need these gains retuned.

References are inputs in ADC counts. The output divider is 5/500 and the ADC
full scale is 5 V = 1000 counts, so 400 V reads as 800 counts. The nominal
ripple of 2 × 17.6 V reads as about 70 counts.

## Number formats

- **duty_t**: 16-bit signed. It has 11 integer bits in two's complement
  and 5 fraction bits, in DPWM clock counts, so 1.0 = 1000 counts =
  32000 LSB. Every table word and every composed duty uses this format.
- **gain_t**: 18-bit signed with 14 fraction bits (range ±8), used for k,
  1-delta and r. `mul_gain` multiplies a duty value by a gain and truncates
  (floor) back to duty_t units.
- **adc_t**: 10-bit unsigned. **err_t**: 11-bit signed.

The composed duty is clamped to 0 .. 999 31/32 counts.

## Switching-cycle timing

`dpwm` counts 0..999 and holds the gate high while the count is below the
compare value. On the 999 → 0 edge it loads the compare value: the integer
part of `duty`, plus one when the 5-bit fraction accumulator carries. Over 32
periods this gives the mean duty 15-bit resolution. Eight clocks before each
period it pulses `tick`, and the next value is fetched in time:

| clock of period | event |
|-----------------|-------|
| 992 | `tick` |
| 993 | sequencer has the new address |
| 994 | table data read |
| 995 | `duty_m*` output registered |
| 999 → 0 | DPWM loads the compare value; new gate pulse starts |

## Loading the tables

The tables are specific to each converter and are loaded after reset through
`tbl_we`/`tbl_sel`/`tbl_addr`/`tbl_wdata`, one word per clock. With t = i·Tsw
for i = 0..999, ω = 2π·50 Hz, and the nominal values Vg (rms), Vout, P, L, C:

    vg(i)   = √2·Vg·|sin(ωt)|
    vout(i) = Vout - P/(C·2ω·Vout)·sin(2ωt)
    iL(i)   = √2·P/Vg·|sin(ωt)|
    d1      = (vout - vg)/vout
    da      = (Vout - vg)/Vout
    dc = d2 = (L/Tsw)·(iL(i+1) - iL(i))/vout

| method | `tbl_sel` 0 | `tbl_sel` 1 | `tbl_sel` 2 |
|--------|-------------|-------------|-------------|
| 1 | 1-d (d = d1 + d2) | – | – |
| 2 | 1-d1 | d2 | – |
| 3 | 1-da | 1-d1 | dc |

Each value is stored as round(x·32000). `tb/tb_pfc_top.sv` (`make_tables`)
evaluates these formulas for Vg = 230 V, Vout = 400 V, P = 300 W, L = 5 mH,
C = 68 µF and Tsw = 10 µs.

## Parameters of `pfc_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `METHOD` | `METHOD_DADBC` | composition method (1, 2, 3) |
| `CLK_PER_SW` | 1000 | clocks per switching period (100 MHz / 100 kHz) |
| `DEPTH` | 1000 | table entries = nominal switching cycles per half-period |
| `ADC_WINDOW` | 1000 | clocks per ADC sample (100 kS/s), also the full-scale count |
| `DEBOUNCE` | 500 | zero-crossing filter length in clocks |
| `KP_A`, `KI_A`, `KD_A` | 0, 8, 0 | average-loop gains, 2^-14 per LSB |
| `KP_R`, `KI_R`, `KD_R` | -60, 0, 0 | ripple-loop gains |
| `DELTA_LIM` | 16383 | clamp of delta and of the integrators (just below 1.0) |

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/pfc_pkg.sv tb/tb_pfc_top.sv --top-module tb_pfc_top -Mdir obj
    ./obj/Vtb_pfc_top

Replace `tb_pfc_top` with `tb_<module>` to run a block test.
`tb/sd_analog_model.sv` is a behavioural (non-synthesizable) model of the
comparator and RC filter of the sigma-delta ADC, used by `tb_sd_adc` and
`tb_pfc_top`.

`tb_pfc_top` runs the top with every parameter at its default, for 10
mains half-periods (about 12 million clocks, ten seconds). It loads the method-3
tables and generates the rectified mains with comparator glitches. It
generates an output voltage whose mean, ripple and line frequency change
from one half-period to the next: 390 V, heavy ripple, 45 Hz, 55 Hz, and a
sag to 50 V held for three half-periods, long enough to drive the average
integrator into its clamp. The output voltage passes through the ADC model.
The testbench checks:

- the measured mean and ripple;
- k and r against a PID model;
- every composed duty value against the method-3 expression in real
  arithmetic;
- every PWM period against the value it latched.

It also counts syncs, rejected glitches, repeats, skips, dither carries and
regulator clamps, and fails if any of them never happens.

## Closed-loop behaviour

`tb_pfc_closed_loop` closes the loop around `tb/boost_plant_model.sv`, a
behavioural boost converter. The model has an ideal switch and diode,
L = 5 mH, C = 68 µF and a resistive load. It also provides the
zero-crossing comparator and measures the power factor of each half-period.
For each case the testbench computes the tables with the formulas above,
resets the controller and runs 14 to 24 half-periods, under two minutes
in all. All parameters are at their defaults.

| case | input | tables for | load | power factor |
|------|-------|------------|------|--------------|
| A | 230 V | 230 V, 400 V, 300 W | 300 W | 0.985 |
| D | 207 V (−10 %) | 230 V, 400 V, 300 W | 300 W | 0.987, k settles at 0.899 |
| B | 230 V | 230 V, 400 V, 300 W | 221 W | 0.787 |
| E | 230 V | 230 V, 400 V, 300 W | 147 W | 0.678 |
| F | 230 V | 230 V, 400 V, 300 W | 72 W | 0.603, r = 0.85 |
| G | 230 V | 230 V, 400 V, 300 W | 33 W | 0.616, r = 0.78 |
| C | 120 V | 120 V, 300 V, 176 W | 176 W | 0.73 |

`tb_pfc_method1` and `tb_pfc_method2` repeat cases A and B with
`METHOD_D` and `METHOD_D1D2`: both give 0.984 at 300 W and 0.822 at 221 W.
So in this model the simpler methods do slightly better at light load than
method 3, for the reason given below.

The input-voltage correction works as intended. Case D needs k = 0.9 and
the average loop finds it, keeping the output at 400 V.

The load correction does not. With tables made for 221 W, case B reaches
0.98 with both loops off, so the table method itself holds at light load.
Through the ripple loop it reaches only 0.79. The measured peak-to-peak
ripple rises with current distortion as well as with load, so at 221 W r
moves the wrong way (1.09). At 72 W and 33 W the ripple is small enough that
r does fall, but with a proportional-only loop it stays far above the
matching value, and the power factor stays near 0.6. The 120 V design point (case C) is poor even with both loops off,
and the cause has not been found. A run with 2 % third and fifth harmonics
on the mains gave erratic results, alternating between about 0.35 and 0.48
from one half-period to the next. That case was not analysed and is not
part of the test.

## What is not here, and how far to trust it

- **Closed loop only against a model.** The converter model is ideal:
  no losses, no switch or diode drops, no parasitic capacitances. The
  results above show stability and the input-voltage correction. They also
  show that the light-load correction through the ripple loop falls well
  short of a matched table. None of the gains has been tried on hardware.
- **Analog and vendor parts are outside the RTL.** The zero-crossing
  comparator, the comparator and RC filter of the sigma-delta ADC, and the
  clock doubler (50 → 100 MHz) are not included. The top takes the 100 MHz
  clock and the two comparator outputs as inputs, and drives the RC filter
  from `adc_fb_out`.
- **Own choices** where only the function is defined:
  - the debounce filter and its length;
  - the sync at the predicted window centre, with its lead, and the gate
    held off until the first restart;
  - the DDA sequencer and its clamp on N;
  - the counting decimator of the ADC, whose full scale is 1000 counts
    rather than 1024;
  - the divider-based mean;
  - the first-order dither pattern;
  - the loadable tables instead of tables fixed in the FPGA configuration;
  - the PID gains other than KI_A, and the integrator-only and
    proportional-only structure of the two loops;
  - the clamps and truncations;
  - the asynchronous active-low reset.
- **Sign conventions.** The block diagrams of the original method disagree
  on the sign of the average-loop error. This design uses mean minus
  reference with positive gains, the combination that lowers k when the
  input voltage drops. The ripple-loop error keeps reference minus ripple,
  and its gains are negative.
- **Operation at 60 Hz** would need a second set of tables. It is not built.

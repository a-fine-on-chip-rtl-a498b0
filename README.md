# On-line path slack measurement with a coarse PLL phase shift and a fine MUX-chain phase shift

Timing failures from aging and PVT drift can be predicted by measuring, from
time to time in the field, how much slack a few critical paths have left. One
way is a **shadow flip-flop** on the end point of the path. It is clocked by a
**shadow clock** whose phase can be moved. The circuit launches a transition
down the path. The shadow clock edge is then moved until the captured value
changes, and that edge position is the arrival time of the transition.

With a phase-shifting PLL alone, the resolution is the PLL's phase step (about
100 ps). This design adds a second, fine phase shifter after the PLL: a chain
of 2-to-1 multiplexers. Each stage of the chain can route the clock through
one of two wires of slightly different delay, so a 16-stage chain offers 2^16
delays, spread over about 2.3 ns. The search runs in two phases:

1. Move the capture edge **earlier** in coarse PLL steps `dT` until the
   response flips. This takes `n` steps.
2. Move it **later** in fine MUX-chain steps `dt` until it flips back. This
   takes `m` steps.

The slack against the initial capture time is then

    slack = n*dT - m*dt

With `dT = 104 ps`, the reference implementation reports `dt` of about 10 ps.

The MUX chain delays are not known exactly after fabrication. So the chain can
be closed into a ring oscillator and timed against the system clock (the
calibration). The host then picks the select words that make the chain
delay increase in steps of about `dt`.

## Block diagram

```
                 +-------------------+           +---------------------+
  system_clock --+ CLK (phase 0)     |  CLK_PLL  |  mux_chain_unit     |  SCLK
  _gen           +--> phase_pll -----+---------->+ IN           OUT   +-------+
                 |    (coarse_n)     |           | SEL  CAL  COUNT    |       |
                 |                   |           +--^-----^-----+------+       |
                 |                   |   CLK2       |     |     |              v
                 |   +---------------+--------------+-----+-----+---+    +-----------+
   TEST, TRG --->+-->|          meas_controller                     |    | shadow_ff |
   host port --->    |  EN, SEN, SEL, CAL, coarse_n, result, counts |--->| SEN  D_s  |--> Q_s
                 |   +-----^----------------------------------------+    +-----^-----+
                 |         | Q_s (back from the shadow flip-flop)              |
                 +--> CLK, EN to the circuit under measurement --- path end ---+
```

The circuit under measurement and the host are outside the top level,
`online_delay_meas`. The circuit receives `cut_clk` and `cut_en` for its
flip-flops and returns `ds`, the end point of the path under measurement.

## One path delay test

A test is launch-on-capture. The host first puts a pattern into the circuit
(through its scan chain) that makes a rising transition at the path's start
point on the next enabled clock edge. The host then raises `trg`. The
controller (all in the system clock domain, `CLK`):

| CLK edge after `trg` is applied | event |
|---|---|
| 3 | `en` rises (two-flop synchronizer on `trg`, then the edge detect) |
| 4 | first enabled edge: the transition is launched at Q0 |
| 5 | second enabled edge: the circuit's own flip-flop captures; `en` falls |
| 4 + `sen_dly` | `sen_clk` rises for one period |
| next `CLK_PLL` edge | `sen` (retimed by `CLK_PLL`) rises for one `CLK_PLL` period |
| 5 + `sen_dly` + 8 | response `qs`, synchronized, is evaluated |

`sen` lasts one shadow-clock period, so exactly one `SCLK` edge falls inside it.
That edge captures the response. `SCLK` trails `CLK_PLL` by the chain delay
(11.9 ns to 14.2 ns), which is more than a period. So the captured edge is the
one that comes from the `CLK_PLL` edge *before* the `sen` window. `sen_dly`
selects which clock period is used. It must be chosen for the length of the
path and the range to be covered.

With `test = 0` the circuit runs normally: `en = 1`, `sen = 0`, and `trg` is
ignored.

A test takes 1 + 2 (synchronizer) + `sen_dly` + 10 system clock cycles, plus
the host's scan load.

## The slack search

The controller keeps `n` (coarse shifts, sent to the PLL as `coarse_n`) and
`m` (index into the fine table, sent to the MUX chain as `sel = table[m]`). It
advances one step per test. Each test needs a fresh scan load, so the host
pulses `trg` again for each step:

| phase | response | action |
|---|---|---|
| first test | any | E := response; n := 1 |
| coarse | equal to E | n := n + 1 (capture `dT` earlier) |
| coarse | differs from E | m := 1 and go to the fine phase (with `coarse_extra`, also n := n + 1) |
| fine | differs from E | m := m + 1 (capture later by one table step) |
| fine | equal to E | done: `result = {err=0, E, n, m}` |

`n` reaching 96 without a flip ends the search with `err = 1`. So does `m`
reaching `fine_last` without a flip back. At the end, `meas_done` pulses. `n`
and `m` return to 0 and `sel` returns to `table[0]`. The next `trg` then starts
a new measurement. Setting `test = 0` also aborts a search.

**Finding `dt` itself.** The fine step is not exactly the target step used to
build the table. So `dt` is found by measurement:

1. Measure once normally, which gives `(n, m)`.
2. Measure again with `coarse_extra = 1`, so one extra coarse step is taken
   before the fine sweep. This gives `(n+1, m')`.
3. The two results describe the same slack, so `n*dT - m*dt = (n+1)*dT - m'*dt`,
   that is, `dt = dT / (m' - m)`.

The end-to-end testbench does exactly this. It gets `m' - m = 10`, so
`dt = 10.4 ps`, for a table built with 10 ps target steps.

## The shadow clock generator

**Coarse: `phase_pll`** (behavioural). `CLK_PLL` is `CLK` delayed by
`9.3 ns + (96 - n) * 104 ps`. So each step of `n` moves the phase forward by
`dT = 104 ps`, and the capture edge moves earlier by `dT`. This mirrors the
delay-tap chain (2 taps of 52 ps per step, 9.3 ns to 19.3 ns) that the
reference implementation uses in place of a PLL phase shifter.

**Fine: `mux_chain_delay`** (behavioural) inside **`mux_chain_unit`**.

- A redundant MUX selects the input. With `cal = 0` it takes `IN`. With
  `cal = 1` it takes the inverted output, which closes a ring.
- After it come N stages. Stage `i` takes the previous node through two wires:
  delay `d_i0` into input 0 and `d_i1` into input 1. `sel[i]` picks one.
- The delay is `t(sel) = sum_i d_{i, sel[i]}`.

The default wire delays (ps, post-layout values of the reference chain):

| stage i | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| d_i0 | 953 | 975 | 779 | 892 | 596 | 975 | 779 | 892 | 707 | 975 | 778 | 892 | 596 | 975 | 778 | 892 |
| d_i1 | 827 | 869 | 948 | 605 | 707 | 774 | 948 | 718 | 826 | 774 | 843 | 718 | 707 | 869 | 843 | 718 |

They give 11.885 ns at the fastest and 14.243 ns at the slowest. The MUX cells
themselves are modelled with zero delay.

The model also reproduces a small 4-stage example. Its wire delays are
560/400, 540/580, 480/500 and 560/500 ps. For `S0S1S2S3` = 0011, 0010 and 0110
it gives 2.10, 2.16 and 2.20 ns. These are three steps of about 50 ps, with at
most 10 ps error.

**Calibration.** `cal_req` makes the controller hold `cal = 1` for exactly 8192
system clocks with `sel = cal_sel`. While `cal` is high:

- `osc_counter`, clocked by the ring itself, counts ring periods (`COUNT_OSC`);
- `ref_counter` counts system clocks (`COUNT_REF`).

Sixteen cycles after `cal` falls, the controller latches both counts and pulses
`cal_done`. The ring period and the chain delay are

    T_OSC = COUNT_REF / COUNT_OSC * T_CLK
    t(sel) + t_fb = T_OSC / 2          (an inverting ring needs two trips per period)

Here `t_fb` is the delay of the inverter and the redundant MUX. The
reference method removes `t_fb` by using the ratio of simulated delays,
`t(sel) = t_sim(sel) / (t_sim(sel) + t_fb_sim) * (T_OSC/2)`. On-chip
variation affects both paths of this small circuit alike, so the ratio is
robust. In simulation (with `t_fb = 400 ps`) the calibrated delay matches the
model to within about 1 ps.

**Drain step (this design's addition).** While the chain carries the 100 MHz
clock, it holds more than one clock edge in flight. If the ring were closed on
those edges, several of them would keep circulating. The ring would then run
at a multiple of its fundamental frequency; in simulation it ran at three
times. So `mux_chain_unit` first holds the chain input low for 3 reference
cycles. Only then does it close the ring. The counters count a window delayed
by the same 3 cycles, so the window is still exactly as long as `cal`.

## Building the fine table (host side)

The controller only stores the table. The host fills it:

1. Calibrate, giving `t(SEL)` for the select words of interest. The chain's
   extremes are less linear, so the reference implementation drops the 100
   fastest and the 100 slowest of them.
2. Choose `SEL'_0`, the word for the initial phase.
3. For each `K = 1 .. M-1`, set `SEL'_K` to the word whose `t(SEL)` is closest
   to `t(SEL'_0) + K * dt_target`.
4. Write the words with `tbl_we / tbl_addr / tbl_sel`, and set `fine_last = M-1`.

The end-to-end testbench does this search over all 65,536 words, using the
model delays.

Linearity of a table can be judged from
`DNL(k) = 1 - (t(SEL'_k) - t(SEL'_{k-1})) / dt_target` and
`INL(k) = sum_{l=1..k} DNL(l)`.

Repeating a measurement and averaging reduces the effect of clock jitter. This
is also left to the host. The reference figures need more than 4 repetitions
to bring 3 sigma below `dt`.

## Interface of `online_delay_meas`

All inputs are synchronous to `cut_clk`.

| port | dir | width | meaning |
|---|---|---|---|
| `rst_n` | in | 1 | asynchronous reset, active low |
| `test` | in | 1 | 1 = measurement mode, 0 = normal operation |
| `trg` | in | 1 | rising edge starts one path delay test |
| `tbl_we`, `tbl_addr`, `tbl_sel` | in | 1, 6, 16 | write `SEL'_addr` of the fine table (64 entries) |
| `fine_last` | in | 6 | last valid table index |
| `sen_dly` | in | 4 | system-clock period of the `sen` window |
| `coarse_extra` | in | 1 | take one extra coarse step before the fine sweep |
| `cal_req`, `cal_sel` | in | 1, 16 | start a calibration of that select word |
| `cut_clk`, `cut_en` | out | 1 | CLK and EN for the circuit's flip-flops |
| `ds` | in | 1 | end point of the path under measurement |
| `qs` | out | 1 | captured response |
| `sclk` | out | 1 | shadow clock (observation) |
| `result` | out | 15 | `{err, E, n[6:0], m[5:0]}` of the last measurement |
| `meas_done` | out | 1 | one-cycle pulse when `result` updates |
| `cal_done`, `cal_count_osc`, `cal_count_ref` | out | 1, 16, 16 | calibration counts |
| `coarse_n`, `sel` | out | 7, 16 | present phase settings |

## Files

| file | contents |
|---|---|
| `rtl/odm_pkg.sv` | constants (clock, coarse step and range, wire-delay table, calibration length), enums, result struct |
| `rtl/online_delay_meas.sv` | top level |
| `rtl/meas_controller.sv` | test sequencer, slack search, calibration sequencer, fine table (synthesizable) |
| `rtl/shadow_ff.sv` | shadow flip-flop (synthesizable) |
| `rtl/mux_chain_unit.sv` | MUX chain + counters + drain step |
| `rtl/osc_counter.sv`, `rtl/ref_counter.sv` | calibration counters (synthesizable) |
| `rtl/mux_chain_delay.sv` | MUX chain delay model (behavioural) |
| `rtl/phase_pll.sv` | coarse phase shifter model (behavioural) |
| `rtl/system_clock_gen.sv` | 100 MHz clock model (behavioural) |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_online_delay_meas` (end to end) |
| `tb/tb_cut_model.sv` | one-path model of a circuit under measurement (launch flip-flop, delay, capture flip-flop) |

The three behavioural models use delays in ps. They stand for parts that are
layout- or process-specific: a routed MUX chain, a PLL or delay-tap macro, and
an oscillator. In a real implementation, the MUX chain is built from MUX cells
with hand-constrained routing, so that the two wires of each stage differ in
delay. The controller, the counters and the shadow flip-flop are plain
synthesizable RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/odm_pkg.sv \
    tb/tb_online_delay_meas.sv --top-module tb_online_delay_meas -o sim -Mdir obj
./obj/sim
```

`--timing` is required, because the clock and delay models use `#` delays.
Replace the testbench name to run another one.

The end-to-end test runs at full size: 16 stages, 8192-cycle calibrations,
and a 64-entry table built from all 2^16 words. It takes about 20 s. It
covers:

- normal mode;
- three calibrations;
- four slack measurements (one with the extra coarse step);
- one measurement whose slack is beyond the coarse range.

`tb_fine_resolution` builds the table as described above for target steps of
50 ps and 100 ps. It prints DNL and INL, and measures `dt = dT/(m' - m)` on
the running design. With the ideal delay model the measured step equals the
table step: 52 ps and 104 ps. The 10.1 ps resolution reported for silicon at a
50 ps target comes from the real chain, whose calibrated delays differ from
the layout values, and cannot be expected from this model.

`tb_averaging` gives the clock model 13 ps RMS edge jitter (the reference
oscillator is specified at 12.8 ps; the `JITTER_PS` parameter of the top and
of `system_clock_gen` defaults to 0, an ideal clock). It measures one path 64
times and prints the spread of single results and of averages of 2, 4 and 8.
The spread falls from about 16.5 ps to about 6.9 ps. So, as in the reference
evaluation, a few repetitions are needed before 3 sigma drops below the fine
step.

In the end-to-end test, each captured response is compared with the path delay. Each coarse step
must move the capture edge by exactly -104 ps, and each fine step by the
table's delay difference. `n` and `m` must match values predicted from the
first capture time.

## Where this design departs from, or adds to, the reference method

- **Host interface.** The fine table port, `cal_req`/`cal_sel`,
  `sen_dly`, `coarse_extra`, `fine_last`, the `err` flag and the
  one-step-per-`trg` search protocol are this design's own. The reference
  leaves the controller's phase control unspecified.
- **Phase control.** The PLL phase is set by a count `n` rather than by
  increment/decrement commands.
- **Drain step.** It is added before the ring is closed (see above).
- **Ring period.** It is read as two trips round the loop. The calibration
  formula therefore uses `T_OSC / 2`.
- **Widths, depths and delays.** The counter width (16 bits), table depth
  (64), feedback delay (400 ps), synchronizer depths and wait counts are
  choices made here.
- **One end point.** Only one end point and one shadow flip-flop are built.
  Observing several end points would need extra shadow flip-flops or a
  multiplexer in front of `ds`.
- **Retiming boundary.** The `sen` window is placed by retiming a `CLK`-domain
  pulse with `CLK_PLL`. If the coarse shift moves the `CLK_PLL` edge across a
  `CLK` edge, the captured shadow-clock edge jumps by one period. With
  `sen_dly = 0` and the default delays, this happens near `n = 90`. Choose the
  initial phase and `sen_dly` so that a measurement stays clear of it.
- **Not modelled.** Setup/hold windows and metastability of the shadow
  flip-flop. Clock jitter is modelled only as optional independent edge
  jitter of the system clock.
- **Circuit under measurement.** Only a one-path model in the testbenches; the
  reference circuit (an ISCAS89 benchmark with scan) is not included.
- **Lint warnings that stand.** The MUX chain model contains an intentional
  combinational loop (the ring oscillator). The top-level `sclk` and `CLK_PLL`
  clock the counters and the `sen` retiming flop directly.

# Running-variance detector for voltage-drop fault attacks on shared FPGAs

When several tenants share one FPGA, one of them can place thousands of ring
oscillators and switch them on for a few nanoseconds. The current they draw
makes the supply voltage dip across the die. That dip is enough to cause a
timing fault in another tenant's logic, for example in one round of an AES
core, which is what differential fault analysis needs.

An on-chip delay sensor sees such a dip as a sudden change in propagation
delay. The usual way to flag it is a fixed threshold on the sensor reading.
That only works if the sensor's normal reading is known in advance. In a
multi-tenant device it is not: the reading depends on where the sensor was
placed, on process variation and on what the neighbours are doing. Two
identical sensors in one clock region can rest 60 taps apart, and one
sensor's reading under attack can equal another's reading at rest.

This design ignores the reading's level and watches how fast it moves. Each
cycle it computes the **variance of the last four sensor samples** and raises
an alarm when that variance exceeds a fixed **M = 64**. The variance of four
samples does not depend on the baseline. A steep drop inflates it within a
few cycles. Slow drifts, ripple and small resistive steps hardly change it.
The only history it keeps is three 8-bit samples and two sums per sensor.

## Signal chain

```
                 200 MHz detection clock (one sample per 5 ns)
  supply ──► TDC sensor ──► Hamming weight ──► running variance ──► threshold ──► attack_detected
  (slowdown)  128 taps       8-bit count        T = 4 window         > 64
```

Each sensor has its own chain (`detection_module`). The top level
(`vdrop_detect_top`) holds three chains and the attack control unit of the
test harness. The attack control unit runs on a separate 550 MHz clock.

| stage | module | registers | latency |
|---|---|---|---|
| TDC sampling chain | `tdc_sensor` (behavioural model) | 128 | samples at edge e |
| Hamming weight | `hamming_weight` | 8 | `hw` valid after e+1 |
| running variance, sums | `running_variance` stage 1 | 24 window + 10 + 18 + 4 fill tracking | e+2 |
| running variance, result | `running_variance` stage 2 | 16 + 1 valid | `variance` after e+3 |
| threshold | `detection_threshold` | 1 | `attack_detected` after e+4 |

The alarm rises 4 detection cycles (20 ns) after the TDC sample that first
shows the disturbance. Counted from the start of an attack, you also add the
wait for the next sampling edge (0 to 5 ns) and the time the supply takes to
sag. In the end-to-end test this gives 22 to 29 ns. The hardware this design
follows measured 16.4 to 23.6 ns, i.e. 9 to 13 cycles at 550 MHz. That pipeline
was not documented, and the split into stages here is this design's own. If
you need the lower figure, the two variance stages can be merged into one at
some cost in clock frequency.

A chain holds 210 flip-flops: 128 in the TDC, 8 in the Hamming weight, 73 in
the variance and 1 in the threshold. There is one multiplier, for the square
of the 10-bit sum.

## The running variance

For a window of T = 4 samples with sum S1 and sum of squares S2,

```
variance = E(v^2) - E(v)^2 = (T*S2 - S1^2) / T^2 = (4*S2 - S1^2) >> 4
```

Both products are exact integers and `T*S2 - S1^2` is never negative, so the
only rounding is the final floor. With 8-bit samples, S1 needs 10 bits,
S2 needs 18 bits and the numerator 20 bits. The largest possible variance of
values in 0..128 is 64² = 4096, which fits the 16-bit output. Two reference
points are useful for checking:

* a ramp falling 20 per sample gives a variance of exactly 500;
* a ramp falling 2 per sample gives 5. A slow drift is invisible by design.

**Which disturbances trip M = 64.** Suppose the reading jumps by Δ and stays
there. One window then holds one new sample and three old ones, and its
variance is 3Δ²/16. The next window holds two of each, giving Δ²/4. So a
clean step is flagged once Δ ≥ 17 taps (Δ²/4 > 64), and a single one-sample
spike once Δ ≥ 19 taps (3Δ²/16 > 64). In the hardware measurements this
design follows, benign neighbours switching on right next to the sensor
pushed the variance to at most 55. The first variance value after a
reference attack was never below 73. M = 64 sits between the two. M is a
parameter (`THRESHOLD_M`), not a run-time register. It should not need
re-tuning per location, because the variance does not depend on the baseline.

The sums are recomputed from the window every cycle; there is no incremental
add-oldest/subtract-newest. The window is three registers plus the incoming
sample. After reset the window holds zeros. The jump from zero to the
sensor's baseline would look like a huge attack, so `valid` stays low until
four real samples have entered, and the threshold ignores the variance while
`valid` is low. The alarm is not latched: it is high for every cycle in which
the variance is above M. Latching and reporting are left to whatever consumes
`attack_detected`.

The variance used is the population form, with the mean in it. Writing it as
a plain sum of squared deviations would scale every value, and so M, by T.

## TDC sensor model

A TDC (time-to-digital converter) sends the clock down a chain of delay
elements: an initial delay of LUTs, then 128 carry-chain bits. A flip-flop
on every bit samples the chain at the next clock edge. The result is a
thermometer code. When the supply sags, every element slows and the code's
edge moves. On the target FPGA this is a placed-and-routed structure whose
behaviour is timing, not logic. It cannot be written as portable RTL, so
`tdc_sensor` is a **behavioural model** with the real part's clock and
128-bit output:

```
tap i = 1  when  ((INIT_DELAY_PS + (i+1) * ELEM_DELAY_PS) * slowdown) mod T_clk  >=  T_clk / 2
```

Here `slowdown` is an unsigned fixed-point factor, 2¹⁴ = nominal, and it
slows every element alike. The defaults are a 1860 ps initial delay and
10 ps per element. At nominal supply they put the code at mid-scale
(65 of 128 taps). A larger slowdown raises the count, and the real sensor's
weight also rises under attack. A miscalibrated initial delay gives all 0s,
all 1s or a code that wraps past one clock period, as on silicon. The
element delay, initial delay, tap order and the uniform delay per bit are
choices of this model; the real carry chain advances 8 bits per primitive.
For an FPGA build, replace `tdc_sensor` with a placed carry-chain TDC that has
the same ports, minus `slowdown`.

## Attack harness

`attack_control_unit` is the part of the test setup that launches attacks.
The attack circuit is made of ERO nodes. Each node is 20 blocks of
10 enhanced ring oscillators, and the nodes are split into two halves
placed around the sensors and the victim. When `start` arrives while the
unit is idle:

* it latches `n_nodes` and `duration`;
* from the next 550 MHz edge, `en_a` holds ⌈n/2⌉ ones and `en_b` holds ⌊n/2⌋,
  counted from index 0 up;
* both enable vectors stay on for exactly `duration` cycles, then drop
  together.

Requests above 34 nodes are clamped to 34. A duration of 0 does nothing. A
`start` while busy is ignored. The enables come straight from flip-flops.

The two reference attacks are:

* **Short:** 20 nodes for 1 cycle (1.8 ns).
* **Normal:** 34 nodes for 100 cycles.

34 is also the node count built (17 per half), because no larger attack is
used.

The ring oscillators themselves and the AES victim are not part of this RTL.
The oscillators have no logic function, only current draw. The AES core is an
ordinary third-party iterative AES-128 and plays no part in detection. The
top brings the node enables out as `ero_en_a` / `ero_en_b`. It takes the
supply seen by each sensor in as `slowdown[s]`.

## Top level: `vdrop_detect_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_atk`, `rst_atk_n` | in | 1 | 550 MHz clock and synchronous active-low reset, attacker side |
| `atk_start` | in | 1 | launch one attack |
| `atk_n_nodes` | in | 6 | ERO nodes to enable (0..34) |
| `atk_duration` | in | 16 | attack length in 550 MHz cycles |
| `atk_busy` | out | 1 | attack running |
| `ero_en_a`, `ero_en_b` | out | 17 each | node enables of the two attack-circuit halves |
| `clk_det`, `rst_det_n` | in | 1 | 200 MHz clock and synchronous active-low reset, detection side |
| `slowdown[3]` | in | 16 each | per-sensor supply slowdown, 2¹⁴ = nominal (drives the TDC models) |
| `hw[3]` | out | 8 each | Hamming weight per sensor |
| `variance[3]` | out | 16 each | running variance per sensor |
| `var_valid` | out | 3 | variance window filled since reset |
| `attack_detected` | out | 3 | one alarm per sensor |

No signal crosses between the two clock domains. On a real device they
interact only through the power network. The three alarms are kept
separate, so that several sensors can later be used to locate the attacker.

## Files

| file | contents |
|---|---|
| `rtl/vdd_pkg.sv` | shared sizes: 128 taps, 8-bit weight, T = 4, M = 64, 16-bit variance, 34 nodes, clock periods |
| `rtl/tdc_sensor.sv` | behavioural TDC model |
| `rtl/hamming_weight.sv` | 128-bit population count, registered |
| `rtl/running_variance.sv` | two-stage running variance with valid flag |
| `rtl/detection_threshold.sv` | registered `variance > M` |
| `rtl/detection_module.sv` | one sensor's chain |
| `rtl/attack_control_unit.sv` | ERO node enable sequencer |
| `rtl/vdrop_detect_top.sv` | three chains plus the attack control unit |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_attack_campaign` |
| `tb/supply_model.sv` | testbench-only model of the supply droop seen by the three sensors |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_hamming_weight`: all thermometer codes, extremes, random words, one-cycle latency.
* `tb_running_variance`: random streams against an integer reference; the
  500 and 5 ramp values; `valid` after reset and after a second reset.
* `tb_detection_threshold`: sweeps across 64, including 64 itself (not
  flagged) and 65; `valid` gating.
* `tb_attack_control_unit`: short, normal and sweep attacks (10 to 30 nodes,
  1 to 5 cycles). Checks exact on-time, the node split, clamping, zero
  duration and a start while busy.
* `tb_tdc_sensor`: hand-computed codes at nominal supply, ×1.25, ×0.75 (all
  0), ×1.5 (all 1) and ×2 (wrapped).
* `tb_detection_module`: a noisy baseline, a small resistive step, a slow
  drift and ten steep drops. Every cycle's `hw`, `variance` and alarm are
  checked against a reference. It expects exactly 11 alarms: the ten drops
  plus the abrupt end of the drift.
* `tb_vdrop_detect_top` is the end-to-end test at default parameters. It
  uses `tb/supply_model.sv`, which turns the ERO enables into a ringing
  droop. The droop reaches each sensor with its own gain. Each sensor also
  gets its own static offset, so the sensors rest near 14, 65 and 97 taps.
  The model adds noise, an 800 kHz ripple and switchable resistive steps.
  Every output of all three chains is checked every cycle. The test requires:
  every short and normal attack flagged at all three sensors; no alarm from
  the resistive steps or the slow drift; at least one sensor driven to
  0 or 128 taps; a start ignored while busy; and an attack-to-alarm delay at
  sensor 1 within 20 to 30 ns.
* `tb_attack_campaign` runs a scaled-down version of the hardware
  evaluation on the same model:
  * 50 switch-on/off cycles of benign neighbours. The variance peaked at 18
    and no alarm was raised.
  * 400 short and 400 normal attacks, all flagged at all three sensors.
  * A histogram of the short-attack delay at sensor 1: 13 to 17 cycles of
    550 MHz. The measured hardware gave 9 to 13.
  * Detection rates over the 10-to-30-node by 1-to-5-cycle grid. Only the
    weakest point, 10 nodes for 1 cycle, is missed at some sensors.

The supply model's gains and time constants are invented. They were chosen
so that the reference attacks produce variances in the hundreds, as on the
measured hardware. They are not a characterisation of any device, and the
campaign's rates say more about the model than about silicon.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vdd_pkg.sv \
    tb/tb_vdrop_detect_top.sv --top-module tb_vdrop_detect_top -o sim
./obj_dir/sim
```

The same command works for any `tb/tb_<module>.sv`; `-Irtl` lets Verilator
find the modules by name. Every testbench finishes within a few seconds.

## Where this design departs from the measured system

* **Latency.** The pipeline here gives 4 detection cycles from TDC sample to
  alarm, i.e. 20 to 25 ns after the attack starts plus the sag time. The
  measured system gave 16.4 to 23.6 ns.
* **TDC.** The TDC is a model, not a placed carry chain (see above).
* **Choices of this design.** These were not specified and could reasonably
  be made otherwise:
  * the variance width (16 bits);
  * the `valid` gating after reset;
  * the non-latching alarm;
  * synchronous active-low resets;
  * the even ⌈n/2⌉ / ⌊n/2⌋ node split, filled from index 0;
  * the 16-bit duration counter.
* **Not built.** Not built here:
  * the ring-oscillator attack circuit and the AES victim;
  * the vendor debug cores used to read the sensors;
  * a faster-sampling level comparator, which could pair with the variance
    to catch deliberately slow attacks (left open, not specified).
  * a Welford-style incremental variance. It is about half the size but
    reacts more slowly to short drops, so it was not used.

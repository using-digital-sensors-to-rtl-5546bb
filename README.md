# Delay-chain digital sensor for supply and temperature attacks

A chip that is under-powered or overheated, whether by a harsh environment or by
an attacker trying to inject faults, first fails on its longest timing paths.
This design puts an artificial long path on the die, built from the same
standard cells as the logic it protects, and measures every clock cycle how far
a signal edge gets along it. The result is one number per sensor, the
*Average Flip-flop Number* (AFN). It falls when the chip gets slower, whatever
the cause: heat, low voltage or both. An alarm is raised when the AFN drops
below the value measured at the worst operating condition the chip must still
tolerate.

A pair of separate temperature and voltage sensors needs two hard limits, each
set for the worst case of the other quantity. A delay sensor needs only one
limit, and that limit is on the very quantity that decides whether the logic
still meets timing. A hot chip at high voltage, or a low-voltage chip in the
cold, still runs correctly, and this sensor lets it run without an alarm.

The RTL has four parts:

- the sensor itself, a toggle flip-flop driving a tapped buffer chain;
- the AFN monitor, which turns samples of the chain into an alarm;
- a per-sensor threshold calibration, which removes most of the
  sensor-to-sensor spread due to process variation;
- an array of 50 sensors with a common alarm.

## How one sensor measures time

```
            +----+   a0    n0 leading buffers        n1 tapped buffers
 clk ------>| T  |------->[>]-[>]- ... -[>]--+->[>]--+->[>]-- ... --+->[>]--+
 rst ------>| FF |                           |       |              |       |
            +----+                        tap 0    tap 1          ...   tap n1-1
                                            |       |                       |
                                          [DFF 0] [DFF 1]    ...      [DFF n1-1]   (all on clk)
```

- **Edge source.** The toggle flip-flop (`toggle_ff`) inverts `a0` on every
  rising clock edge. So every cycle one edge enters the chain, rising and
  falling in turn.
- **Timing the edge.** The edge runs through `n0` leading buffers, which only
  add delay, and then through `n1` buffers. Each of these also drives a
  sampling flip-flop (`fn_sampler`). At the next clock edge, the flip-flops
  that the edge has reached hold the new value of `a0` ("phase A"). The
  flip-flops it has not yet reached still hold the old one ("phase A-bar").
- **The reading.** The sampling flip-flops are numbered from 0, next to the
  leading buffers. **FN** is the index of the first flip-flop in phase A-bar.
  That equals the number of leading flip-flops that caught the edge.
- **Telling the phases apart.** `a0` toggles on the same edge that samples the
  taps. A sample is therefore in phase A-bar exactly when it equals the new
  `a0`. A priority encoder finds the first such flip-flop.

Some worked readings (FN read with these rules):

| situation | flip-flops 0..k-1 | flip-flop k onward | FN |
|---|---|---|---|
| fast chip, edge reaches flip-flop 30 but not 31 | phase A | phase A-bar from 31 | 31 |
| edge sits right at flip-flop 15, caught in alternate cycles | A | 15 alternates | 15 and 16 in turn, AFN 15.5 |
| slow chip, chain longer than two periods | A up to 12 | A-bar 13..36, A again from 37 | 13 (only the first change counts) |
| very fast chip, edge gets through the whole chain | all A | none | `n1` (saturated) |

Leading buffers and sampled buffers have different jobs:

- The leading buffers set the operating point: they move the edge's reach to
  the middle of the sampled part at nominal conditions.
- The number of sampled buffers sets the range: the chain must show at least
  one phase change over the whole range of conditions the chip will meet.

Both are recalibrated when the design moves to another process. Nothing else
changes.

**Timing of `fn_sampler`:**

- The taps are sampled at clock edge *e*.
- FN is registered at edge *e+1*.
- After reset, `fn_valid` stays low for the first two edges and is high from
  the third edge on. The samples taken at the first edge see no launched edge
  yet.

## From FN to an alarm: the AFN monitor

A single FN is noisy near a flip-flop's sampling window. `afn_monitor` adds
FN over `WINDOW` consecutive valid cycles, in non-overlapping windows. The
window is 9 cycles for the 45 nm sensor and 20 for the FPGA array.

The sum is kept as it is and never divided. It is the AFN times `WINDOW`, so
a value such as 15.5 stays exact. The threshold is held in the same units, so
the comparison needs no divider:

- At the clock edge that takes in the window's last FN:
  - `afn_sum` is updated;
  - `afn_valid` pulses for one cycle;
  - `alarm` is set to `afn_sum < threshold_sum`.
- The alarm is a level. It holds until the next window ends.
- The comparison is strict. A sensor that reads exactly its threshold AFN is
  running at the worst allowed condition, not beyond it.

The default threshold is AFN 17. That is 153 in sum units for a 9-cycle
window and 340 for a 20-cycle window.

## Calibration against process variation

Two sensors of the same design, on the same die and in the same conditions, can
read quite different AFNs: a few units apart on an FPGA. A single
chip-wide threshold then makes some sensors raise false alarms and others miss
real ones.

`afn_calibrator` gives each sensor its own threshold. The procedure:

1. Hold the chip at the worst-case condition it must tolerate.
2. Pulse `cal_start`.
3. The calibrator throws away the window in progress. That window may have
   begun before the condition was applied.
4. It adds up the next `CAL_REPEATS` window sums (100 by default).
5. It loads their average, rounded to the nearest sum unit, as the sensor's
   threshold.

The outputs during and after calibration:

- `cal_busy` is high from the edge after `cal_start` until the new threshold
  is loaded.
- `cal_done` stays high after the load, until reset.
- Until the load, the monitor keeps using the previous threshold. After reset
  that is the fixed AFN 17.

With a constant condition, calibration takes `CAL_REPEATS + 1` windows. That
is 101 × 20 = 2020 cycles for the FPGA array.

The divide by `CAL_REPEATS` is a constant divide, done once per calibration. It
synthesises to a combinational divider, 17 bits by 7 bits at the FPGA size. If
that is too costly, a shift-and-subtract sequencer can replace it without
changing the interface.

## The array (`sensor_array`, the top)

The top holds `NUM_SENSORS` independent `sensor_channel`s. Each channel is one
sensor with its monitor and calibrator. All channels share:

- the clock and reset;
- `cal_start`, so the whole chip is calibrated at once, under one condition.

Each channel has its own chain, so its own process variation (its `SEED` in
the model). The top brings out every channel's:

- raw samples;
- FN;
- window sum, `afn_valid` and threshold;
- alarm.

It also summarises the alarms:

- `alarm_any`, the OR of all alarms;
- `alarm_count`, how many sensors are alarming. This shows how uniformly the
  sensors decide.

Both summaries are registered one clock after the alarms. Also at the top:

- `cal_busy`, set while any sensor is still calibrating;
- `cal_done`, set once every sensor has calibrated.

All channels reset together, so their windows end on the same clock edge.

### Parameters

| parameter | `sensor_array` default | sensor-level default | meaning |
|---|---|---|---|
| `NUM_SENSORS` | 50 | - | sensors in the array |
| `N0` | 70 | 9 | leading buffers |
| `N1` | 32 | 43 | tapped buffers and sampling flip-flops |
| `WINDOW` | 20 | 9 | cycles per AFN |
| `AFN_THRESHOLD` | 17 | 17 | threshold before calibration, AFN units |
| `CAL_REPEATS` | 100 | 100 | measurements averaged by a calibration |

The top's defaults are a 50-sensor FPGA implementation. The sensor-level
modules default to a 45 nm standard-cell sensor. All these constants are in
`sensor_pkg`. Derived widths:

- FN has `$clog2(N1+1)` bits.
- A window sum has `$clog2(N1*WINDOW+1)` bits.

## The buffer chain is a model, not logic

The buffers' propagation delay is the quantity being sensed. For that reason
`delay_chain` is a **behavioural model**, not synthesizable logic:

- Every edge that enters the chain reaches tap *j* after the sum of the delays
  of buffers 0 to `N0`+*j*. This is a transport delay: several edges can be in
  the chain at once.
- For speed, the model does not keep each buffer's output. Each launched edge
  is a process that walks down the chain and updates the taps as it reaches
  them.
- The buffer delays are taken from `pvt_env_pkg` when the edge is launched:
  - `buffer_delay_ps` is a chip-wide variable, the nominal buffer delay at the
    current voltage and temperature. A testbench raises it for a hot or
    under-powered chip and lowers it for a cool or over-powered one.
  - Process variation multiplies this delay by two factors drawn from the
    instance's `SEED` by a fixed integer hash: one per sensor (±3 % by
    default) and one per buffer (±2 %).
- Rising edges can be made slower than falling ones (`RISE_FALL_PERMILLE`,
  0 by default), as in real buffers. When the edge's reach falls between the
  two, FN alternates between neighbours from cycle to cycle. The flip-flop
  between them then samples the same value every cycle, and the AFN lands on
  a half, such as 15.5.
- Delays are rounded to an even number of picoseconds. With an odd clock
  period no tap ever changes on a sampling edge.
- The model has no setup/hold window and no metastability: a flip-flop samples
  a tap exactly. Under a constant condition every cycle gives the same FN,
  or two alternating ones with a rise/fall asymmetry. Real sensors, which
  have noise and metastability, also give readings such as 16.89.
- The model does not say how voltage and temperature map to delay. A given
  (V, T) point cannot be reproduced; only delays can.

Everything else is synthesizable:

- `toggle_ff`
- `fn_sampler`
- `afn_monitor`
- `afn_calibrator`
- the wiring modules `digital_sensor`, `sensor_channel` and `sensor_array`

To build a real sensor, replace `delay_chain` with a netlist of `N0 + N1`
buffer cells. On an FPGA these are LUT-based buffers. Several implementation
points matter:

- Keep the buffers from being optimised away, for example with dont-touch or
  keep attributes.
- Place each chain compactly, as one block.
- Leave the path from the toggle flip-flop through the chain to the sampling
  flip-flops out of timing closure: it is meant to fail timing.
- Clock the sampling flip-flops from the same clock tree as the logic being
  protected.
- `fn_sampler` has no synchroniser. In silicon, FN is computed from samples
  that may be metastable for a fraction of a cycle, and the averaging absorbs
  that. Adding a second sampling rank would cost one cycle and change nothing
  else.

## Files

`rtl/`:

| file | contents |
|---|---|
| `sensor_pkg.sv` | configuration constants and width functions |
| `pvt_env_pkg.sv` | environment model: nominal buffer delay, process-variation hash, per-buffer delay |
| `toggle_ff.sv` | edge source |
| `delay_chain.sv` | behavioural buffer chain |
| `fn_sampler.sv` | sampling flip-flops and FN priority encoder |
| `digital_sensor.sv` | toggle flip-flop + chain + sampler |
| `afn_monitor.sv` | window sums and threshold alarm |
| `afn_calibrator.sv` | threshold calibration |
| `sensor_channel.sv` | one sensor with its monitor and calibrator |
| `sensor_array.sv` | the top: 50 channels, `alarm_any`, `alarm_count` |

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`. Each
one prints `TB_RESULT checks=N failures=M` and stops itself through a
watchdog. The expected values come from the testbench's own arithmetic. For
example, the expected FN is the number of taps whose summed buffer delays are
below the clock period.

| testbench | what it covers |
|---|---|
| `tb_toggle_ff` | reset value, toggling every cycle, reset in mid-run |
| `tb_delay_chain` | arrival time of every tap, ±1 ps, for three delays and two seeds |
| `tb_fn_sampler` | random phase patterns; no phase change; a second phase change |
| `tb_digital_sensor` | FN against the chain model over six delays: saturation, a second phase change, FN falling as delay rises, `fn_valid` latency |
| `tb_afn_monitor` | window sums with idle cycles; alarm at threshold, just above and just below it; one-cycle `afn_valid` timing |
| `tb_afn_calibrator` | default threshold; discarded first window; rounded average of 100 random sums; busy/done |
| `tb_sensor_channel` | a full sensor from fast to slow; calibration at a worst case (101 windows); alarms after calibration |
| `tb_sensor_array` | the whole array at its default size (50 × (70+32)), see below |
| `tb_sensor_characterization` | four sample readings of two dies: AFN 31, 13, 15.5 and 31.5, with rising edges 2 % slower than falling ones; per-cycle FN by edge direction; the constant flip-flop of a half-integer reading |

`tb_sensor_array` runs the full-size top with no parameter changes. It checks
every sensor's sum and alarm, and the summaries, in six conditions:

- **Fast chip:** FN is saturated, nobody alarms.
- **Near the fixed threshold:** 24 of 50 sensors alarm, which is process
  variation at work.
- **Slow chip:** everybody alarms.
- **Very slow chip:** a second phase change appears.
- **Calibration at a worst-case delay:** every sensor's threshold must become
  its own reading there.
- **After calibration:** the worst case raises no alarm, and the smallest
  slower delay makes all 50 sensors alarm.

The calibration and the two after-calibration conditions show what
calibration is for: uniform decisions. The testbench counts each of these
mechanisms and fails if one never happens. It takes a few seconds.

## Simulating

Verilator 5 with `--timing` is needed for the chain model's delays. The packages
must come first. From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/sensor_pkg.sv rtl/pvt_env_pkg.sv tb/tb_sensor_array.sv \
    --top-module tb_sensor_array
./obj_dir/Vtb_sensor_array
```

Swap the testbench name to run any other test. Every file sets
`` `timescale 1ps/1ps ``, so delays are in picoseconds.

To change a configuration, override the top's parameters. For example, a
16-sensor array of the 45 nm size is
`sensor_array #(.NUM_SENSORS(16), .N0(9), .N1(43), .WINDOW(9))`.

To model an operating condition, set `pvt_env_pkg::buffer_delay_ps` from a
testbench. The chain picks up the change with the next launched edge.

## Choices made in this RTL

These points are this design's own choices, not fixed by the sensor's
definition:

- Flip-flops are numbered from 0.
- The phase of a sample is decided against the toggled `a0`.
- Only the first phase change counts.
- FN saturates at `N1` when no flip-flop is in phase A-bar.
- Reset is synchronous and active high. It clears `a0` and every register.
- AFN is carried as a window sum.
- Windows do not overlap.
- The alarm is a level, updated at every window end, not sticky.
- The calibration discards the first window, rounds to nearest, and starts on
  all sensors at once.
- `alarm_any` and `alarm_count` are extra outputs of the array.
- The delay model is this design's own: even-picosecond delays, the hash-based
  process factors with their ±3 % and ±2 % spreads, and no metastability.

The sizes, the threshold of 17, the 100-measurement calibration and the
rule "alarm when slower than at the worst case" follow the sensor's published
characterisation.

Not provided:

- the supply and clock sources;
- a mapping from voltage and temperature to buffer delay;
- any readout interface beyond the raw ports (such as a bus or registers).

# Intelligent trigger units for a data acquisition system

A data logger that watches mains voltage or a biomedical signal produces large amounts of
data, and most of it is uninteresting. This design contains two trigger units. Each decides
*which* samples are worth keeping:

- **The derivative trigger** is synthesizable logic for a small FPGA. It digitises the signal
  with a 12-bit successive-approximation converter and computes how fast the signal changes
  from one sample to the next. It then keeps only the samples selected by one of two rules:
  - **high-slope rule**, `|dV/dt| >= β1`: record when something abrupt happens (dips, spikes,
    oscillatory bursts);
  - **low-slope rule**, `|dV/dt| <= β2`: record only the undisturbed parts of the waveform, and
    drop a fixed window around each disturbance.
- **The analog transient detector** is a behavioural model of an op-amp circuit. It gives a
  fixed 1 ms impulse whenever the signal leaves a ±α band around a disturbance-free version of
  itself. The impulse can trigger any ordinary recorder.

The two units can do the same job as alternatives, both catching transients. They can also
work as a complementary pair: the analog unit catches transients while the digital unit
records only the clean signal.

## The derivative trigger (`fpga_apparatus`)

```
          +---------+  sample  +-------+  d   +---------+ |d| +---------+ store/trig +----------+
 comp_i ->| conv_ad |--------->| deriv |----->| abs_val |---->| control |----------->| cntrlmem |-> data_o, we_o, trig_o
          +---------+   (12b)  +-------+ (13b)+---------+(12b)+---------+            +----------+
               |                                          lvl_i, win_i, mode_i
               +--> dac_code_o (to external D/A converter)
```

### What the threshold means

The derivative is the first difference of successive samples, `d[n] = x[n] - x[n-1]`, in
converter codes. The sampling period is fixed, so a slope in volts per second becomes a
threshold in codes:

    LVL = β · Ts / LSB,   Ts = 60 µs,   LSB = 5 V / 4096 = 1.22 mV   (input range ±2.5 V)

For example, β = 2583 V/s gives LVL = 126.96, so 127. A 50 Hz sine of 2.5 V peak changes by at
most 32 codes per sample. It therefore never crosses that threshold unless a disturbance rides
on it. The window is set in samples: 5 ms / 60 µs gives WIN = 83.

Because only the slope is tested, sensitivity depends on where in the cycle a transient lands.
A transient adds to the sine's own slope near a rising zero crossing and partly cancels it near
a falling one. The analog unit does not have this property.

For a sinusoidal transient of amplitude B and duration Tp, starting at sine phase γ on a sine of
amplitude A and frequency f, the onset is caught when

    B >= β·Tp/(2π) − A·f·Tp·cos γ

Take A = 1.4 V, f = 50 Hz, Tp = 14 ms and β = 540 V/s (LVL = 27). The smallest B caught is then
0.22 V at a rising zero crossing and 2.18 V at a falling one. `tb_sensitivity` sweeps 12 phases
and 6 amplitudes and reproduces this pattern:
- The unit's onset triggers agree with the formula wherever B is more than 25 % away from the
  bound.
- Later in the transient, the transient's falling half can add to the sine's slope. That can
  trigger even below the bound.

`tb_fpga_apparatus` and `tb_das_top` compare the unit with an exact sampled model, not with this
formula.

### How `control` decides (the part to read carefully)

Each sample `x[n]` gets one decision, made from `|d[n]|`. An *event* is `|d| >= LVL` under the
high-slope rule and `|d| > LVL` under the low-slope rule. An event loads a window counter with
`WIN-1`; every later sample without an event counts it down. A window of 0 acts as a window of
1.

| mode (`mode_i`) | sample is stored when | meaning of WIN |
|---|---|---|
| `MODE_HIGH_SLOPE` (0) | it is an event, or the counter is not yet 0 | record length: the triggering sample and WIN-1 after it. A new event restarts the window. |
| `MODE_LOW_SLOPE` (1) | it is not an event and the counter is 0 | discard window: the offending sample and WIN-1 after it are dropped. Any new event restarts the window. |

`trig_o` marks the first stored sample of each run. A recorder uses it as its trigger point and
sets its own pretrigger. `mode_i` can change while the unit runs: the window counter carries
over, and the next decision uses the new rule.

For example, in high-slope mode with WIN = 83: a 6 ms dip starting at a peak causes an event at
its leading edge, which opens an 83-sample record. The trailing edge, 100 samples later, opens a
second record, so there are two runs with a `trig_o` each. In low-slope mode the same edges each
blank 83 samples, and everything else is written.

### Converter and timing (`conv_ad`)

Only the digital half of the converter is here. The D/A converter, the comparator and the
sample-and-hold are outside the FPGA and connect through `dac_code_o`, `comp_i` and
`conv_busy_o` (hold while high).

With a 1 MHz clock, every 60 clocks:

| clock after start | event |
|---|---|
| 0 | `busy` rises; trial code = MSB set |
| 1 … 12 | one bit decided per clock: the bit is kept if `comp_i` = 1 (input above D/A) |
| 12 | `sample_valid` pulse, code available |
| 13 / 14 / 15 | difference, magnitude, decision |
| 16 | `we_o` strobe with `data_o` (the sample) and `trig_o` |

Codes are offset binary: 0 is -2.5 V and 4095 is +2.5 V - 1 LSB. The result is the largest code
whose D/A level lies below the input.

### Memory interface (`cntrlmem`)

The samples are recorded by an external instrument, a logic analyser in the original set-up.
`cntrlmem` holds each sample until its decision arrives. For a kept sample it drives `data_o`
with a one-clock `we_o`; `stored_o` counts the writes. There is no on-chip sample memory.

### Size

The unit uses 122 flip-flops. With the observation outputs (`stored_o`, `hit_o`, `dec_valid_o`)
left unconnected, it needs 55 pins. That fits a small FPGA of the XC4000 class, which has 1120
flip-flops and 61 user I/O.

## The analog transient detector (`analog_trigger`, behavioural model)

The model has to answer: did the signal depart from what it *should* be? The reference `Vr(t)`
comes from the signal itself, through a low-pass filter (first order, -3 dB at 70 Hz). At
50 Hz that filter has gain 0.814 and lags by 35.5° (1.97 ms). A first-order all-pass filter
applies exactly that gain and lag to the direct path:

    fa = 50 / tan(atan(50/70) / 2) ≈ 156 Hz,   K = 1/sqrt(1 + (50/70)²) = 0.814

For a clean 50 Hz sine the two paths therefore cancel. A fast disturbance passes the all-pass
path at full size (times K) and is mostly removed from the reference. Unlike a
previous-cycle comparison, a disturbance that repeats every cycle is still seen.

```
V ─┬─ all-pass ─┐
   │            ├─ diff amp ×3 ─┬─ comparator (> +0.6 V) ─┐
   └─ low-pass ─┘  (Vr)         └─ comparator (< -0.6 V) ─┴─ OR ─ monostable (1 ms) ─ impulse_o
```

A gain of 3 and comparator thresholds of ±0.6 V make α = 0.2 V. The circuit is meant for 50 Hz
sines of 2–7 V peak-to-peak. The monostable is not retriggerable, so every detection gives the
same 1 ms impulse whatever the disturbance looks like.

The filters are simulated in discrete time, with a 1 µs step (`DT_NS`). The low-pass filter uses
an exponential update; the all-pass uses the bilinear transform, prewarped. Ports carry `real`
volts. These modules, and the top that contains them, are simulation models, not hardware.

## Top level (`das_top`)

`das_top` places `fpga_apparatus` and `analog_trigger` side by side, and they share no signal.
In a real set-up both watch the same input: the digital unit through its converter (`comp_i`),
the analog unit directly (`vin_i`). All ports of both units are brought out. To synthesize,
take `fpga_apparatus`.

## Files

| file | content |
|---|---|
| `rtl/das_pkg.sv` | sample and difference types, trigger-mode enum |
| `rtl/conv_ad.sv`, `deriv.sv`, `abs_val.sv`, `control.sv`, `cntrlmem.sv` | digital blocks |
| `rtl/fpga_apparatus.sv` | digital unit |
| `rtl/lowpass_filter.sv`, `allpass_filter.sv`, `diff_amp.sv`, `comparator.sv`, `monostable.sv` | analog behavioural models |
| `rtl/or_gate.sv` | the OR of the two comparators |
| `rtl/analog_trigger.sv` | analog unit |
| `rtl/das_top.sv` | both units |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/sar_analog_model.sv` | sample-and-hold, ideal 12-bit D/A converter and comparator for the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog and compares against
values it computes itself:
- `tb_control` uses a distance-to-last-event formulation instead of a counter.
- `tb_fpga_apparatus` and `tb_das_top` quantise, difference and decide every sample
  independently, then compare each write and its latency.

`tb_das_top` runs the whole design at its default sizes for 420 ms of signal. That signal holds
a dip, a burst, a mode switch and three periodic notches. The testbench counts each mechanism
and requires every one to occur. It finishes in well under a second. `tb_sensitivity` runs the
phase sweep described above and takes about 2 s.

```
verilator --binary --timing --assert -y rtl -y tb rtl/das_pkg.sv tb/tb_das_top.sv --top-module tb_das_top
./obj_dir/Vtb_das_top
```

`-y rtl -y tb` lets Verilator find each module in the file of the same name. Only the package
has to be named. To run another testbench, substitute its name.

## Parameters to change

- `SAMPLE_CYCLES` sets the clocks per sample. Scale it with the clock: at 1 MHz, 60 clocks give
  60 µs. It must exceed 13.
- `COUNT_W` is the width of the write counter.
- `LVL` and `WIN` are run-time inputs of 12 bits each.
- Analog model: `LP_FC_HZ`, `MATCH_HZ`, `GAIN`, `VTH_V` (= GAIN·α), `PULSE_NS`, `DT_NS`.

## What is assumed, and how far to trust it

These are the design's own choices. The source description names the blocks but leaves these
details open:
- The clock rate (1 MHz) and the one-bit-per-clock converter timing.
- The offset-binary coding, and the use of only one external comparator.
- The first-difference derivative.
- Using WIN as the record length in high-slope mode.
- The mode as a run-time input. The original reprogrammed the FPGA for each rule.
- The memory handshake (`we_o` and `trig_o`).
- Resets: asynchronous, active low.
- First-order filters, the ±12 V rail of the amplifier, and the 1 ms impulse width. The width
  is estimated from the 1 MΩ / 1 nF timing parts.

The analog model reacts within one 1 µs step. The built circuit showed a delay of about 1 ms
between a transient and its impulse, and the model does not reproduce that delay.

The digital blocks are exercised against independent reference models, including a randomised
run of both rules. The analog models are checked for gain and phase at 10 Hz–1 kHz, and for
detecting dips, spikes, bursts and notches at 2 and 7 V peak-to-peak while ignoring a 0.1 V
step. They have not been checked against measurements of the real circuit.

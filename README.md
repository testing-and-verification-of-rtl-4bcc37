# Digital closed-loop PA power controller

A handset transmitter must ramp the power amplifier (PA) up at the start of every
transmit burst, hold a precise power level through the burst, and ramp it down again,
all within tight spectrum and timing masks. This design is the digital part of such a
controller (PAC). A programmable sequencer times the burst. A programmable ramp
profile gives the power that is wanted at each moment. A feedback loop, running at
4.875 MHz, compares the wanted power with a detector reading from an ADC. It
integrates the error and drives a 10-bit DAC, whose voltage controls the PA.

Everything that is analog stays outside this RTL: the DAC, its output switch, the RC
filter, the PA, the coupler and detector, and the ADC. The top module `pac_top`
brings out what they need: the DAC code, DAC power-on, the clamp control for the DAC
output switch, and the ramp magnitude for an older external analog controller. It
takes the 8-bit ADC sample in, one per clock (the converter itself, which delivers
its result as a serial bit stream, is outside too). All settings are written over a four-wire serial
interface by a DSP.

## The loop

```
ramp_store -> lpf_integrator --(+)--> integrator_limiter -> dac_gain -> power_shaper -> DAC code
                                 ^ (-)                         |
                                 |                             +-- (digital loop back)
                             adc_gain <------ ADC sample <------+
```

One loop sample is taken on every clock. Each stage works as follows:

| Stage | What it does | Settings |
|---|---|---|
| `ramp_store` | Plays a 32-entry profile of (magnitude, duration) pairs | 10-bit magnitude, duration 1 to 64 tics |
| `lpf_integrator` | Low-pass filter `A z^-1/(1-(1-A) z^-1)` while Ramp Enable is high. Integrator `-A z^-1/(1-z^-1)` after it falls. | A = 10, 8, 7 or 6 /128 |
| `integrator_limiter` | Accumulates reference minus feedback. Held at 0 or below and at a 14-bit limit or above. | limit 0 to 16383 |
| `dac_gain` | Forward gain | 1/64, 3/128, 1/32, 3/64, 1/16, 3/32, 1/8, 3/16 |
| `power_shaper` | Piecewise-linear gain that rises with level, to offset the PA flattening near saturation | g = 8, 12, 16, 20; three thresholds of 0 to 992 in steps of 32 |
| `adc_gain` | Feedback gain | 3/4, 7/8, 1, 9/8, 5/4, 3/2, 7/4, 2 |

Integration after Ramp Enable falls turns the ramp-down into straight segments. Each
ramp entry played after the fall sets the slope of one segment, so the falling edge
is piecewise linear and needs few entries. The integrator output is clamped at zero.

The power shaper computes, with the thresholds t1 <= t2 <= t3:

```
y = x                                                    x <= t1
y = t1 + (x-t1) g/4                                      t1 < x <= t2
y = t1 + (t2-t1) g/4 + (x-t2) g/2                        t2 < x <= t3
y = t1 + (t2-t1) g/4 + (t3-t2) g/2 + (x-t3) g            x > t3
```

It works on the exact product of the DAC gain and truncates to whole DAC steps only at
its output, where it saturates at 1023.

### Number formats, and why the typical settings saturate

This is the part that most needs care when choosing settings. The unit is the *nit*,
one DAC step (2.1 V / 1024, about 2.05 mV above the 0.3 V pedestal).

| Signal | Format |
|---|---|
| Ramp magnitude, DAC code | 10-bit whole nits |
| Ramp filter output, integrator, limit | 14 bits, 4 fraction bits (Q10.4) |
| DAC gain output | Q10.11: the product is kept exact |
| Feedback (ADC gain output) | signed Q.4; an ADC sample is shifted up by 4 bits |

With 4 fraction bits, a limit of 16383 drives the DAC to full scale at a forward gain
of one. The DAC voltage for a limit L is therefore `0.3 V + L/16383 x 2.1 V`. The
consequence is that in closed loop the DAC sees the integrator divided by 16 *and*
multiplied by the DAC gain.

The settings quoted as typical for this controller are:

- limit 12800
- DAC gain 1/16
- ADC gain 1
- A = 1/16
- shaper g = 8, with thresholds 400, 450 and 500

With these settings the DAC can reach at most 12800 / 16 / 16 = 50 nits (about
0.4 V). The loop can only settle if the detector reading reaches the ramp level
first. Otherwise the integrator parks at its limit.

The end-to-end testbench runs those settings exactly as given. It checks that the
DAC sits at 50 nits with the integrator at its limit. It then runs a second burst
with gains that let the loop close on its PA model:

- DAC gain 3/16
- limit 16383
- shaper g = 20 above 32 nits

Thresholds can only be multiples of 32 (register field x 32), so 400, 450 and 500
cannot be set exactly.

The same scale bounds the loop. The integrator tops out at 16383, and the largest DAC
gain is 3/16. So with the shaper at unity the DAC reaches at most
16383 / 16 x 3/16 = 192 nits, about 0.69 V. That is below the roughly 0.9 V where a
typical PA starts to respond, so a loop that drives the PA relies on the shaper's
gain above a low threshold.

A loop-back check at DAC gain 1/16 with a 250-nit step would need an integrator
value of 64000. It therefore stops at 64 nits. Choose the DAC gain and shaper so
that `plateau x 2048 / k <= 16383`, with k the gain in 128ths, or let the
shaper supply the rest.

The scale was chosen so that these behave as specified:

- the integrator limit gives the output `0.3 V + L/16383 x 2.1 V` at unity forward gain
- the forward and feedback gain tests give DAC slopes of `error x gain` nits per clock

The 192-nit bound and the 64-nit loop-back limit are consequences of that choice.

## Burst timing: sequencer and ramp store

The sequencer (`ifs`) is a 64 x 16 RAM holding 32 states:

- Word 2s is the level of the 16 control outputs in state s.
- Word 2s+1 is the duration of state s.
- A state lasts `duration[14:0] + 1` tics.
- Duration bit 15 sends the sequencer back to state 0 when the state ends.
- After state 31 it wraps to state 0 anyway.

The sequencer runs only while `PAC_CTRL.run` is set. When stopped it sits in state 0
with all outputs low.

Four sequencer outputs drive the controller:

| Bit | Signal | Effect |
|---|---|---|
| 0 | Tx Enable | brought out as `tx_en` |
| 1 | PAC Enable | Powers the DAC (`dac_power`). Clears the filter, integrator and ramp state while low. |
| 2 | Ramp Enable | Its rise starts the ramp profile. Its level selects low-pass or integrator mode. |
| 3 | Calibration Enable | While it and PAC Enable are high, the ADC sample is copied into `MON_ADC` every clock. The last one stays. |

A *tic* is the 2.166 MHz sequencer period (0.4615 µs). There is only one clock.
`tic_gen` turns it into a tic enable on 4 of every 9 clocks (4.875 x 4/9 = 2.1667 MHz).
Tics are therefore 2 or 3 clocks apart and average 2.25 clocks.

The ramp store plays from entry 0 when Ramp Enable rises. Each entry lasts
`duration + 1` tics:

- The *latched* entry (`RAMP_CTRL[4:0]`) is held for as long as Ramp Enable stays high. This is the plateau of the burst.
- When Ramp Enable falls, the entries after it play out. These are the ramp-down slopes.
- After the *last* entry (`RAMP_CTRL[9:5]`) the output is 0.

A typical profile is
`[364,26] [380,7] [370,1]* [72,9] [114,10] [228,9] [576,10]`, with the third entry
latched. In it the first two entries form the ramp-up, the plateau is 370 nits, and
the last four are ramp-down slopes. The ramp magnitude also leaves on `ramp_mag` for
an external controller.

## DAC output clamp

Powering the DAC on with PAC Enable causes an overshoot. The PA must not see it. The
DAC output switch is therefore kept clamped to 0 V from PAC Enable until the first
Ramp Enable rise. `dac_switch_ctrl` does this with one flip-flop:

- The flip-flop is set by the Ramp Enable rise and cleared while PAC Enable is low.
- `dac_clamp = NAND(PAC Enable, flip-flop)`.
- The clamp opens in the clock where the rise is seen.
- Later Ramp Enable pulses in the same burst do not close it.

## Register access

Serial frames (`dsp_ctrl_if`), MSB first:

```
ctl    ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
cdata       X X A7..A0 R W A I X X | D15..D0 | D15..D0 ...
rdata                              | Q15..Q0 | ...          (reads)
```

- `cdata` is sampled on `sclk` rising edges.
- Read data changes after the rising edges, so the DSP samples it on falling edges.
- With the index flag I set and `ctl` kept high, each further word goes to, or comes from, the next address.
- The A flag is only reported, on `status.last_a`.
- The serial lines pass through two-flop synchronisers, so `sclk` must be at most clk/8.

Register map (`pac_regfile`):

| Address | Register | Contents | Reset |
|---|---|---|---|
| 0x00-0x3F | IFS | sequencer RAM | not reset |
| 0x40-0x5F | RAMP | magnitude [15:6], duration-1 [5:0] | not reset |
| 0x60 | PAC_CTRL | See below. Each gain or coefficient field selects from the lists in the loop table above, 0 being the first. | 0x0A20 |
| 0x61 | LIMIT | [13:0] integrator limit | 12800 |
| 0x62 | SHAPER | t1 [4:0], t2 [9:5], t3 [14:10], each x 32 nits | all 31: 992 nits, so unity gain below that |
| 0x63 | RAMP_CTRL | latched entry [4:0], last entry [9:5] | 2, 6 |
| 0x64 | GPIO_DIR | 1 = output | 0 |
| 0x65 | GPIO_INV | 1 = inverted | 0 |
| 0x70 | MON_ADC | calibration capture (read only) | 0 |
| 0x71 | MON_INTEG | integrator (read only) | |
| 0x72 | MON_DAC | DAC code (read only) | |

PAC_CTRL fields:

| Bits | Field |
|---|---|
| [0] | run |
| [2:1] | DAC source: 0 loop, 1 ramp store, 2 GPIO inputs |
| [3] | digital loop back |
| [4] | ADC bipolar |
| [6:5] | LPF A |
| [9:7] | DAC gain |
| [12:10] | ADC gain |
| [14:13] | shaper g |

Test modes:

- **Digital loop back:** the DAC gain output replaces the ADC sample, which closes the loop without any analog parts.
- **Ramp store to DAC:** the profile is sent to the DAC as it is played.
- **GPIO inputs to DAC:** the DAC test sets one line at a time.
- **Bipolar ADC:** the sample is read as two's complement.

GPIO lines configured as outputs carry sequencer outputs 0 to 9, after the optional
inversion. This lets the burst timing be checked on a scope.

## Where this design goes its own way

- **Delay in the inner loop.** The integrator is a register, so the inner loop (integrator, DAC gain, loop back, ADC gain) has one clock of delay. An ideal loop-back analysis has none. Final values agree; step responses differ slightly.
- **Time constant for A = 1/16.** The filter implements A exactly as k/128. For A = 1/16 this gives a time constant of 16 clocks = 3.28 µs. Elsewhere 3.07 µs is quoted for the same setting. The other settings match the quoted 2.67, 3.69 and 4.31 µs only roughly.
- **Assumed details.** The following are this design's own:
  - the register map above 0x5F and all control bit layouts
  - the sequencer bit assignment
  - the run bit
  - the read timing on the serial interface
  - MSB-first order
  - the latched/last entry registers
  - the behaviour after the last ramp entry
  - the zero clamp of the ramp-down integrator
- **Thresholds.** They are multiples of 32 only (see above).

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_pac_top -y rtl -y tb \
    rtl/pac_pkg.sv tb/tb_pac_top.sv -o sim && obj_dir/sim
```

`tb_pac_top` runs the top at its default parameters, with a DSP bus model
(`cif_bfm`) and a simple model of DAC, clamp switch, PA, detector and ADC
(`pa_loop_model`: linear, 1.5 V of detector per volt of PA control above 0.9 V, 8-bit
ADC over 1.9 V). It programs a complete burst (25, 50, 34, 1184, 38 and 25 tics)
and checks:

- PAC Enable lasts 1306 tics (2938.5 clocks)
- the typical settings settle at the limit
- the loop tracks a 185-nit plateau to within 4 ADC codes
- the ramp-down drives the integrator to zero
- loop back settles on the plateau
- the clamp opens only after Ramp Enable
- the ramp-store mode plays a 10-level staircase (0 to 768 and back, then 1023), 10 tics per level
- a short 25/25/100/25-tic sequence produces the right Tx, PAC and Ramp Enable lengths
- in the GPIO DAC test, each of the ten lines gives its expected DAC voltage (302 mV for line 1 up to 1.35 V for line 10), with 0 V while PAC Enable is low
- ten DC voltages at the ADC are captured under Calibration Enable and read back over the serial interface as the expected codes:

  | Mode | Voltage | Code |
  |---|---|---|
  | unipolar | 500 mV | 0x43 |
  | unipolar | 1.5 V | 0xC9 |
  | bipolar | -500 mV | 0xBC |
  | bipolar | 950 mV | 0x7F |

- the limiter test: reference 100 nits, ADC at 0, forward gain 1/8 x 8 = 1, and ten limits from 0 to 16383 give DAC voltages `0.3 V + L/16383 x 2.1 V` (620.4 mV at 2500, 2.40 V at 16383)
- the GPIO outputs carry the sequencer outputs

It counts each of these mechanisms and fails any that never occurred. The block
testbenches check the gain slopes and limit voltages against the figures these
settings should give, using the other blocks' formulas computed independently in
the testbench.

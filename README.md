# Delta-sigma class-D audio amplifier

A class-D amplifier switches its output transistors fully on or fully off, so
in principle it wastes no power. The usual way to feed it from digital audio is
to map each PCM sample to a pulse width (PWM); that mapping is non-linear and
needs heavy correction DSP. This design instead drives the switches straight
from a **single-bit delta-sigma modulator**: the pulses all have the same width,
the audio is carried by their short-term density, and the modulator's loop
pushes the quantisation noise above the audio band, where the LC filter in
front of the speaker removes it. The only digital logic is a small
third-order modulator with power-of-two coefficients: three adders with fixed
shifts, no multipliers.

The RTL follows the amplifier published by J. Varona, A. A. Hamoui and
K. Martin ("A Low-Voltage Fully-Monolithic ΔΣ-Based Class-D Audio
Amplifier"), a 0.18 µm CMOS chip running from 1 V to 1.8 V. The modulator
structure and coefficients, the 16-bit input, the 5.6 MHz clock and the
topology and sizes of the output stage are theirs. Word lengths, rounding,
overload handling, reset and every delay value are choices made here, listed
under [Choices made here](#choices-made-here).

## Signal chain

```
           16-bit PCM                 1-bit                 p+ ─ 1x ─ 2x ─┬─ 32x ─┬─ 384x ─ spk_p ─┐
pcm_in ──> dsm3_modulator ──> bitstream ─┤                                XC 1x   XC 16x            LC filter + speaker
           (5.6 MHz)                     └─ inv ─> n- ─ 1x ─ 2x ─┴─ 32x ─┴─ 384x ─ spk_n ─┘     (off chip)
                                          output_driver (3 inverters/line)        h_bridge
```

* `dsm3_modulator` — synthesizable. One PCM sample in and one output bit out
  per clock.
* Phase split (in `class_d_amp`) — p+ is the bitstream and n- is its inverse.
* `output_driver` — behavioural model of the gate-drive chain. Each line has
  three inverters sized 1x, 2x and 32x. Two pairs of weak cross-coupled
  inverters (1x and 16x) link the lines.
* `h_bridge` — behavioural model of the two 384x CMOS inverters that form
  the bridge-tied load. Each 384x inverter is 384 unit inverters of
  Wp = 13 µm, Wn = 5 µm. The bridge drives the speaker to +VDD or -VDD.

Each line has four inversions in total, three in the driver and one in the
bridge. So `spk_p` equals the bitstream and `spk_n` is its inverse: a 1 puts
+VDD across the load and a 0 puts -VDD.

## The modulator loop

The loop filter has three integrators in a chain, and a one-bit quantiser
follows them:

```
u ─(+)─ b1 ─ 1/(z-1) ─ b2 ─(+)─ z/(z-1) ─ b3 ─(+)─ 1/(z-1) ─┬─ sign ─> y
    - y                    - a1·y              - a2·y       │
                           - δ·x3 <─────────────────────────┘
```

The first and third integrators are delaying. The second is not delaying: its
new value is used in the same clock. Three paths feed back:

* the output y enters the first summing node, where it is subtracted from u;
* y also enters the second and third integrators through a1 and a2;
* a resonator path of gain δ runs from the last integrator back into the second.

Clock by clock:

```
y[n]    = +1 if x3[n] >= 0 else -1
x2[n]   = x2[n-1] + b2·x1[n] - δ·x3[n] - a1·y[n]
x1[n+1] = x1[n]   + b1·(u[n] - y[n])
x3[n+1] = x3[n]   + b3·x2[n] - a2·y[n]
```

This gives the noise transfer function

```
NTF(z) = ((z-1)^3 + b3·δ·z·(z-1)) / (z^3 - (k1 - b3·δ)z^2 + (k2 - b3·δ)z - (1 - a2))
k1 = 3 - a1·b3 - a2
k2 = 3 - a1·b3 - 2·a2 + b1·b2·b3
```

and a signal transfer function of b1·b2·b3·z / (denominator), which is 1 at DC.

| coefficient | a1   | a2   | b1   | b2   | b3   | δ     |
|-------------|------|------|------|------|------|-------|
| value       | 2^-2 | 2^-1 | 2^-2 | 2^-2 | 2^-1 | 2^-13 |
| shift       | 2    | 1    | 2    | 2    | 1    | 13    |

What those numbers do:

* **Stability.** A single-bit loop stays stable only if the NTF gain stays
  moderate at all frequencies. The design rule is |NTF| < 1.5. With these
  coefficients the peak is 1.47.
* **Noise zeros.** The NTF has one zero at DC. The resonator moves the other
  two to about ±7.0 kHz at a 5.6448 MHz clock, because 1 - b3·δ/2 = cos ω
  gives ω ≈ sqrt(b3·δ). This lowers the noise in the middle of the audio band.
* **Noise level.** The in-band NTF is below -70 dB up to 20 kHz.
* **Resolution.** A bit-true model of this datapath reaches 98 dB SQNR in a
  20 kHz band with a 2.75 kHz tone at 0.25 of full scale, 103 dB at 0.5 and
  108 dB at 0.7. That is above 16 bits.
* **Overload.** Above roughly 0.7 of full scale the loop overloads, which is
  normal for a third-order single-bit modulator.

### Number format and overload

The states are signed 25-bit words (`PCM_BITS + FRAC_BITS + GUARD_BITS` =
16 + 8 + 1):

* The LSB is 1/256 of a PCM LSB.
* The output ±1 equals ±2^15 PCM LSBs, which is PCM full scale.
* The 8 fraction bits keep the tiny resonator term δ·x3 (a 13-bit shift)
  meaningful.
* All shifts are arithmetic, so they round toward minus infinity.
* Inside the stable input range no state goes above 1.2x full scale.

Each integrator update **saturates** at the word's range, which is ±2x full
scale. When an update clamps, the registered `sat` output is high for the next
clock. The clamp level matters:

* With a ±4x range, a loop pushed into overload could stay in a large clamped
  oscillation after the input came back into range. The output's DC mean was
  still right, but the in-band noise was huge.
* With ±2x it returned to normal operation in every overload case tried. That
  includes full-scale bursts of random length followed by random levels.

### Timing

* One sample is taken on each rising edge of `clk`. The design has no
  interpolation filter, so the PCM source must already run at the modulator
  rate.
* `bitstream` is a function of the x3 register only. There is no
  combinational path from `pcm_in` to any output.
* A new input sample first affects the output bit two clocks later.
* `rst_n` is asynchronous and active low. It clears all three states, so the
  output is 1 right after reset.
* Cost after synthesis: 76 flip-flops and a few adders. The critical path is
  x1 → second integrator → third integrator input, which is two additions in
  series.

## The output stage models

A synthesis tool cannot build the driver chain or the bridge. They are
modelled so that the whole chain can be simulated end to end. Every delay in
them is a placeholder. The only figure known for the real circuit is a
rise/fall time below 1 ns.

### `output_driver` and `xc_pair`

In the real circuit the n- line passes through one more inverter than p+ (the
phase split). So the two lines start out skewed. If the skew reached the
bridge, both halves would briefly pull the load the same way and cause
crossover distortion. The weak cross-coupled inverters between the lines
correct it: when one line switches, they help the other follow.

The two-state model (`xc_pair`) expresses this as a rule:

* If one node of a pair switches and the other node's own driver has not
  followed yet, the weak inverter pulls the lagging node over `XC_NS` later.
* The node's own driver always wins when it changes.
* So with complementary inputs, the skew after a pair is never more than
  `XC_NS`.

Defaults:

* stage delays: 0.10, 0.10 and 0.15 ns;
* pull-over delays: 0.05 ns for the 1x pair and 0.03 ns for the 16x pair;
* extra delay on the n- input, `N_SKEW_NS`: 0.10 ns, one inverter delay.

A gate therefore follows its input after 0.35 ns. The 0.1 ns input skew
reaches the bridge as 0.03 ns.

Synthesis reads the cross-coupled processes as latches in a loop, because a
pair of inverters in a ring is exactly that. The models are meant for
simulation only.

### `h_bridge`

Each output is the inverse of its gate, delayed by `OUT_NS` = 0.5 ns.
`crossover` is high while both outputs sit at the same level. In the complete
chain it pulses for 0.03 ns at each bitstream transition and is never high at
mid-clock.

## Choices made here

The published design does not specify the following:

* the 25-bit state word (8 fraction bits, 1 guard bit), floor rounding, and
  saturation at ±2x full scale with a `sat` flag;
* an asynchronous active-low reset;
* reading PCM at the modulator clock (no interpolator is described);
* the 5.6448 MHz clock in the testbenches (128 × 44.1 kHz). The published
  figure is 5.6 MHz;
* the pull-over rule of the cross-coupled pairs and all delay values;
* the phase split as a plain inverter in the top level, with its delay
  represented by `N_SKEW_NS` inside the driver model.

These parts are analog and are not modelled:

* the balanced LC filter and the speaker, connected to `spk_p` and `spk_n`;
* the on-chip bypass capacitors;
* the pads, bond wires and package.

Supply voltage, on-resistance, output power, efficiency and THD cannot be
reproduced here. The bridge outputs are logic levels.

## Files

| file | contents |
|------|----------|
| `rtl/class_d_pkg.sv` | word sizes and coefficient shifts |
| `rtl/dsm3_modulator.sv` | the modulator (synthesizable) |
| `rtl/xc_pair.sv` | behavioural cross-coupled inverter pair |
| `rtl/output_driver.sv` | behavioural differential gate driver |
| `rtl/h_bridge.sv` | behavioural H-bridge |
| `rtl/class_d_amp.sv` | top level: modulator, phase split, driver, bridge |
| `tb/tb_dsm3_modulator.sv` | modulator against an independent integer model |
| `tb/tb_output_driver.sv` | driver polarity, delay and skew removal |
| `tb/tb_h_bridge.sv` | bridge inversion, delay, crossover flag |
| `tb/tb_class_d_amp.sv` | end to end at default parameters |
| `tb/tb_tone_sweep.sv` | 2.75 kHz tone at four levels |

## Simulating

Verilator 5 with `--timing` is needed, because the output-stage models use
delays. From the project root:

```
verilator --binary --timing -Irtl -y rtl --top-module tb_class_d_amp \
    rtl/class_d_pkg.sv tb/tb_class_d_amp.sv -o sim && ./obj_dir/sim
```

Swap in any other testbench name. Each one prints
`TB_RESULT checks=N failures=M` and exits. All of them run in a few seconds.

How the testbenches check the design:

* **`tb_dsm3_modulator`** runs an integer reference model of the loop
  alongside the modulator. The two must agree bit for bit, including `sat`,
  over random inputs. It also has checks that do not use the reference:
  * after reset the output is 1 and `sat` is 0;
  * for five DC levels, the mean of the ±1 output over 16384 clocks matches
    the input to 1e-3;
  * a half-scale 2.75 kHz tone survives a sinc³ filter (three length-64
    moving averages) to within 2e-4 of full scale, compared with the input
    delayed four clocks and passed through the same filter. That only holds
    if the noise really is shaped out of band;
  * a 0.95 full-scale burst clamps the loop, and afterwards the loop
    reproduces a DC level again.
* **`tb_class_d_amp`** runs the complete chain at default parameters:
  * two periods of the tone, then an overload burst, then a DC level;
  * at mid-clock, the bridge outputs match the bitstream;
  * the bridge switches 0.85 ns after the bitstream;
  * crossover pulses stay at or below 0.03 ns;
  * it counts bitstream transitions, bridge reversals, crossover pulses that
    the cross-coupled pairs shortened, and clamps, and fails if any of them
    never happened.
* **`tb_tone_sweep`** plays the tone at 0.1, 0.3, 0.5 and 0.7 of full scale.
  For each level it checks that nothing clamps, that the filtered error is
  below 1e-3, and that the gain is 1 to within 1%.

## Changing the design

* **Coefficients.** Change the shifts in `class_d_pkg`, or override them on
  `dsm3_modulator`. Keep the peak |NTF| below about 1.5, or the single-bit
  loop will go unstable.
* **Input width.** `PCM_BITS` sets it. The state word grows with it.
* **Word length.** `FRAC_BITS` trades accuracy of the δ path against area.
* **Clamp level.** `GUARD_BITS` sets it. Raising it can bring back the
  post-overload oscillation described above.
* **Driver skew.** To study a poorly matched driver, raise `N_SKEW_NS` on
  `output_driver`, or remove a cross-coupled pair. The crossover pulses in
  `tb_class_d_amp` then widen.

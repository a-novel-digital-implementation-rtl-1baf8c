# Digital firing and speed control for a three-phase triac voltage controller

An induction motor's speed can be varied by lowering its stator voltage. A
cheap way to do that is to put a triac in each of the three supply lines and
fire the triacs a chosen angle after each zero crossing of their phase
voltage: the later the firing angle, the less of each half cycle reaches the
motor. This RTL is the complete digital side of such a controller, meant for
an FPGA clocked at 50 MHz on a 60 Hz supply. It

* measures the phase angle of each phase voltage with a counter that restarts
  at every zero crossing,
* fires each triac when that counter reaches the firing angle,
* closes a speed loop with PI control, and
* switches between three PI controllers according to the controller's
  current *mode of operation*, detected from the line currents.

The mode switching is the main idea. With three triacs and no neutral, the
line currents pass through spells in which no line, two lines or all three
lines conduct. Which spells occur names the mode:

| mode  | spells seen in one supply cycle | speed vs. firing angle |
|-------|---------------------------------|------------------------|
| 0/2   | none conducting, two conducting | rises with the angle   |
| 0/2/3 | none, two and three conducting  | rises with the angle   |
| 2/3   | two and three, never none       | falls with the angle   |

Mode 2/3 is the desirable one: the currents are nearly sinusoidal. Because
the plant's gain changes sign between modes, a single PI controller cannot
regulate across all of them. The design therefore runs one controller per mode
and lets a mode decoder choose which one drives the firing angle.

## Block diagram

```
 zc_comp[p] ─► zero_cross_detector ─zc─► half_cycle_counter ─saw─► angle_pulse_counter ─► gate[p]
                  (one per phase)              (one per phase)      ▲   (one per phase)
                                                                    │ c_theta
 btn_up/dn ─► reference_speed ─ref─┐                                │
                                   ├─► speed_error ─e─► pi_controller ×3 ─► control_mux ─► firing_angle_control
 adc_speed ───────────────────────-┘                    (0/2, 0/2/3, 2/3)      ▲ mode       ▲ update = zc of phase A
                                                                               │
 i_pos/i_neg ─────────────────────────────────────────────► limits_decoder ────┘ (cycle = rising zc of phase A)
```

`acvc_top` wires this together. Everything analog or off-chip is a port:
the voltage and current comparators, the speed sensor and its ADC, and the
triac drivers.

## The phase-angle saw-tooth and the firing pulse

This is the core of the firing path; everything here is cycle-exact.

**Zero crossings.** A comparator per phase gives a square wave, high during
the positive half cycle. `zero_cross_detector` passes it through a two-stage
synchroniser and a sampling register, then XORs that register's input and
output. The result is a one-clock pulse at *both* edges, so there are two
pulses per supply period. The pulse is gated off during reset.

**Saw-tooth.** `half_cycle_counter` counts clock cycles from 0. It returns to
0 on a zero-crossing pulse, or on its own after reaching

    C_max = f_clk / (2 f_line) = 50 MHz / 120 Hz = 416666   (truncated)

Its value is therefore the phase angle within the current half cycle:
`angle = 180° · saw / C_max`. One count is 0.000432°. The C_max wrap keeps
the counter alive if a crossing is missed or the supply runs slow. In that
case the ramp restarts early, and a pulse can fire a second time in the same
half cycle. This is deliberate free-running behaviour, and the end-to-end
test exercises it.

**Firing.** The firing angle is carried as a saw-tooth value,
`C_θ = round(C_max · θ / 180)`. `angle_pulse_counter` latches `C_θ` at each
of its own phase's zero crossings. When the saw-tooth equals it, the pulse
register sets and drives the gate. A width counter then runs, and after
`DC = C_max · θ_p / 180` cycles it clears itself and the pulse register
together. A zero crossing also clears both, so a pulse never runs into the
next half cycle. Because a triac conducts in both directions, each phase
fires once per half cycle.

**Timing, measured from the first clock edge that samples a comparator edge
(edge k):**

| edge      | event                                               |
|-----------|-----------------------------------------------------|
| k, k+1    | two synchroniser stages                             |
| k+1 → k+2 | `zc` pulse high for one cycle                       |
| k+2       | saw-tooth = 0, `C_θ` latched for this half cycle    |
| k+2+C_θ   | saw-tooth = `C_θ` — match                            |
| k+3+C_θ   | gate rises                                          |
| k+3+C_θ+DC| gate falls (unless a crossing came first)           |

So every firing angle is late by a fixed 3 clock cycles (60 ns at 50 MHz,
about 0.001°).

## Speed loop

**Error.** `reference_speed` holds the set point. Each press of the increase
or decrease button moves it by `REF_STEP`, within 0 … 2^14−1. Each speed
sample from the ADC (`adc_valid`, `adc_speed`) is registered by
`speed_error`, which forms the signed error `e = reference − sensed`. The
sample rate of the ADC is the PI sampling rate; nothing in the RTL assumes a
particular value.

**PI controllers.** `pi_controller` uses the incremental, trapezoidal form of
PI control:

    u(n) = u(n−1) + k1·e(n) + k2·e(n−1),   k1 = kp + T·ki/2,   k2 = −kp + T·ki/2

It needs only two 18×18 multiplications per sample. Registers sit after the
input, after the products and after their sum. A three-bit valid shift
register acts as the sequencer and writes `u(n)` on the third clock edge
after the sample edge. Samples may arrive on consecutive cycles. `u`
saturates at the limits of its 40-bit range rather than wrapping.

All three controllers process every sample, each with its own `k1`/`k2`.
The defaults are placeholders, not tuned values: `k1 = 2560`, `k2 = −2304`
in the two rising-gain modes, and the negated pair in mode 2/3. Read as Q8
numbers, each sample moves the firing angle by about `e` counts plus a
proportional kick of `10·e`. Tune them for your motor, sensor scale and
sample rate.

**Mode decoding.** `limits_decoder` synchronises the two current comparators
of each line (current > 0, current < 0). It ORs each pair into "line
conducts" and classifies every clock cycle as a spell of none (NOR), all
three (AND) or two lines conducting. Three sticky flags record which spells
occurred. At each supply-cycle boundary, the rising zero crossing of phase A,
a three-input table turns the flags into the mode:

    seen none and seen three   → 0/2/3
    seen none, never three     → 0/2   (also: no current at all)
    never none                 → 2/3

The mode register is loaded and the flags cleared. The sample taken in the
boundary cycle counts towards the cycle that ends there. The first boundary
after reset only clears the flags. The mode is the select of `control_mux`,
which registers the chosen controller's output.

Until the first complete cycle has been decoded, `mode_valid` is low. While
it is low, no controller output is passed on, so the firing angle stays at
its initial value. Without this gate, the reset value of the mode register
would let an arbitrary controller steer the motor during the first cycle.

**Firing-angle control.** `firing_angle_control` shifts the selected output
right by `SCALE_SHIFT` (8), which puts it in saw-tooth counts. It then clips
the value to `[C_LO, C_HI]` (0° … 120° by default) and holds it. The held
value becomes the firing angle at the next zero crossing of phase A, so the
angle changes at most once per half cycle. Each phase then picks it up at its
own next crossing.

## What is taken as given and what is chosen here

The following come from the source design:

* the block partition;
* the saw-tooth scheme and its numbers (50 MHz, 60 Hz, C_max = 416666);
* the XOR zero-crossing detector;
* the pulse register with its width counter;
* the incremental PI law, its 18×18 multipliers, and u(n) written three
  cycles after e(n);
* OR-ing the current comparators and the once-per-cycle mode update;
* clipping to a maximum and a minimum angle, updated every half cycle.

The source design gives no values for the following. They are this design's
own choices and are all parameters:

* the pulse width θ_p (10°, `PULSE_DEG`);
* the angle limits and initial angle (0°, 120°, 120°);
* all PI gains, the output width (40 bits) and saturation;
* the scaling (a right shift);
* the speed word width (14 bits), the button step and the reference range;
* the synchronisers on every asynchronous input (two flops; the bare
  detector is `SYNC_STAGES = 0`);
* the contents of the mode table, which are a reading of the mode names;
* which phase marks the cycle boundary (phase A);
* latching `C_θ` per phase at its own crossing;
* the reset values.

Known departures and limits:

* The three controllers integrate every sample whether selected or not, and
  there is no bumpless transfer. When the mode changes, the firing angle can
  jump to a value that the newly selected controller wound up while idle.
  The angle clip limits the effect on the triacs, but not on the stored
  `u`.
* Only the saturation at the 40-bit limits stops the controllers from winding
  up.
* Button inputs are edge-detected but not debounced; bounce must be filtered
  before the pins.
* The speed ADC is expected as a parallel word with a strobe. The
  microcontroller-style interface to an on-board ADC that a real board
  needs is not included.
* No timing or area figures for an FPGA are claimed. The logic is small: about 660
  flip-flop bits and six 18×18 products.

## Parameters of `acvc_top`

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ`, `LINE_HZ` | 50 000 000, 60 | give `C_max = CLK_HZ / (2·LINE_HZ)` |
| `PULSE_DEG` | 10 | gate pulse width in degrees |
| `ALPHA_MIN_DEG`, `ALPHA_MAX_DEG`, `ALPHA_INIT_DEG` | 0, 120, 120 | firing-angle clip limits and reset angle |
| `SYNC_STAGES` | 2 | synchroniser depth on comparator inputs |
| `S_W`, `E_W`, `K_W`, `U_W` | 14, 18, 18, 40 | speed, error, gain, controller-output widths |
| `SCALE_SHIFT` | 8 | controller output → saw-tooth counts |
| `REF_STEP`, `REF_INIT` | 64, 8192 | button step and reset reference |
| `K1_*`, `K2_*` | ±2560, ∓2304 | gains per mode (`_0_2`, `_0_2_3`, `_2_3`) |

Widths derived from `C_max` (the saw-tooth, `c_theta`) follow automatically:
19 bits at the defaults. `acvc_pkg` holds `mode_t` and the helpers
`cmax_of()`, `deg_to_count()` and `mode_lut()`.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/acvc_pkg.sv rtl/*.sv tb/tb_acvc_top.sv --top-module tb_acvc_top
./obj_dir/Vtb_acvc_top
```

For a unit test, list `rtl/acvc_pkg.sv`, `rtl/bit_sync.sv`, the module and its
testbench.

The two end-to-end testbenches share `tb/acvc_top_harness.svh`:

* `tb_acvc_top` builds the top for a 72 kHz clock. This makes C_max = 600 and
  the run takes well under a second.
* `tb_acvc_top_full` uses every default (50 MHz, C_max = 416666). It runs
  about 13 million cycles in roughly 10 s.

Both play 16 supply cycles from a small plant model. It provides three
comparator square waves 120° apart and current-comparator patterns that
follow a mode script (2/3, then 0/2/3, then 0/2, then 2/3). A scripted speed
sensor reads below or above the reference. The supply runs fast for four
cycles, so pulses are cut by the crossing, and slow for six cycles, so the
saw-tooth wraps at C_max. A button sequence runs at the end.

The harness checks the following:

* every gate edge against the timing table above;
* the decoded mode after every cycle;
* the selected controller output against a 64-bit model of the three PI
  controllers;
* the clipped angle at each phase-A crossing;
* the reference steps.

It also requires that each of these happened at least once:

* a saw-tooth wrap;
* pulses ended by the width counter and pulses cut by a crossing;
* all three modes and a switch between them;
* clipping at both limits and a value passed inside the limits;
* both buttons.

`tb_acvc_speed_loop` closes the loop. The plant is a crude first-order motor
model that exists only in the testbench:

* the mode is set by the firing angle (2/3 between 60° and 110°);
* the steady-state speed falls with the angle and with the load;
* each speed sample moves one eighth of the way towards it.

The firing angle the model uses is measured from the actual phase-A gate
pulses. The top runs at the reduced clock with mode-2/3 gains of −3 and +2,
which suit this plant. The test steps the load from 0.2 to 0.8, then raises
and lowers the reference with the buttons. After every event the speed must
settle to within 40 of the reference (about 0.5 % of the set point), and the
decoder must report mode 2/3 throughout. This demonstrates the sign
convention and the dynamics of the loop on a toy plant. It is not a claim
about any particular motor: the default gains are untuned, and a real drive
needs gains designed for it.

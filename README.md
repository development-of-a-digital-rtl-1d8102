# Digital LLRF controller for a pulsed proton-linac cavity

This is the FPGA part of a base-band low-level RF (LLRF) control system for
normal-conducting cavities that run in pulsed mode. The target is 325 MHz
CH cavities fed with RF pulses of up to a few hundred microseconds, at up to
4 Hz. The RF board outside the FPGA mixes the cavity pick-up signal down to
base band. The FPGA then sees three slow signals: the I and Q components of
the field and, from a separate RF power detector, its amplitude. The FPGA
closes two independent feedback loops on these signals:

* **Phase loop.** A CORDIC turns (I, Q) into a phase. A controller compares
  it with the phase setpoint and produces the drive phase.
* **Amplitude loop.** The detector amplitude is compared with a set value
  that is *not constant*. On every trigger, a pulse shape generator plays a
  stored curve of 2048 set values. The curve is scaled by a pulse amplitude
  setpoint. A controller produces the drive amplitude, which is limited to
  be non-negative.

A second CORDIC turns the drive amplitude and drive phase back into I and Q.
These go to the DACs and on to the I/Q modulator in front of the klystron.

The amplitude is measured by the detector and not taken from the I/Q
magnitude, because the detector is the more accurate of the two. The
demodulator is only used for phase.

## Signal flow

```
 adc_i ─┐
 adc_q ─┴─► cordic_vectoring ──meas_phase──►(Σ)──► pid_controller ──drive_phase──┐
                                              ▲ −   (WRAP_ERROR=1,               │
                              phase_setpoint ─┘      integral held               │
                                                     between pulses)             ▼
 adc_amp ─────────────────────────────────►(Σ)──► pid_controller ─┐       cordic_rotation ─► dac_i
                                             ▲ −  (WRAP_ERROR=0)  ├─► mux ─► ≥0 ─►│          dac_q
 trigger_gen ─► pulse_shape_gen ─► × ───────┴──── (2-clock delay) ┘  ▲   (amp_output_stage)
   ▲ ext_trig     (2048 × 16 bit)  ▲                                  amp_ctrl_on
   │ period                 pulse_amp_setpoint
```

`llrf_top` wires these blocks together. Every module is in its own file under
`rtl/`, and shared types are in `rtl/llrf_pkg.sv`.

## Number formats and sign conventions

These are the points most likely to trip up someone who drives the design
from a host program.

| Quantity | Type | Meaning of the code |
|---|---|---|
| I, Q, amplitude, set values, drive amplitude | `sample_t`, signed 16 bit | ADC/DAC codes |
| phases (setpoint, measured, drive) | `phase_t`, signed 16 bit | binary angle: the full code range is one turn. −32768 is −180°, 16384 is +90°, 1 LSB is 0.0055° |
| gains Kp, Ki, Kd | `gain_t`, signed 16 bit | 8 fractional bits: 256 = 1.0 |
| pulse shape entries | unsigned 16 bit | 1.0 = 0x8000, so values up to 1.99 are allowed |

* **Error sign.** Each summing junction forms *e = measurement − setpoint*.
  The set value enters with the minus sign, as in the block diagram of the
  original system. A drive that raises the measurement therefore needs
  **negative** gains for negative feedback. The testbenches use Kp = −1.0
  and Ki = −1/128 for phase, and Kp = −3.0 and Ki = −1/64 for amplitude.
* **Controller equation.** Per sample:
  u = (Kp·e + I + Kd·(e − e_prev)) / 256, with I ← I + Ki·e.
  The differential term exists but is meant to run with Kd = 0, because it
  mostly amplifies noise.

## The phase loop: wrap-around and integral hold

A phase has no ends, so the phase controller (`WRAP_ERROR = 1`) does all of
its arithmetic modulo one turn:

* Error: setpoint +179° and measurement −179° give an error of +2°, not
  −358°.
* Integral accumulator: it wraps at 2^24. This is one turn with 8 fraction
  bits.
* Output: the drive phase wraps past ±180° instead of saturating.

An earlier version saturated the drive phase, and it locked up. When the
required drive phase lies just across ±180°, a saturated output sits at the
wrong end of the range while the error keeps pushing it further into the
limit. Wrapping removes that stable wrong state.

While no pulse is running, the cavity is empty and its measured phase is
noise. The phase controller's integral is therefore frozen (`hold`) whenever
the pulse generator is idle. The next pulse then starts from the drive phase
that worked in the previous one. The amplitude integral is not held: between
pulses the set value is 0 and the measured amplitude decays towards 0, so
there is little to wind up.

The amplitude controller (`WRAP_ERROR = 0`) saturates instead:

* its error is saturated to 16 bits;
* its accumulator is clamped so that it alone cannot exceed the output range
  (anti-windup);
* its output is saturated, and `amp_ctrl_sat` reports when that happens.

## Pulses: trigger, shape memory and set value

* **Trigger source** (`trigger_gen`). The trigger comes either from an
  internal counter, every `trigger_period` clocks (4 Hz is 25,000,000 clocks
  at 100 MHz), or from the asynchronous `ext_trig` input. `ext_trig` passes a
  two-flip-flop synchroniser and its rising edge is used; the trigger follows
  the edge by 3 clocks. `trig_src` selects the source. `trigger_period = 0`
  stops the internal trigger.
* **Pulse shape generator** (`pulse_shape_gen`). It holds a 2048 × 16-bit
  memory, loaded through `shape_wr_*`.
  * A trigger while idle starts a pulse. Triggers during a pulse are
    ignored.
  * Entries 0 … `pulse_len`−1 are read out in order, each held for
    `step_cycles` clocks. With 2048 entries, 98 clocks per entry give a
    pulse of about 2 ms at 100 MHz, and 10 clocks per entry give 204.8 µs.
  * Between pulses the value is 0.
  * `pulse_active` marks the pulse and `pulse_start` marks its first clock.
* **Scaling** (`setpoint_scaler`). The amplitude set value is
  shape × `pulse_amp_setpoint` / 2^15, rounded and saturated. A pulse can
  therefore be made higher or lower without reloading the memory.
* **Open/closed loop and limit** (`amp_output_stage`).
  * With `amp_ctrl_on = 1`, the drive amplitude is the controller output.
  * With `amp_ctrl_on = 0`, the set value itself is the drive (open loop),
    which is useful for commissioning. The set value is delayed by the
    controller's two clocks, so that switching modes does not shift the
    pulse in time.
  * Either way, the result is limited to ≥ 0, because a negative amplitude
    would mean a 180° phase flip. `amp_clamped` reports when the limit
    acts. This happens at the end of every closed-loop pulse, when the set
    value drops to 0 while the cavity is still full.

## CORDICs

Both converters are fully pipelined and take one sample per clock.

| Module | Mode | Latency | Accuracy (checked) |
|---|---|---|---|
| `cordic_vectoring` | (I, Q) → phase | ITER+2 = 18 clocks | ±3 LSB (0.016°) for vectors longer than 4096 |
| `cordic_rotation` | (A, φ) → (A cos φ, A sin φ) | ITER+3 = 19 clocks | ±4 LSB |

* **Internal widths.** x and y carry 2 extra integer bits for the CORDIC
  gain and 4 fraction bits. The angle carries 4 extra fraction bits.
* **Quadrant handling.** A first stage turns the vector (or the start vector)
  by ±90° so the iterations only need to cover ±90°.
* **Gain correction.** The rotation CORDIC multiplies the amplitude by
  round(2^16/K) before the iterations, with K = Π√(1+2^−2i) ≈ 1.6468.
* **Tables.** The arctangent table and K are computed at elaboration time
  with `$atan`/`$sqrt`, so no table file is needed.
* **Not brought out.** The vectoring CORDIC also computes the magnitude, but
  it is not used, since the amplitude comes from the detector.

## Timing

The design processes one ADC sample per clock on every input and produces one
DAC sample per clock. The clock rate is a free choice. The testbenches assume
100 MHz wherever they turn clock counts into times.

| Path | Clocks |
|---|---|
| ADC I/Q → drive phase | 18 (CORDIC) + 2 (controller) = 20 |
| drive phase → DAC | 19 (CORDIC) |
| ADC amplitude → drive amplitude | 2 (controller) + 1 (select/limit) = 3 |
| drive amplitude → DAC | 19 |
| trigger → first set value at `amp_set_value` | 3 |

The two loops do not wait for each other. The amplitude loop keeps its short
latency, and the phase loop is slower by the input CORDIC.

`dac_valid` rises once the pipelines have filled after reset.

Reset is synchronous and active high. It clears the controllers, the pulse
state and the valid pipelines. It does not clear the shape memory.

## Host settings

The connection to the control PC is not part of this RTL. All settings are
plain input ports of `llrf_top`, and a register interface of your choice can
drive them:

| Port | Sets |
|---|---|
| `phase_setpoint`, `pulse_amp_setpoint` | the two setpoints |
| `phase_gains`, `amp_gains` | the gains, as a `pid_gains_t` struct of Kp, Ki and Kd |
| `amp_ctrl_on` | closed loop (1) or open loop (0) |
| `trig_src`, `trigger_period` | the trigger source and the internal trigger period |
| `pulse_len`, `step_cycles` | the pulse length in entries and the clocks per entry |
| `shape_wr_en`, `shape_wr_addr`, `shape_wr_data` | the shape memory write port |

Monitoring outputs: `meas_phase`, `amp_set_value`, `drive_amp`,
`drive_phase`, `pulse_active`, `pulse_start`, `trigger`, `amp_clamped` and
`amp_ctrl_sat`.

## What is outside this RTL

The following parts belong to the complete system but have no logic here:

* **RF board:** the I/Q demodulator and modulator (LO at twice the carrier
  frequency) and the RF power detector.
* **Reference:** the RF generator.
* **Converters:** the ADCs and DACs.
* **Analog filters:** first-order low-pass filters with a cutoff near
  100 kHz, in front of the ADCs and behind the DACs.

Also not included:

* **Feed-forward path.** The original system plans one to speed up the pulse
  rise, but it was not specified.

## Departures from the original system and own choices

The following points follow the original system:

* the block structure;
* separate phase and amplitude loops, with phase from a CORDIC and amplitude
  from the detector;
* P+I control with a D term that is present but unused;
* the integral hold of the phase loop between pulses;
* the 2048-entry pulse shape memory with trigger-started read-out;
* the pulse amplitude multiplier, the on/off switch and the ≥ 0 limit;
* internal periodic and external triggers;
* the error sign at the summing junctions.

The following are this design's own choices:

* all widths and number formats, the 16-bit converters and the gain format;
* one sample per clock;
* the CORDIC structure and iteration count;
* the controller pipeline, the saturation and anti-windup rules, and the
  wrapping phase arithmetic;
* the shape memory write port and the `pulse_len`/`step_cycles` settings;
* the trigger synchroniser;
* the two-clock delay on the open-loop path.

Gains are run-time settings because no gain values are given. The values in
the testbenches are tuned to the testbench cavity model and are not
recommended settings for real hardware.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_cordic_vectoring` | 4000+ random vectors and the quadrant corner cases against `$atan2`; latency |
| `tb_cordic_rotation` | 4000+ random (A, φ) against `A·cos`/`A·sin`; latency |
| `tb_pid_controller` | a phase-type and an amplitude-type controller against a 64-bit integer model over 20,000 random samples, with changing gains, hold and gaps in the sample stream; directed checks of latency, the integral ramp, hold, error wrap, output wrap and saturation |
| `tb_pulse_shape_gen` | the full 2048-entry memory, clock by clock: start delay, entry sequence, `step_cycles` including 0, ignored re-triggers, `pulse_len = 0`, a full-length pulse, reset in mid-pulse |
| `tb_trigger_gen` | internal spacing for several periods, period 0, one trigger per external edge with a 3-clock delay, no leakage of the internal counter |
| `tb_setpoint_scaler`, `tb_amp_output_stage` | random and corner-case inputs against the formulas |
| `tb_llrf_top` | the whole design at default parameters, closed around a behavioural cavity model (see below) |
| `tb_pulse_200us` | 204.8 µs pulses with a step in the set value, at default parameters |

**The cavity model.** Both system-level testbenches use a cavity model
written in the testbench:

* it is a first-order resonator with a time constant of 98 clocks (loaded
  Q of 1000 at 325.224 MHz, sampled at 100 MHz);
* the drive passes through a cable phase and a coupling gain;
* the ADC inputs get ±2 LSB of noise.

**`tb_llrf_top`.** It loads the full shape memory and runs four 2048-entry
pulses:

* two pulses on the internal trigger, closed loop;
* one pulse in open loop;
* one pulse on the external trigger, with the phase setpoint at −179°.

It checks:

* the cavity's own amplitude and phase, taken from the model, over the last
  1000 clocks of each closed-loop pulse, against limits of 1e−3 rms
  amplitude error and 0.1° rms phase error (the model reaches about 1.3e−5
  and 0.002–0.007°);
* that the phase integral does not move between pulses;
* the open-loop drive;
* the DAC vector length.

It also counts the internal and external triggers, full-length pulses,
integral hold, open-loop and closed-loop operation, the ≥ 0 limit,
controller saturation and phase-error wrap-around. A mechanism that never
happened counts as a failure.

**`tb_pulse_200us`.** After 50 µs into each pulse, the amplitude must stay
within 1e−3 and the phase within 0.1° on every sample. In the model, the
amplitude reaches the 1e−3 band after 1.6–16 µs. The model is far quieter
than real hardware, so these numbers show that the loops work. They do not
predict the performance of a real cavity.

Two modules carry concurrent assertions that are checked in every
simulation run with `--assert`:

* `pulse_shape_gen`: `pulse_start` only occurs inside a pulse, and the set
  value is zero between pulses.
* `pid_controller`: the amplitude integrator stays inside its clamp range.

To run a testbench with Verilator, for example the system-level one:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/llrf_pkg.sv \
    tb/tb_llrf_top.sv --top-module tb_llrf_top
./obj_dir/Vtb_llrf_top
```

Replace `tb_llrf_top` with any other testbench name. All testbenches finish
in seconds.

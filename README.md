# Slot-edge PID speed control for a small DC motor

This is an FPGA speed controller for a brushed DC motor. The motor is switched from an
18 V supply by a logic-level N-channel MOSFET, and the FPGA drives the MOSFET gate with
an 8-bit PWM signal at about 10 kHz. Speed feedback comes from an optical
emitter/detector pair looking through a disk with 30 slots on the motor shaft. The
controller times the interval between slot edges and turns it into RPM. Every new
measurement runs one step of a discrete PID loop, which sets the next PWM duty. So the
loop runs at each slot edge, not at a fixed sample rate.

Everything from the sensor input to the PWM output is synthesizable SystemVerilog. The
switch bank that sets the loop up and an autonomous step-test sequencer are included.
The MOSFET, the motor and the sensor are modelled for simulation only.

## Signal path

```
 sw[9:0] ──► user_if ──setpoint, pid_en, test_mode, mode_changed──┐
                                                                  ▼
 sensor_in ─► input_capture ─interval (valid/ready)─► motor_controller ─duty─► pwm_gen ─► pwm_out
                 │  tick, stall_evt                   │ speed_calc → pid_ctrl
                 └────────────────────────────────────┤ step_test  → log stream ─► log_* ports
                                                      └ rpm, status ports
```

| module | job |
|---|---|
| `motor_pkg` | shared constants, the `mode_e` enum, the `log_word_t` record |
| `user_if` | synchronizes and debounces the 10 switches and decodes them |
| `input_capture` | times slot edges in 10.24 µs ticks; detects stall and overflow |
| `speed_calc` | RPM = 195312 / ticks, with a bit-serial divider |
| `pid_ctrl` | fixed-point PID, one step per speed sample |
| `step_test` | test-mode step sequencer and time-stamped speed records |
| `motor_controller` | joins the above: sample stream, mode table, duty select |
| `pwm_gen` | 8-bit PWM, 255 steps of 20 clocks (9.8 kHz at 50 MHz) |
| `motor_ctrl_top` | wires the four top-level blocks together |

## Measuring speed from slot intervals

With 30 slots, one slot interval of T seconds means 60 / (30·T) = **2 / T rpm**.
`input_capture` counts a tick every 512 clocks (10.24 µs at 50 MHz). A 1 ms interval
(about 2000 rpm, the fastest the motor runs) is then about 98 ticks, so one tick is a
worst-case resolution of about 1 %. In ticks the speed is
`RPM = 2·f_clk / 512 / n = 195312 / n`. `speed_calc` computes this with a restoring
divider, one quotient bit per clock, in 20 clocks.

The details of the interval counter:

* The sensor passes a two-flip-flop synchronizer and rising edges are detected. At each
  edge the counter and the tick prescaler restart. So an edge D clocks after the
  previous one reports `floor(D / 512)`. `cap_valid` rises 4 clocks after the sensor
  edge.
* The counter is 12 bits wide, so it covers 41.9 ms. The slowest setpoint, 60 rpm, has
  a 33 ms interval, so it fits.
* **Stall**: if the counter fills up without an edge, `stalled` is set and `stall_evt`
  pulses. The count then starts over, so `stall_evt` repeats every 41.9 ms while the
  motor stands still. The first edge after a stall, or after reset, only starts a
  measurement.
* **Overflow**: a new interval may arrive while the previous one is still waiting in
  the output register. The older value is then replaced, `ovf_evt` pulses and the
  sticky `overflow` flag is set. In practice this happens only when noise on the sensor
  gives several edges within the divider's 20-clock busy time.

`motor_controller` turns every stall event into a speed sample of 0 rpm. Without this,
a PID loop that runs only on slot edges could never start a motor that is standing
still.

## The PID step

For each sample, `pid_ctrl` computes the following. The error `e` is in rpm, and the
gains are Q.12 fixed point.

```
e    = setpoint − measured
I    = clamp(I + e, 0, INT_LIM)
u    = KP·e + KI·I + KD·(e − e_prev)
duty = clamp(u >> (12 + OUT_SHIFT), 0, 255)
```

* **Gains.** KP = 7, KI = 0.1 and KD = 0.01 (28672, 410 and 41 in Q.12) are the values
  the motor was tuned with.
* **OUT_SHIFT = 4** converts rpm of error into PWM counts. This scale is a choice of
  this implementation: the units of the tuned gains are not known.
* **Variable sample rate.** The sum and the difference are taken per sample with no dt.
  The loop runs once per slot edge, so its effective integral and derivative gains rise
  with speed. The loop is therefore best tuned for mid-range setpoints, around
  1000 rpm. The fix would be gains scaled with the measured interval, or gain
  scheduling; neither is implemented.
* **Low speeds.** At the bottom of the range the loop is slow. At 64 rpm a slot
  interval is 31 ms, so the loop runs only about 32 times per second. Near the stall
  limit it also receives zero-speed samples. Against the model it takes about 5 s to
  settle there, and the speed rests on the PWM grid: one duty step is about 7.8 rpm,
  and 64 rpm is reached as 60 rpm at duty 29.
* **Error sum.** The sum is held between 0 and INT_LIM = 40760, the value at which the
  I term alone gives full duty. A negative sum could only be wind-up, because the duty
  cannot go below 0. This clamp matters for noise: a spurious short interval reads as
  65535 rpm. Without the clamp, one such sample would push the sum far negative and
  pull the motor down for hundreds of samples. With it, the loop recovers in a few
  milliseconds.
* **Timing.** The new duty appears 2 clocks after the sample. The whole path from a
  slot edge to a new duty is about 26 clocks. `pwm_gen` applies it at the start of its
  next period.
* **Disable.** While the PID is off, or in the clock of a mode change, the PID state is
  cleared.

## Switches and modes

| switch | use |
|---|---|
| `sw[7:0]` | setpoint: a PWM duty (PID off) or speed / 8 rpm (PID on, 0–2040 rpm) |
| `sw[8]` | PID enable |
| `sw[9]` | test mode (1) or run mode (0) |

The switches are synchronized, and a change is taken only after it has been steady for
10 ms (`DEBOUNCE` clocks).

| mode | duty comes from |
|---|---|
| run, PID off | the switch value, directly |
| run, PID on | the PID, tracking `sw[7:0]·8` rpm |
| test, PID off | the step test: duty 0, then the switch value |
| test, PID on | the PID, tracking the step test's level · 8 rpm: half the switch value, then the full value |

## Step test

A step test starts when test mode is entered, or when the PID switch is toggled in test
mode. It runs on its own from there:

1. It holds the first level for 0.5 s (`PRE_TICKS` capture ticks).
2. It steps to the switch level and holds it for 1.5 s (`POST_TICKS`).
3. It raises `test_done` and keeps the final level.

In closed loop, switch value 162 gives a step from 648 to 1296 rpm. In open loop,
value 179 gives a step from 0 to 70 % duty.

Each speed sample taken during the test leaves on the `log_*` valid/ready port as a
`log_word_t`:

* `time_stamp`: capture ticks since the test started, divided by 256 (2.62 ms units);
* `rpm`: the measured speed.

The port holds one record. A sample that arrives while a record is still waiting is
dropped and counted in `log_dropped`. These ports are meant for a host link such as a
UART, which is not part of this RTL.

## Parameters and clocking

All timing in `motor_ctrl_top` is derived from `CLK_HZ`:

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | clock rate |
| `PWM_PRESCALE` | 20 | clocks per PWM step, 255 steps per period |
| `CAP_PRESCALE` | 512 | clocks per capture tick (10.24 µs) |
| `CNT_BITS` | 12 | interval counter width |
| `DEBOUNCE` | CLK_HZ/100 | switch debounce, 10 ms |
| `RPM_NUM` | 2·(CLK_HZ/CAP_PRESCALE) | speed numerator, 195312 |
| `PRE_TICKS`, `POST_TICKS` | 0.5 s, 1.5 s | step-test phases in ticks |

Lowering `CLK_HZ` together with `CAP_PRESCALE` slows the whole design down in proportion
and keeps `RPM_NUM` the same. The system testbench uses this to simulate seconds of
motor time quickly.

Reset is asynchronous and active low. The design uses a single clock.

## Verification

Each block has a self-checking testbench in `tb/`. It ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_pwm_gen` | period of 5100 clocks; high time = duty·20 clocks for 0, 255 and random codes |
| `tb_input_capture` | floor(D/P) for edges at known distances; 4-clock latency; stall and its repetition; overflow |
| `tb_speed_calc` | 195312/n for edge and random n; 20-clock latency |
| `tb_pid_ctrl` | each duty against the control law computed in the testbench, including both clamps |
| `tb_user_if` | decoding; rejection of bounces; exact debounce delay; `mode_changed` |
| `tb_step_test` | level sequence, phase lengths, record contents and time stamps, dropping |
| `tb_motor_controller` | mode table; speed output; stall as 0 rpm; PID direction; both test modes |
| `tb_motor_ctrl_top` | the whole design against the motor model, at a 64× slower clock (see below) |
| `tb_setpoint_range` | closed loop at 64, 504, 1000, 1504 and 1800 rpm against the motor model, each held within 3 % (at least one PWM step) |
| `tb_motor_ctrl_full` | default parameters at 50 MHz: from standstill to 1000 rpm in PID mode, held within 2 % after 1.5 s; PWM period |

`tb_motor_ctrl_top` runs through these scenarios in turn and counts every mechanism it
triggers. A mechanism that never occurs is a failure.

* Open loop at 70 %: the measured speed matches the model.
* Stall inside the deadband.
* Closed loop to 1000 rpm from standstill.
* Noise pulses that cause overflows, and the recovery after them.
* An open-loop step test with a throttled host that drops records.
* The closed-loop 648 → 1296 rpm step: within 5 % after about 0.11 s, and within 2 % at
  the end.

`tb/motor_model.sv` is a behavioural plant used only in simulation:

* first order, G(s) = 10/(s+10), so a 0.1 s time constant;
* 110 rpm per volt above a 1.5 V deadband;
* 18 V supply switched by the PWM, smoothed with a 2 ms electrical time constant;
* 30 slots per revolution.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_motor_ctrl_top \
    rtl/motor_pkg.sv $(ls rtl/*.sv | grep -v motor_pkg) tb/*.sv -o sim
./obj_dir/sim
```

The package goes first and only once. Listing it twice makes Verilator stop on a
duplicate-declaration warning.

Any other testbench runs the same way; only `--top-module` changes. The full-size
testbench simulates 2 s of motor time at 50 MHz, which takes about half a minute. Lint
gives warnings but no errors. The remaining warnings are about width extensions and
pins left open on purpose.

## Where this implementation makes its own choices

* **Hardware instead of a soft processor.** In the original build, a soft processor
  (NIOS II) computed the speed and ran the PID. Here that work is done by dedicated
  hardware (`speed_calc`, `pid_ctrl`, `motor_controller`). The processor and its JTAG
  UART are not included. The step-test records come out on a plain valid/ready port
  instead.
* **Gain scaling.** The tuned gains are kept, but the scale from rpm error to PWM counts
  (`OUT_SHIFT`) and the clamp on the error sum are this design's. They were set so that
  the loop settles against the motor model. On real hardware the loop may need
  re-tuning.
* **Own choices with no reference behaviour.** These were defined here:
  * the meaning of "stall" and "overflow" in the input capture;
  * the 12-bit counter;
  * the 8 rpm per switch step;
  * the switch positions and the debounce;
  * the step-test sequence, its hold times and record format;
  * the 50 MHz clock.
* **Setpoint grid.** A closed-loop step from 640 to 1300 rpm can only be approximated
  on the 8 rpm grid, as 648 to 1296 rpm.
* **Model limit.** The motor model reaches only about 1815 rpm at full duty. The model
  cannot show the top of the 60–2000 rpm range, but the RTL covers it.

# FPGA real-time logic for a collaborative-robot controller

A small robot controller splits its work in two. A Linux processor does the
slow, library-heavy work: 3D vision, motion planning, user interfaces. An FPGA
does everything with a hard deadline: pulse generation, sensor capture and
interrupt pacing. A soft processor inside the FPGA runs the real-time
software. This RTL is the FPGA's fixed-function logic. That soft processor
reaches all of it as one bus master.

The architecture comes from the article *An FPGA-based controller for
collaborative robotics* (Jeppesen, Roy, Moro, Baronti). The article gives
the partitioning, the rates and the behaviour of the blocks. The register
maps, bus protocol, widths and reset behaviour are choices made here, and so
is anything the article only names. Each file's opening comment says which
parts follow the article and which are this design's own.

The article covers two configurations of the same idea. Both are built and
stand side by side in `cobot_controller_top`:

| part | clock | what it drives |
|---|---|---|
| **servo demonstrator** (`servo_demo_system`) | 50 MHz | a 5-joint hobby-servo arm (base, shoulder, elbow, wrist, gripper) that follows a hand seen by a depth camera |
| **six-axis drive** (`six_axis_drive`) | 100 MHz | six PMSM motor axes of an industrial collaborative arm, updated at 16 kHz |

Each part has its own clock, reset and processor bus port. The soft
processor, its memories, the floating-point co-processor, DDR3 and JTAG are
not part of this RTL. Their connections appear as top-level ports.

## The servo demonstrator

### Control flow

```
 vision board ──SPI {X,Y} 30 Hz──► spi_slave ──irq──► processor: keep last 8 positions
                                                            │
 interval_timer ──50 Hz irq──────────────────────► processor ISR:
                                                    every 10th tick: new joint targets
                                                    every tick:      new speed
                                                            │ bus writes
                                               ┌────────────┴──────────────┐
                                               ▼   5 x servo_pwm           ▼
                                        pulse moves at "speed" until it reaches "target"
```

The processor's ISR plans a trapezoidal profile. Each 200 ms segment has five
50 Hz ticks of changing speed followed by five ticks of constant speed. The
processor writes new target positions at 5 Hz (four arm joints, from the
average of the last eight hand positions) and new speeds at 50 Hz. The hardware does the rest: between writes it keeps moving
the pulse width towards the target, and it stops exactly on the target.

### servo_pwm: the part to understand

A channel generates one pulse per period. Defaults: `PERIOD` = 1,000,000
clocks (20 ms at 50 MHz), so the rate is 50 Hz.

- **Pulse width.** The high time is `MIN_HIGH + position`. `MIN_HIGH` is
  25,000 clocks, which is 2.5 % of the period. The position runs from 0 to
  `POS_RANGE` = 100,000, so the widest pulse is 125,000 clocks (12.5 %).
  That gives 100,001 distinct pulse widths.
- **Motion.** A position update happens once per period, at the period
  boundary:
  `position += clamp(target − position, −speed, +speed)`.
  So the speed is in position values per PWM period. A speed of 0 freezes
  the servo.
- **Clamping.** Targets, speeds and presets above `POS_RANGE` are clamped.
- **Reset.** Position and target reset to mid-range (a 1.5 ms pulse). The
  output stays low until `CTRL.enable` is set.
- **Timing.** The pulse starts on the clock after `period_start_o`. Writes
  take effect at the next period boundary. The exception is a `CURRENT`
  preset, which acts at once.

| offset | register | access | meaning |
|---|---|---|---|
| 0 | TARGET | r/w | target position, 0..100,000 |
| 1 | SPEED | r/w | maximum position change per period |
| 2 | CURRENT | r/w | current position; a write presets it |
| 3 | CTRL | r/w | bit 0 output enable; bit 1 (read only) at target |

Why 50 MHz: 10 % of a 20 ms period at 50 MHz is exactly 100,000 clocks. That
matches the position resolution the servo link is specified to give. The
article gives no clock rate for the demonstrator.

### interval_timer

This is a down-counter with the usual soft-processor timer registers. The
default period of 1,000,000 clocks gives 50 Hz. The time-out flag stays set
until the processor writes STATUS.

| offset | register | meaning |
|---|---|---|
| 0 | STATUS | bit 0 TO (any write clears it); bit 1 RUN |
| 1 | CONTROL | bit 0 irq enable; bit 1 continuous; bit 2 start; bit 3 stop |
| 2 | PERIOD | period in clocks (minimum 2) |
| 3 | SNAP | current count |
| 4 | COUNT | time-outs since reset |

The timer is stopped after reset. Interrupts are exactly `PERIOD` clocks
apart.

### spi_slave

This is a receive-only SPI slave: mode 0, MSB first, one 32-bit frame per
chip select, carrying X in bits 31:16 and Y in bits 15:0. The SPI pins are
oversampled by the system clock, so SCLK must be at most 1/4 of the clock
(12.5 MHz at 50 MHz).

A frame is accepted only if it has exactly 32 bits. Then:

- The frame lands in DATA and READY is set.
- With the interrupt enabled, `irq_o` follows READY.
- Reading DATA clears READY.

Error cases:

- A frame of any other length sets FRAME_ERR and is dropped.
- A frame that arrives while READY is still set sets OVERRUN and replaces
  DATA.

Registers: 0 DATA, 1 STATUS (READY, OVERRUN, FRAME_ERR; write 1s to clear),
2 CONTROL (irq enable), 3 FRAMES (count of frames received).

The history of the last eight positions belongs to the processor's interrupt
software, not to this block.

### Address map (word addresses, 16 words per window)

| window | word address | block |
|---|---|---|
| 0 | 0x000 | interval timer |
| 1 | 0x010 | SPI receiver |
| 2+n | 0x020 + 16n | servo channel n, n = 0..4 |

## The six-axis drive

Each joint has one `drive_subsystem`. The processor serves the axes one
after another in every 16 kHz control period. For each axis it reads the
current and position measurements, runs the control calculation, and writes
three phase duties. The space-vector modulation is done in software.

- **ADC interface, `sinc3_filter`.** Each sigma-delta modulator bit stream
  goes through three integrators at the modulator rate. Every `DECIMATION`
  bits (default 64), three combs produce one sample. The output runs from 0
  (all zeros) to 64³ = 262,144 (all ones), in 19 bits. Wrap-around in the
  integrators is intentional and harmless. The subsystem supplies the
  modulator clock: the system clock divided by 5, i.e. 20 MHz. There are two
  channels per axis (phase currents). At decimation 64 a new sample arrives
  every 3.2 µs. A step in the input has fully settled after three windows,
  9.6 µs, which fits within the 10 µs ADC settling allowance of a
  16 kHz control period.
- **Encoder interface, `quad_encoder`.** This is a 4× quadrature decoder
  with a 32-bit signed count. A change of both A and B at once is illegal:
  it is not counted and it sets an error flag.
- **PWM, `drive_pwm`.** This is a three-phase centre-aligned PWM built on an
  up/down counter with `HALF` = 3125. The period is 6250 clocks, which is
  16 kHz at 100 MHz. The high-side switch is on for exactly 2·duty clocks
  per period. The low-side switch is on for 2·(HALF − duty − DEADTIME)
  clocks. This leaves `DEADTIME` (50 clocks, 500 ns) with both switches off
  at every edge. An assertion checks that the two switches of a phase are
  never on together. Duties are taken on the clock before the bottom of the
  count, so a duty written during a period takes effect in the next one.
  `sync_o` marks the bottom of the count.

### foc_accel: one field-oriented-control step per axis

A single accelerator serves all six axes in turn. The processor writes the
axis number and the step's inputs, starts the step, polls DONE and reads the
voltage vector. The step runs four stages:

1. **Clarke.** `i_alpha = ia`, `i_beta = (ia + 2·ib)/√3`. This takes one
   multiply by 18919/32768.
2. **Park.** (i_alpha, i_beta) is rotated by −θ, which gives (id, iq).
3. **PI.** There is one PI controller each for d and q:
   `e = ref − i`, then `integ = sat(integ + KI·e)`, then
   `v = sat(integ + KP·e)`. The integrators are stored per axis, so
   interleaving axes does not mix their states.
4. **Inverse Park.** (vd, vq) is rotated by +θ, which gives
   (v_alpha, v_beta). Space-vector modulation of these values is left to
   software.

**The rotator.** Both rotations share one CORDIC rotator, at one iteration
per clock with 16 iterations. The angle is first brought into ±90° by a
half-turn pre-rotation, which negates x and y. The CORDIC gain of 1.6468 is
then removed with a multiply by 19898/32768. The arctangent table is the 18
constants `round(atan(2^-i)·2^20/2π)`. The datapath carries 4 guard bits
beyond Q1.15.

**Accuracy and timing.** Results are within a few LSB of floating-point
transforms. A step takes 38 clocks (0.38 µs at 100 MHz), against a 1.5 µs
per-axis figure for a hardware fixed-point FOC.

**Formats.**
- Currents and voltages are Q1.15.
- θ is 16 bits, with 65536 = one electrical turn.
- KP and KI are unsigned Q4.12.
- Every result saturates to Q1.15.

Register map (window 6 of the drive bus):

| offset | register | meaning |
|---|---|---|
| 0 | CTRL | write bit 0 = START, bit 1 = clear the selected axis's integrators; read bit 0 BUSY, bit 1 DONE |
| 1 | AXIS | axis whose integrators are used |
| 2..8 | IA, IB, THETA, ID_REF, IQ_REF, KP, KI | inputs |
| 9..14 | ID, IQ, VD, VQ, VALPHA, VBETA | results |
| 15 | CYCLES | clocks taken by the last step |

Axis 0's `sync_o` is the control interrupt, `ctrl_irq`. All axes leave reset
together, so their counters stay in phase.

Register window n (word address 16n) belongs to axis n. Window 6 holds the
FOC accelerator. Window 7 holds the link to the external Linux processor. It
is a second copy of the demonstrator's `spi_slave`, with its own interrupt,
`host_irq`. It receives 32-bit words and uses the same registers as in the
demonstrator. The article lists this SPI interface but gives no frame format
and no contents. What the words mean is left to the software.

| offset | register | meaning |
|---|---|---|
| 0..2 | DUTY_U/V/W | duty per phase, 0..3125 |
| 3 | CTRL | bit 0 enable; write bit 1 = 1 clears position; write bit 2 = 1 clears encoder error |
| 4 | POSITION | encoder count |
| 5 | STATUS | bit 0 encoder error |
| 6, 7 | ADC0, ADC1 | latest sinc3 samples |
| 8 | PERIODS | PWM periods since reset |

The article also draws a *drive state machine* in each axis, but does not
describe its states. It is not built: the CTRL enable bit switches the power
stage directly.

## Bus

`cobot_pkg` defines the bus. A request (`mm_req_t`) has:

- a one-clock `read` or `write` strobe;
- a 12-bit word address;
- 32-bit write data.

Read data (`m_rdata`, with `m_rvalid`) returns exactly one clock after the
read. There are no wait states.

`mm_interconnect` decodes the upper address bits into a slave index. It
forwards the strobe only to that slave, with a 4-bit local offset. It
remembers which slave was read so it can return that slave's data. An
unmapped window ignores writes and reads as zero. An assertion checks that
`read` and `write` are never set together.

## What is not here, and departures

- **Processors and vendor blocks are not here.** These are the soft
  processor, its floating-point custom instructions, tightly coupled memory,
  DDR3 controller, JTAG debug and I2C interface. Their insides are not given,
  so the buses and interrupts are ports instead.
- **The FOC accelerator is this design's own.** The article specifies it
  only as a fixed-point FOC block, reused per axis. The algorithm split, the
  CORDIC rotator, the number formats and the per-axis integrators are this
  design's own. So is the absence of a voltage-vector magnitude limit.
- **The safety IP and the drive state machine are not here.** Their rules
  and states are not given.
- **Sizes chosen here.** None of these is specified by the article:
  - 2 ADC channels per axis;
  - decimation 64;
  - 20 MHz modulator clock;
  - 500 ns dead time;
  - PWM frequency equal to the 16 kHz control rate;
  - quadrature encoders.
- **The servo speed unit is chosen here.** The article says the PWM IP
  "changes at the speed command until the position command is reached". The
  unit used here, position values per 50 Hz period, is this design's.
- **The external-processor link only receives.** The article shows a
  connection between the Linux processor and the soft processor, but not what
  crosses it. Here the Linux processor can send words to the FPGA, but the
  FPGA cannot reply over this link.
- **One article number is not built to.** The 62.5 µs software time budget
  concerns processor time. It is not a property of this logic.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_servo_pwm`: compares every pulse width and period length with a
  reference step model.
- `tb_sinc3_filter`: compares every output with a direct convolution
  against the sinc3 impulse response. It also checks settled values at
  decimation 64.
- `tb_foc_accel`: checks 120 random steps over three interleaved axes
  against floating-point Clarke/Park and inverse-Park models and an integer
  PI model. It also checks the step time.
- `tb_drive_pwm`: measures high-side and low-side times, dead time and
  period, at the full 16 kHz size.
- `tb_mm_interconnect`: random accesses against register-file slave models.
- `tb_interval_timer`, `tb_spi_slave`, `tb_quad_encoder` and
  `tb_drive_subsystem` check the register behaviour and edge cases of their
  blocks.
- `tb_servo_demo_system` and `tb_six_axis_drive` check the address maps and
  per-channel wiring. `tb_six_axis_drive` also sends a word over the
  external-processor link.

`tb_cobot_controller_top` runs the whole design at its default sizes. It
simulates 420 ms: two 5 Hz planning windows and about 6,700 control periods.
Testbench models play the vision board, the servo-loop software and the
drive-loop software. The testbench:

- checks every servo pulse against a model built from the bus writes;
- checks that every servo arrives at its target by each 5 Hz boundary;
- checks the 50 Hz and 16 kHz interrupt spacing to the clock;
- checks encoder counts, ADC values and every axis's pulse widths;
- runs one FOC step per control period, which turns each axis's ADC currents
  and encoder angle into new duties, and checks it against a floating-point
  model and the 1.5 µs budget;
- receives a numbered word every millisecond from a model of the external
  processor, over the drive's SPI link, and checks that none is lost or
  changed;
- counts each mechanism (SPI frames, timer interrupts, target and speed
  updates, moving and arriving servos, control interrupts, ADC and encoder
  reads, duty updates, FOC steps, external-processor words) and fails if any of them never happened.

It takes about a minute and a half in Verilator.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cobot_pkg.sv \
    tb/tb_cobot_controller_top.sv --top-module tb_cobot_controller_top -y rtl
./obj_dir/Vtb_cobot_controller_top
```

Use the same command with any other `tb_*.sv`. To lint the RTL, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/cobot_pkg.sv rtl/<module>.sv`.
Verilator reports two warnings that are expected:

- SYNCASYNCNET on the resets. The asynchronous reset is also used in the
  `disable iff` of the assertions.
- Unused bits of the per-axis sync vector in `six_axis_drive`. Only axis 0's
  sync is needed, because the axes run in phase.

## Changing it

- Servo count, period and range are parameters of `servo_demo_system`. The
  article's servo board accepts up to 24 channels.
- Axis count, PWM half-period, dead time, ADC channel count, decimation and
  modulator clock divider are parameters of `six_axis_drive`.
- Shared constants (clock rates, rates, window numbers) live in `cobot_pkg`.
- The sinc3 output width follows from the decimation: 3·log2(D)+1 bits.

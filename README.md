# Induction-motor vector control in 16-bit fixed point

This is synthesizable SystemVerilog for the digital controller of an
induction-motor drive using rotor-flux-oriented vector control. It follows a
published FPGA design that was built from a block diagram (Xilinx System
Generator under Simulink).

Vector control makes an induction motor behave like a separately excited DC
motor. The measured stator currents are turned into a frame that rotates with
the rotor flux. In that frame one current component (`i_sd`) sets the flux and
the other (`i_sq`) sets the torque. Each gets its own PI loop. The controller
has to know where the rotor flux is pointing. Here it estimates the flux from
the measured stator voltages and currents, which takes one square root and two
divisions on every control step.

Each control step takes the phase currents, the rotor speed and the stator
voltages. It returns the stator voltage command (alpha/beta). A PWM stage
outside this design turns that command into gate signals.

## Block structure

```
vector_control                  top: START edge detector + core
 ├─ start_edge_detect           START level -> one-clock aq_done strobe (falling edge)
 └─ vector_sg                   the control core
     ├─ clarke_transform        i_a, i_c -> i_alpha, i_beta
     ├─ rotor_flux_estimator    voltage model -> |psi_r|, cos/sin of flux angle
     │   ├─ isqrt               |psi_r| = sqrt(psi_ra^2 + psi_rb^2)
     │   └─ divider  x2         cos = psi_ra/|psi_r|, sin = psi_rb/|psi_r|
     ├─ park_transform          i_alpha, i_beta -> i_sd, i_sq
     ├─ w_estimator             synchronous speed w = p*w_r + (Lm/Tr) i_sq/psi_r
     │   └─ divider
     ├─ pi_subsystem            four PIs: speed, flux, current q, current d
     │   └─ pi_controller x4
     ├─ decoupling              adds cross-coupling / back-EMF terms
     └─ inverse_park            u_sd, u_sq -> u_alpha, u_beta
```

`vc_pkg` holds the shared 16-bit type, the fixed-point formats, the machine
constants and the helper functions. `delay_line` is the z^-n register chain
that sequences the pipelines.

## One control step, clock by clock

START is a level from the acquisition side. `start_edge_detect` registers it
once and compares the delayed copy with the current value (`delayed > current`).
The result is registered. This gives `aq_done`, a one-clock pulse after START
falls. Counting from `aq_done` inside `vector_sg`:

| clock | what happens |
|---|---|
| 0 | `isa`, `isc`, `m_w`, `usa`, `usb` captured in enable registers |
| 1 | Clarke transform (1 clock); its result is held in registers from clock 3 |
| 3 | rotor flux estimator starts (aq_done delayed 1+2). The voltages reach it through a 2-clock delay. |
| ~59 | estimator READY (56 clocks after its start); cos, sin and \|psi_r\| pass through one more register |
| +2 | Park transform done (fixed 2-clock pipeline) |
| +3 | estimator READY delayed by 3 starts both the PI subsystem and the ω estimator |
| +11 / +36 | PI subsystem READY / ω estimator READY |
| join | when both have reported, the decoupling block starts (3 clocks) and inverse Park follows (2 clocks) |
| +3, +4 | decoupling READY delayed 3 loads `u_a`/`u_b`; one clock later `ready`/`done` |

A full step is about 100 clocks. With the assumed 100 µs control period, any
clock of 1 MHz or more is enough. START must not fall again before `done`.

Inside `pi_subsystem`, the delays are those of the reference diagram:

- START loads the input registers.
- The speed and flux PIs start one clock later.
- Their outputs pass one register.
- The measured currents pass 3 + 1 registers.
- The current PIs start 1+3+1 clocks after START.
- The voltages pass one more register.
- READY comes 1+3+1+5+1 = 11 clocks after START.

In the reference design, long fixed delay lines (25, 36, 45 and 66 samples)
aligned the data to the latencies of its library blocks. This design does not
copy them. Every block here holds its outputs until its next start. The core
therefore uses a small join: the decoupling block starts as soon as both the PI
subsystem and the ω estimator have reported READY. If you change the latency
of a block, no delay needs retuning.

## The rotor flux estimator

This block is the largest and the hardest to get right. Its equations are the
standard voltage model in the stationary frame. On every start it computes:

```
psi_s  += Ts (u_s - Rs i_s)                 alpha and beta
psi_r   = (Lr/Lm) (psi_s - sigma Ls i_s)
|psi_r| = sqrt(psi_ra^2 + psi_rb^2)
cos     = psi_ra / |psi_r|,   sin = psi_rb / |psi_r|
```

A sequencer (`S_IDLE → S_INTEG → S_ROTOR → S_SQUARE → S_SQRT → S_DIV`) runs
the steps in order, then pulses `ready`:

1. It latches the inputs.
2. It updates the two integrators.
3. It forms the rotor flux and saturates it to Q3.12.
4. It squares and sums.
5. It runs the 17-clock square root.
6. It starts both 31-clock divisions together.

Points to know:

- **Integrator width.** At 100 µs, one increment of `Ts·Rs·i` is about 1e-5 Wb.
  That is smaller than one LSB of a 16-bit Q3.12 flux. The two stator-flux
  integrators are therefore 48 bits with 32 fraction bits. Only the outputs
  are 16 bits wide.
- **Pure integration.** As in any voltage model, an offset in the measured
  voltage or current makes the estimate drift. Nothing here corrects for
  that. In the closed-loop simulation the machine model and the controller
  constants match exactly, so the drift stays small.
- **Zero flux.** At power-up the flux is zero, so the square root gives 0. In
  that case the block does not divide: it outputs cos = 1 and sin = 0 and
  finishes early.
- `db_psy_sa/sb` carry the stator flux (Q3.12). They come out as
  `debug1/debug2` at the top.

The square root (`isqrt`) works digit by digit, one result bit per clock. The
divider (`divider`) is a restoring divider, one quotient bit per clock. Its
quotient is truncated toward zero and saturated. Division by zero gives the
saturated value. The reference design used vendor CORDIC cores at these
points. These substitutes compute the same functions but have different
latency and size.

## ω estimator, PIs and decoupling

- **`w_estimator`** computes the synchronous electrical speed
  `w = 2·w_r + (Lm/Tr)·i_sq/psi_r`. `w_r` is the mechanical speed and the
  machine has 2 pole pairs. Before dividing, `psi_r` is raised to at least
  0.05 Wb so that start-up does not divide by almost nothing. `psi_clamp`
  reports when that happens.
- **`pi_controller`** works as follows:
  - It implements `e = ref − fb`, `I ← clamp(I + KI·e)` and
    `out = clamp(KP·e + I)`, where `KI` is the integral gain per sample
    (Ki·Ts).
  - The integrator advances only on `start`, so it cannot run away between
    samples.
  - Clamping the integrator to the output limit is the anti-windup.
  - The gains are `real` parameters. They are turned into constants with 16
    fraction bits when the design is elaborated.
- **`decoupling`** computes:
  - `u_sd = v_sd − w·σLs·i_sq`
  - `u_sq = v_sq + w·σLs·i_sd + w·(Lm/Lr)·psi_r`

The default gains are set for the assumed machine and a 100 µs period. They
are not taken from the reference design.

| loop | KP | KI (per sample) | limit |
|---|---|---|---|
| speed → i_sq ref | 2.0 A/(rad/s) | 0.004 | ±20 A |
| flux → i_sd ref | 40 A/Wb | 0.3 | ±20 A |
| current → voltage (d and q) | 8 V/A | 0.2 | ±300 V |

The flux loop limit must stay above the magnetising current: with the
assumed Lm, 1 Wb needs 14.4 A.

## Fixed-point formats

Every signal between blocks is 16-bit two's complement. The binary point
depends on the quantity:

| quantity | format | range | LSB |
|---|---|---|---|
| current | Q7.8 | ±128 A | 3.9 mA |
| voltage | Q10.5 | ±1024 V | 31 mV |
| flux | Q3.12 | ±8 Wb | 0.24 mWb |
| speed | Q11.4 | ±2048 rad/s | 0.0625 rad/s |
| cos / sin | Q1.14 | ±2 | 6.1e-5 |

Speeds at the ports (`vit_ref`, `db_w_r`) are mechanical rad/s. The internal
`w` is electrical. Products are truncated (floor), and every result is
saturated to 16 bits. Constants carry 16 fraction bits.

## What follows the reference design and what is this design's own

These parts follow the reference design:

- the partitioning into these blocks, and their port names
- the four-PI cascade and its delays
- the start-enabled PI integrators
- the aq_done edge detector
- the short delays around the flux estimator and the output registers
- one square root and two divisions in the flux estimator
- a 1 Wb flux reference
- 16-bit precision
- a machine rated 2238 VA, 220 V, 5.87 A, with 2 pole pairs at 60 Hz

The following are this design's own choices:

- **Equations of every block.** The textbook forms of rotor-flux-oriented
  control were used; the reference design does not print them.
- **Binary points.**
- **Machine constants** (in `vc_pkg`): Rs = 0.435 Ω, Rr = 0.816 Ω,
  Lls = Llr = 2 mH, Lm = 69.31 mH. These are the common 3 HP reference
  machine of that rating.
- **Control period** of 100 µs.
- **Gains and limits**, and the anti-windup.
- **Flux floor** in the ω estimator.
- **Zero-flux rule** in the flux estimator.
- **Arithmetic cores**: the radix-2 square root and divider instead of CORDIC
  cores.
- **Join** in place of the long alignment delays.
- **Reset**: synchronous, active high, clears everything.
- **Pipeline depths**: 1 clock for Clarke, 2 for Park and inverse Park, 3 for
  decoupling.

Not included:

- The PWM firing-signal generator. It was a behavioural function outside the
  reference hardware, and its modulation method is not specified. `u_a`,
  `u_b` and `done` are the ports it would use.
- The Simulink gateway blocks. They only set the port formats.
- The inverter and the motor.

## Verification

Every module except the `delay_line` helper has a self-checking testbench in
`tb/` named `tb_<module>`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- **Arithmetic blocks.** The testbench compares against floating-point models
  of the equations. The tolerance is a few LSB plus the rounding of the
  constants.
- **Divider and square root.** These are checked exactly, including the edge
  cases.
- **Latency.** Every handshake's latency is checked, counted from the clock
  in which `start` is high to the clock in which `ready`/`done` is high: 11
  clocks for the PI subsystem, 36 for the ω estimator, 56 for the flux
  estimator, 32/34 for the two divider configurations, 18 for the square root
  and 4 for decoupling.
- **Closed loop, short** (`tb_vector_sg`). The core runs against
  `im_motor_model`, a behavioural voltage-fed induction machine in `tb/`. It
  uses the same constants, J = 0.089 kg·m² and an ideal inverter. The run
  covers magnetisation from zero and the ramp to 286 rpm (1 s).
- **Closed loop, full** (`tb_vector_control`). The whole top runs at its
  default parameters over the full 14 s profile: +286 rpm, −286 rpm, +573 rpm
  under light load (1 N·m), then the same under rated load (11.9 N·m). The
  testbench checks:
  - the speed is within 15 rpm of the reference at the end of every hold
    (at the hold ends the error was below 1 rpm)
  - the machine's rotor flux and the estimated |psi_r| are within 15% of 1 Wb
    (both stayed within about 1.5% in the logged samples)
  - the zero-flux path, the flux floor, a PI clamp, the speed reversals and
    the load change each happened at least once

The full run takes about 10 s with Verilator.

To simulate one testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb +libext+.sv --top-module tb_vector_control \
    rtl/vc_pkg.sv tb/tb_vector_control.sv
./obj_dir/Vtb_vector_control
```

Replace `tb_vector_control` with any other `tb_*` name to run that testbench.
The machine constants and the control period are in `vc_pkg`. The gains are
parameters of `pi_subsystem`. The flux reference is a parameter of
`vector_sg`.

## Limits worth knowing

- **Output update.** `u_a`/`u_b` are new once per `done`. The testbenches
  apply them one control period after sampling, as real hardware would.
- **Flux drift.** The flux estimator is a pure integrator. On real
  measurements with offsets it will drift, and it needs the usual low-pass or
  offset correction, which this design does not have.
- **Load sign.** The load in the closed-loop test is a constant torque of
  fixed sign, so during reversal it drives the machine instead of braking it.
- **Resources.** No resource or timing figures are claimed for a specific
  FPGA. The 64-bit intermediate products keep the arithmetic simple. A
  size-optimised version would narrow them to what the formats need.

# Real-time BLDC drive simulator on one FPGA

This design puts a brushless DC motor, its three-phase inverter and the
motor's controller on one FPGA. The motor side is a real-time model. It solves
the motor's electrical and mechanical equations in IEEE-754 double precision,
one integration step every microsecond, using the two-step Adams-Bashforth
method. The controller side is ordinary fixed-point drive logic: a speed loop,
a current loop, a PWM generator, commutation from Hall sensors, dead time,
overcurrent latching and a DC-link monitor. The two sides exchange only what
would cross the pins of a real drive: the six gate signals go one way, and the
Hall signals plus the sampled currents and DC-link voltage go the other. So the
controller can be developed and tested against the model before it meets a
real motor, and it can be moved to a real motor unchanged.

Everything runs from one 50 MHz clock. Slower rates are clock enables:

- the 1 MHz model step;
- the 250 kHz angle update;
- the 15 kHz PWM carrier.

## Motor model data

The defaults describe a small motor with one pole pair:

| Quantity | Value |
|---|---|
| R | 1 Ω |
| L | 1 mH |
| M | 0.5 mH |
| J | 45·10⁻³ kg·m² |
| k_ψ = k_f | 0.025 V·s/rad |
| loss torque (Nm, opposes motion) | 3·10⁻⁹ ω² + 8·10⁻⁶ \|ω\| + 0.0271 |

These are parameters of `bldc_motor` and `speed_emf`.

## Double-precision arithmetic (`fp64_pkg`, `fp64_add`, `fp64_mul`)

`fp64_pkg` holds combinational IEEE-754 binary64 add/subtract and multiply.
Both round to nearest, ties to even. Subnormals are read as zero and flushed to
zero. Overflow gives infinity. NaNs are neither produced nor handled. No vendor
floating-point core is used.

`fp64_add` and `fp64_mul` wrap these functions in fixed-latency pipelines:
15 cycles (300 ns) for the adder and 12 cycles (240 ns) for the multiplier.
Each has a `start`/`done` pair. The result is computed in the first stage and
then delayed, so a synthesis tool with retiming can spread the logic over the
registers. The latency is the parameter `LAT`.

## The model step (`bldc_motor`)

This block is the core of the design and the hardest to follow.

Per phase k, with the star point free (i_a + i_b + i_c = 0):

    (L - M) di_k/dt = u_k - e_k - u_n - R i_k
    u_n = mean of (u_k - e_k) over the phases that carry current
    J dω/dt = Te - Tl - T_loss(ω),     Te = Σ k_f f_k i_k

Both states advance with the two-step Adams-Bashforth rule:

    x(n+1) = x(n) + Ts/2 · (3 h(n) - h(n-1))

The step is written as `inc = Ts/(2L')·(3h - h_prev)`, so that the constant
Ts/(2L') is folded once at elaboration.

### Schedule

Ten adders and eight multipliers work in lock step. A step has three stages.
In each stage:

- every unit reads registers;
- all results are written back when the slowest unit finishes, which takes
  max(15, 12) + 1 = 16 cycles.

A step therefore takes 48 of its 50 cycles. `busy` is high during a step.
`overrun` is a sticky flag that is set if a `step` strobe arrives while the
model is still busy.

Registers keep their values across steps. A value produced in a late stage is
used by an early stage of the next step. In effect the current loop works on
inputs that are one or two steps (1–2 µs) old. That is small against the
0.5 ms electrical time constant. It is the price of fitting the whole step into
three stages.

| Stage | Work |
|---|---|
| 0 | apply increments to i and ω; u − e; partial sums for u_n; torque; 3h; \|ω\|·C2; ω → angle rate; u_n |
| 1 | u − e − u_n; 3h − h_prev for currents and speed; Te − Tl; R·i; k_f f_k · i_k |
| 2 | h = (u − e − u_n) − R·i; torque sum minus loss; increments Ts/(2L')·(3h − h_prev) |

### Open phase and loss torque

A phase marked cleared (`clr`, driven by the conduction logic) has its current
forced to zero and is left out of u_n.

The loss torque always opposes the motion. At standstill, the rotor stays still
while |Te − Tl| ≤ 0.0271 Nm. A step that would reverse the speed stops it at
zero instead.

### Angle rate output

The model also outputs `ang_rate`, which is ω converted to angle counts per
4 µs tick in Q13.32. It feeds the angle counter.

## Angle, back EMF and Hall signals (`count_angle`, `emf_table`, `speed_emf`)

`count_angle` accumulates `ang_rate` on the 250 kHz tick. One electrical
revolution is 6 × 1023 = 6138 counts, so 2π/3 is exactly 2046 counts. The
counter wraps in both directions.

`emf_table` produces the trapezoidal excitation coefficient f_k of each phase:

- f_k rises from −1 to +1 over one sixth of a turn;
- it stays at +1 for two sixths;
- it falls back over one sixth;
- it stays at −1 for two sixths.

Only the rising ramp is stored: 1023 Q31 words, computed at elaboration as
q(j) = (2j + 1 − 1023)/1023. The other sixths are constants or the mirrored
ramp. Phases b and c read the angle shifted by ±2046 counts. Each Hall signal
is high while its phase is in sixths 1–3, so the Hall edges fall on the
commutation points. The forward Hall sequence {HA,HB,HC} is
001 → 101 → 100 → 110 → 010 → 011.

`speed_emf` turns the coefficients into doubles:

- back EMF e_k = p·k_ψ·f_k·ω;
- torque coefficients p·k_f·f_k.

It uses four multipliers in two passes, and starts on every model step.

## Inverter and conduction (`conduction_logic`, `inverter_model`)

Inverter legs:

| Leg | Upper switch | Lower switch |
|---|---|---|
| a | T1 | T4 |
| b | T3 | T6 |
| c | T5 | T2 |

Bit k of every 6-bit gate vector is T(k+1).

`conduction_logic` decides what carries each phase current:

- if a leg's transistor is gated, that transistor conducts;
- otherwise the free-wheeling diode chosen by the current's sign conducts
  (lower diode for current into the motor, upper diode for current out of it);
- the diode conducts until the current reaches zero or changes sign with
  respect to its sign while driven;
- from then on `cr` clears the phase until the leg is gated again.

`inverter_model` outputs +Ud/2 or −Ud/2 per leg from the conducting switch, and
0 for a cleared phase. It asserts against shoot-through.

## Controller

| Block | What it does |
|---|---|
| `saw_pwm` | Triangle carrier counting 0…1667…0 (15 kHz). The PWM is on for exactly 2·duty cycles per period. `trip` strobes at both turning points. |
| `zoh_adc` | On `trip`, samples the three currents and Ud into signed 16-bit integers: 1/64 A and 1/64 V per LSB, truncated and saturated. |
| `dc_link_monitor` | `dc_ok` drops below 40 V and returns above 42 V. |
| `speed_measurement` | Times Hall edges in 1 µs ticks. ω = (π/3)/T, computed by a 24-cycle divider, 1/8 rad/s per LSB. The sign comes from the Hall sequence. A jump between non-adjacent Hall states restarts the measurement. If no edge arrives within twice the last interval, the estimate is halved. After 1 s without an edge the result is 0. |
| `speed_regulator` | Reference is ω_set, or 0 when `dc_ok` is low. Proportional gain 16 (as a shift), limited to 0…25 A. A negative error selects generator operation. |
| `current_regulator` | PI. Feedback is Σ\|i\|/2, which equals the current in the two conducting phases. The integrator is clamped for anti wind-up. Duty is limited to 0…1500 (90 %). |
| `switching_logic` | Hall state → transistor pair. Generator operation selects the opposite pair. Both switches of the pair are chopped by the PWM. `en` = 0 blocks all gates. |
| `overcurrent` | Latches PWM blocking when any \|i\| > 40 A. `oc_clear` releases it. |
| `dead_time` | One per leg. It delays each turn-on until the input has been high, and the partner switch off, for `dead_cycles` cycles. All three legs share one setting. |

Hall-to-pair table (pair names are the two gated transistors):

| Hall {HA,HB,HC} | Motor | Generator |
|---|---|---|
| 001 | T5 T6 | T2 T3 |
| 101 | T6 T1 | T3 T4 |
| 100 | T1 T2 | T4 T5 |
| 110 | T2 T3 | T5 T6 |
| 010 | T3 T4 | T6 T1 |
| 011 | T4 T5 | T1 T2 |

The controller has no multipliers: every gain is a power of two.

## Top level (`bldc_rts_top`)

Inputs:

- `ud` and `tl`: DC-link voltage and load torque, as doubles;
- `omega_set`: speed reference;
- `dead_cycles`: dead time;
- `oc_clear`: releases the overcurrent latch;
- `open_loop` and `duty_ol`: with `open_loop` set, the regulators are bypassed
  and the PWM runs at the fixed duty `duty_ol` in motor operation.

`open_loop` is the mode for comparing the model with a real motor.

Outputs:

- the model states (currents, speed, torque, back EMF, angle);
- the gates, Hall signals, measured speed, duty and status flags.

`freq_div` makes the step and angle enables.

## Departures and own choices

- The arithmetic units are plain pipelines, not vendor cores.
- The single step takes 48 cycles (960 ns), against the 740 ns of the original
  schedule. It still fits the 1 µs slot.
- The step is split into three lock-step stages, so some terms lag one or two
  steps (see above). This is this design's own schedule.
- Separate clocks are replaced by clock enables on one 50 MHz clock. No PLL is
  instantiated.
- The back-EMF table holds an ideal straight ramp. A measured shape could be
  computed or loaded instead.
- The following are own choices:
  - the regulator gains and limits;
  - the current scaling (1/64 A), voltage scaling (1/64 V) and speed scaling
    (1/8 rad/s);
  - the overcurrent threshold and DC-link threshold;
  - the hysteresis;
  - the speed-measurement details (sign from the Hall sequence, halving on a
    missing edge).
- The `direction` input of `emf_table` is tied to 0. Reversal of torque comes
  from generator operation.
- The following are not part of the RTL. The model states are brought out as
  ports instead.
  - the DAC interface that shows the model states on an oscilloscope;
  - the host communication link;
  - the PLL.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values are
computed independently, for example:

- `tb_fp64_add` and `tb_fp64_mul` compare thousands of random and edge-case
  operands with the simulator's `real` arithmetic, and check the latency to the
  cycle;
- `tb_bldc_motor` checks the current rise against Ud/(2R)·(1 − e^(−t/τ)), the
  coasting speed against the loss polynomial, static friction, reverse drive by
  a load, and the 48-cycle step.

Two testbenches run the whole drive at default parameters:

- `tb_bldc_rts_top` (about 0.9 s simulated) is a closed-loop run:
  - start from standstill to a 10 rad/s reference;
  - a DC-link sag that forces generator braking;
  - an overvoltage plus a speed step that trips the overcurrent latch, which is
    then cleared.

  It counts commutations, PWM pulses, diode free-wheeling, phase clears, speed
  updates, generator entries, DC-link drops, overcurrent trips and dead-time
  gaps, and fails if any of them never happened. It also checks continuously
  for shoot-through, short dead times and step overruns.
- `tb_open_loop` runs duty 0.7 from standstill. It checks:
  - the mean current against (2d − 1)·Ud/(2R);
  - the acceleration against (Te − loss)/J;
  - the acceleration drop after a 0.2 Nm load step.

Reaching the several-thousand-rpm operating points of a real motor would take
tens of seconds of simulated time and has not been simulated.

## Simulating

With Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl +libext+.sv -Irtl \
        rtl/fp64_pkg.sv rtl/ctrl_pkg.sv tb/tb_bldc_rts_top.sv \
        --top-module tb_bldc_rts_top -j 4
    ./obj_dir/Vtb_bldc_rts_top

Replace the testbench name to run any other test. The end-to-end run takes
about a minute of wall time. Block tests take seconds.

## Parameters worth changing

| Parameter | Meaning |
|---|---|
| `bldc_motor`: `R_OHM`, `L_H`, `M_H`, `J_KGM2`, `LOSS_C*`, `TS` | Motor data. `KANG` must follow `TS` and the angle tick. |
| `speed_emf`: `K_PSI`, `K_F`, `POLE_PAIRS` | EMF and torque constants. |
| `fp64_add.LAT`, `fp64_mul.LAT` | Latencies. The model's stage length follows them. `STEP_DIV` must stay above 3·(max + 1). |
| `emf_table.N_PTS` | Points per sixth. `count_angle.ANGLE_STEPS` must be 6·N_PTS. |
| `saw_pwm.HALF_PERIOD` | Carrier half period in clocks: 1667 gives 15 kHz. |
| Regulator and protection blocks | Gains as shifts, and limits in LSBs of `ctrl_pkg`. |

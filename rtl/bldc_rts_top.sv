// bldc_rts_top: real-time BLDC drive simulator and its controller in one chip.
//
// Plant (double precision, one step per microsecond):
//   count_angle integrates the speed into the electrical angle; emf_table
//   turns the angle into the three excitation coefficients and the Hall
//   signals; speed_emf forms back EMF and torque coefficients; bldc_motor
//   integrates currents and speed; conduction_logic decides which transistor
//   or diode of each leg conducts; inverter_model gives the phase voltages.
// Controller (fixed point, as a real controller would see the motor):
//   zoh_adc samples currents and DC-link voltage at the carrier turning points;
//   dc_link_monitor forces the speed reference to 0 on a weak DC link;
//   speed_measurement times the Hall edges; speed_regulator (P) sets the
//   current reference and motor/generator mode; current_regulator (PI) sets
//   the duty; saw_pwm compares it with the triangular carrier; overcurrent
//   latches PWM blocking; switching_logic picks the transistor pair from the
//   Hall state; three dead_time blocks delay each turn-on.
// The two halves exchange only gate signals, Hall signals and the sampled
// currents and voltage, as they would across the pins of a real drive.
// One 50 MHz clock; freq_div makes the 1 MHz step and 250 kHz angle enables.
// The DC-link voltage and the load torque are inputs (doubles), as are the
// speed reference, the dead time and the overcurrent latch clear. With
// open_loop set the regulators are bypassed and the PWM runs at the fixed
// duty duty_ol in motor operation (the open-loop validation mode). The model
// states are outputs for observation (the design sends them to a DAC).
// The blocks' own status strobes (motor busy, EMF update done, speed result
// valid) and the carrier value are not needed at this level and stay unused.
module bldc_rts_top
  import fp64_pkg::*;
  import ctrl_pkg::*;
#(
  parameter int STEP_DIV = 50
) (
  input  logic               clk,
  input  logic               rst,
  input  q16_t               omega_set,    // speed reference, 1/8 rad/s per LSB
  input  fp64_t              ud,           // DC-link voltage, V
  input  fp64_t              tl,           // load torque, Nm
  input  logic [7:0]         dead_cycles,  // dead time, clock cycles
  input  logic               oc_clear,     // clears the overcurrent latch
  input  logic               open_loop,    // 1: fixed duty duty_ol, motor operation
  input  duty_t              duty_ol,      // open-loop duty, carrier counts
  output fp64_t              ia, ib, ic,
  output fp64_t              speed,
  output fp64_t              te,
  output fp64_t              ea, eb, ec,
  output logic [12:0]        angle,
  output logic [2:0]         hall,         // {HA, HB, HC}
  output logic [5:0]         gates,        // T1..T6 after dead time
  output logic [2:0]         cr,           // open (current-free) phases
  output logic               pwm,
  output logic               gen,
  output logic               oc_block,
  output logic               dc_ok,
  output q16_t               omega_meas,
  output duty_t              duty,         // duty applied to the PWM
  output logic               overrun
);
  // ---------------- clock enables ----------------
  logic step, ang_tick;
  freq_div #(.STEP_DIV(STEP_DIV)) u_div (.clk, .rst, .step, .ang_tick);

  // ---------------- plant ----------------
  logic signed [45:0] ang_rate;
  logic signed [31:0] emf1, emf2, emf3;
  logic ha, hb, hc;
  fp64_t kfa, kfb, kfc, va, vb, vc;
  logic [5:0] on_t;
  logic motor_busy, emf_done;

  count_angle u_angle (.clk, .rst, .en(ang_tick), .speed(ang_rate), .angle);

  emf_table u_table (.clk, .angle, .direction(1'b0), .emf1, .emf2, .emf3, .ha, .hb, .hc);
  assign hall = {ha, hb, hc};

  speed_emf u_semf (.clk, .rst, .start(step), .speed, .emf1, .emf2, .emf3,
                    .oemf1(ea), .oemf2(eb), .oemf3(ec), .okf1(kfa), .okf2(kfb), .okf3(kfc),
                    .done(emf_done));

  bldc_motor u_motor (.clk, .rst, .step, .ua(va), .ub(vb), .uc(vc), .ea, .eb, .ec,
                      .kfa, .kfb, .kfc, .tl, .clr(cr), .ia, .ib, .ic, .speed, .te,
                      .ang_rate, .busy(motor_busy), .overrun);

  conduction_logic u_cond (.clk, .rst, .gate(gates), .ia, .ib, .ic, .on_t, .cr);

  inverter_model u_inv (.clk, .rst, .on_t, .cr, .ud, .va, .vb, .vc);

  // ---------------- controller ----------------
  q16_t ia_q, ib_q, ic_q, ud_q, iz;
  duty_t duty_cl;
  logic gen_cl;
  logic trip, meas_valid;
  duty_t saw;
  logic [5:0] gate_raw;

  zoh_adc u_zoh (.clk, .rst, .sample(trip), .ia, .ib, .ic, .ud, .ia_q, .ib_q, .ic_q, .ud_q);

  dc_link_monitor u_dcmon (.clk, .rst, .ud_q, .dc_ok);

  speed_measurement u_smeas (.clk, .rst, .tick(step), .hall, .omega(omega_meas), .valid(meas_valid));

  speed_regulator u_sreg (.clk, .rst, .omega_set, .omega(omega_meas), .dc_ok, .iz, .gen(gen_cl));

  current_regulator u_creg (.clk, .rst, .en(trip), .iz, .ia(ia_q), .ib(ib_q), .ic(ic_q), .duty(duty_cl));

  // open loop: fixed duty in motor operation, as used to validate the model
  assign duty = open_loop ? duty_ol : duty_cl;
  assign gen  = open_loop ? 1'b0    : gen_cl;

  saw_pwm u_pwm (.clk, .rst, .duty, .pwm, .saw, .trip);

  overcurrent u_oc (.clk, .rst, .ia(ia_q), .ib(ib_q), .ic(ic_q), .clear(oc_clear), .block(oc_block));

  switching_logic u_sw (.clk, .rst, .hall, .pwm, .gen, .en(!oc_block), .gate(gate_raw));

  // legs: a = (T1,T4), b = (T3,T6), c = (T5,T2)
  dead_time u_dt_a (.clk, .rst, .hi_in(gate_raw[0]), .lo_in(gate_raw[3]), .dt(dead_cycles), .hi(gates[0]), .lo(gates[3]));
  dead_time u_dt_b (.clk, .rst, .hi_in(gate_raw[2]), .lo_in(gate_raw[5]), .dt(dead_cycles), .hi(gates[2]), .lo(gates[5]));
  dead_time u_dt_c (.clk, .rst, .hi_in(gate_raw[4]), .lo_in(gate_raw[1]), .dt(dead_cycles), .hi(gates[4]), .lo(gates[1]));

endmodule

// tb_bldc_rts_top: closed-loop run of the whole drive at default parameters.
//
// Scenario (simulated time about 1 s):
//   1. start from standstill with Ud = 48 V and a 10 rad/s reference: the
//      drive must commutate, chop, free-wheel through the diodes, measure the
//      speed and settle near the reference;
//   2. Ud drops to 30 V: the DC-link monitor must force the reference to 0 and
//      the drive must brake in generator mode;
//   3. Ud jumps to 600 V with a 100 rad/s reference: the overcurrent latch must block every gate pulse
//      until it is cleared.
// Each mechanism is counted and a mechanism that never happened is a failure.
// Continuous checks: no leg ever has both switches on, every turn-on follows
// the other switch's turn-off by at least the dead time, and no model step
// overruns its 1 us slot.
module tb_bldc_rts_top;
  import fp64_pkg::*;
  import ctrl_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  q16_t omega_set;
  fp64_t ud, tl;
  logic [7:0] dead_cycles;
  logic oc_clear, open_loop = 1'b0;
  duty_t duty_ol = '0;
  fp64_t ia, ib, ic, speed, te, ea, eb, ec;
  logic [12:0] angle;
  logic [2:0] hall, cr;
  logic [5:0] gates;
  logic pwm, gen, oc_block, dc_ok, overrun;
  q16_t omega_meas;
  duty_t duty;

  int checks = 0, failures = 0;
  int n_commut = 0, n_pwm = 0, n_diode = 0, n_clear = 0, n_meas = 0, n_gen = 0;
  int n_dclow = 0, n_oc = 0, n_dead = 0, n_blocked_pulse = 0;

  always #10 clk = ~clk;

  bldc_rts_top dut (.*);

  initial begin
    #1500ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // mechanism counters and continuous checks
  logic [2:0] hall_d;
  logic pwm_d, gen_d, dc_ok_d, oc_d, oc_d2, oc_d3;
  logic [2:0] cr_d;
  q16_t om_d;
  int   off_time [6];
  localparam int PARTNER [6] = '{3, 4, 5, 0, 1, 2};   // T1<->T4, T2<->T5, T3<->T6
  logic [5:0] gates_d;
  int   cyc = 0;
  int   shoot = 0, short_dead = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (hall != hall_d) n_commut++;
    if (pwm && !pwm_d) n_pwm++;
    if (|(dut.on_t & ~gates)) n_diode++;
    if (|(cr & ~cr_d)) n_clear++;
    if (omega_meas != om_d) n_meas++;
    if (gen && !gen_d) n_gen++;
    if (!dc_ok && dc_ok_d) n_dclow++;
    if (oc_block && !oc_d) n_oc++;
    if (oc_d3 && |gates) n_blocked_pulse++;   // gates lag the latch by two registers
    if ((gates[0] && gates[3]) || (gates[2] && gates[5]) || (gates[4] && gates[1])) shoot++;
    for (int k = 0; k < 6; k++) begin
      if (gates_d[k] && !gates[k]) off_time[k] = cyc;
      if (gates[k] && !gates_d[k] && off_time[PARTNER[k]] > 0) begin
        if (cyc - off_time[PARTNER[k]] < int'(dead_cycles)) short_dead++;
        else if (cyc - off_time[PARTNER[k]] < 4 * int'(dead_cycles)) n_dead++;
      end
    end
    hall_d <= hall; pwm_d <= pwm; gen_d <= gen; dc_ok_d <= dc_ok; oc_d <= oc_block; oc_d2 <= oc_d; oc_d3 <= oc_d2;
    cr_d <= cr; om_d <= omega_meas; gates_d <= gates;
  end else begin
    // start the edge detectors from the present values
    hall_d <= hall; pwm_d <= pwm; gen_d <= gen; dc_ok_d <= dc_ok; oc_d <= oc_block; oc_d2 <= oc_block; oc_d3 <= oc_block;
    cr_d <= cr; om_d <= omega_meas; gates_d <= gates;
  end

  task automatic run_ms(int ms);
    repeat (ms * 50_000) @(posedge clk);
  endtask

  initial begin
    real w;
    for (int k = 0; k < 6; k++) off_time[k] = 0;
    omega_set = 16'sd80;              // 10 rad/s
    ud = $realtobits(48.0);
    tl = $realtobits(0.0);
    dead_cycles = 8'd25;              // 0.5 us
    oc_clear = 1'b0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    // 1. start-up and speed control
    run_ms(700);
    w = $bitstoreal(speed);
    $display("after start-up: model speed %f rad/s, measured %0d/8, duty %0d", w, omega_meas, duty);
    check("speed near reference", w > 8.0 && w < 11.5);
    check("measured speed matches model", (real'(omega_meas) / 8.0 - w) < 1.0 && (w - real'(omega_meas) / 8.0) < 1.0);
    check("no overcurrent during start-up", !oc_block);
    // 2. DC link sag: reference forced to 0, generator braking
    ud = $realtobits(30.0);
    run_ms(100);
    check("dc link reported low", !dc_ok);
    check("braking in generator mode", gen);
    check("speed falling", $bitstoreal(speed) < w - 0.5);
    $display("after sag: model speed %f rad/s", $bitstoreal(speed));
    ud = $realtobits(48.0);
    run_ms(50);
    check("dc link back", dc_ok);
    // 3. overvoltage together with a large speed step drives an overcurrent;
    //    gates blocked until cleared
    ud = $realtobits(600.0);
    omega_set = 16'sd800;
    run_ms(10);
    check("overcurrent latched", oc_block);
    ud = $realtobits(48.0);
    omega_set = 16'sd80;
    run_ms(5);
    check("still latched", oc_block);
    check("no gates while blocked", gates == 6'b0);
    oc_clear = 1'b1;
    @(posedge clk);
    oc_clear = 1'b0;
    run_ms(20);
    check("running again after clear", !oc_block && n_pwm > 0);
    // mechanism counts
    $display("commutations %0d, pwm pulses %0d, diode cycles %0d, phase clears %0d, speed updates %0d",
             n_commut, n_pwm, n_diode, n_clear, n_meas);
    $display("generator entries %0d, dc-link drops %0d, overcurrent trips %0d, dead-time gaps %0d",
             n_gen, n_dclow, n_oc, n_dead);
    check("commutation happened", n_commut >= 3);
    check("pwm happened", n_pwm > 100);
    check("diode free-wheeling happened", n_diode > 0);
    check("phase current clearing happened", n_clear > 0);
    check("speed measurement happened", n_meas > 0);
    check("generator mode happened", n_gen > 0);
    check("dc-link low happened", n_dclow > 0);
    check("overcurrent happened", n_oc > 0);
    check("dead time inserted", n_dead > 0);
    check("gate pulse while blocked", n_blocked_pulse == 0);
    check("no shoot-through", shoot == 0);
    check("dead time respected", short_dead == 0);
    check("no step overrun", !overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

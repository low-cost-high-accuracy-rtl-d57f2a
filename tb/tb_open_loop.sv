// tb_open_loop: open-loop run of the whole drive at a fixed duty of 0.7.
//
// This is the configuration used to validate the motor model against a real
// motor: the regulators are bypassed, the PWM runs at a constant duty and the
// phase currents are observed. From standstill, with Ud = 48 V and duty 0.7,
// the two conducting phases see (2d - 1) Ud on average under hard chopping
// (the diodes apply -Ud during the off time), so the current settles near
// (2d - 1) Ud / (2R) = 9.6 A while the back EMF is still small. The testbench
// checks that mean current (taken over whole carrier periods), that the
// model accelerates at (Te - loss) / J, that a load step lowers that
// acceleration by Tl / J, and that every model step keeps its 1 us slot.
// Runs at the top's default parameters.
module tb_open_loop;
  import fp64_pkg::*;
  import ctrl_pkg::*;

  localparam real JJ = 45.0e-3;

  logic clk = 1'b0, rst = 1'b1;
  q16_t omega_set = '0;
  fp64_t ud, tl;
  logic [7:0] dead_cycles = 8'd25;
  logic oc_clear = 1'b0, open_loop = 1'b1;
  duty_t duty_ol = duty_t'(1167);        // 0.7 of the 1667-count half period
  fp64_t ia, ib, ic, speed, te, ea, eb, ec;
  logic [12:0] angle;
  logic [2:0] hall, cr;
  logic [5:0] gates;
  logic pwm, gen, oc_block, dc_ok, overrun;
  q16_t omega_meas;
  duty_t duty;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  bldc_rts_top dut (.*);

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_close(string what, real got, real want, real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("FAIL %s: got %f want %f (tol %f)", what, got, want, tol);
    end
  endtask

  // mean of the largest phase current magnitude and of the torque, sampled
  // once per model step
  real i_sum, te_sum;
  int  n_sum;
  logic sampling = 1'b0;
  always @(posedge clk) if (sampling && dut.step) begin
    real a, b, c, m;
    a = $bitstoreal(ia); b = $bitstoreal(ib); c = $bitstoreal(ic);
    m = (a < 0 ? -a : a);
    if ((b < 0 ? -b : b) > m) m = (b < 0 ? -b : b);
    if ((c < 0 ? -c : c) > m) m = (c < 0 ? -c : c);
    i_sum += m; te_sum += $bitstoreal(te); n_sum++;
  end

  task automatic run_ms(int ms);
    repeat (ms * 50_000) @(posedge clk);
  endtask

  // average over an exact number of carrier periods (15 periods = 1 ms)
  task automatic measure(int ms, output real i_mean, output real te_mean, output real dw);
    real w0;
    i_sum = 0; te_sum = 0; n_sum = 0;
    w0 = $bitstoreal(speed);
    sampling = 1'b1;
    run_ms(ms);
    sampling = 1'b0;
    i_mean  = i_sum / n_sum;
    te_mean = te_sum / n_sum;
    dw = $bitstoreal(speed) - w0;
  endtask

  initial begin
    real i1, t1, dw1, i2, t2, dw2, w, loss;
    ud = $realtobits(48.0);
    tl = $realtobits(0.0);
    repeat (5) @(posedge clk);
    rst = 1'b0;
    run_ms(20);
    measure(20, i1, t1, dw1);
    w = $bitstoreal(speed);
    loss = 3.0e-9 * w * w + 8.0e-6 * w + 0.0271;
    $display("no load: mean |i| %f A, mean Te %f Nm, speed %f rad/s, dw %f", i1, t1, w, dw1);
    check_close("mean current at duty 0.7", i1, 0.4 * 48.0 / 2.0, 1.5);
    check_close("acceleration without load", dw1, 20e-3 * (t1 - loss) / JJ, 0.15 * (dw1 < 0 ? -dw1 : dw1) + 0.05);
    // load step
    tl = $realtobits(0.2);
    run_ms(5);
    measure(20, i2, t2, dw2);
    w = $bitstoreal(speed);
    loss = 3.0e-9 * w * w + 8.0e-6 * w + 0.0271;
    $display("load 0.2 Nm: mean |i| %f A, mean Te %f Nm, speed %f rad/s, dw %f", i2, t2, w, dw2);
    check_close("acceleration with load", dw2, 20e-3 * (t2 - 0.2 - loss) / JJ, 0.15 * (dw2 < 0 ? -dw2 : dw2) + 0.05);
    checks++;
    if (!(dw2 < dw1)) begin
      failures++;
      $display("FAIL load did not slow the acceleration");
    end
    checks++;
    if (overrun || oc_block || gen) begin
      failures++;
      $display("FAIL overrun %0b, overcurrent %0b, generator %0b", overrun, oc_block, gen);
    end
    checks++;
    if (duty != duty_ol) begin
      failures++;
      $display("FAIL open-loop duty not applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bldc_motor: self-checking test of the double-precision motor model.
// Every check compares against closed-form physics computed here in real
// arithmetic, not against a copy of the model's schedule:
//  1. phases a and c driven with +-Ud/2, phase b open, no back EMF: the phase
//     current must follow Ud/(2R) (1 - exp(-t/tau)), tau = (L-M)/R, and ic = -ia;
//  2. the torque output must equal kf_a ia + kf_c ic;
//  3. after the currents are cleared the rotor coasts: the speed must follow
//     J dw/dt = -(C2 w^2 + C1 w + C0), integrated here with a fine Euler step;
//  4. with no current, a load below C0 must leave the rotor still, a larger
//     one must turn it backwards;
//  5. every step must finish within 50 cycles (1 us at 50 MHz) without overrun.
module tb_bldc_motor;
  import fp64_pkg::*;
  localparam int STEP = 50;
  localparam real UD = 48.0, RR = 1.0, LS = 0.5e-3, JJ = 45.0e-3;

  logic clk = 1'b0, rst = 1'b1, step = 1'b0;
  fp64_t ua, ub, uc, ea, eb, ec, kfa, kfb, kfc, tl;
  logic [2:0] clr;
  fp64_t ia, ib, ic, speed, te;
  logic signed [45:0] ang_rate;
  logic busy, overrun;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  bldc_motor dut (.*);

  initial begin
    #200ms;
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

  int busy_cycles, max_busy = 0;
  always @(posedge clk) begin
    if (step) busy_cycles = 0;
    else if (busy) begin
      busy_cycles++;
      if (busy_cycles > max_busy) max_busy = busy_cycles;
    end
  end

  task automatic run_steps(int n);
    repeat (n) begin
      @(negedge clk); step = 1'b1;
      @(negedge clk); step = 1'b0;
      repeat (STEP - 1) @(negedge clk);
    end
  endtask

  initial begin
    real tau, t, w0, wr, loss, i1, w_after;
    ua = $realtobits(UD / 2); ub = FP_ZERO; uc = $realtobits(-UD / 2);
    ea = FP_ZERO; eb = FP_ZERO; ec = FP_ZERO;
    kfa = FP_ZERO; kfb = FP_ZERO; kfc = FP_ZERO; tl = FP_ZERO;
    clr = 3'b010;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    tau = LS / RR;
    // 1. current rise through two phases in series
    run_steps(500);
    t = 500e-6;
    check_close("ia at 0.5 ms", $bitstoreal(ia), UD / (2 * RR) * (1 - $exp(-t / tau)), 0.15);
    check_close("ic = -ia", $bitstoreal(ic), -$bitstoreal(ia), 1e-9);
    check_close("ib open", $bitstoreal(ib), 0.0, 0.0);
    run_steps(2000);
    t = 2500e-6;
    i1 = $bitstoreal(ia);
    check_close("ia at 2.5 ms", i1, UD / (2 * RR) * (1 - $exp(-t / tau)), 0.1);
    // 2. torque from the torque coefficients
    kfa = $realtobits(0.025); kfc = $realtobits(-0.025);
    run_steps(2000);
    check_close("te", $bitstoreal(te), 0.025 * ($bitstoreal(ia) - $bitstoreal(ic)), 1e-3);
    checks++;
    if (!($bitstoreal(speed) > 0.02)) begin
      failures++;
      $display("FAIL rotor did not accelerate: %f", $bitstoreal(speed));
    end
    // 3. coasting: clear all currents and compare against the loss polynomial
    clr = 3'b111; kfa = FP_ZERO; kfc = FP_ZERO;
    run_steps(10);
    w0 = $bitstoreal(speed);
    run_steps(20000);
    wr = w0;
    for (int n = 0; n < 20000; n++) begin
      loss = 3.0e-9 * wr * wr + 8.0e-6 * wr + 0.0271;
      wr = wr - 1.0e-6 * loss / JJ;
    end
    check_close("coasting speed", $bitstoreal(speed), wr, 1e-4);
    check_close("coasting slope", w0 - $bitstoreal(speed), 0.02 * (3.0e-9 * w0 * w0 + 8.0e-6 * w0 + 0.0271) / JJ, 2e-4);
    // run until the rotor stops, then 4. static friction
    run_steps(80000);
    check_close("stopped", $bitstoreal(speed), 0.0, 1e-5);
    tl = $realtobits(0.02);
    run_steps(2000);
    check_close("held by friction", $bitstoreal(speed), 0.0, 1e-5);
    tl = $realtobits(0.1);
    run_steps(2000);
    w_after = $bitstoreal(speed);
    check_close("driven backwards by load", w_after, -(0.1 - 0.0271) * 2000e-6 / JJ, 2e-4);
    // 5. timing
    checks++;
    if (max_busy > STEP - 2 || overrun) begin
      failures++;
      $display("FAIL step takes %0d cycles, overrun=%0b", max_busy, overrun);
    end
    $display("step busy %0d cycles, final ia %f", max_busy, i1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_saw_pwm: the carrier must be a triangle of period 3334 cycles (15 kHz at
// 50 MHz) with trip strobes at both turning points; the PWM on-time per
// period must be 2*duty cycles.
module tb_saw_pwm;
  import ctrl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  duty_t duty, saw;
  logic pwm, trip;
  saw_pwm dut (.*);
  initial begin #10000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    int ontime, trips, last_trip, cyc;
    int dl [4];
    dl = '{0, 500, 1200, 1667};
    duty = '0;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int k = 0; k < 4; k++) begin
      duty = duty_t'(dl[k]);
      // align to a bottom trip
      do @(posedge clk); while (!(trip && saw == 0));
      repeat (3) @(posedge clk);
      ontime = 0; trips = 0; cyc = 0; last_trip = -1;
      repeat (3334) begin
        @(posedge clk); cyc++;
        if (pwm) ontime++;
        if (trip) begin
          if (last_trip >= 0) chk("half period", cyc - last_trip == 1667);
          last_trip = cyc; trips++;
        end
      end
      chk("two trips per period", trips == 2);
      chk("on time", ontime == 2 * dl[k] || (dl[k] == 1667 && ontime == 3334));
    end
    finish_tb();
  end
endmodule

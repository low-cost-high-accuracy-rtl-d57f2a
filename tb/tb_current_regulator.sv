// tb_current_regulator: a reference model of the PI law (sum of |i| halved,
// P gain 2, integrator /16 clamped to 0..1500*16, output clamped to 0..1500)
// computed here must match the duty after every update; between strobes the
// duty must hold.
module tb_current_regulator;
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
  logic en = 1'b0;
  q16_t iz, ia, ib, ic;
  duty_t duty;
  current_regulator dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    longint acc, e, d, fb;
    acc = 0;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      iz = q16_t'($urandom % 1600);
      ia = q16_t'(int'($urandom % 3000) - 1500);
      ib = q16_t'(int'($urandom % 3000) - 1500);
      ic = -ia - ib;
      @(negedge clk) en = 1'b1;
      @(negedge clk) en = 1'b0;
      fb = ((ia < 0 ? -ia : ia) + (ib < 0 ? -ib : ib) + (ic < 0 ? -ic : ic)) / 2;
      e = longint'(iz) - fb;
      acc = acc + e;
      if (acc < 0) acc = 0;
      if (acc > 1500 * 16) acc = 1500 * 16;
      d = 2 * e + acc / 16;
      if (d < 0) d = 0;
      if (d > 1500) d = 1500;
      chk("duty", longint'(duty) == d);
      iz = 0;
      @(negedge clk);
      chk("hold", longint'(duty) == d);
    end
    finish_tb();
  end
endmodule

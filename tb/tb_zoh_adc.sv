// tb_zoh_adc: values appear only at sample strobes, scaled by 64 and
// truncated toward zero, saturated at +-32767, and are held between strobes.
module tb_zoh_adc;
  import fp64_pkg::*;
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
  logic sample = 1'b0;
  fp64_t ia, ib, ic, ud;
  q16_t ia_q, ib_q, ic_q, ud_q;
  zoh_adc dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  function automatic int q(real x);
    real y;
    y = x * 64.0;
    if (y > 32767.0) return 32767;
    if (y < -32767.0) return -32767;
    return int'($rtoi(y));
  endfunction
  initial begin
    real a, b, c, u;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      a = (real'($urandom % 200000) - 100000.0) / 997.0;
      b = (real'($urandom % 200000) - 100000.0) / 123.0;
      c = -a;
      u = real'($urandom % 70000) / 100.0;
      ia = $realtobits(a); ib = $realtobits(b); ic = $realtobits(c); ud = $realtobits(u);
      @(negedge clk) sample = 1'b1;
      @(negedge clk) sample = 1'b0;
      chk("ia", int'(ia_q) == q(a));
      chk("ib", int'(ib_q) == q(b));
      chk("ic", int'(ic_q) == q(c));
      chk("ud", int'(ud_q) == q(u));
      ia = $realtobits(a + 7.0);
      @(negedge clk);
      chk("held", int'(ia_q) == q(a));
    end
    finish_tb();
  end
endmodule

// tb_speed_regulator: current reference = min(|ref - w| * 16, 1600) with the
// error sign as generator flag, reference 0 while the DC link is low.
module tb_speed_regulator;
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
  q16_t omega_set, omega, iz;
  logic dc_ok, gen;
  speed_regulator dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    int e, m, want;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      omega_set = q16_t'($urandom % 4000);
      omega = q16_t'(int'($urandom % 8000) - 4000);
      if (n % 3 == 0) omega = omega_set + q16_t'(int'($urandom % 200) - 100);
      dc_ok = (n % 7 != 0);
      @(posedge clk); @(negedge clk);
      e = (dc_ok ? int'(omega_set) : 0) - int'(omega);
      m = e < 0 ? -e : e;
      want = m * 16 > 1600 ? 1600 : m * 16;
      chk("iz", int'(iz) == want);
      chk("gen", gen == (e < 0));
    end
    finish_tb();
  end
endmodule

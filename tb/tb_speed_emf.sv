// tb_speed_emf: e_k = 0.025 * f_k * w and okf_k = 0.025 * f_k for random Q31
// coefficients and speeds, compared with real arithmetic (relative 1e-12);
// done must follow start by 2*(12+1) cycles or fewer.
module tb_speed_emf;
  import fp64_pkg::*;
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
  logic start = 1'b0, done;
  fp64_t speed, oemf1, oemf2, oemf3, okf1, okf2, okf3;
  logic signed [31:0] emf1, emf2, emf3;
  speed_emf dut (.*);
  initial begin #10000000; failures++; $display("watchdog"); finish_tb(); end
  task automatic near(string w, fp64_t got, real want);
    real g, tol;
    g = $bitstoreal(got);
    tol = (want < 0 ? -want : want) * 1e-12 + 1e-300;
    chk(w, g - want <= tol && want - g <= tol);
  endtask
  initial begin
    real f1, f2, f3, ws;
    int t0, cyc;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      emf1 = $urandom; emf2 = $urandom; emf3 = (n == 0) ? 32'sh7FFF_FFFF : $urandom;
      ws = (real'($urandom % 300000) - 150000.0) / 100.0;
      speed = $realtobits(ws);
      f1 = real'(emf1) / 2147483648.0; f2 = real'(emf2) / 2147483648.0; f3 = real'(emf3) / 2147483648.0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk("latency", cyc <= 2 * 13 + 1);
      near("e1", oemf1, 0.025 * ws * f1);
      near("e2", oemf2, 0.025 * ws * f2);
      near("e3", oemf3, 0.025 * ws * f3);
      near("kf1", okf1, 0.025 * f1);
      near("kf2", okf2, 0.025 * f2);
      near("kf3", okf3, 0.025 * f3);
    end
    finish_tb();
  end
endmodule

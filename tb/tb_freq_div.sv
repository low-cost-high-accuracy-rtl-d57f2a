// tb_freq_div: the step enable must come every 50 cycles and the angle
// enable every 200 cycles, each one cycle wide.
module tb_freq_div;
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
  logic step, ang_tick;
  freq_div dut (.*);
  initial begin #100000; failures++; $display("watchdog"); finish_tb(); end
  int last_s = -1, last_a = -1, cyc = 0, ns = 0, na = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (step) begin
      if (last_s >= 0) chk("step period", cyc - last_s == 50);
      last_s = cyc; ns++;
    end
    if (ang_tick) begin
      if (last_a >= 0) chk("angle tick period", cyc - last_a == 200);
      last_a = cyc; na++;
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst = 1'b0;
    repeat (2000) @(posedge clk);
    chk("step count", ns >= 39 && ns <= 41);
    chk("tick count", na >= 9 && na <= 11);
    finish_tb();
  end
endmodule

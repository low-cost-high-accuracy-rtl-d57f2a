// tb_overcurrent: the latch must set when any |i| exceeds 2560 and stay set
// after the current returns, until clear.
module tb_overcurrent;
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
  q16_t ia, ib, ic;
  logic clear = 1'b0, block;
  overcurrent dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    logic over;
    ia = 0; ib = 0; ic = 0;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      ia = q16_t'(int'($urandom % 6000) - 3000);
      ib = q16_t'(int'($urandom % 5200) - 2600);
      ic = q16_t'(int'($urandom % 5200) - 2600);
      over = (ia > 2560 || ia < -2560 || ib > 2560 || ib < -2560 || ic > 2560 || ic < -2560);
      @(negedge clk);
      chk("latch", block == over);
      ia = 0; ib = 0; ic = 0;
      @(negedge clk);
      chk("held", block == over);
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      chk("cleared", !block);
    end
    // exactly at the limit: no trip
    ia = 2560; @(negedge clk);
    chk("limit itself", !block);
    finish_tb();
  end
endmodule

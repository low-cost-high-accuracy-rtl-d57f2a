// tb_dc_link_monitor: dc_ok must fall below 2560 (40 V) and rise only above
// 2688 (42 V).
module tb_dc_link_monitor;
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
  q16_t ud_q;
  logic dc_ok;
  dc_link_monitor dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    logic st;
    ud_q = 0;
    repeat (3) @(posedge clk); rst = 1'b0;
    st = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      ud_q = q16_t'(2400 + int'($urandom % 450));
      @(negedge clk);
      if (ud_q < 2560) st = 1'b0;
      else if (ud_q > 2688) st = 1'b1;
      chk("dc_ok", dc_ok == st);
    end
    finish_tb();
  end
endmodule

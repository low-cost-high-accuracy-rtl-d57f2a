// tb_dead_time: random leg commands; the outputs must never be on together,
// a turn-on must come exactly dt+1 cycles after the input rose, counted from
// the later of that rise and the other output going low, and a turn-off must follow the input in one cycle.
module tb_dead_time;
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
  logic hi_in = 0, lo_in = 0, hi, lo;
  logic [7:0] dt;
  dead_time dut (.*);
  initial begin #10000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    int t;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      dt = 8'($urandom % 20);
      // high side on
      @(negedge clk) begin hi_in = 1; lo_in = 0; end
      t = 0;
      while (!hi && t < 100) begin @(negedge clk); t++; chk("never both", !(hi && lo)); end
      chk("hi turn-on delay", t == int'(dt) + 1);
      repeat ($urandom % 10) @(negedge clk);
      // switch to low side
      hi_in = 0; lo_in = 1;
      @(negedge clk);
      chk("hi off at once", !hi);
      t = 1;
      while (!lo && t < 100) begin @(negedge clk); t++; chk("never both", !(hi && lo)); end
      chk("lo turn-on delay", t == int'(dt) + 2);   // counted from the high side going off
      @(negedge clk) lo_in = 0;
      @(negedge clk);
      chk("lo off", !lo);
    end
    finish_tb();
  end
endmodule

// tb_count_angle: the angle must equal floor(n*speed / 2^32) modulo 6138
// after n enables, for positive and negative speeds (wrap in both directions).
module tb_count_angle;
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
  logic signed [45:0] speed;
  logic [12:0] angle;
  count_angle dut (.*);
  initial begin #10000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    longint pos, rev;
    rev = longint'(6138) << 32;
    speed = 46'sh0_05D3_C4B1_2345;   // about 5.8 counts per tick
    repeat (3) @(posedge clk); rst = 1'b0;
    pos = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) speed = -46'sh0_0A11_0000_7777;
      @(negedge clk) en = 1'b1;
      @(negedge clk) en = 1'b0;
      pos = pos + longint'(speed);
      if (pos >= rev) pos -= rev;
      if (pos < 0)    pos += rev;
      chk("angle", angle == 13'(pos >> 32));
    end
    finish_tb();
  end
endmodule

// tb_emf_table: the three coefficients must follow the trapezoid (ramp over
// the first sixth, +1 for two sixths, falling ramp, -1 for two sixths), with
// phase b 2046 counts late and phase c 2046 counts early, to within one LSB of
// the ramp formula; each Hall signal must be high exactly in sixths 1..3 of
// its phase; direction swaps b and c.
module tb_emf_table;
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
  logic [12:0] angle;
  logic direction;
  logic signed [31:0] emf1, emf2, emf3;
  logic ha, hb, hc;
  emf_table dut (.clk, .angle, .direction, .emf1, .emf2, .emf3, .ha, .hb, .hc);
  initial begin #10000000; failures++; $display("watchdog"); finish_tb(); end
  function automatic real fref(int a);
    real x;
    x = real'(a) / 1023.0;                     // sixths
    if (x < 1.0)      return -1.0 + 2.0 * x;
    else if (x < 3.0) return 1.0;
    else if (x < 4.0) return 1.0 - 2.0 * (x - 3.0);
    else              return -1.0;
  endfunction
  function automatic int wrapa(int a);
    return (a % 6138 + 6138) % 6138;
  endfunction
  function automatic logic href(int a);
    return a >= 1023 && a < 4092;
  endfunction
  task automatic cmp(string w, logic signed [31:0] got, int a);
    real g;
    g = real'(got) / 2147483647.0;
    chk(w, g - fref(a) < 2.0e-3 && fref(a) - g < 2.0e-3);
  endtask
  initial begin
    direction = 1'b0;
    for (int a = 0; a < 6138; a += 7) begin
      angle = 13'(a);
      @(posedge clk); #1;
      cmp("phase a", emf1, a);
      cmp("phase b", emf2, wrapa(a - 2046));
      cmp("phase c", emf3, wrapa(a + 2046));
      chk("hall a", ha == href(a));
      chk("hall b", hb == href(wrapa(a - 2046)));
      chk("hall c", hc == href(wrapa(a + 2046)));
    end
    direction = 1'b1;
    for (int a = 0; a < 6138; a += 61) begin
      angle = 13'(a);
      @(posedge clk); #1;
      cmp("reverse b", emf2, wrapa(a + 2046));
      cmp("reverse c", emf3, wrapa(a - 2046));
    end
    finish_tb();
  end
endmodule

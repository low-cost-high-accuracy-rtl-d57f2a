// tb_switching_logic: for every Hall state the gated pair must be the one
// whose positive phase has +1 and negative phase -1 back EMF (worked out here
// from the trapezoid and the inverter table), the opposite pair in generator
// mode, nothing without PWM or with blocking, nothing for 000 and 111.
module tb_switching_logic;
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
  logic [2:0] hall;
  logic pwm, gen, en;
  logic [5:0] gate;
  switching_logic dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  // upper switch bit of phase a,b,c: T1,T3,T5 = bits 0,2,4; lower T4,T6,T2 = bits 3,5,1
  function automatic logic [5:0] pair(int hi_ph, int lo_ph);
    int up [3], dn [3];
    up = '{0, 2, 4}; dn = '{3, 5, 1};
    return (6'b1 << up[hi_ph]) | (6'b1 << dn[lo_ph]);
  endfunction
  initial begin
    logic [2:0] hs [6];
    int hp [6], lp [6];
    // sixth s of the electrical angle: Hall state, phase at +1, phase at -1
    hs = '{3'b001, 3'b101, 3'b100, 3'b110, 3'b010, 3'b011};
    hp = '{2, 0, 0, 1, 1, 2};
    lp = '{1, 1, 2, 2, 0, 0};
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int s = 0; s < 6; s++) begin
      for (int m = 0; m < 8; m++) begin
        hall = hs[s]; pwm = m[0]; gen = m[1]; en = !m[2];
        @(negedge clk);
        if (!pwm || !en) chk("off", gate == 0);
        else if (!gen)   chk("motor pair", gate == pair(hp[s], lp[s]));
        else             chk("generator pair", gate == pair(lp[s], hp[s]));
      end
    end
    hall = 3'b000; pwm = 1; gen = 0; en = 1; @(negedge clk); chk("invalid 000", gate == 0);
    hall = 3'b111; @(negedge clk); chk("invalid 111", gate == 0);
    finish_tb();
  end
endmodule

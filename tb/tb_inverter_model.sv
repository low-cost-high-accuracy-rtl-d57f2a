// tb_inverter_model: every conducting-switch pattern of the inverter state
// table must give +-Ud/2 on the right phases, 0 V on open phases.
module tb_inverter_model;
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
  logic [5:0] on_t;
  logic [2:0] cr;
  fp64_t ud, va, vb, vc;
  inverter_model dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  function automatic real lg(logic hi, logic lo, logic open, real u);
    if (open) return 0.0;
    if (hi) return u / 2;
    if (lo) return -u / 2;
    return 0.0;
  endfunction
  initial begin
    real u;
    logic [5:0] pats [6];
    pats = '{6'b000011, 6'b000110, 6'b001100, 6'b011000, 6'b110000, 6'b100001};
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      u = real'($urandom % 60000) / 100.0 + 1.0;
      ud = $realtobits(u);
      on_t = pats[n % 6];
      cr = (n % 5 == 0) ? 3'($urandom) : 3'b000;
      @(posedge clk); @(negedge clk);
      chk("va", $bitstoreal(va) == lg(on_t[0], on_t[3], cr[0], u));
      chk("vb", $bitstoreal(vb) == lg(on_t[2], on_t[5], cr[1], u));
      chk("vc", $bitstoreal(vc) == lg(on_t[4], on_t[1], cr[2], u));
    end
    // table row T1T2: ua = +Ud/2, uc = -Ud/2
    ud = $realtobits(48.0); on_t = 6'b000011; cr = 3'b010;
    @(posedge clk); @(negedge clk);
    chk("T1T2 row", $bitstoreal(va) == 24.0 && $bitstoreal(vc) == -24.0 && $bitstoreal(vb) == 0.0);
    finish_tb();
  end
endmodule

// tb_conduction_logic: gated transistors conduct; after turn-off the diode
// chosen by the current sign conducts; when the current reaches zero or
// reverses the phase is cleared until the leg is gated again.
module tb_conduction_logic;
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
  logic [5:0] gate, on_t;
  logic [2:0] cr;
  fp64_t ia, ib, ic;
  conduction_logic dut (.*);
  initial begin #1000000; failures++; $display("watchdog"); finish_tb(); end
  task automatic tick(); @(posedge clk); @(negedge clk); endtask
  initial begin
    gate = '0; ia = FP_ZERO; ib = FP_ZERO; ic = FP_ZERO;
    repeat (3) @(posedge clk); rst = 1'b0;
    tick();
    chk("all open after reset", cr == 3'b111 && on_t == 6'b0);
    // T1T2 gated: phase a high side, phase c low side
    gate = 6'b000011; ia = $realtobits(5.0); ic = $realtobits(-5.0);
    tick();
    chk("transistors conduct", on_t == 6'b000011 && cr == 3'b010);
    // both off: a (current in) -> lower diode T4, c (current out) -> upper diode T5
    gate = 6'b000000;
    tick();
    chk("diodes conduct", on_t == 6'b011000 && cr == 3'b010);
    // current of a decays through zero: cleared; c still negative
    ia = FP_ZERO; ic = $realtobits(-0.1);
    tick();
    chk("a cleared", cr[0] && !on_t[0] && !on_t[3]);
    chk("c still on diode", !cr[2] && on_t[4]);
    ic = $realtobits(0.2);   // sign reversal also ends conduction
    tick();
    chk("c cleared", cr == 3'b111 && on_t == 6'b0);
    ic = $realtobits(-3.0);  // stays cleared while not gated
    tick();
    chk("stays cleared", cr[2]);
    // low side of b gated
    gate = 6'b100000; ib = $realtobits(-1.0);
    tick();
    chk("b low side", on_t == 6'b100000 && cr == 3'b101);
    finish_tb();
  end
endmodule

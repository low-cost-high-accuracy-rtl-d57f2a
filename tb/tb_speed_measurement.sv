// tb_speed_measurement: Hall edges are generated for a known speed in both
// directions; the result must equal round-down of (pi/3*1e6*8)/interval with
// the sign of the direction; without edges the estimate must decay to 0.
module tb_speed_measurement;
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
  logic tick = 1'b0;
  logic [2:0] hall;
  q16_t omega;
  logic valid;
  speed_measurement #(.MAX_COUNT(20000)) dut (.*);
  initial begin #200000000; failures++; $display("watchdog"); finish_tb(); end
  // 1 us tick as a 1-in-50 enable
  int tc = 0;
  always @(posedge clk) begin tc = (tc + 1) % 50; tick <= (tc == 0); end
  logic [2:0] seq [6];
  initial seq = '{3'b001, 3'b101, 3'b100, 3'b110, 3'b010, 3'b011};
  int nv = 0;
  always @(posedge clk) if (valid) nv++;
  initial begin
    int idx, us, nvalid;
    hall = 3'b001; idx = 0;
    repeat (3) @(posedge clk); rst = 1'b0;
    for (int d = 0; d < 2; d++) begin
      us = (d == 0) ? 700 : 2500;
      nvalid = 0;
      for (int e = 0; e < 10; e++) begin
        repeat (us * 50) @(posedge clk);
        idx = (d == 0) ? (idx + 1) % 6 : (idx + 5) % 6;
        hall = seq[idx];
      end
      repeat (100) @(posedge clk);
      chk(d == 0 ? "forward speed" : "reverse speed",
          (d == 0) ? (omega >= 16'sd11966 - 16'sd20 && omega <= 16'sd11966 + 16'sd20)
                   : (omega <= -16'sd3351 + 16'sd5 && omega >= -16'sd3351 - 16'sd5));
    end
    // stop: the estimate decays and finally reads 0
    repeat (30000 * 50) @(posedge clk);
    chk("stopped reads zero", omega == 0);
    // a jump between non-neighbouring states is not a measurement
    hall = 3'b001; repeat (500 * 50) @(posedge clk);
    hall = 3'b110; repeat (200) @(posedge clk);
    chk("jump ignored", omega == 0);
    chk("measurements made", nv >= 10);
    finish_tb();
  end
endmodule

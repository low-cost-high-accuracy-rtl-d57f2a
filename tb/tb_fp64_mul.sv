// tb_fp64_mul: self-checking test of fp64_mul.
// Random doubles (exponents kept clear of overflow and subnormals, plus
// near-cancelling pairs and exact zeros) are fed one per start; each result
// must equal, bit for bit, the simulator's own IEEE double arithmetic, and
// must appear exactly LAT=12 cycles after its start.
module tb_fp64_mul;
  import fp64_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, done;
  fp64_t a, b, y;

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;

  fp64_mul dut (.clk, .rst, .start,  .a, .b, .y, .done);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp();
    logic [63:0] r;
    r = {$urandom, $urandom};
    r[62:52] = 11'(1023 - 40 + ($urandom % 80));
    return r;
  endfunction

  always @(posedge clk) cyc++;

  initial begin
    fp64_t exp_y;
    int t0;
    a = '0; b = '0;

    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      a = rnd_fp();
      b = rnd_fp();
      if (n % 5 == 1) b = {b[63], a[62:3], b[2:0]};      // near cancellation
      if (n % 7 == 2) b = {b[63], a[62:52], b[51:0]};    // equal exponents
      if (n == 10) b = 64'h0;
      if (n == 11) b = a;
      
      exp_y = $realtobits($bitstoreal(a) * $bitstoreal(b));
      @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != 12) begin
        failures++;
        $display("latency %0d, expected 12", cyc - t0);
      end
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("mismatch a=%h b=%h y=%h exp=%h", a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

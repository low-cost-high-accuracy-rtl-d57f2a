// fp64_add: IEEE-754 double precision adder/subtractor with a fixed latency.
//
// The result for operands presented with start is available on y, with done
// high for one cycle, exactly LAT clock cycles later. A new operation may start
// every cycle (the unit is a LAT-deep pipeline). The default LAT=15 matches the
// execution time the design budgets for this operation (300 ns at 50 MHz); the
// arithmetic itself is one combinational stage from fp64_pkg followed by a
// delay line, which a synthesis tool can retime across the LAT registers.
// Rounding is to nearest even with subnormals flushed to zero (own choice).
module fp64_add
  import fp64_pkg::*;
#(
  parameter int LAT = 15
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  logic  sub,      // 1: y = a - b
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y,
  output logic  done
);

  fp64_t      pipe_d [LAT];
  logic [LAT-1:0] pipe_v;

  always_ff @(posedge clk) begin
    pipe_d[0] <= fp_add(a, b, sub);
    for (int i = 1; i < LAT; i++) pipe_d[i] <= pipe_d[i-1];
  end

  always_ff @(posedge clk) begin
    if (rst) pipe_v <= '0;
    else     pipe_v <= {pipe_v[LAT-2:0], start};
  end

  assign y    = pipe_d[LAT-1];
  assign done = pipe_v[LAT-1];

  initial assert (LAT >= 2) else $error("fp64_add: LAT must be at least 2");

endmodule

// freq_div: clock-enable generator.
//
// The design times the model with a 1 MHz step clock, a 250 kHz angle clock
// and a 50 MHz processing clock. Here everything runs on the 50 MHz clock and
// the slower clocks become one-cycle enables: step every STEP_DIV cycles
// (1 us) and ang_tick every ANGLE_DIV cycles (4 us). Using enables instead of
// divided clocks is this implementation's choice.
module freq_div #(
  parameter int STEP_DIV  = 50,
  parameter int ANGLE_DIV = 200
) (
  input  logic clk,
  input  logic rst,
  output logic step,
  output logic ang_tick
);
  logic [$clog2(STEP_DIV)-1:0]  sc;
  logic [$clog2(ANGLE_DIV)-1:0] ac;
  always_ff @(posedge clk) begin
    if (rst) begin
      sc <= '0; ac <= '0; step <= 1'b0; ang_tick <= 1'b0;
    end else begin
      step     <= (sc == '0);
      ang_tick <= (ac == '0);
      sc <= (sc == $bits(sc)'(STEP_DIV - 1))  ? '0 : sc + 1'b1;
      ac <= (ac == $bits(ac)'(ANGLE_DIV - 1)) ? '0 : ac + 1'b1;
    end
  end
endmodule

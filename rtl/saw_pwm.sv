// saw_pwm: symmetrical triangular carrier and PWM comparator.
//
// An up/down counter runs 0 .. HALF_PERIOD .. 0, giving a carrier period of
// 2*HALF_PERIOD clock cycles (15 kHz at 50 MHz, the switching frequency of the
// design). pwm is high while duty > carrier, so duty = HALF_PERIOD is full on
// and duty = 0 is off (on for exactly 2*duty cycles per period). trip is a one-cycle strobe at both turning points of
// the carrier; it times the zero-order hold and the current regulator.
// The counter form of the carrier and the comparator polarity are own choice.
module saw_pwm
  import ctrl_pkg::*;
#(
  parameter int HALF_PERIOD = 1667
) (
  input  logic  clk,
  input  logic  rst,
  input  duty_t duty,
  output logic  pwm,
  output duty_t saw,
  output logic  trip
);
  logic up;
  always_ff @(posedge clk) begin
    if (rst) begin
      saw <= '0; up <= 1'b1; pwm <= 1'b0; trip <= 1'b0;
    end else begin
      trip <= 1'b0;
      if (up) begin
        if (saw == duty_t'(HALF_PERIOD - 1)) begin up <= 1'b0; trip <= 1'b1; end
        saw <= saw + 1'b1;
      end else begin
        if (saw == duty_t'(1)) begin up <= 1'b1; trip <= 1'b1; end
        saw <= saw - 1'b1;
      end
      pwm <= up ? (duty > saw) : (duty >= saw);
    end
  end
endmodule

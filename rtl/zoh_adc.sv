// zoh_adc: zero-order hold standing in for the current and voltage ADC.
//
// On each sample strobe the double phase currents and the DC-link voltage are
// converted to signed 16-bit integers (1/64 A and 1/64 V per LSB, truncated
// toward zero and saturated) and held until the next strobe. The design
// samples with a zero-order hold synchronised with the PWM carrier; the
// sample points are the carrier's turning points (trip strobe of saw_pwm).
// Widths and scales are own choice. Outputs change one cycle after sample.
module zoh_adc
  import fp64_pkg::*;
  import ctrl_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  sample,
  input  fp64_t ia, ib, ic, ud,
  output q16_t  ia_q, ib_q, ic_q, ud_q
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ia_q <= '0; ib_q <= '0; ic_q <= '0; ud_q <= '0;
    end else if (sample) begin
      ia_q <= sat16(fp_to_fix(ia, CUR_FRAC));
      ib_q <= sat16(fp_to_fix(ib, CUR_FRAC));
      ic_q <= sat16(fp_to_fix(ic, CUR_FRAC));
      ud_q <= sat16(fp_to_fix(ud, VOLT_FRAC));
    end
  end
endmodule

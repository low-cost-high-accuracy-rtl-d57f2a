// ctrl_pkg: fixed-point scales shared by the control system and the ADC model.
//
// The control system works on small signed integers, like a controller fed by
// a real ADC; only the motor model uses doubles. The scales are this
// implementation's choice (the design names the quantities k_i i, k_w w and
// k_uC U_d without giving their widths):
//   current  1/64 A per LSB, 16-bit signed
//   voltage  1/64 V per LSB, 16-bit signed
//   speed    1/8 rad/s per LSB, 16-bit signed
//   duty     carrier counts, 0 .. carrier half period
package ctrl_pkg;
  localparam int CUR_FRAC   = 6;
  localparam int VOLT_FRAC  = 6;
  localparam int SPEED_FRAC = 3;
  typedef logic signed [15:0] q16_t;
  typedef logic [11:0]        duty_t;

  function automatic q16_t sat16(input logic signed [63:0] x);
    if (x > 64'sd32767)       return 16'sh7FFF;
    else if (x < -64'sd32767) return -16'sh7FFF;
    else                      return q16_t'(x);
  endfunction

  function automatic logic [15:0] abs16(input q16_t x);
    return x[15] ? 16'(-x) : 16'(x);
  endfunction
endpackage

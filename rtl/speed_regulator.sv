// speed_regulator: reference selection and proportional speed regulator.
//
// The reference is omega_set while the DC link is healthy and 0 otherwise
// (the multiplexer driven by the DC-link monitor). The speed error is split
// into its sign and magnitude: a negative error selects generator operation
// (braking), the magnitude times the gain 2^KP_SHL is limited to 0..I_MAX and
// becomes the current reference. Proportional structure, limiter and the
// sign comparator follow the design; the power-of-two gain (no multiplier)
// and the limit value are own choice. Registered, one cycle.
module speed_regulator
  import ctrl_pkg::*;
#(
  parameter int KP_SHL = 4,
  parameter int I_MAX  = 1600    // 25 A at 1/64 A per LSB
) (
  input  logic clk,
  input  logic rst,
  input  q16_t omega_set,
  input  q16_t omega,
  input  logic dc_ok,
  output q16_t iz,
  output logic gen
);
  logic signed [17:0] err;
  logic [17:0]        mag;
  logic [31:0]        p;
  always_comb begin
    err = 18'(dc_ok ? omega_set : 16'sd0) - 18'(omega);
    mag = err[17] ? 18'(-err) : 18'(err);
    p   = 32'(mag) << KP_SHL;
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      iz <= '0; gen <= 1'b0;
    end else begin
      iz  <= (p > 32'(I_MAX)) ? q16_t'(I_MAX) : q16_t'(p);
      gen <= err[17];
    end
  end
endmodule

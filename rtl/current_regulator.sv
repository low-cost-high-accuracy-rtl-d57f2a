// current_regulator: PI current regulator with output limiter.
//
// The measured current is the sum of the absolute phase currents, halved so
// that it equals the current of the two conducting phases. On each en strobe
// (carrier turning point) the error e = iz - i is integrated, acc += e, with
// acc held within 0 .. D_MAX * 2^KI_SHR (anti wind-up), and the duty becomes
// D = clamp(e * 2^KP_SHL + acc / 2^KI_SHR, 0, D_MAX). The PI structure, the
// absolute values, the sum and the 0..D_max limiter follow the design; the
// gains, the halving and the anti wind-up are own choice.
module current_regulator
  import ctrl_pkg::*;
#(
  parameter int KP_SHL = 1,
  parameter int KI_SHR = 4,
  parameter int D_MAX  = 1500
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  q16_t  iz,
  input  q16_t  ia, ib, ic,
  output duty_t duty
);
  localparam logic signed [31:0] ACC_MAX = 32'(D_MAX) <<< KI_SHR;
  logic signed [31:0] fb, e, acc, acc_n, d;
  always_comb begin
    fb    = (32'(abs16(ia)) + 32'(abs16(ib)) + 32'(abs16(ic))) >>> 1;
    e     = 32'(iz) - fb;
    acc_n = acc + e;
    if (acc_n < 0)        acc_n = 0;
    if (acc_n > ACC_MAX)  acc_n = ACC_MAX;
    d = (e <<< KP_SHL) + (acc_n >>> KI_SHR);
    if (d < 0)                  d = 0;
    if (d > 32'(D_MAX))         d = 32'(D_MAX);
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; duty <= '0;
    end else if (en) begin
      acc  <= acc_n;
      duty <= duty_t'(d);
    end
  end
endmodule

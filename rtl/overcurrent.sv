// overcurrent: latched overcurrent protection.
//
// Each sampled phase current is compared with the limit I_OV; when any
// magnitude exceeds it the "all within limit" AND of the three comparisons
// drops and the latch sets block, which removes all transistor gate pulses.
// The latch stays set until clear. Comparisons, AND and latch follow the
// design; the clear input and the limit value are own choice. block rises one
// cycle after the offending sample.
module overcurrent
  import ctrl_pkg::*;
#(
  parameter int I_OV = 2560      // 40 A at 1/64 A per LSB
) (
  input  logic clk,
  input  logic rst,
  input  q16_t ia, ib, ic,
  input  logic clear,
  output logic block
);
  logic all_ok;
  assign all_ok = (abs16(ia) <= 16'(I_OV)) && (abs16(ib) <= 16'(I_OV)) && (abs16(ic) <= 16'(I_OV));
  always_ff @(posedge clk) begin
    if (rst || clear) block <= 1'b0;
    else if (!all_ok) block <= 1'b1;
  end
endmodule

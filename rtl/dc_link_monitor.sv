// dc_link_monitor: DC-link voltage supervision.
//
// dc_ok falls when the sampled DC-link voltage drops below U_MIN and rises
// again only above U_MIN + HYST. While dc_ok is low the speed reference is
// forced to zero, which keeps the motor from starting before the supply is up
// and turns it into a generator when the link voltage sags. The threshold
// follows the design; the hysteresis and the values are own choice.
module dc_link_monitor
  import ctrl_pkg::*;
#(
  parameter int U_MIN = 2560,    // 40 V at 1/64 V per LSB
  parameter int HYST  = 128      // 2 V
) (
  input  logic clk,
  input  logic rst,
  input  q16_t ud_q,
  output logic dc_ok
);
  always_ff @(posedge clk) begin
    if (rst)                                dc_ok <= 1'b0;
    else if (ud_q < 16'(U_MIN))             dc_ok <= 1'b0;
    else if (ud_q > 16'(U_MIN + HYST))      dc_ok <= 1'b1;
  end
endmodule

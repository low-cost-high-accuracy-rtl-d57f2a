// count_angle: electrical rotor angle as the running sum of the speed.
//
// Implements theta(k) = T * sum of w(i) as a phase accumulator. One electrical
// revolution is ANGLE_STEPS = 6 x 1023 counts, so the angle addresses the
// back-EMF table directly and a shift of 2*pi/3 is exactly 2046 counts (as in
// the design). speed is signed, in angle counts per en tick with FRAC fraction
// bits (46 bits wide as in the design; the fixed-point format is own choice).
// The accumulator wraps in both directions. angle is the integer part,
// updated one cycle after en.
module count_angle #(
  parameter int ANGLE_STEPS = 6138,
  parameter int SPEED_W     = 46,
  parameter int FRAC        = 32
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic signed [SPEED_W-1:0]  speed,
  output logic [12:0]                angle
);
  localparam int AW = 13 + FRAC + 1;
  localparam logic signed [AW-1:0] REV = AW'(ANGLE_STEPS) <<< FRAC;
  logic signed [AW-1:0] acc, nxt;
  always_comb begin
    nxt = acc + AW'(speed);
    if (nxt >= REV)      nxt = nxt - REV;
    else if (nxt < 0)    nxt = nxt + REV;
  end
  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= nxt;
  end
  assign angle = acc[FRAC +: 13];
  initial assert (SPEED_W <= AW) else $error("count_angle: speed wider than accumulator");
endmodule

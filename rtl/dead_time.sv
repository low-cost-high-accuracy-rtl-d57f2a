// dead_time: turn-on delay for the two transistors of one inverter leg.
//
// Each output follows its input low at once but goes high only after the
// input has been high, and the other output low, for dt consecutive clock
// cycles, so the two switches of a leg are never on together and the gap
// between them is at least dt cycles. dt is shared by all three legs, as in
// the design. Registered: with dt = 0 the outputs follow the inputs one
// cycle late.
module dead_time #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         hi_in,
  input  logic         lo_in,
  input  logic [W-1:0] dt,
  output logic         hi,
  output logic         lo
);
  logic [W-1:0] ch, cl;
  always_ff @(posedge clk) begin
    if (rst) begin
      ch <= '0; cl <= '0; hi <= 1'b0; lo <= 1'b0;
    end else begin
      ch <= (hi_in && !lo && !lo_in) ? ((ch == dt) ? ch : ch + 1'b1) : '0;
      cl <= (lo_in && !hi && !hi_in) ? ((cl == dt) ? cl : cl + 1'b1) : '0;
      hi <= hi_in && !lo_in && !lo && (ch == dt);
      lo <= lo_in && !hi_in && !hi && (cl == dt);
    end
  end
  always_ff @(posedge clk) begin
    if (!rst) assert (!(hi && lo)) else $error("dead_time: both switches on");
  end
endmodule

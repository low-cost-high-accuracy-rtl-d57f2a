// switching_logic: six-step commutation from the Hall signals.
//
// The Hall state {ha,hb,hc} selects the transistor pair of the inverter state
// table that drives the phase with positive flat back EMF high and the phase
// with negative flat back EMF low (motor operation). In generator operation
// (gen) the opposite pair is selected, which reverses the torque. Both
// transistors of the pair are chopped by pwm, and en = 0 (overcurrent
// blocking) removes all pulses. Hall states 000 and 111 drive nothing.
// The pair table is derived from the back-EMF shape and the inverter table;
// chopping both switches is own reading. gate[0] = T1 ... gate[5] = T6.
// Registered, one cycle.
module switching_logic (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] hall,    // {ha, hb, hc}
  input  logic       pwm,
  input  logic       gen,
  input  logic       en,
  output logic [5:0] gate
);
  localparam logic [5:0] T12 = 6'b000011, T23 = 6'b000110, T34 = 6'b001100,
                         T45 = 6'b011000, T56 = 6'b110000, T61 = 6'b100001;
  logic [5:0] pair;
  always_comb begin
    unique case (hall)
      3'b001:  pair = gen ? T23 : T56;
      3'b101:  pair = gen ? T34 : T61;
      3'b100:  pair = gen ? T45 : T12;
      3'b110:  pair = gen ? T56 : T23;
      3'b010:  pair = gen ? T61 : T34;
      3'b011:  pair = gen ? T12 : T45;
      default: pair = 6'b000000;
    endcase
  end
  always_ff @(posedge clk) begin
    if (rst) gate <= '0;
    else     gate <= (pwm && en) ? pair : 6'b000000;
  end
endmodule

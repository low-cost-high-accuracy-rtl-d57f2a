// conduction_logic: which switch of each inverter leg carries the current.
//
// A leg whose transistor is gated on conducts through that switch. When both
// transistors of a leg are off, the phase current keeps flowing through a
// free-wheeling diode: the lower diode for a current into the motor, the
// upper one for a current out of it, until the current reaches zero, as the
// design describes. The zero is detected as the current becoming zero or
// changing sign with respect to its sign when the leg was last driven; from
// then on cr (clear) holds the phase current at zero until the leg is gated
// again. Outputs are registered (one cycle). Index: gate/on_t[0] = T1 ...
// [5] = T6; legs a = (T1,T4), b = (T3,T6), c = (T5,T2).
module conduction_logic
  import fp64_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] gate,
  input  fp64_t      ia, ib, ic,
  output logic [5:0] on_t,
  output logic [2:0] cr
);
  localparam int HI [3] = '{0, 2, 4};
  localparam int LO [3] = '{3, 5, 1};

  fp64_t      i [3];
  logic [2:0] sgn;   // sign of the current while last driven
  assign i = '{ia, ib, ic};

  always_ff @(posedge clk) begin
    if (rst) begin
      on_t <= '0; cr <= 3'b111; sgn <= '0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        if (gate[HI[k]] || gate[LO[k]]) begin
          on_t[HI[k]] <= gate[HI[k]];
          on_t[LO[k]] <= gate[LO[k]] && !gate[HI[k]];
          cr[k]  <= 1'b0;
          sgn[k] <= i[k][63];
        end else if (cr[k] || fp_is_zero(i[k]) || i[k][63] != sgn[k]) begin
          on_t[HI[k]] <= 1'b0;
          on_t[LO[k]] <= 1'b0;
          cr[k] <= 1'b1;
        end else begin
          on_t[HI[k]] <= i[k][63];    // current out of the motor: upper diode
          on_t[LO[k]] <= !i[k][63];   // current into the motor: lower diode
        end
      end
    end
  end
endmodule

// inverter_model: behavioural three-phase bridge feeding the motor model.
//
// Each leg puts +Ud/2 on its phase when its upper switch conducts and -Ud/2
// when its lower switch conducts, measured from the DC-link midpoint, as in
// the design's inverter state table. "Conducts" means the transistor or its
// anti-parallel diode (decided by conduction_logic). Switching times and
// device voltage drops are not modelled, as in the design. A phase whose
// current is cleared (cr) is open and gets 0 V; the motor model leaves it
// out. Transistor numbering: T1/T4 phase a, T3/T6 phase b, T5/T2 phase c;
// on_t[0] is T1 ... on_t[5] is T6. Ud/2 is formed exactly by lowering the
// exponent of Ud. Outputs are registered (one cycle).
module inverter_model
  import fp64_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] on_t,
  input  logic [2:0] cr,
  input  fp64_t      ud,
  output fp64_t      va, vb, vc
);
  fp64_t half;
  assign half = fp_is_zero(ud) ? FP_ZERO : {ud[63], ud[62:52] - 11'd1, ud[51:0]};

  function automatic fp64_t leg(input logic hi, input logic lo, input logic open, input fp64_t h);
    if (open)    return FP_ZERO;
    else if (hi) return h;
    else if (lo) return fp_neg(h);
    else         return FP_ZERO;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      va <= FP_ZERO; vb <= FP_ZERO; vc <= FP_ZERO;
    end else begin
      va <= leg(on_t[0], on_t[3], cr[0], half);
      vb <= leg(on_t[2], on_t[5], cr[1], half);
      vc <= leg(on_t[4], on_t[1], cr[2], half);
    end
  end

  // a leg never conducts through both switches
  always_ff @(posedge clk) begin
    if (!rst) assert (!(on_t[0] && on_t[3]) && !(on_t[2] && on_t[5]) && !(on_t[4] && on_t[1]))
      else $error("inverter_model: shoot-through");
  end
endmodule

// speed_emf: back EMF and torque coefficients of the three phases.
//
// From the Q31 excitation coefficients f_k and the double speed w it computes
//   e_k   = p * k_psi * f_k * w     (back EMF, V)
//   okf_k = p * k_f * f_k           (torque per ampere, Nm/A)
// both as doubles, following the design's back-EMF and torque equations.
// The Q31 value is turned into a double exactly (fp_from_i32 with scale
// 2^-31). Two passes through four fp64_mul units: first p*k_psi*w and the
// okf_k, then e_k = f_k * (p*k_psi*w). A start strobe samples speed and the
// coefficients; done pulses when all outputs are updated, 2*(MUL_LAT+1)
// cycles later. k_f = k_psi (SI units) is own reading of the motor data.
module speed_emf
  import fp64_pkg::*;
#(
  parameter int  MUL_LAT    = 12,
  parameter real K_PSI      = 0.025,
  parameter real K_F        = 0.025,
  parameter int  POLE_PAIRS = 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  fp64_t              speed,
  input  logic signed [31:0] emf1, emf2, emf3,
  output fp64_t              oemf1, oemf2, oemf3,
  output fp64_t              okf1, okf2, okf3,
  output logic               done
);
  localparam fp64_t K_E  = $realtobits(real'(POLE_PAIRS) * K_PSI);
  localparam fp64_t K_TF = $realtobits(real'(POLE_PAIRS) * K_F);

  fp64_t f [3], kw, ma [4], mb [4], my [4];
  logic [3:0] md;
  logic go, pass;   // pass 0: kw and okf, pass 1: emf
  logic busy;

  for (genvar g = 0; g < 4; g++) begin : g_mul
    fp64_mul #(.LAT(MUL_LAT)) u_mul (.clk, .rst, .start(go), .a(ma[g]), .b(mb[g]), .y(my[g]), .done(md[g]));
  end

  always_comb begin
    if (!pass) begin
      for (int k = 0; k < 3; k++) begin ma[k] = K_TF; mb[k] = f[k]; end
      ma[3] = K_E; mb[3] = speed;
    end else begin
      for (int k = 0; k < 3; k++) begin ma[k] = f[k]; mb[k] = kw; end
      ma[3] = FP_ZERO; mb[3] = FP_ZERO;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      go <= 1'b0; pass <= 1'b0; busy <= 1'b0; done <= 1'b0; kw <= FP_ZERO;
      for (int k = 0; k < 3; k++) f[k] <= FP_ZERO;
      oemf1 <= FP_ZERO; oemf2 <= FP_ZERO; oemf3 <= FP_ZERO;
      okf1 <= FP_ZERO; okf2 <= FP_ZERO; okf3 <= FP_ZERO;
    end else begin
      go <= 1'b0;
      done <= 1'b0;
      if (start && !busy) begin
        f[0] <= fp_from_i32(emf1, -31);
        f[1] <= fp_from_i32(emf2, -31);
        f[2] <= fp_from_i32(emf3, -31);
        busy <= 1'b1; pass <= 1'b0; go <= 1'b1;
      end else if (busy && md[0]) begin
        if (!pass) begin
          okf1 <= my[0]; okf2 <= my[1]; okf3 <= my[2]; kw <= my[3];
          pass <= 1'b1; go <= 1'b1;
        end else begin
          oemf1 <= my[0]; oemf2 <= my[1]; oemf3 <= my[2];
          busy <= 1'b0; done <= 1'b1;
        end
      end
    end
  end
endmodule

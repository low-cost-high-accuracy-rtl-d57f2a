// emf_table: relative excitation coefficient f(theta) of the three phases and
// the Hall sensor signals.
//
// The coefficient is the trapezoid of the design: f rises from -1 to +1 over
// the first sixth of a revolution, stays at +1 for two sixths, falls back over
// one sixth and stays at -1 for two sixths. Only the rising sixth is stored,
// N_PTS = 1023 words of Q31, as the design does; the other sixths are the
// constant or the mirrored table. Phase b reads the angle 2*pi/3 (2*N_PTS
// counts) earlier, phase c 2*pi/3 later. The table contents are computed here
// as the straight ramp q(j) = (2j+1-N_PTS)/N_PTS in Q31 (own formula; a
// measured back-EMF shape could be loaded instead).
// Each Hall signal is high while its phase's angle lies in sixths 1..3, so
// its edges fall on the commutation points (own choice). direction = 1 swaps
// phases b and c. Outputs are registered: one cycle after angle.
module emf_table #(
  parameter int N_PTS = 1023
) (
  input  logic                clk,
  input  logic [12:0]         angle,     // 0 .. 6*N_PTS-1
  input  logic                direction,
  output logic signed [31:0]  emf1, emf2, emf3,
  output logic                ha, hb, hc
);
  localparam int REV = 6 * N_PTS;
  localparam logic signed [31:0] Q_ONE = 32'sh7FFF_FFFF;

  typedef logic signed [31:0] rom_t [N_PTS];
  function automatic rom_t make_ramp();
    rom_t t;
    for (int j = 0; j < N_PTS; j++)
      t[j] = 32'(((longint'(2 * j + 1) - longint'(N_PTS)) * longint'(Q_ONE)) / longint'(N_PTS));
    return t;
  endfunction
  localparam rom_t RAMP = make_ramp();

  function automatic logic [12:0] wrap(input int a);
    int x;
    x = a;
    if (x >= REV) x = x - REV;
    if (x < 0)    x = x + REV;
    return 13'(x);
  endfunction

  function automatic logic [2:0] sixth(input logic [12:0] a);
    logic [2:0] s;
    s = 3'd0;
    for (int k = 1; k < 6; k++)
      if (int'(a) >= k * N_PTS) s = 3'(k);
    return s;
  endfunction

  function automatic logic signed [31:0] coef(input logic [12:0] a);
    logic [2:0] s;
    int j;
    s = sixth(a);
    j = int'(a) - int'(s) * N_PTS;
    unique case (s)
      3'd0:       return RAMP[j];
      3'd1, 3'd2: return Q_ONE;
      3'd3:       return RAMP[N_PTS - 1 - j];
      default:    return -Q_ONE;
    endcase
  endfunction

  logic [12:0] aa, ab, ac;
  always_comb begin
    aa = angle;
    ab = wrap(int'(angle) - 2 * N_PTS);
    ac = wrap(int'(angle) + 2 * N_PTS);
    if (direction) {ab, ac} = {ac, ab};
  end

  always_ff @(posedge clk) begin
    emf1 <= coef(aa);
    emf2 <= coef(ab);
    emf3 <= coef(ac);
    ha <= sixth(aa) inside {3'd1, 3'd2, 3'd3};
    hb <= sixth(ab) inside {3'd1, 3'd2, 3'd3};
    hc <= sixth(ac) inside {3'd1, 3'd2, 3'd3};
  end
endmodule

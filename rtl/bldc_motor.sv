// bldc_motor: double-precision BLDC motor model, one integration step per
// STEP_DIV clock cycles (1 us at 50 MHz).
//
// Electrical part, per phase k (star connection, i_a+i_b+i_c = 0):
//   (L-M) di_k/dt = u_k - e_k - u_n - R i_k
//   u_n = mean over the conducting phases of (u_k - e_k)
// Mechanical part:
//   J dw/dt = Te - Tl - sgn(w) (C2 w^2 + C1 |w| + C0),  Te = sum okf_k i_k
// where okf_k = p k_f f_k comes from speed_emf. Both states are advanced with
// the two-step Adams-Bashforth rule x(n+1) = x(n) + Ts/2 (3 f(n) - f(n-1)).
// The equations, the parameter values, the 1 us step, the 64-bit format and
// the loss polynomial follow the design; the schedule below is this
// implementation's own.
//
// Datapath: 10 fp64_add and 8 fp64_mul units work in lock step. A step runs
// three stages; in each stage every unit reads registers, all results are
// written back when the slowest unit is done (max(ADD_LAT, MUL_LAT) cycles),
// so a step takes 3*(max+1) = 48 cycles at the default latencies. Registers
// keep their value from one step to the next, so a quantity produced in a late
// stage is consumed by an early stage of the next step: like separate
// processes exchanging results once per step, the current loop sees its
// inputs up to two steps late, which is small against the 0.5 ms electrical
// time constant.
//   stage 0: i += inc, w += incw, d = u - e, s = s1 + d_c, te, tm;  3h, 3tacc, |w| C2, w*KANG, u_n
//   stage 1: v = d - u_n, m = 3h - h_prev, 3tacc - tacc_prev, tn = te - Tl, s1;  R i, okf i
//   stage 2: h = v - R i, tacc = tn - loss, te partial sum;  inc = Ts/(2L') m, incw, q2
// A cleared phase (clr) has its current forced to 0, its h to 0, and is left
// out of u_n (own handling of the open phase). At standstill the rotor stays
// still while |Te - Tl| <= C0, and a speed that would change sign stops at 0
// for one step (own handling of the loss torque around zero speed).
//
// Interface: step (one-cycle strobe) starts a step; ua..uc, ea..ec are read in
// that cycle; kf*, tl and clr are sampled then. Outputs change as stages
// finish. overrun is set (sticky) if a step strobe arrives while busy.
module bldc_motor
  import fp64_pkg::*;
#(
  parameter int  ADD_LAT     = 15,
  parameter int  MUL_LAT     = 12,
  parameter real TS          = 1.0e-6,    // integration step (s)
  parameter real R_OHM       = 1.0,       // phase resistance
  parameter real L_H         = 1.0e-3,    // phase inductance
  parameter real M_H         = 0.5e-3,    // mutual inductance
  parameter real J_KGM2      = 45.0e-3,   // rotor inertia
  parameter real LOSS_C2     = 3.0e-9,    // loss torque polynomial, Nm/(rad/s)^2
  parameter real LOSS_C1     = 8.0e-6,    // Nm/(rad/s)
  parameter real LOSS_C0     = 0.0271,    // Nm
  parameter real KANG        = 1.0e-6 * 4.0 * 6138.0 / 6.283185307179586 * 4294967296.0
                                          // p * angle tick (4 us) * counts/rev / 2pi * 2^32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                step,
  input  fp64_t               ua, ub, uc,
  input  fp64_t               ea, eb, ec,
  input  fp64_t               kfa, kfb, kfc,
  input  fp64_t               tl,
  input  logic [2:0]          clr,       // {c,b,a}: phase current held at zero
  output fp64_t               ia, ib, ic,
  output fp64_t               speed,
  output fp64_t               te,
  output logic signed [45:0]  ang_rate,  // speed in angle counts per 4 us tick, 32 fraction bits
  output logic                busy,
  output logic                overrun
);

  localparam int NA = 10;
  localparam int NM = 8;

  localparam fp64_t K_R   = $realtobits(R_OHM);
  localparam fp64_t K_IL  = $realtobits(TS / (2.0 * (L_H - M_H)));
  localparam fp64_t K_IJ  = $realtobits(TS / (2.0 * J_KGM2));
  localparam fp64_t K_3   = $realtobits(3.0);
  localparam fp64_t K_C2  = $realtobits(LOSS_C2);
  localparam fp64_t K_C1  = $realtobits(LOSS_C1);
  localparam fp64_t K_C0  = $realtobits(LOSS_C0);
  localparam fp64_t K_ANG = $realtobits(KANG);
  localparam fp64_t K_1_3 = $realtobits(1.0 / 3.0);
  localparam fp64_t K_1_2 = $realtobits(0.5);

  typedef enum logic [1:0] {ST_IDLE, ST_RUN} state_t;

  // model state and intermediate registers
  fp64_t i_r [3], inc [3], d [3], v [3], r [3], h [3], hp [3], t3 [3], m [3], tek [3];
  fp64_t w, incw, s1, s, un, tab, te_r, tn, q0, q1, q2, tm, tacc, taccp, tt, mw, kang;
  fp64_t kf_s [3], tl_s;
  logic [2:0] clr_s;

  state_t     state;
  logic [1:0] stage;
  logic       go;
  logic       a_got, m_got;

  fp64_t      add_a [NA], add_b [NA], add_y [NA];
  logic       add_sub [NA];
  logic [NA-1:0] add_done;
  fp64_t      mul_a [NM], mul_b [NM], mul_y [NM];
  logic [NM-1:0] mul_done;

  for (genvar g = 0; g < NA; g++) begin : g_add
    fp64_add #(.LAT(ADD_LAT)) u_add (.clk, .rst, .start(go), .sub(add_sub[g]),
                                     .a(add_a[g]), .b(add_b[g]), .y(add_y[g]), .done(add_done[g]));
  end
  for (genvar g = 0; g < NM; g++) begin : g_mul
    fp64_mul #(.LAT(MUL_LAT)) u_mul (.clk, .rst, .start(go),
                                     .a(mul_a[g]), .b(mul_b[g]), .y(mul_y[g]), .done(mul_done[g]));
  end

  // masked (u-e) of conducting phases and 1/(number of conducting phases)
  fp64_t dm [3];
  fp64_t cn;
  always_comb begin
    for (int k = 0; k < 3; k++) dm[k] = clr_s[k] ? FP_ZERO : d[k];
    unique case (clr_s)
      3'b000:                 cn = K_1_3;
      3'b001, 3'b010, 3'b100: cn = K_1_2;
      3'b011, 3'b101, 3'b110: cn = FP_ONE;
      default:                cn = FP_ZERO;
    endcase
  end

  // loss term subtracted from the net torque: opposes the motion, or holds the
  // rotor at standstill when the net torque does not exceed C0
  fp64_t loss_sel;
  always_comb begin
    if (!fp_is_zero(w))               loss_sel = {w[63], tm[62:0]};
    else if (fp_abs_gt(tn, K_C0))     loss_sel = {tn[63], tm[62:0]};
    else                              loss_sel = tn;
  end

  fp64_t ein [3], uin [3];
  assign uin = '{ua, ub, uc};
  assign ein = '{ea, eb, ec};

  // operand selection for the current stage
  always_comb begin
    for (int j = 0; j < NA; j++) begin
      add_a[j] = FP_ZERO; add_b[j] = FP_ZERO; add_sub[j] = 1'b0;
    end
    for (int j = 0; j < NM; j++) begin
      mul_a[j] = FP_ZERO; mul_b[j] = FP_ZERO;
    end
    unique case (stage)
      2'd0: begin
        for (int k = 0; k < 3; k++) begin
          add_a[k]   = i_r[k]; add_b[k]   = inc[k];
          add_a[4+k] = uin[k]; add_b[4+k] = ein[k]; add_sub[4+k] = 1'b1;
          mul_a[k]   = K_3;    mul_b[k]   = h[k];
        end
        add_a[3] = w;    add_b[3] = incw;
        add_a[7] = s1;   add_b[7] = dm[2];
        add_a[8] = tab;  add_b[8] = tek[2];
        add_a[9] = q2;   add_b[9] = K_C0;
        mul_a[3] = K_3;  mul_b[3] = tacc;
        mul_a[4] = K_C2; mul_b[4] = fp_abs(w);
        mul_a[5] = K_ANG; mul_b[5] = w;
        mul_a[6] = s;    mul_b[6] = cn;
      end
      2'd1: begin
        for (int k = 0; k < 3; k++) begin
          add_a[k]   = d[k];  add_b[k]   = un;    add_sub[k]   = 1'b1;
          add_a[3+k] = t3[k]; add_b[3+k] = hp[k]; add_sub[3+k] = 1'b1;
          mul_a[k]   = K_R;   mul_b[k]   = i_r[k];
          mul_a[3+k] = kf_s[k]; mul_b[3+k] = i_r[k];
        end
        add_a[6] = tt;   add_b[6] = taccp; add_sub[6] = 1'b1;
        add_a[7] = q0;   add_b[7] = K_C1;
        add_a[8] = te_r; add_b[8] = tl_s;  add_sub[8] = 1'b1;
        add_a[9] = dm[0]; add_b[9] = dm[1];
      end
      default: begin
        for (int k = 0; k < 3; k++) begin
          add_a[k] = v[k]; add_b[k] = r[k]; add_sub[k] = 1'b1;
          mul_a[k] = K_IL; mul_b[k] = m[k];
        end
        add_a[3] = tek[0]; add_b[3] = tek[1];
        add_a[4] = tn;     add_b[4] = loss_sel; add_sub[4] = 1'b1;
        mul_a[3] = K_IJ;   mul_b[3] = mw;
        mul_a[4] = q1;     mul_b[4] = fp_abs(w);
      end
    endcase
  end

  // stage sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE; stage <= 2'd0; go <= 1'b0; a_got <= 1'b0; m_got <= 1'b0;
      overrun <= 1'b0; clr_s <= 3'b111; tl_s <= FP_ZERO;
      for (int k = 0; k < 3; k++) kf_s[k] <= FP_ZERO;
    end else begin
      go <= 1'b0;
      if (step) begin
        if (state != ST_IDLE) overrun <= 1'b1;
        clr_s <= clr; tl_s <= tl; kf_s <= '{kfa, kfb, kfc};
        state <= ST_RUN; stage <= 2'd0; a_got <= 1'b0; m_got <= 1'b0;
        go <= 1'b1;
      end else if (state == ST_RUN) begin
        if (add_done[0]) a_got <= 1'b1;
        if (mul_done[0]) m_got <= 1'b1;
        if ((a_got || add_done[0]) && (m_got || mul_done[0])) begin
          a_got <= 1'b0; m_got <= 1'b0;
          if (stage == 2'd2) begin
            state <= ST_IDLE; stage <= 2'd0;
          end else begin
            stage <= stage + 2'd1;
            go <= 1'b1;
          end
        end
      end
    end
  end

  // write-back of adder results
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 3; k++) begin
        i_r[k] <= FP_ZERO; d[k] <= FP_ZERO; v[k] <= FP_ZERO; h[k] <= FP_ZERO; hp[k] <= FP_ZERO; m[k] <= FP_ZERO;
      end
      w <= FP_ZERO; s1 <= FP_ZERO; s <= FP_ZERO; tab <= FP_ZERO; te_r <= FP_ZERO; tm <= FP_ZERO;
      tn <= FP_ZERO; q1 <= FP_ZERO; mw <= FP_ZERO; tacc <= FP_ZERO; taccp <= FP_ZERO;
    end else if (state == ST_RUN && add_done[0]) begin
      unique case (stage)
        2'd0: begin
          for (int k = 0; k < 3; k++) begin
            i_r[k] <= clr_s[k] ? FP_ZERO : add_y[k];
            d[k]   <= add_y[4+k];
          end
          // a speed that changes sign within one step is stopped at zero
          w    <= (!fp_is_zero(w) && !fp_is_zero(add_y[3]) && (add_y[3][63] != w[63])) ? FP_ZERO : add_y[3];
          s    <= add_y[7];
          te_r <= add_y[8];
          tm   <= add_y[9];
        end
        2'd1: begin
          for (int k = 0; k < 3; k++) begin
            v[k] <= add_y[k];
            m[k] <= add_y[3+k];
          end
          mw <= add_y[6];
          q1 <= add_y[7];
          tn <= add_y[8];
          s1 <= add_y[9];
        end
        default: begin
          for (int k = 0; k < 3; k++) begin
            hp[k] <= h[k];
            h[k]  <= clr_s[k] ? FP_ZERO : add_y[k];
          end
          tab   <= add_y[3];
          taccp <= tacc;
          tacc  <= add_y[4];
        end
      endcase
    end
  end

  // write-back of multiplier results
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 3; k++) begin
        t3[k] <= FP_ZERO; r[k] <= FP_ZERO; tek[k] <= FP_ZERO; inc[k] <= FP_ZERO;
      end
      tt <= FP_ZERO; q0 <= FP_ZERO; kang <= FP_ZERO; un <= FP_ZERO; incw <= FP_ZERO; q2 <= FP_ZERO;
    end else if (state == ST_RUN && mul_done[0]) begin
      unique case (stage)
        2'd0: begin
          for (int k = 0; k < 3; k++) t3[k] <= mul_y[k];
          tt   <= mul_y[3];
          q0   <= mul_y[4];
          kang <= mul_y[5];
          un   <= mul_y[6];
        end
        2'd1: begin
          for (int k = 0; k < 3; k++) begin
            r[k]   <= mul_y[k];
            tek[k] <= mul_y[3+k];
          end
        end
        default: begin
          for (int k = 0; k < 3; k++) inc[k] <= mul_y[k];
          incw <= mul_y[3];
          q2   <= mul_y[4];
        end
      endcase
    end
  end

  assign ia       = i_r[0];
  assign ib       = i_r[1];
  assign ic       = i_r[2];
  assign speed    = w;
  assign te       = te_r;
  assign ang_rate = 46'(fp_to_fix(kang, 0));
  assign busy     = (state != ST_IDLE);

  // a step must finish before the next one starts
  always_ff @(posedge clk) begin
    if (!rst) assert (!(step && busy)) else $error("bldc_motor: step strobe while busy");
  end

endmodule

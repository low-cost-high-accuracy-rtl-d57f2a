// fp64_pkg: IEEE-754 double precision arithmetic used by the motor model.
//
// The motor model keeps every state variable and every intermediate value as a
// 64-bit IEEE-754 double, as the design calls for, without any vendor
// floating-point core. This package holds the combinational arithmetic; the
// modules fp64_add and fp64_mul wrap it with the fixed latencies of the design.
//
// Conventions (own choices, the design only fixes the 64-bit format):
//   * round to nearest, ties to even, for add and multiply;
//   * subnormal inputs are read as zero and subnormal results are flushed to zero;
//   * exponent overflow gives a signed infinity; NaN is not generated or treated.
// Conversions to and from fixed point truncate toward zero and saturate.
package fp64_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP_ZERO = 64'h0;
  localparam fp64_t FP_ONE  = 64'h3FF0_0000_0000_0000;

  // Pack sign, biased exponent and a 53-bit mantissa (hidden bit at 52) with
  // guard/round/sticky bits; rounds to nearest even and handles over/underflow.
  function automatic fp64_t fp_round_pack(input logic s, input int e,
                                          input logic [52:0] m, input logic g,
                                          input logic rs);
    logic [53:0] mr;
    int          er;
    mr = {1'b0, m};
    er = e;
    if (g && (rs || m[0])) mr = mr + 54'd1;
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 2047)   return {s, 11'h7FF, 52'h0};
    else if (er <= 0) return {s, 63'h0};
    else              return {s, er[10:0], mr[51:0]};
  endfunction

  // a + b, or a - b when sub is set.
  function automatic fp64_t fp_add(input fp64_t a, input fp64_t b, input logic sub);
    logic        sa, sb, sx, sy;
    logic [10:0] ea, eb, ex, ey;
    logic [55:0] mx, my, shifted;   // 1.52 mantissa followed by guard, round, sticky
    logic [56:0] sum;
    logic        sticky;
    int          d, lz, e;
    sa = a[63];
    sb = b[63] ^ sub;
    ea = a[62:52];
    eb = b[62:52];
    if (eb == 0) return (ea == 0) ? {sa & sb, 63'h0} : {sa, a[62:0]};
    if (ea == 0) return {sb, b[62:0]};
    // order the operands so that |x| >= |y|
    if (a[62:0] >= b[62:0]) begin
      sx = sa; ex = ea; mx = {1'b1, a[51:0], 3'b000};
      sy = sb; ey = eb; my = {1'b1, b[51:0], 3'b000};
    end else begin
      sx = sb; ex = eb; mx = {1'b1, b[51:0], 3'b000};
      sy = sa; ey = ea; my = {1'b1, a[51:0], 3'b000};
    end
    d = int'(ex) - int'(ey);
    if (d >= 56) begin
      shifted = 56'h0;
      sticky  = 1'b1;
    end else begin
      shifted = my >> d;
      sticky  = 1'b0;
      for (int i = 0; i < 56; i++)
        if (i < d && my[i]) sticky = 1'b1;
    end
    shifted[0] = shifted[0] | sticky;
    e = int'(ex);
    if (sx == sy) begin
      sum = {1'b0, mx} + {1'b0, shifted};
      if (sum[56]) begin
        sum = {1'b0, sum[56:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, shifted};
      if (sum == 0) return FP_ZERO;
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - lz;
    end
    return fp_round_pack(sx, e, sum[55:3], sum[2], sum[1] | sum[0]);
  endfunction

  // a * b
  function automatic fp64_t fp_mul(input fp64_t a, input fp64_t b);
    logic         s;
    logic [105:0] p;
    int           e;
    s = a[63] ^ b[63];
    if (a[62:52] == 0 || b[62:52] == 0) return {s, 63'h0};
    p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e = int'(a[62:52]) + int'(b[62:52]) - 1023;
    if (p[105])
      return fp_round_pack(s, e + 1, p[105:53], p[52], |p[51:0]);
    else
      return fp_round_pack(s, e, p[104:52], p[51], |p[50:0]);
  endfunction

  // Signed 32-bit integer times 2**scale, exact.
  function automatic fp64_t fp_from_i32(input logic signed [31:0] x, input int scale);
    logic [31:0] mag;
    int          k;
    logic [52:0] m;
    if (x == 0) return FP_ZERO;
    mag = x[31] ? 32'(-x) : 32'(x);
    k = 0;
    for (int i = 0; i < 32; i++)
      if (mag[i]) k = i;
    m = 53'(mag) << (52 - k);
    return {x[31], 11'(k + 1023 + scale), m[51:0]};
  endfunction

  // Truncate a * 2**frac toward zero to a signed integer of 64 bits, saturating.
  function automatic logic signed [63:0] fp_to_fix(input fp64_t a, input int frac);
    logic [52:0]        m;
    int                 e;
    logic signed [63:0] mag;
    if (a[62:52] == 0) return 64'sd0;
    m = {1'b1, a[51:0]};
    e = int'(a[62:52]) - 1023 + frac;   // value = m * 2**(e-52)
    if (e < 0) return 64'sd0;
    if (e >= 62) return a[63] ? -64'sh3FFF_FFFF_FFFF_FFFF : 64'sh3FFF_FFFF_FFFF_FFFF;
    if (e >= 52) mag = $signed(64'(m) << (e - 52));
    else         mag = $signed(64'(m >> (52 - e)));
    return a[63] ? -mag : mag;
  endfunction

  // |a| > |b| for finite doubles
  function automatic logic fp_abs_gt(input fp64_t a, input fp64_t b);
    return a[62:0] > b[62:0];
  endfunction

  function automatic fp64_t fp_neg(input fp64_t a);
    return {~a[63], a[62:0]};
  endfunction

  function automatic fp64_t fp_abs(input fp64_t a);
    return {1'b0, a[62:0]};
  endfunction

  function automatic logic fp_is_zero(input fp64_t a);
    return a[62:52] == 0;
  endfunction

endpackage

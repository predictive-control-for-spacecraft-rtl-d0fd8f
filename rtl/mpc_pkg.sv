// mpc_pkg: constants and arithmetic shared by the interior-point MPC accelerator.
//
// The accelerator builds and solves the KKT system of one primal-dual
// interior-point iteration for a spacecraft rendezvous controller with a
// 6-state (relative position, velocity) and 6-input (+/- impulse per axis)
// model. The problem sizes below are fixed by that model; the maximum
// horizon NMAX is a design choice (20, the horizon of the reference timing
// measurement) and is also exposed as a module parameter.
//
// Number formats:
//   * single-precision IEEE-754 words (fp32_t) for everything outside the
//     Lanczos process;
//   * Q32.32 (64-bit signed, 32 fraction bits) accumulators for float dot
//     products, as the builder does;
//   * sFix25_23 preconditioned matrix entries, sFix35_33 Lanczos vectors,
//     sFix52_50 Lanczos inner products and sFix64_32 reciprocal square roots.
//
// The float functions stand in for pipelined floating-point cores. They
// truncate (round toward zero), flush denormals to zero and saturate on
// overflow; NaN and infinity are not produced or interpreted. Each is
// combinational; callers register the result.
package mpc_pkg;

  localparam int NX    = 6;                 // states
  localparam int NU    = 6;                 // inputs
  localparam int NT    = 6;                 // terminal equality rows
  localparam int NS    = NX + NU;           // primal variables per stage
  localparam int NCS   = 2 * NU;            // inequality rows per stage
  localparam int ROWW  = 3 * NX + NU;       // width of the compact KKT form
  localparam int NMAX_DEFAULT = 20;

  // KKT dimension for horizon n: n(2NX+NU) + 2NX + NT
  function automatic int kkt_dim(input int n);
    return n * (2 * NX + NU) + 2 * NX + NT;
  endfunction

  // primal dimension n(NX+NU)+NX
  function automatic int pri_dim(input int n);
    return n * NS + NX;
  endfunction

  typedef logic [31:0]        fp32_t;
  typedef logic signed [63:0] q32_t;    // Q32.32 and sFix64_32
  typedef logic signed [24:0] mat_t;    // sFix25_23
  typedef logic signed [34:0] vec_t;    // sFix35_33
  typedef logic signed [51:0] dot_t;    // sFix52_50

  localparam fp32_t FP_ONE  = 32'h3f80_0000;
  localparam fp32_t FP_MONE = 32'hbf80_0000;
  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_MAX  = 32'h7f7f_ffff;

  function automatic fp32_t f_neg(input fp32_t a);
    return (a[30:23] == 8'd0) ? FP_ZERO : {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t f_abs(input fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  // pack sign, unbiased-plus-127 exponent and 24-bit normalised mantissa
  function automatic fp32_t f_pack(input logic s, input int e, input logic [23:0] m);
    if (e >= 255) return {s, FP_MAX[30:0]};
    if (e <= 0)   return FP_ZERO;
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic fp32_t f_mul(input fp32_t a, input fp32_t b);
    logic [47:0] p;
    int          e;
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_ZERO;
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return f_pack(a[31] ^ b[31], e + 1, p[47:24]);
    return f_pack(a[31] ^ b[31], e, p[46:23]);
  endfunction

  function automatic fp32_t f_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [27:0] mx, my, s;
    int          sh, e;
    if (b[30:23] == 8'd0) return (a[30:23] == 8'd0) ? FP_ZERO : a;
    if (a[30:23] == 8'd0) return b;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    mx = {1'b0, 1'b1, x[22:0], 3'b000};
    my = {1'b0, 1'b1, y[22:0], 3'b000};
    sh = int'(x[30:23]) - int'(y[30:23]);
    my = (sh > 27) ? 28'd0 : (my >> sh);
    s  = (x[31] == y[31]) ? mx + my : mx - my;
    e  = int'(x[30:23]);
    if (s == 28'd0) return FP_ZERO;
    if (s[27]) begin
      s = s >> 1;
      e = e + 1;
    end else begin
      for (int i = 0; i < 27; i++) begin
        if (!s[26]) begin
          s = s << 1;
          e = e - 1;
        end
      end
    end
    return f_pack(x[31], e, s[26:3]);
  endfunction

  function automatic fp32_t f_sub(input fp32_t a, input fp32_t b);
    return f_add(a, f_neg(b));
  endfunction

  // float -> 64-bit signed fixed point with FRAC fraction bits (saturating)
  function automatic q32_t f_to_fix(input fp32_t a, input int frac);
    logic [63:0] m;
    int          sh;
    if (a[30:23] == 8'd0) return '0;
    m  = {40'd0, 1'b1, a[22:0]};
    sh = int'(a[30:23]) - 150 + frac;
    if (sh >= 40) m = 64'h7fff_ffff_ffff_ffff;
    else if (sh >= 0) m = m << sh;
    else if (sh > -64) m = m >> (-sh);
    else m = '0;
    return a[31] ? -$signed(m) : $signed(m);
  endfunction

  // 64-bit signed fixed point with FRAC fraction bits -> float (truncating)
  function automatic fp32_t fix_to_f(input q32_t x, input int frac);
    logic [63:0] mag;
    logic [63:0] m;
    int          p;
    mag = x[63] ? 64'(-x) : 64'(x);
    if (mag == 64'd0) return FP_ZERO;
    p = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) p = i;
    if (p >= 23) m = mag >> (p - 23);
    else m = mag << (23 - p);
    return f_pack(x[63], p - frac + 127, m[23:0]);
  endfunction

  // saturate a 64-bit signed value to W bits
  function automatic q32_t sat_w(input q32_t x, input int w);
    q32_t hi, lo;
    hi = (q32_t'(1) <<< (w - 1)) - 1;
    lo = -(q32_t'(1) <<< (w - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

endpackage

// tb_util.svh: shared helpers for the self-checking testbenches.
// real <-> single-precision conversion done independently of mpc_pkg
// (through the double-precision bit pattern, truncating the mantissa).
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
function automatic logic [31:0] r2f(input real r);
  logic [63:0] d;
  int          e;
  d = $realtobits(r);
  if (r == 0.0) return 32'h0;
  e = int'(d[62:52]) - 1023 + 127;
  if (e <= 0) return 32'h0;
  return {d[63], 8'(e), d[51:29]};
endfunction

function automatic real f2r(input logic [31:0] f);
  logic [63:0] d;
  if (f[30:23] == 8'd0) return 0.0;
  d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
  return $bitstoreal(d);
endfunction

function automatic real rabs(input real x);
  return (x < 0.0) ? -x : x;
endfunction

// relative-or-absolute closeness
function automatic bit close(input real a, input real b, input real tol);
  real m;
  m = rabs(b) > 1.0 ? rabs(b) : 1.0;
  return rabs(a - b) <= tol * m;
endfunction
`endif

// fix_rsqrt: reciprocal square root of the Lanczos inner product.
//
// Input x is sFix52_50 (taken as non-negative), output y is sFix64_32, as
// in the document: an integer square root followed by the reciprocal of
// the result. With X the raw integer, sqrt(x) = isqrt(X) * 2^-25, so
// y = 2^25 / R in real terms and 2^57 / R as a Q32.32 integer, computed by
// the divider state machine. x = 0 (or negative) returns the largest
// positive sFix64_32 value (this design's choice).
//
// Timing: `done` pulses 26 + 1 + 64 + 1 + 1 = 93 cycles after `start` is sampled.
module fix_rsqrt
  import mpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  dot_t  x,
  output logic  busy,
  output logic  done,
  output q32_t  y
);
  logic        sq_busy, sq_done, dv_busy, dv_done;
  logic [25:0] root;
  logic [63:0] quo;
  logic        pending;

  isqrt_sm #(.W(52)) u_sqrt (
    .clk(clk), .rst_n(rst_n), .start(start && !busy),
    .x(x[51] ? 52'd0 : 52'(x)),
    .busy(sq_busy), .done(sq_done), .root(root)
  );

  div_sm #(.W(64)) u_div (
    .clk(clk), .rst_n(rst_n), .start(sq_done && root != 26'd0),
    .num(64'd1 << 57), .den({38'd0, root}),
    .busy(dv_busy), .done(dv_done), .quo(quo)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending <= 1'b0;
      done    <= 1'b0;
      y       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) pending <= 1'b1;
      if (sq_done && root == 26'd0) begin
        y       <= 64'sh7fff_ffff_ffff_ffff;
        done    <= 1'b1;
        pending <= 1'b0;
      end else if (dv_done) begin
        y       <= $signed(quo[63]) ? 64'sh7fff_ffff_ffff_ffff : $signed(quo);
        done    <= 1'b1;
        pending <= 1'b0;
      end
    end
  end

  assign busy = pending || sq_busy || dv_busy;
endmodule

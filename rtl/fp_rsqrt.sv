// fp_rsqrt: single-precision reciprocal square root.
//
// Used for the diagonal preconditioner (row sums of absolute values raised
// to -1/2) and for the Givens rotations and right-hand-side normalisation
// of MINRES. The document does not say how these float operations are
// done; this design reuses the integer square root and divider state
// machines on the mantissa. With x = M * 2^E (M the 24-bit integer
// mantissa), the mantissa is shifted so the exponent is even, scaled to a
// 50-bit radicand X and R = isqrt(X) is formed; then Q = 2^62 / R and the
// result Q * 2^-(62 + E'/2) is packed as a float. Non-positive input
// returns 0 (this design's choice).
//
// Timing: `done` pulses 25 + 64 + 3 cycles after `start`.
module fp_rsqrt
  import mpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t x,
  output logic  busy,
  output logic  done,
  output fp32_t y
);
  logic        sq_busy, sq_done, dv_busy, dv_done;
  logic [49:0] radicand;
  logic [24:0] root;
  logic [63:0] quo;
  logic        pending;
  int          e_half, e_half_q;
  int          eu;

  // value = M * 2^eu with eu = e-150; radicand X = M * 2^24 or M * 2^25 so
  // that the remaining exponent (eu-24 or eu-25) is even
  always_comb begin
    eu = int'(x[30:23]) - 150;
    if (eu % 2 != 0) begin
      radicand = {1'b0, 1'b1, x[22:0], 25'd0};   // M * 2^25
      e_half   = (eu - 25) / 2;
    end else begin
      radicand = {2'b00, 1'b1, x[22:0], 24'd0};   // M * 2^24
      e_half   = (eu - 24) / 2;
    end
  end

  isqrt_sm #(.W(50)) u_sqrt (
    .clk(clk), .rst_n(rst_n),
    .start(start && !busy && !x[31] && x[30:23] != 8'd0),
    .x(radicand), .busy(sq_busy), .done(sq_done), .root(root)
  );

  div_sm #(.W(64)) u_div (
    .clk(clk), .rst_n(rst_n), .start(sq_done),
    .num(64'd1 << 62), .den({39'd0, root}),
    .busy(dv_busy), .done(dv_done), .quo(quo)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      done     <= 1'b0;
      y        <= FP_ZERO;
      e_half_q <= 0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        e_half_q <= e_half;
        if (x[31] || x[30:23] == 8'd0) begin
          y    <= FP_ZERO;
          done <= 1'b1;
        end else begin
          pending <= 1'b1;
        end
      end
      if (dv_done) begin
        // 1/sqrt(x) = Q * 2^-62 * 2^-e_half
        y       <= fix_to_f(q32_t'(quo), 62 + e_half_q);
        done    <= 1'b1;
        pending <= 1'b0;
      end
    end
  end

  assign busy = pending || sq_busy || dv_busy;
endmodule

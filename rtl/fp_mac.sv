// fp_mac: float multiply, fixed-point accumulate, float result.
//
// One dot product term per clock: the two single-precision operands are
// multiplied in float, the product is converted to Q32.32 (64-bit signed,
// 32 fraction bits) and added to a running sum, and the finished sum is
// converted back to float. Exact fixed-point accumulation gives one
// addition per cycle without the latency of a float adder loop, which is
// how the document's builder sustains its throughput. A term flagged
// `in_first` restarts the sum from `bias` (a float, e.g. the H element to
// add, or 0); `in_last` ends it.
//
// Timing: stage 1 multiplies, stage 2 converts and accumulates, stage 3
// converts back: `out_valid` rises 3 cycles after the `in_last` term.
// The per-stage split is this design's; the document's core latency is
// not given.
module fp_mac
  import mpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t bias,
  output logic  out_valid,
  output fp32_t result
);
  fp32_t prod_q, bias_q;
  logic  v1, f1, l1, v2;
  q32_t  acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; v2 <= 1'b0;
      out_valid <= 1'b0;
      acc <= '0; prod_q <= '0; bias_q <= '0; result <= '0;
    end else begin
      v1     <= in_valid;
      f1     <= in_first;
      l1     <= in_last;
      prod_q <= f_mul(a, b);
      bias_q <= bias;
      v2 <= 1'b0;
      if (v1) begin
        acc <= (f1 ? f_to_fix(bias_q, 32) : acc) + f_to_fix(prod_q, 32);
        v2  <= l1;
      end
      out_valid <= v2;
      if (v2) result <= fix_to_f(acc, 32);
    end
  end
endmodule

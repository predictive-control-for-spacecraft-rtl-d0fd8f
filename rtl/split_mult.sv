// split_mult: sFix25_23 x sFix35_33 product built from two narrow multiplies.
//
// The Lanczos matrix-vector product multiplies a 25-bit matrix entry by a
// 35-bit vector entry. To fit 25x18 hardware multipliers the vector operand
// is split into a signed high part b[34:17] and an unsigned low part
// b[16:0]; the two partial products are registered, then shifted and added
// in a second stage (long multiplication in stages, two multipliers per
// element, as the document describes). The split point is this design's.
//
// Timing: p = a*b (60 bits, 56 fraction bits) two cycles after a, b.
module split_mult (
  input  logic               clk,
  input  logic signed [24:0] a,
  input  logic signed [34:0] b,
  output logic signed [59:0] p
);
  logic signed [42:0] p_hi;   // a * b[34:17] (signed x signed)
  logic signed [42:0] p_lo;   // a * b[16:0]  (signed x unsigned)

  always_ff @(posedge clk) begin
    p_hi <= 43'(a * $signed(b[34:17]));
    p_lo <= 43'(a * $signed({1'b0, b[16:0]}));
    p    <= (60'(p_hi) <<< 17) + 60'(p_lo);
  end
endmodule

// lanczos_matvec: one row of the preconditioned KKT matrix times v per clock.
//
// The compact KKT form has ROWW = 3*NX+NU = 24 columns. A bank of ROWW
// split multipliers forms a_c * v_c for a whole row at once (sFix25_23 times
// sFix35_33), and a registered binary adder tree (padded to 32 inputs,
// five levels) sums them. The row sum is truncated back to the vector
// format sFix35_33 with saturation. Rows stream in back to back, one per
// cycle, giving one dot product per clock as in the document; one register
// per tree level is this design's choice.
//
// Timing: `out_valid`/`z` follow `in_valid` by LAT = 2 + 5 + 1 = 8 cycles.
module lanczos_matvec
  import mpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  mat_t [ROWW-1:0]  arow,
  input  vec_t [ROWW-1:0]  vrow,
  output logic             out_valid,
  output vec_t             z
);
  localparam int LEAVES = 32;
  localparam int LEVELS = 5;
  localparam int LAT    = 2 + LEVELS + 1;

  logic signed [59:0] prod [ROWW];
  logic signed [64:0] tree [LEVELS+1][LEAVES];
  logic [LAT-1:0]     vpipe;

  for (genvar c = 0; c < ROWW; c++) begin : g_mul
    split_mult u_mul (.clk(clk), .a(arow[c]), .b(vrow[c]), .p(prod[c]));
  end

  always_comb begin
    for (int c = 0; c < LEAVES; c++)
      tree[0][c] = (c < ROWW) ? 65'(prod[c]) : '0;
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    for (genvar c = 0; c < (LEAVES >> l); c++) begin : g_add
      always_ff @(posedge clk) tree[l][c] <= tree[l-1][2*c] + tree[l-1][2*c+1];
    end
    for (genvar c = (LEAVES >> l); c < LEAVES; c++) begin : g_pad
      assign tree[l][c] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else vpipe <= {vpipe[LAT-2:0], in_valid};
    z <= vec_t'(sat_w(64'(tree[LEVELS][0] >>> 23), 35));
  end

  assign out_valid = vpipe[LAT-1];
endmodule

// matrix_index: address generation for time-varying prediction matrices.
//
// The processor stores each matrix (A_i, B_i, G_i, F_i or H_i) anywhere in
// the data RAM, in row-major order, and writes its start address into
// element i of an index RAM of NMAX+1 words. A matrix used at several
// stages (a time-invariant model) is stored once and indexed repeatedly.
// To read element `offset` of the stage-`stage` matrix, the index RAM is
// read at `stage` and its output is added to the element offset; the sum
// is the data RAM read address. This follows the document's indexing
// figure (index RAM, adder, data RAM); the one-cycle delay of `offset` that
// lines it up with the synchronous index RAM output is this design's.
//
// Timing: `addr` is valid one cycle after `stage`/`offset` are presented.
module matrix_index #(
  parameter int NMAX = 20,
  parameter int AW   = 12,
  localparam int SW  = $clog2(NMAX + 1)
) (
  input  logic          clk,
  input  logic          idx_we,
  input  logic [SW-1:0] idx_waddr,
  input  logic [AW-1:0] idx_wdata,
  input  logic [SW-1:0] stage,
  input  logic [AW-1:0] offset,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] base;
  logic [AW-1:0] offset_q;

  shared_ram #(.DEPTH(NMAX + 1), .W(AW), .NRD(1)) u_idx (
    .clk(clk), .we(idx_we), .waddr(idx_waddr), .wdata(idx_wdata),
    .raddr(stage), .rdata(base)
  );

  always_ff @(posedge clk) offset_q <= offset;

  assign addr = base + offset_q;
endmodule

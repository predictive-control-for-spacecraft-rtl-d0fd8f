// shared_ram: synchronous RAM with one write port and NRD read ports.
//
// Every memory of the accelerator is one of these: the data RAM the
// processor fills with prediction matrices and vectors, the five index RAMs,
// the Phi RAM, the preconditioner RAMs and the column and vector banks of
// the Lanczos process. Writes take effect at the clock edge; each read port
// returns the word at its address one cycle later (read-before-write on a
// collision). A single- or dual-port block RAM is NRD = 1 or 2; more read
// ports stand for replicated block RAMs. Contents are not reset.
module shared_ram #(
  parameter int DEPTH = 4096,
  parameter int W     = 32,
  parameter int NRD   = 1,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [W-1:0]            wdata,
  input  logic [NRD-1:0][AW-1:0]  raddr,
  output logic [NRD-1:0][W-1:0]   rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    for (int p = 0; p < NRD; p++)
      rdata[p] <= (32'(raddr[p]) < DEPTH) ? mem[raddr[p]] : '0;
  end
endmodule

// linear_system_builder: builds the KKT system of one PD-IP iteration.
//
// Holds the shared data RAM the processor fills (mode 1: prediction
// matrices A_i, B_i, G_i, F_N, H_i in row-major order, and the vectors m_k,
// w_k and [-h; f]), the index RAMs that locate each stage's matrices, and
// the Phi RAM. Three triggered modes then run on it:
//   mode 2  phi_builder writes H + G' diag(w) G into the Phi RAM;
//   mode 3  row_sequencer streams the rows of the compact KKT form
//           (seq_* outputs, to the preconditioner);
//   mode 4  row_sequencer streams the rows extended by G', b_builder turns
//           them into b_k (b_* outputs).
// The data RAM has four read ports; phi_builder owns them in mode 2, the
// sequencer (port 0) and b_builder (ports 1, 2) otherwise. Start a mode
// only while `busy` is low.
//
// Data RAM addresses are word addresses; m_base, w_base and rhs_base say
// where the processor put m_k, w_k and [-h; f] (this layout is this
// design's choice; the document only says these are transferred through a
// shared RAM).
module linear_system_builder
  import mpc_pkg::*;
#(
  parameter int NMAX = 20,
  parameter int DDEPTH = 4096,
  localparam int AW  = $clog2(DDEPTH),
  localparam int SW  = $clog2(NMAX + 1),
  localparam int PHI_DEPTH = NMAX * NS * NS + NX * NX,
  localparam int PW  = $clog2(PHI_DEPTH),
  localparam int KMAX = NMAX * (2 * NX + NU) + 2 * NX + NT,
  localparam int RW  = $clog2(KMAX),
  localparam int VW  = $clog2(KMAX + NMAX * NCS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // mode 1: data RAM and index RAM writes
  input  logic           dram_we,
  input  logic [AW-1:0]  dram_waddr,
  input  fp32_t          dram_wdata,
  input  logic           idx_we,
  input  logic [2:0]     idx_sel,
  input  logic [SW-1:0]  idx_waddr,
  input  logic [AW-1:0]  idx_wdata,
  // configuration
  input  logic [SW-1:0]  n_hor,
  input  logic [AW-1:0]  m_base,
  input  logic [AW-1:0]  w_base,
  input  logic [AW-1:0]  rhs_base,
  // mode triggers
  input  logic           start_phi,
  input  logic           start_seq,
  input  logic           start_b,
  output logic           busy,
  output logic           phi_done,
  output logic           seq_done,
  // mode-3 stream
  output logic           seq_valid,
  output fp32_t          seq_val,
  output logic [VW-1:0]  seq_vidx,
  output logic [RW-1:0]  seq_row,
  output logic [5:0]     seq_col,
  output logic           seq_first,
  output logic           seq_last,
  // mode-4 result
  output logic           b_valid,
  output logic [RW-1:0]  b_row,
  output fp32_t          b_val
);
  logic [3:0][AW-1:0] d_ra, phi_ra4;
  fp32_t [3:0]        d_rd;
  logic               phi_busy, sq_busy;

  shared_ram #(.DEPTH(DDEPTH), .W(32), .NRD(4)) u_dram (
    .clk(clk), .we(dram_we), .waddr(dram_waddr), .wdata(dram_wdata),
    .raddr(d_ra), .rdata(d_rd));

  logic          phi_we;
  logic [PW-1:0] phi_waddr, phi_raddr;
  fp32_t         phi_wdata, phi_rdata;

  shared_ram #(.DEPTH(PHI_DEPTH), .W(32), .NRD(1)) u_phi (
    .clk(clk), .we(phi_we), .waddr(phi_waddr), .wdata(phi_wdata),
    .raddr(phi_raddr), .rdata(phi_rdata));

  phi_builder #(.NMAX(NMAX), .AW(AW)) u_phib (
    .clk(clk), .rst_n(rst_n), .start(start_phi && !busy), .n_hor(n_hor), .w_base(w_base),
    .busy(phi_busy), .done(phi_done),
    .idx_we(idx_we), .idx_sel(idx_sel), .idx_waddr(idx_waddr), .idx_wdata(idx_wdata),
    .dram_raddr(phi_ra4), .dram_rdata(d_rd),
    .phi_we(phi_we), .phi_waddr(phi_waddr), .phi_wdata(phi_wdata));

  logic          with_g;
  logic          s_valid, s_first, s_last;
  fp32_t         s_val;
  logic [VW-1:0] s_vidx;
  logic [RW-1:0] s_row;
  logic [5:0]    s_col;
  logic [AW-1:0] sq_ra;
  logic [1:0][AW-1:0] b_ra;

  always_ff @(posedge clk) begin
    if (!rst_n) with_g <= 1'b0;
    else if (!busy && start_seq) with_g <= 1'b0;
    else if (!busy && start_b) with_g <= 1'b1;
  end

  row_sequencer #(.NMAX(NMAX), .AW(AW)) u_seq (
    .clk(clk), .rst_n(rst_n), .start(!busy && (start_seq || start_b)),
    .with_g(busy ? with_g : start_b), .n_hor(n_hor),
    .busy(sq_busy), .done(seq_done),
    .idx_we(idx_we), .idx_sel(idx_sel), .idx_waddr(idx_waddr), .idx_wdata(idx_wdata),
    .dram_raddr(sq_ra), .dram_rdata(d_rd[0]),
    .phi_raddr(phi_raddr), .phi_rdata(phi_rdata),
    .out_valid(s_valid), .out_val(s_val), .out_vidx(s_vidx), .out_row(s_row),
    .out_col(s_col), .out_first(s_first), .out_last(s_last));

  b_builder #(.AW(AW), .VW(VW), .RW(RW)) u_b (
    .clk(clk), .rst_n(rst_n), .m_base(m_base), .rhs_base(rhs_base),
    .in_valid(s_valid && with_g), .in_val(s_val), .in_vidx(s_vidx), .in_row(s_row),
    .in_first(s_first), .in_last(s_last),
    .dram_raddr(b_ra), .dram_rdata(d_rd[2:1]),
    .b_valid(b_valid), .b_row(b_row), .b_val(b_val));

  always_comb begin
    if (phi_busy) d_ra = phi_ra4;
    else d_ra = {{AW{1'b0}}, b_ra[1], b_ra[0], sq_ra};
  end

  // b_builder result lags the stream by a few cycles
  logic [7:0] b_tail;
  always_ff @(posedge clk) begin
    if (!rst_n) b_tail <= '0;
    else b_tail <= {b_tail[6:0], s_valid && with_g};
  end

  assign seq_valid = s_valid && !with_g;
  assign seq_val   = s_val;
  assign seq_vidx  = s_vidx;
  assign seq_row   = s_row;
  assign seq_col   = s_col;
  assign seq_first = s_first;
  assign seq_last  = s_last;
  assign busy      = phi_busy || sq_busy || (b_tail != '0);
endmodule

// pcore: interior-point KKT accelerator, the processor's AXI4-lite peripheral.
//
// A primal-dual interior-point controller spends most of its time solving
// the KKT linear system of each iteration. This peripheral takes that work
// from the processor: the processor writes the time-varying prediction
// matrices, the iteration's vectors m_k, w_k, [-h; f] and the index RAMs
// through AXI4-lite, then triggers in turn
//   mode 2  (Phi = H + G' diag(w) G),
//   mode 3  (compact KKT rows -> preconditioner -> fixed-point column RAMs),
//   mode 4  (right-hand side b_k),
//   solve   (I_MR iterations of preconditioned MINRES),
// polls STATUS and reads back the search direction c_k = [dtheta; dlambda]
// (and, for its convergence tests, b_k).
// The two halves are the linear system builder and the MINRES solver, as
// in the document's architecture figure; the register map is in
// axi_lite_regs. Default sizes: 6 states, 6 inputs, horizon up to
// NMAX = 20, a 4096-word data RAM.
module pcore
  import mpc_pkg::*;
#(
  parameter int NMAX   = 20,
  parameter int DDEPTH = 4096,
  localparam int AW  = $clog2(DDEPTH),
  localparam int SW  = $clog2(NMAX + 1),
  localparam int KMAX = NMAX * (2 * NX + NU) + 2 * NX + NT,
  localparam int RW  = $clog2(KMAX),
  localparam int VW  = $clog2(KMAX + NMAX * NCS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [17:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [17:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        irq_done        // solver finished (one-cycle pulse)
);
  logic          start_phi, start_seq, start_b, start_solve;
  logic [SW-1:0] n_hor;
  logic [15:0]   i_mr, iter;
  logic [AW-1:0] m_base, w_base, rhs_base;
  logic          bld_busy, pre_busy, sol_busy;
  logic          phi_done, seq_done, pre_done, sol_done;
  logic          idx_we, dram_we;
  logic [2:0]    idx_sel;
  logic [SW-1:0] idx_waddr;
  logic [AW-1:0] idx_wdata, dram_waddr;
  logic [31:0]   dram_wdata;
  logic [RW-1:0] sol_raddr;
  logic          sol_rsel;
  fp32_t         sol_rdata;

  axi_lite_regs #(.SW(SW), .AW(AW), .RW(RW)) u_axi (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(s_axi_awaddr), .s_axi_awvalid(s_axi_awvalid), .s_axi_awready(s_axi_awready),
    .s_axi_wdata(s_axi_wdata), .s_axi_wstrb(s_axi_wstrb), .s_axi_wvalid(s_axi_wvalid),
    .s_axi_wready(s_axi_wready), .s_axi_bresp(s_axi_bresp), .s_axi_bvalid(s_axi_bvalid),
    .s_axi_bready(s_axi_bready), .s_axi_araddr(s_axi_araddr), .s_axi_arvalid(s_axi_arvalid),
    .s_axi_arready(s_axi_arready), .s_axi_rdata(s_axi_rdata), .s_axi_rresp(s_axi_rresp),
    .s_axi_rvalid(s_axi_rvalid), .s_axi_rready(s_axi_rready),
    .start_phi(start_phi), .start_seq(start_seq), .start_b(start_b), .start_solve(start_solve),
    .n_hor(n_hor), .i_mr(i_mr), .m_base(m_base), .w_base(w_base), .rhs_base(rhs_base),
    .bld_busy(bld_busy), .pre_busy(pre_busy), .sol_busy(sol_busy),
    .phi_done(phi_done), .seq_done(seq_done), .pre_done(pre_done), .sol_done(sol_done),
    .iter(iter),
    .idx_we(idx_we), .idx_sel(idx_sel), .idx_waddr(idx_waddr), .idx_wdata(idx_wdata),
    .dram_we(dram_we), .dram_waddr(dram_waddr), .dram_wdata(dram_wdata),
    .sol_raddr(sol_raddr), .sol_rsel(sol_rsel), .sol_rdata(sol_rdata));

  logic          seq_valid, seq_first, seq_last, b_valid;
  fp32_t         seq_val, b_val;
  logic [VW-1:0] seq_vidx;
  logic [RW-1:0] seq_row, b_row;
  logic [5:0]    seq_col;

  linear_system_builder #(.NMAX(NMAX), .DDEPTH(DDEPTH)) u_lsb (
    .clk(clk), .rst_n(rst_n),
    .dram_we(dram_we), .dram_waddr(dram_waddr), .dram_wdata(dram_wdata),
    .idx_we(idx_we), .idx_sel(idx_sel), .idx_waddr(idx_waddr), .idx_wdata(idx_wdata),
    .n_hor(n_hor), .m_base(m_base), .w_base(w_base), .rhs_base(rhs_base),
    .start_phi(start_phi), .start_seq(start_seq), .start_b(start_b),
    .busy(bld_busy), .phi_done(phi_done), .seq_done(seq_done),
    .seq_valid(seq_valid), .seq_val(seq_val), .seq_vidx(seq_vidx), .seq_row(seq_row),
    .seq_col(seq_col), .seq_first(seq_first), .seq_last(seq_last),
    .b_valid(b_valid), .b_row(b_row), .b_val(b_val));

  minres_solver #(.NMAX(NMAX)) u_mr (
    .clk(clk), .rst_n(rst_n), .n_hor(n_hor), .i_mr(i_mr),
    .seq_valid(seq_valid), .seq_val(seq_val), .seq_vidx(seq_vidx), .seq_row(seq_row),
    .seq_col(seq_col), .seq_first(seq_first), .seq_last(seq_last),
    .b_valid(b_valid), .b_row(b_row), .b_val(b_val),
    .start(start_solve), .busy(sol_busy), .done(sol_done),
    .pre_busy(pre_busy), .pre_done(pre_done), .iter(iter),
    .sol_raddr(sol_raddr), .sol_rsel(sol_rsel), .sol_rdata(sol_rdata));

  assign irq_done = sol_done;
endmodule

// tb_minres_solver: solves a random horizon-2 KKT system end to end in the
// solver (preconditioner, column RAMs, Lanczos fixed-point passes, float
// MINRES update) and checks the answer against the reference matrix.
//
// The testbench lays the dense reference matrix out in the 24-column
// compact form itself (kkt_model::compact_vidx) and checks that the
// layout covers every non-zero of each row. It then streams the rows and
// b_k, runs the solver for I_MR iterations and checks
//   - the iteration counter equals I_MR when `done` pulses,
//   - the relative residual ||K c - b||_inf / ||b||_inf is below 2e-2 after
//     I_MR = n iterations (fixed-point Lanczos converges more slowly than
//     exact arithmetic),
//   - a second solve of the same system with 20 more iterations ends with
//     a smaller residual (convergence, and b_k survives a solve),
//   - the iteration time stays within the 3n + 200 cycle budget.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_minres_solver;
  import mpc_pkg::*;
  localparam int NMAX = 20;
  localparam int HOR  = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [4:0] n_hor; logic [15:0] i_mr;
  logic seq_valid, seq_first, seq_last; fp32_t seq_val; logic [9:0] seq_vidx;
  logic [8:0] seq_row; logic [5:0] seq_col;
  logic b_valid; logic [8:0] b_row; fp32_t b_val;
  logic start, busy, done, pre_busy, pre_done; logic [15:0] iter;
  logic [8:0] sol_raddr; logic sol_rsel; fp32_t sol_rdata;
  int checks = 0, failures = 0;
  kkt_model md;
  real sol [];
  real res_first;

  minres_solver #(.NMAX(NMAX)) dut (.*);

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic stream_system();
    for (int r = 0; r < md.nk; r++) begin
      int covered;
      int nz;
      covered = 0; nz = 0;
      for (int c = 0; c < md.nk; c++) if (md.kv(r, c) != 0.0) nz++;
      for (int c = 0; c < ROWW; c++) begin
        int vi;
        real v;
        vi = md.compact_vidx(r, c);
        v  = (vi >= 0) ? md.kv(r, vi) : 0.0;
        if (v != 0.0) covered++;
        @(negedge clk);
        seq_valid = 1; seq_first = (c == 0); seq_last = (c == ROWW - 1);
        seq_row = 9'(r); seq_col = 6'(c); seq_vidx = 10'((vi >= 0) ? vi : r); seq_val = r2f(v);
      end
      checks++;
      if (covered != nz) begin
        failures++; $display("row %0d: layout covers %0d of %0d non-zeros", r, covered, nz);
      end
    end
    @(negedge clk); seq_valid = 0;
    for (int r = 0; r < md.nk; r++) begin
      @(negedge clk); b_valid = 1; b_row = 9'(r); b_val = r2f(md.b[r]);
    end
    @(negedge clk); b_valid = 0;
    while (pre_busy) @(negedge clk);
  endtask

  task automatic run_solver(int iters, output real res);
    int t0, t1;
    @(negedge clk); i_mr = 16'(iters); start = 1;
    @(negedge clk); start = 0;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    checks++;
    if (iter != 16'(iters)) begin failures++; $display("iter %0d, expected %0d", iter, iters); end
    checks++;
    t1 = iters * (3 * md.nk + 200) + 4 * md.nk + 400;
    if (t0 > t1) begin failures++; $display("solve took %0d cycles, budget %0d", t0, t1); end
    for (int r = 0; r < md.nk; r++) begin
      @(negedge clk); sol_raddr = 9'(r);
      @(negedge clk); sol[r] = f2r(sol_rdata);
    end
    res = md.residual(sol);
    $display("I_MR %0d: %0d cycles, residual %g", iters, t0, res);
  endtask

  initial begin
    real res2;
    rst_n = 0; seq_valid = 0; seq_first = 0; seq_last = 0; seq_val = 0; seq_vidx = 0;
    seq_row = 0; seq_col = 0; b_valid = 0; b_row = 0; b_val = 0; start = 0; sol_raddr = 0; sol_rsel = 0;
    i_mr = 0;
    md = new(HOR);
    md.randomize_data(1);
    md.build();
    n_hor = 5'(HOR);
    sol = new[md.nk];
    repeat (3) @(negedge clk); rst_n = 1;
    stream_system();
    run_solver(md.nk, res_first);
    checks++;
    if (!(res_first < 2e-2)) begin failures++; $display("residual too large"); end
    run_solver(md.nk + 20, res2);
    checks++;
    if (!(res2 < res_first)) begin failures++; $display("residual did not fall with more iterations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

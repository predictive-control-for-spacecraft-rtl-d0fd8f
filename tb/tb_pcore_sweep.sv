// tb_pcore_sweep: the accelerator used the way the controller uses it over
// one sample. The controller tries horizons one after another and, for each
// horizon, runs several interior-point iterations. This testbench does the
// same on one pcore instance at its default sizes, with no reset in between:
//   horizons N = 3, 20, 4 (growing to the full size, then shrinking),
//   two interior-point iterations per horizon.
// For a new horizon the processor model writes the index RAMs, the
// registers and the whole data RAM image. For the second iteration of a
// horizon it writes only the iteration vectors m_k, w_k and [-h; f]. The
// prediction matrices stay in place, which is what the index RAMs allow.
// Every solve then runs modes 2, 3 and 4 and MINRES with
// I_MR = ceil(1.2 * KKT rows). Checked for every solve:
//   - the STATUS done bits,
//   - ITER,
//   - the relative residual ||K c - b|| / ||b|| of the c_k read back,
//     against a dense reference model, below 2e-2.
// It also checks that the vector-only update costs fewer bus writes than a
// full reload.
//
// The test data gives each stage three independent thrust directions
// (B_i = A_i [0 0; I -I], the +/- thrust pairs), while the terminal
// equality fixes all six states. At N = 1 the KKT matrix is then singular
// (18 equality rows of rank 15), and at N = 2 it is barely regular and
// badly conditioned. So the sweep starts at N = 3. At N = 1 the row
// stream and b_k are still exact; only the residual test needs a regular
// system.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_pcore_sweep;
  import mpc_pkg::*;
  localparam real RES_TOL = 2e-2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n;
  logic [17:0] s_axi_awaddr, s_axi_araddr;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic        irq_done;
  int checks = 0, failures = 0;
  int n_wr = 0;
  real mem [4096];

  pcore dut (.*);

  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && s_axi_awvalid && s_axi_awready) n_wr++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(int word, logic [31:0] data);
    @(negedge clk);
    s_axi_awaddr = 18'(word * 4); s_axi_awvalid = 1; s_axi_wdata = data; s_axi_wvalid = 1;
    s_axi_wstrb = 4'hf;
    #1;
    while (!s_axi_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (s_axi_bvalid) @(negedge clk);
  endtask

  task automatic axi_read(int word, output logic [31:0] data);
    @(negedge clk);
    s_axi_araddr = 18'(word * 4); s_axi_arvalid = 1;
    #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge clk);
    data = s_axi_rdata;
    @(negedge clk);
  endtask

  task automatic wait_status(int bit_no, string what);
    logic [31:0] st;
    int polls;
    polls = 0;
    do begin
      axi_read(1, st);
      polls++;
      if (!st[bit_no]) repeat (20) @(negedge clk);
    end while (!st[bit_no] && polls < 1000000);
    check(st[bit_no], {what, " finished"});
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    do axi_read(1, st); while (st[0]);
  endtask

  // modes 2-4 and MINRES on what the data RAM holds, then c_k read back
  task automatic run_step(kkt_model md, int imr, string tag);
    logic [31:0] d;
    real csol [];
    real res;
    csol = new[md.nk];
    axi_write(0, 32'h1); wait_status(8, {tag, " mode 2"}); wait_idle();
    axi_write(0, 32'h2); wait_status(10, {tag, " preconditioner"});
    axi_write(0, 32'h4); wait_status(9, {tag, " mode 4"}); wait_idle();
    axi_write(0, 32'h8); wait_status(11, {tag, " MINRES"});
    axi_read(7, d);
    check(d == 32'(imr), $sformatf("%s: ITER %0d, expected %0d", tag, d, imr));
    for (int r = 0; r < md.nk; r++) begin
      axi_read('h8000 + r, d);
      csol[r] = f2r(d);
    end
    res = md.residual(csol);
    $display("%s: rows %0d, I_MR %0d, residual %g", tag, md.nk, imr, res);
    check(res < RES_TOL, $sformatf("%s: residual %g above %g", tag, res, RES_TOL));
  endtask

  initial begin
    int hors [3] = '{3, 20, 4};
    int w_full, w_vec;
    rst_n = 0;
    s_axi_awaddr = 0; s_axi_awvalid = 0; s_axi_wdata = 0; s_axi_wstrb = 0; s_axi_wvalid = 0;
    s_axi_bready = 1; s_axi_araddr = 0; s_axi_arvalid = 0; s_axi_rready = 1;
    repeat (4) @(negedge clk); rst_n = 1;

    foreach (hors[h]) begin
      kkt_model md;
      int hor, imr;
      hor = hors[h];
      md = new(hor);
      md.randomize_data(1);
      md.build();
      md.image(mem);
      imr = (12 * md.nk + 9) / 10;

      // new horizon: registers, index RAMs, every data RAM word in use
      w_full = n_wr;
      axi_write(2, hor); axi_write(3, imr);
      axi_write(4, md.M_BASE); axi_write(5, md.W_BASE); axi_write(6, md.RHS_BASE);
      for (int sel = 0; sel < 5; sel++)
        for (int i = 0; i <= hor; i++) axi_write('h1000 + 32 * sel + i, md.index_of(sel, i));
      for (int a = 0; a < md.AB_ADDR + hor * 72; a++) axi_write('h4000 + a, r2f(mem[a]));
      w_full = n_wr - w_full;
      run_step(md, imr, $sformatf("N=%0d iteration 1", hor));

      // next interior-point iteration: new m_k, w_k, [-h; f]; matrices kept
      foreach (md.w[i])   md.w[i]   = kkt_model::fr(kkt_model::urand(0.2, 5.0));
      foreach (md.m[i])   md.m[i]   = kkt_model::fr(kkt_model::urand(-1.0, 1.0));
      foreach (md.rhs[i]) md.rhs[i] = kkt_model::fr(kkt_model::urand(-2.0, 2.0));
      md.build();
      w_vec = n_wr;
      foreach (md.m[i])   axi_write('h4000 + md.M_BASE + i, r2f(md.m[i]));
      foreach (md.w[i])   axi_write('h4000 + md.W_BASE + i, r2f(md.w[i]));
      foreach (md.rhs[i]) axi_write('h4000 + md.RHS_BASE + i, r2f(md.rhs[i]));
      w_vec = n_wr - w_vec;
      check(w_vec < w_full, $sformatf("N=%0d: vector update %0d writes, full load %0d",
                                      hor, w_vec, w_full));
      run_step(md, imr, $sformatf("N=%0d iteration 2", hor));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

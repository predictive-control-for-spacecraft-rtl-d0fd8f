// Shared body of the pcore end-to-end testbenches. The including module
// defines HOR (horizon) and IMR_NUM / IMR_DEN (I_MR = ceil(IMR_NUM/IMR_DEN
// * kkt rows)) and instantiates nothing else.
//
// A processor model drives the AXI4-lite port through one complete
// interior-point step of the accelerator:
//   mode 1  index RAMs, registers and data RAM written over AXI,
//   mode 2  Phi = H + G' diag(w) G,
//   mode 3  compact KKT rows -> preconditioner -> column RAMs,
//   mode 4  b_k = [-h; f] - [Phi F' G'; F 0 0] m_k,
//   solve   I_MR MINRES iterations,
// then reads c_k back over AXI and checks ||K c_k - b_k|| / ||b_k|| against
// the dense reference model. Along the way it counts every mechanism of the
// design (each must occur, with the expected count where one is known) and
// checks the register read-back, the sticky done bits and the b_k values,
// both as built and as read back over AXI.
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
kkt_model md;
real mem [4096];
real csol [];
int  nk, imr;

pcore dut (.*);

initial begin
  #2000000000; failures++;
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
end

// ---------------- mechanism counters ----------------------------------------
typedef enum int {
  K_AXI_WR, K_AXI_RD, K_B_STALL, K_PHI_RUN, K_PHI_TERM, K_ROWS, K_PRE_RSQ,
  K_PRE_DONE, K_BROWS, K_GEXT, K_ITER, K_FIX_RSQ, K_GIV_RSQ, K_SOL_DONE, K_BUSY_SEEN,
  K_N
} mech_e;
string mname [K_N] = '{"AXI writes", "AXI reads", "write responses held by the master",
  "mode 2 runs", "Phi terminal-block cycles", "mode 3 rows", "preconditioner rsqrt runs",
  "preconditioner done", "mode 4 b_k rows", "G' extension elements", "MINRES iterations",
  "fixed-point rsqrt runs", "Givens rsqrt runs", "solver done", "STATUS polls seen busy"};
int mcount [K_N];

always @(posedge clk) if (rst_n) begin
  if (s_axi_awvalid && s_axi_awready) mcount[K_AXI_WR]++;
  if (s_axi_arvalid && s_axi_arready) mcount[K_AXI_RD]++;
  if (s_axi_bvalid && !s_axi_bready) mcount[K_B_STALL]++;
  if (dut.phi_done) mcount[K_PHI_RUN]++;
  if (dut.u_lsb.u_phib.busy && dut.u_lsb.u_phib.i == dut.n_hor) mcount[K_PHI_TERM]++;
  if (dut.seq_valid && dut.seq_last) mcount[K_ROWS]++;
  if (dut.u_mr.u_pre.u_rsqrt.done) mcount[K_PRE_RSQ]++;
  if (dut.pre_done) mcount[K_PRE_DONE]++;
  if (dut.b_valid) mcount[K_BROWS]++;
  if (dut.u_lsb.with_g && dut.u_lsb.s_valid && dut.u_lsb.s_col >= 6'(ROWW)) mcount[K_GEXT]++;
  if (dut.u_mr.state == dut.u_mr.S_C && 32'(dut.u_mr.r) == nk - 1) mcount[K_ITER]++;
  if (dut.u_mr.u_frs.done) mcount[K_FIX_RSQ]++;
  if (dut.u_mr.u_grs.done) mcount[K_GIV_RSQ]++;
  if (irq_done) mcount[K_SOL_DONE]++;
end

// b_k rows as they leave the builder
real bseen [512];
always @(posedge clk) if (rst_n && dut.b_valid) bseen[dut.b_row] = f2r(dut.b_val);

// mode-3 elements against the reference layout
int seq_bad = 0, seq_n = 0;
always @(posedge clk) if (rst_n && dut.seq_valid) begin
  int  vi;
  real e;
  vi = md.compact_vidx(int'(dut.seq_row), int'(dut.seq_col));
  e  = (vi >= 0) ? md.kv(int'(dut.seq_row), vi) : 0.0;
  seq_n++;
  if ((vi >= 0 && int'(dut.seq_vidx) != vi && e != 0.0) ||
      !close(f2r(dut.seq_val), e, 1e-5 * (1.0 + rabs(e)))) begin
    seq_bad++;
    if (seq_bad < 10) $display("row %0d slot %0d: vidx %0d val %g, expected vidx %0d val %g",
      dut.seq_row, dut.seq_col, dut.seq_vidx, f2r(dut.seq_val), vi, e);
  end
end

// ---------------- AXI4-lite master ------------------------------------------
int wr_n = 0;
task automatic axi_write(int word, logic [31:0] data);
  @(negedge clk);
  s_axi_awaddr = 18'(word * 4); s_axi_awvalid = 1; s_axi_wdata = data; s_axi_wvalid = 1;
  s_axi_wstrb = 4'hf;
  #1;
  while (!s_axi_awready) begin @(negedge clk); #1; end
  @(negedge clk);
  s_axi_awvalid = 0; s_axi_wvalid = 0;
  // every 7th response is held for two cycles before it is accepted
  wr_n++;
  if (wr_n % 7 == 0) begin s_axi_bready = 0; repeat (2) @(negedge clk); end
  s_axi_bready = 1;
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
    if (st[2:0] != 3'b000) mcount[K_BUSY_SEEN]++;
    polls++;
  if (!st[bit_no]) repeat (20) @(negedge clk);
  end while (!st[bit_no] && polls < 1000000);
  checks++;
  if (!st[bit_no]) begin failures++; $display("%s never finished", what); end
endtask

task automatic expect_reg(int word, int value, string what);
  logic [31:0] d;
  axi_read(word, d);
  checks++;
  if (d != 32'(value)) begin failures++; $display("%s read back %0d, expected %0d", what, d, value); end
endtask

task automatic wait_idle();
  logic [31:0] st;
  do axi_read(1, st); while (st[0]);
endtask

initial begin
  logic [31:0] d;
  real res;
  rst_n = 0;
  s_axi_awaddr = 0; s_axi_awvalid = 0; s_axi_wdata = 0; s_axi_wstrb = 0; s_axi_wvalid = 0;
  s_axi_bready = 1; s_axi_araddr = 0; s_axi_arvalid = 0; s_axi_rready = 1;
  foreach (mcount[k]) mcount[k] = 0;
  md = new(HOR);
  md.randomize_data(1);
  md.build();
  md.image(mem);
  nk  = md.nk;
  imr = (IMR_NUM * nk + IMR_DEN - 1) / IMR_DEN;
  csol = new[nk];
  repeat (4) @(negedge clk); rst_n = 1;

  // mode 1: configuration, index RAMs, data RAM
  axi_write(2, HOR);
  axi_write(3, imr);
  axi_write(4, md.M_BASE);
  axi_write(5, md.W_BASE);
  axi_write(6, md.RHS_BASE);
  expect_reg(2, HOR, "N");
  expect_reg(3, imr, "I_MR");
  expect_reg(4, md.M_BASE, "M_BASE");
  expect_reg(5, md.W_BASE, "W_BASE");
  expect_reg(6, md.RHS_BASE, "RHS_BASE");
  for (int sel = 0; sel < 5; sel++)
    for (int i = 0; i <= HOR; i++) axi_write('h1000 + 32 * sel + i, md.index_of(sel, i));
  for (int a = 0; a < md.AB_ADDR + HOR * 72; a++) axi_write('h4000 + a, r2f(mem[a]));

  // mode 2
  axi_write(0, 32'h1);
  wait_status(8, "mode 2");
  wait_idle();
  // mode 3: the preconditioner consumes the rows
  axi_write(0, 32'h2);
  wait_status(10, "preconditioner");
  expect_reg(1, 32'h600, "STATUS after mode 3");
  // mode 4
  axi_write(0, 32'h4);
  wait_status(9, "mode 4");
  wait_idle();
  // MINRES
  axi_write(0, 32'h8);
  wait_status(11, "MINRES");
  expect_reg(7, imr, "ITER");

  // b_k as built, against the reference
  for (int r = 0; r < nk; r++) begin
    checks++;
    if (!close(bseen[r], md.b[r], 1e-4 * (1.0 + rabs(md.b[r])))) begin
      failures++;
      if (failures < 10) $display("b[%0d] = %g, expected %g", r, bseen[r], md.b[r]);
    end
  end
  checks++;
  if (seq_bad != 0 || seq_n != nk * ROWW) begin
    failures++; $display("%0d of %0d mode-3 elements wrong", seq_bad, seq_n);
  end
  // c_k
  for (int r = 0; r < nk; r++) begin
    axi_read('h8000 + r, d);
    csol[r] = f2r(d);
  end
  // b_k through the AXI window, as the processor's convergence tests read it
  for (int r = 0; r < nk; r++) begin
    axi_read('hC000 + r, d);
    checks++;
    if (d != r2f(bseen[r])) begin
      failures++;
      if (failures < 10) $display("b[%0d] read %g over AXI, built %g", r, f2r(d), bseen[r]);
    end
  end
  res = md.residual(csol);
  $display("N=%0d rows=%0d I_MR=%0d residual %g", HOR, nk, imr, res);
  checks++;
  if (!(res < RES_TOL)) begin failures++; $display("residual above %g", RES_TOL); end

  // mechanisms
  for (int k = 0; k < K_N; k++) begin
    checks++;
    $display("  %-36s %0d", mname[k], mcount[k]);
    if (mcount[k] == 0) begin failures++; $display("  ^ never happened"); end
  end
  checks++;
  if (mcount[K_ROWS] != nk || mcount[K_BROWS] != nk || mcount[K_PRE_RSQ] != nk ||
      mcount[K_ITER] != imr || mcount[K_FIX_RSQ] != imr || mcount[K_GIV_RSQ] != imr ||
      mcount[K_PHI_RUN] != 1 || mcount[K_SOL_DONE] != 1 || mcount[K_GEXT] != nk * 2 * NU ||
      mcount[K_PHI_TERM] < NX * NX) begin
    failures++; $display("mechanism counts differ from the expected ones");
  end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

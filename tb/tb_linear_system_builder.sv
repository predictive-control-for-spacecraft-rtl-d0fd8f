// tb_linear_system_builder: runs the builder's four modes on a random
// horizon-4 problem and checks its two output streams against the dense
// reference model:
//   mode 1  index RAMs and data RAM loaded through the write ports,
//   mode 2  Phi built (phi_done pulses once, busy meanwhile),
//   mode 3  every element of the compact KKT form: value and vector index
//           at the slot the reference layout gives, 24 per row, rows in
//           order, no b_k output,
//   mode 4  b_k for every row, no mode-3 output.
// Mode 4 must also end within the cycle count of one element per clock
// plus the pipeline.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_linear_system_builder;
  import mpc_pkg::*;
  localparam int NMAX = 20, DDEPTH = 4096, HOR = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic dram_we; logic [11:0] dram_waddr; fp32_t dram_wdata;
  logic idx_we; logic [2:0] idx_sel; logic [4:0] idx_waddr; logic [11:0] idx_wdata;
  logic [4:0] n_hor; logic [11:0] m_base, w_base, rhs_base;
  logic start_phi, start_seq, start_b, busy, phi_done, seq_done;
  logic seq_valid, seq_first, seq_last; fp32_t seq_val; logic [9:0] seq_vidx;
  logic [8:0] seq_row; logic [5:0] seq_col;
  logic b_valid; logic [8:0] b_row; fp32_t b_val;
  int checks = 0, failures = 0;
  kkt_model md;
  real mem [4096];
  int n_seq, n_b, n_phi, bad_seq, bad_b, next_row, next_col;
  real bseen [512];

  linear_system_builder #(.NMAX(NMAX), .DDEPTH(DDEPTH)) dut (.*);

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (phi_done) n_phi++;
    if (seq_valid) begin
      int  vi;
      real e;
      vi = md.compact_vidx(int'(seq_row), int'(seq_col));
      e  = (vi >= 0) ? md.kv(int'(seq_row), vi) : 0.0;
      n_seq++;
      if (int'(seq_row) != next_row || int'(seq_col) != next_col ||
          seq_first != (seq_col == 0) || seq_last != (seq_col == 6'(ROWW - 1)) ||
          (vi >= 0 && e != 0.0 && int'(seq_vidx) != vi) ||
          !close(f2r(seq_val), e, 1e-5 * (1.0 + rabs(e)))) begin
        bad_seq++;
        if (bad_seq < 8) $display("row %0d slot %0d: vidx %0d val %g, expected vidx %0d val %g",
          seq_row, seq_col, seq_vidx, f2r(seq_val), vi, e);
      end
      if (next_col == ROWW - 1) begin next_col = 0; next_row++; end else next_col++;
    end
    if (b_valid) begin n_b++; bseen[b_row] = f2r(b_val); end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_idle(output int cycles);
    cycles = 0;
    @(negedge clk);
    while (busy) begin @(negedge clk); cycles++; end
    repeat (2) @(negedge clk);   // done pulses as busy falls
  endtask

  initial begin
    int t;
    rst_n = 0; dram_we = 0; dram_waddr = 0; dram_wdata = 0; idx_we = 0; idx_sel = 0;
    idx_waddr = 0; idx_wdata = 0; start_phi = 0; start_seq = 0; start_b = 0;
    n_seq = 0; n_b = 0; n_phi = 0; bad_seq = 0; bad_b = 0; next_row = 0; next_col = 0;
    md = new(HOR);
    md.randomize_data(1);
    md.build();
    md.image(mem);
    n_hor = 5'(HOR); m_base = 12'(md.M_BASE); w_base = 12'(md.W_BASE); rhs_base = 12'(md.RHS_BASE);
    repeat (3) @(negedge clk); rst_n = 1;

    // mode 1
    for (int sel = 0; sel < 5; sel++)
      for (int i = 0; i <= HOR; i++) begin
        @(negedge clk); idx_we = 1; idx_sel = 3'(sel); idx_waddr = 5'(i);
        idx_wdata = 12'(md.index_of(sel, i));
      end
    @(negedge clk); idx_we = 0;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk); dram_we = 1; dram_waddr = 12'(a); dram_wdata = r2f(mem[a]);
    end
    @(negedge clk); dram_we = 0;

    // mode 2
    start_phi = 1; @(negedge clk); start_phi = 0;
    check(busy == 1, "busy during mode 2");
    wait_idle(t);
    check(n_phi == 1, $sformatf("phi_done pulses: %0d", n_phi));
    check(n_seq == 0 && n_b == 0, "no stream output in mode 2");

    // mode 3
    @(negedge clk); start_seq = 1; @(negedge clk); start_seq = 0;
    wait_idle(t);
    check(n_seq == md.nk * ROWW, $sformatf("mode 3 elements %0d, expected %0d", n_seq, md.nk * ROWW));
    check(bad_seq == 0, $sformatf("%0d mode 3 elements wrong", bad_seq));
    check(n_b == 0, "no b_k output in mode 3");

    // mode 4
    @(negedge clk); start_b = 1; @(negedge clk); start_b = 0;
    wait_idle(t);
    check(n_seq == md.nk * ROWW, "no mode 3 output in mode 4");
    check(n_b == md.nk, $sformatf("b_k rows %0d, expected %0d", n_b, md.nk));
    check(t <= md.nk * (ROWW + 2 * NU) + 20, $sformatf("mode 4 took %0d cycles", t));
    for (int r = 0; r < md.nk; r++)
      if (!close(bseen[r], md.b[r], 1e-4 * (1.0 + rabs(md.b[r])))) begin
        bad_b++;
        if (bad_b < 8) $display("b[%0d] = %g, expected %g", r, bseen[r], md.b[r]);
      end
    check(bad_b == 0, $sformatf("%0d b_k values wrong", bad_b));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_preconditioner: streams each row of the dense reference KKT matrix
// (horizon 3) as 24 numbers, non-zeros first in random slots, and checks
// (a) M_r = (sum_p |K_rp|)^-1/2 through the solver read port and (b) every
// column RAM write: value K_rc * M_r * M_c in sFix25_23 (within 2 LSB),
// at the right column RAM and row address.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_preconditioner;
  import mpc_pkg::*;
  localparam int NMAX = 20;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n; logic [9:0] nk;
  logic in_valid, in_first, in_last; fp32_t in_val; logic [9:0] in_vidx; logic [8:0] in_row;
  logic [5:0] in_col; logic busy, done;
  logic [ROWW-1:0] col_we; logic [8:0] col_addr; mat_t col_data;
  logic [8:0] m_raddr; fp32_t m_rdata;
  int checks = 0, failures = 0;
  kkt_model md;
  real  slot_val [400][ROWW];
  int   slot_idx [400][ROWW];
  int   written [400][ROWW];
  real  mref [400];

  preconditioner #(.NMAX(NMAX)) dut (.*);

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && col_we != '0) begin
    int c, r;
    real e, g;
    c = $clog2(int'(col_we));
    r = int'(col_addr);
    e = slot_val[r][c] * mref[r] * mref[slot_idx[r][c]];
    g = $itor(col_data) / (2.0 ** 23);
    checks++;
    if (rabs(g - e) > 2.0 / (2.0 ** 23) + 1e-5 * rabs(e) || $countones(col_we) != 1) begin
      failures++;
      if (failures < 10) $display("row %0d col %0d got %g exp %g", r, c, g, e);
    end
    written[r][c]++;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_first = 0; in_last = 0; in_val = 0; in_vidx = 0; in_row = 0;
    in_col = 0; m_raddr = 0;
    md = new(3);
    md.randomize_data(1);
    md.build();
    nk = 10'(md.nk);
    for (int r = 0; r < md.nk; r++) begin
      int  nzc[$];
      int  perm[ROWW];
      real s;
      s = 0.0;
      nzc.delete();
      for (int c = 0; c < md.nk; c++)
        if (md.kv(r, c) != 0.0) begin nzc.push_back(c); s += rabs(f2r(r2f(md.kv(r, c)))); end
      mref[r] = 1.0 / $sqrt(s);
      for (int c = 0; c < ROWW; c++) perm[c] = c;
      perm.shuffle();
      for (int c = 0; c < ROWW; c++) begin slot_val[r][c] = 0.0; slot_idx[r][c] = r; end
      foreach (nzc[i]) begin
        slot_val[r][perm[i]] = f2r(r2f(md.kv(r, nzc[i])));
        slot_idx[r][perm[i]] = nzc[i];
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < md.nk; r++)
      for (int c = 0; c < ROWW; c++) begin
        @(negedge clk);
        in_valid = 1; in_first = (c == 0); in_last = (c == ROWW - 1);
        in_row = 9'(r); in_col = 6'(c); in_vidx = 10'(slot_idx[r][c]); in_val = r2f(slot_val[r][c]);
      end
    @(negedge clk); in_valid = 0;
    while (!done) @(negedge clk);
    for (int r = 0; r < md.nk; r++) begin
      @(negedge clk); m_raddr = 9'(r);
      @(negedge clk);
      checks++;
      if (rabs(f2r(m_rdata) - mref[r]) > 1e-5 * mref[r]) begin
        failures++; $display("M[%0d] got %g exp %g", r, f2r(m_rdata), mref[r]);
      end
    end
    for (int r = 0; r < md.nk; r++)
      for (int c = 0; c < ROWW; c++) begin
        checks++;
        if (written[r][c] != 1) begin failures++; $display("(%0d,%0d) written %0d times", r, c, written[r][c]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

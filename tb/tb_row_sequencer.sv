// tb_row_sequencer: streams the compact KKT form (mode 3) and its G'
// extension (mode 4) for horizons 2 and 20. Every number must equal the
// dense reference matrix at (row, vidx); every non-zero of each dense row
// must be emitted exactly once; rows must be 24 (36) numbers long, in
// order, one number per clock.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_row_sequencer;
  import mpc_pkg::*;
  localparam int NMAX = 20, AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, with_g, busy, done;
  logic [4:0] n_hor;
  logic idx_we; logic [2:0] idx_sel; logic [4:0] idx_waddr; logic [AW-1:0] idx_wdata;
  logic [AW-1:0] dram_raddr; fp32_t dram_rdata;
  logic [11:0] phi_raddr; fp32_t phi_rdata;
  logic out_valid, out_first, out_last; fp32_t out_val;
  logic [9:0] out_vidx; logic [8:0] out_row; logic [5:0] out_col;
  logic d_we; logic [AW-1:0] d_waddr; fp32_t d_wdata;
  logic p_we; logic [11:0] p_waddr; fp32_t p_wdata;
  int checks = 0, failures = 0;

  row_sequencer #(.NMAX(NMAX), .AW(AW)) dut (.*);
  shared_ram #(.DEPTH(4096), .W(32), .NRD(1)) u_d (.clk(clk), .we(d_we), .waddr(d_waddr),
    .wdata(d_wdata), .raddr(dram_raddr), .rdata(dram_rdata));
  shared_ram #(.DEPTH(NMAX*144+36), .W(32), .NRD(1)) u_p (.clk(clk), .we(p_we), .waddr(p_waddr),
    .wdata(p_wdata), .raddr(phi_raddr), .rdata(phi_rdata));

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int n, bit g);
    kkt_model md;
    real mem[4096];
    int  hits[];
    int  cyc, nel, rowlen, ncols, exp_row, exp_col;
    real v;
    int  hi;
    md = new(n);
    md.randomize_data(1);
    md.build();
    md.image(mem);
    hits = new[md.nk * md.nm];
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); d_we = 1; d_waddr = AW'(i); d_wdata = r2f(mem[i]);
    end
    @(negedge clk); d_we = 0;
    for (int e = 0; e < n * 144 + 36; e++) begin
      @(negedge clk); p_we = 1; p_waddr = 12'(e); p_wdata = r2f(md.phi[e]);
    end
    @(negedge clk); p_we = 0;
    for (int s = 0; s <= 4; s++)
      for (int i = 0; i <= n; i++) begin
        @(negedge clk); idx_we = 1; idx_sel = 3'(s); idx_waddr = 5'(i);
        idx_wdata = AW'(md.index_of(s, i));
      end
    @(negedge clk); idx_we = 0;
    rowlen = g ? 36 : 24;
    ncols  = g ? md.nm : md.nk;
    n_hor = 5'(n); with_g = g;
    start = 1; @(negedge clk); start = 0;
    cyc = 1; nel = 0; exp_row = 0; exp_col = 0;
    while (!done) begin
      if (out_valid) begin
        v = f2r(out_val);
        checks++;
        if (int'(out_row) != exp_row || int'(out_col) != exp_col ||
            out_first != (exp_col == 0) || out_last != (exp_col == rowlen - 1)) begin
          failures++;
          if (failures < 10) $display("order: row %0d col %0d exp %0d %0d", out_row, out_col, exp_row, exp_col);
        end
        if (v != 0.0) begin
          checks++;
          if (int'(out_vidx) >= ncols || !close(v, md.kv(int'(out_row), int'(out_vidx)), 1e-6)) begin
            failures++;
            if (failures < 10) $display("n=%0d g=%0d row %0d col %0d vidx %0d val %g", n, g, out_row, out_col, out_vidx, v);
          end else begin
            hi = int'(out_row) * md.nm + int'(out_vidx);
            hits[hi] = hits[hi] + 1;
          end
        end
        nel++;
        exp_col++;
        if (exp_col == rowlen) begin exp_col = 0; exp_row++; end
      end
      @(negedge clk); cyc++;
    end
    checks++;
    if (nel != md.nk * rowlen) begin failures++; $display("elements %0d exp %0d", nel, md.nk * rowlen); end
    checks++;
    if (cyc > md.nk * rowlen + 4) begin failures++; $display("cycles %0d", cyc); end
    for (int r = 0; r < md.nk; r++)
      for (int c = 0; c < ncols; c++)
        if (md.kv(r, c) != 0.0) begin
          checks++;
          hi = r * md.nm + c;
          if (hits[hi] != 1) begin
            failures++;
            if (failures < 10) $display("n=%0d g=%0d K[%0d][%0d] emitted %0d times", n, g, r, c, hits[hi]);
          end
        end
  endtask

  initial begin
    rst_n = 0; start = 0; with_g = 0; n_hor = 0; idx_we = 0; idx_sel = 0; idx_waddr = 0;
    idx_wdata = 0; d_we = 0; d_waddr = 0; d_wdata = 0; p_we = 0; p_waddr = 0; p_wdata = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(2, 0); run(2, 1); run(20, 0); run(20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_phi_builder: loads the reference problem (horizons 3 and 20, with a
// non-zero H) into a data RAM, runs mode 2 and checks every Phi RAM write
// (address and value, 1e-5 relative) against H + G' diag(w) G computed in
// real arithmetic, plus the run time of one term per clock.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_phi_builder;
  import mpc_pkg::*;
  localparam int NMAX = 20, AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  logic [4:0] n_hor; logic [AW-1:0] w_base;
  logic idx_we; logic [2:0] idx_sel; logic [4:0] idx_waddr; logic [AW-1:0] idx_wdata;
  logic [3:0][AW-1:0] dram_raddr; fp32_t [3:0] dram_rdata;
  logic phi_we; logic [11:0] phi_waddr; fp32_t phi_wdata;
  logic d_we; logic [AW-1:0] d_waddr; fp32_t d_wdata;
  int checks = 0, failures = 0;
  real got [NMAX*144+36];
  int  nwr;

  phi_builder #(.NMAX(NMAX), .AW(AW)) dut (.*);
  shared_ram #(.DEPTH(4096), .W(32), .NRD(4)) u_d (.clk(clk), .we(d_we), .waddr(d_waddr),
    .wdata(d_wdata), .raddr(dram_raddr), .rdata(dram_rdata));

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (phi_we) begin
    got[phi_waddr] = f2r(phi_wdata);
    nwr++;
  end

  task automatic run(int n);
    kkt_model md;
    real mem[4096];
    int cyc, expect_cyc;
    md = new(n);
    md.randomize_data(1);
    md.build();
    md.image(mem);
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); d_we = 1; d_waddr = AW'(i); d_wdata = r2f(mem[i]);
    end
    @(negedge clk); d_we = 0;
    for (int s = 0; s <= 4; s++)
      for (int i = 0; i <= n; i++) begin
        @(negedge clk); idx_we = 1; idx_sel = 3'(s); idx_waddr = 5'(i);
        idx_wdata = AW'(md.index_of(s, i));
      end
    @(negedge clk); idx_we = 0;
    n_hor = 5'(n); w_base = AW'(kkt_model::W_BASE); nwr = 0;
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expect_cyc = n * 144 * 12 + 36;
    checks++;
    if (cyc < expect_cyc || cyc > expect_cyc + 10) begin
      failures++; $display("n=%0d took %0d cycles, expected about %0d", n, cyc, expect_cyc);
    end
    checks++;
    if (nwr != n * 144 + 36) begin failures++; $display("writes %0d", nwr); end
    for (int e = 0; e < n * 144 + 36; e++) begin
      checks++;
      if (!close(got[e], md.phi[e], 1e-5)) begin
        failures++;
        if (failures < 10) $display("n=%0d phi[%0d] got %g exp %g", n, e, got[e], md.phi[e]);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; n_hor = 0; w_base = 0; idx_we = 0; idx_sel = 0; idx_waddr = 0;
    idx_wdata = 0; d_we = 0; d_waddr = 0; d_wdata = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(3);
    run(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

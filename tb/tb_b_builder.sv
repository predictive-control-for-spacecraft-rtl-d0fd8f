// tb_b_builder: streams the non-zeros of each row of the dense reference
// [Phi E' G'; E 0 0] (rows padded with zeros to a random length), with m_k
// and [-h; f] in a data RAM, and checks b_r = rhs_r - row . m (1e-5
// relative), its row number and the 5-cycle latency after the row's last
// number. Horizon 4.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_b_builder;
  import mpc_pkg::*;
  localparam int AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n; logic [AW-1:0] m_base, rhs_base;
  logic in_valid, in_first, in_last; fp32_t in_val; logic [9:0] in_vidx; logic [8:0] in_row;
  logic [1:0][AW-1:0] dram_raddr; fp32_t [1:0] dram_rdata;
  logic b_valid; logic [8:0] b_row; fp32_t b_val;
  logic d_we; logic [AW-1:0] d_waddr; fp32_t d_wdata;
  int checks = 0, failures = 0;
  int cyc = 0;
  int lastq [$];
  kkt_model md;

  b_builder #(.AW(AW), .VW(10), .RW(9)) dut (.*);
  shared_ram #(.DEPTH(4096), .W(32), .NRD(2)) u_d (.clk(clk), .we(d_we), .waddr(d_waddr),
    .wdata(d_wdata), .raddr(dram_raddr), .rdata(dram_rdata));

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  int nb = 0;
  always @(negedge clk) if (rst_n && b_valid) begin
    checks++;
    if (int'(b_row) != nb || !close(f2r(b_val), md.b[nb], 1e-5) || cyc - lastq[0] != 5) begin
      failures++;
      if (failures < 10) $display("row %0d (exp %0d) b %g exp %g lat %0d", b_row, nb, f2r(b_val), md.b[nb], cyc - lastq[0]);
    end
    void'(lastq.pop_front());
    nb++;
  end

  initial begin
    real mem[4096];
    int  cols[$];
    rst_n = 0; in_valid = 0; in_first = 0; in_last = 0; in_val = 0; in_vidx = 0; in_row = 0;
    d_we = 0; d_waddr = 0; d_wdata = 0;
    md = new(4);
    md.randomize_data(1);
    md.build();
    md.image(mem);
    m_base = AW'(kkt_model::M_BASE); rhs_base = AW'(kkt_model::RHS_BASE);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); d_we = 1; d_waddr = AW'(i); d_wdata = r2f(mem[i]);
    end
    @(negedge clk); d_we = 0;
    for (int r = 0; r < md.nk; r++) begin
      int len;
      cols.delete();
      for (int c = 0; c < md.nm; c++) if (md.kv(r, c) != 0.0) cols.push_back(c);
      len = cols.size() + $urandom_range(0, 6);
      if (len < 4) len = 4;
      for (int e = 0; e < len; e++) begin
        @(negedge clk);
        in_valid = 1; in_first = (e == 0); in_last = (e == len - 1); in_row = 9'(r);
        if (e < cols.size()) begin in_vidx = 10'(cols[e]); in_val = r2f(md.kv(r, cols[e])); end
        else begin in_vidx = 10'($urandom_range(0, md.nm - 1)); in_val = 32'h0; end
        if (e == len - 1) lastq.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nb != md.nk) begin failures++; $display("%0d of %0d rows", nb, md.nk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

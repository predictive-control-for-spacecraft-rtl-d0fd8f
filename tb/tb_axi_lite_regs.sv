// tb_axi_lite_regs: checks the AXI4-lite register block on its own.
// A small model of the solution RAM (one cycle of read latency, contents
// 0x5000_0000 + address for the solution, 0x6000_0000 + address for b_k)
// stands behind the read port. Checked:
//   - configuration registers written and read back,
//   - CTRL bits give one-cycle start pulses, one per set bit,
//   - index RAM and data RAM writes appear on the RAM ports with the
//     right select, address and data, for exactly one cycle,
//   - STATUS: busy inputs, sticky done bits, cleared by a CTRL write,
//   - solution and b_k reads return the element addressed (RAM latency
//     covered, the RAM model answers differently for the two windows),
//     and RVALID rises two clock edges after the read handshake,
//   - a held write response (BREADY low) stays valid.
`include "tb_util.svh"
module tb_axi_lite_regs;
  localparam int SW = 5, AW = 12, RW = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [17:0] s_axi_awaddr, s_axi_araddr;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic [31:0] s_axi_wdata, s_axi_rdata; logic [3:0] s_axi_wstrb; logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic start_phi, start_seq, start_b, start_solve;
  logic [SW-1:0] n_hor; logic [15:0] i_mr; logic [AW-1:0] m_base, w_base, rhs_base;
  logic bld_busy, pre_busy, sol_busy, phi_done, seq_done, pre_done, sol_done; logic [15:0] iter;
  logic idx_we; logic [2:0] idx_sel; logic [SW-1:0] idx_waddr; logic [AW-1:0] idx_wdata;
  logic dram_we; logic [AW-1:0] dram_waddr; logic [31:0] dram_wdata;
  logic [RW-1:0] sol_raddr; logic sol_rsel; logic [31:0] sol_rdata;
  int checks = 0, failures = 0;
  int n_start [4];
  int n_idx, n_dram;
  logic [2:0] last_sel; logic [SW-1:0] last_ia; logic [AW-1:0] last_iw, last_da; logic [31:0] last_dw;

  axi_lite_regs #(.SW(SW), .AW(AW), .RW(RW)) dut (.*);

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always_ff @(posedge clk) sol_rdata <= (sol_rsel ? 32'h6000_0000 : 32'h5000_0000) + 32'(sol_raddr);

  always @(posedge clk) if (rst_n) begin
    if (start_phi) n_start[0]++;
    if (start_seq) n_start[1]++;
    if (start_b) n_start[2]++;
    if (start_solve) n_start[3]++;
    if (idx_we) begin n_idx++; last_sel = idx_sel; last_ia = idx_waddr; last_iw = idx_wdata; end
    if (dram_we) begin n_dram++; last_da = dram_waddr; last_dw = dram_wdata; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(int word, logic [31:0] data, int hold = 0);
    @(negedge clk);
    s_axi_awaddr = 18'(word * 4); s_axi_awvalid = 1; s_axi_wdata = data; s_axi_wvalid = 1;
    s_axi_wstrb = 4'hf; s_axi_bready = (hold == 0);
    #1;
    while (!s_axi_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    for (int h = 0; h < hold; h++) begin
      check(s_axi_bvalid == 1, "write response held while BREADY is low");
      @(negedge clk);
    end
    s_axi_bready = 1;
    while (s_axi_bvalid) @(negedge clk);
  endtask

  task automatic axi_read(int word, output logic [31:0] data, output int lat);
    @(negedge clk);
    s_axi_araddr = 18'(word * 4); s_axi_arvalid = 1;
    #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_arvalid = 0;
    lat = 1;
    while (!s_axi_rvalid) begin @(negedge clk); lat++; end
    data = s_axi_rdata;
    @(negedge clk);
  endtask

  task automatic expect_read(int word, logic [31:0] value, string what);
    logic [31:0] d;
    int lat;
    axi_read(word, d, lat);
    check(d == value, $sformatf("%s: read %h, expected %h", what, d, value));
    check(lat == 3, $sformatf("%s: RVALID seen at negedge %0d after the handshake", what, lat));
  endtask

  initial begin
    rst_n = 0;
    s_axi_awaddr = 0; s_axi_awvalid = 0; s_axi_wdata = 0; s_axi_wstrb = 0; s_axi_wvalid = 0;
    s_axi_bready = 1; s_axi_araddr = 0; s_axi_arvalid = 0; s_axi_rready = 1;
    {bld_busy, pre_busy, sol_busy, phi_done, seq_done, pre_done, sol_done} = '0;
    iter = 16'd321;
    n_start = '{0, 0, 0, 0}; n_idx = 0; n_dram = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // configuration registers
    axi_write(2, 7); axi_write(3, 400); axi_write(4, 12); axi_write(5, 640, 3); axi_write(6, 896);
    check(n_hor == 5'd7 && i_mr == 16'd400 && m_base == 12 && w_base == 640 && rhs_base == 896,
          "configuration outputs");
    expect_read(2, 7, "N"); expect_read(3, 400, "I_MR"); expect_read(4, 12, "M_BASE");
    expect_read(5, 640, "W_BASE"); expect_read(6, 896, "RHS_BASE"); expect_read(7, 321, "ITER");

    // start pulses
    axi_write(0, 32'h1); axi_write(0, 32'h2); axi_write(0, 32'h4); axi_write(0, 32'h8);
    axi_write(0, 32'hA);
    check(n_start[0] == 1 && n_start[1] == 2 && n_start[2] == 1 && n_start[3] == 2,
          $sformatf("start pulses %0d %0d %0d %0d", n_start[0], n_start[1], n_start[2], n_start[3]));

    // index and data RAM writes
    axi_write('h1000 + 32 * 3 + 17, 1604);
    check(n_idx == 1 && last_sel == 3'd3 && last_ia == 5'd17 && last_iw == 12'd1604, "index RAM write");
    axi_write('h4000 + 2345, 32'h3F80_0000);
    check(n_dram == 1 && last_da == 12'd2345 && last_dw == 32'h3F80_0000, "data RAM write");
    axi_write('h4000 + 4095, 32'hC000_0000);
    check(n_dram == 2 && last_da == 12'd4095, "data RAM write, last word");
    check(n_idx == 1, "no stray index RAM write");

    // status: busy bits and sticky done bits
    @(negedge clk); bld_busy = 1; sol_busy = 1;
    expect_read(1, 32'h5, "STATUS busy");
    @(negedge clk); bld_busy = 0; sol_busy = 0; phi_done = 1; pre_done = 1;
    @(negedge clk); phi_done = 0; pre_done = 0;
    expect_read(1, 32'h500, "STATUS sticky Phi and preconditioner");
    @(negedge clk); seq_done = 1; sol_done = 1; pre_busy = 1;
    @(negedge clk); seq_done = 0; sol_done = 0;
    expect_read(1, 32'hF02, "STATUS all sticky, preconditioner busy");
    pre_busy = 0;
    axi_write(0, 32'h0);
    expect_read(1, 32'h0, "STATUS after CTRL write");

    // solution reads
    for (int r = 0; r < 378; r += 37) expect_read('h8000 + r, 32'h5000_0000 + r, $sformatf("solution %0d", r));
    expect_read('h8000 + 377, 32'h5000_0000 + 377, "solution 377");
    // b_k reads through the same RAM port
    for (int r = 5; r < 378; r += 61) expect_read('hC000 + r, 32'h6000_0000 + r, $sformatf("b_k %0d", r));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// axi_lite_regs: AXI4-lite slave of the accelerator.
//
// The processor sees the accelerator as memory: control and status
// registers, the index RAMs, the shared data RAM and the solution. Word
// addresses (byte address / 4):
//   0x0000 CTRL     write: bit0 mode 2 (Phi), bit1 mode 3 (KKT rows to the
//                   preconditioner), bit2 mode 4 (b_k), bit3 run MINRES;
//                   each 1 bit gives a one-cycle start pulse and any write
//                   clears the sticky done bits
//   0x0001 STATUS   read: bit0 builder busy, bit1 preconditioner busy,
//                   bit2 solver busy; sticky done bits 8 Phi, 9 rows,
//                   10 preconditioner, 11 solver
//   0x0002 N        horizon          0x0003 I_MR  MINRES iterations
//   0x0004 M_BASE   0x0005 W_BASE    0x0006 RHS_BASE  (data RAM words)
//   0x0007 ITER     read: MINRES iterations done
//   0x1000 + 32*sel + i   index RAM sel (0 A, 1 B, 2 G, 3 F, 4 H), stage i
//   0x4000 + a      data RAM word a (write)
//   0x8000 + r      solution element r (read)
//   0xC000 + r      b_k element r (read), as the last mode-4 run built it
// One write and one read are handled at a time; a write needs AW and W
// together and is answered the next cycle. RVALID rises on the second clock
// edge after the ARVALID/ARREADY handshake: the address is registered,
// the solution RAM adds one cycle, and RDATA is registered. Responses are always OKAY. The register map is this design's;
// the document states only that AXI4-lite presents data and status
// registers as shared memory locations. The b_k window is there because
// the processor's infeasibility tests use ||b_k||_inf every iteration while
// b_k is built in the peripheral.
module axi_lite_regs #(
  parameter int SW = 5,
  parameter int AW = 12,
  parameter int RW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-lite slave
  input  logic [17:0]   s_axi_awaddr,
  input  logic          s_axi_awvalid,
  output logic          s_axi_awready,
  input  logic [31:0]   s_axi_wdata,
  input  logic [3:0]    s_axi_wstrb,
  input  logic          s_axi_wvalid,
  output logic          s_axi_wready,
  output logic [1:0]    s_axi_bresp,
  output logic          s_axi_bvalid,
  input  logic          s_axi_bready,
  input  logic [17:0]   s_axi_araddr,
  input  logic          s_axi_arvalid,
  output logic          s_axi_arready,
  output logic [31:0]   s_axi_rdata,
  output logic [1:0]    s_axi_rresp,
  output logic          s_axi_rvalid,
  input  logic          s_axi_rready,
  // control and configuration
  output logic          start_phi,
  output logic          start_seq,
  output logic          start_b,
  output logic          start_solve,
  output logic [SW-1:0] n_hor,
  output logic [15:0]   i_mr,
  output logic [AW-1:0] m_base,
  output logic [AW-1:0] w_base,
  output logic [AW-1:0] rhs_base,
  // status
  input  logic          bld_busy,
  input  logic          pre_busy,
  input  logic          sol_busy,
  input  logic          phi_done,
  input  logic          seq_done,
  input  logic          pre_done,
  input  logic          sol_done,
  input  logic [15:0]   iter,
  // RAM access
  output logic          idx_we,
  output logic [2:0]    idx_sel,
  output logic [SW-1:0] idx_waddr,
  output logic [AW-1:0] idx_wdata,
  output logic          dram_we,
  output logic [AW-1:0] dram_waddr,
  output logic [31:0]   dram_wdata,
  output logic [RW-1:0] sol_raddr,
  output logic          sol_rsel,     // 0 solution, 1 b_k
  input  logic [31:0]   sol_rdata
);
  logic        wr;
  logic [15:0] wa, ra_q;
  logic [3:0]  sticky;
  logic [1:0]  rd_pend;            // read pipeline: address, RAM data

  assign wr            = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr;
  assign s_axi_wready  = wr;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign wa            = s_axi_awaddr[17:2];
  assign s_axi_arready = (rd_pend == 2'b00) && !s_axi_rvalid;

  assign idx_we     = wr && wa[15:12] == 4'h1;
  assign idx_sel    = wa[7:5];
  assign idx_waddr  = SW'(wa[4:0]);
  assign idx_wdata  = AW'(s_axi_wdata);
  assign dram_we    = wr && wa[15:12] == 4'h4;
  assign dram_waddr = AW'(wa[11:0]);
  assign dram_wdata = s_axi_wdata;
  assign sol_raddr  = RW'(ra_q[11:0]);
  assign sol_rsel   = ra_q[14];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      rd_pend      <= '0;
      ra_q         <= '0;
      {start_phi, start_seq, start_b, start_solve} <= '0;
      n_hor <= SW'(1); i_mr <= 16'd1;
      m_base <= '0; w_base <= '0; rhs_base <= '0;
      sticky <= '0;
    end else begin
      {start_phi, start_seq, start_b, start_solve} <= '0;
      if (phi_done) sticky[0] <= 1'b1;
      if (seq_done) sticky[1] <= 1'b1;
      if (pre_done) sticky[2] <= 1'b1;
      if (sol_done) sticky[3] <= 1'b1;
      // write channel
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr) begin
        s_axi_bvalid <= 1'b1;
        if (wa[15:12] == 4'h0 && s_axi_wstrb != 4'b0000) begin
          unique case (wa[3:0])
            4'h0: begin
              start_phi   <= s_axi_wdata[0];
              start_seq   <= s_axi_wdata[1];
              start_b     <= s_axi_wdata[2];
              start_solve <= s_axi_wdata[3];
              sticky      <= '0;
            end
            4'h2: n_hor    <= SW'(s_axi_wdata);
            4'h3: i_mr     <= s_axi_wdata[15:0];
            4'h4: m_base   <= AW'(s_axi_wdata);
            4'h5: w_base   <= AW'(s_axi_wdata);
            4'h6: rhs_base <= AW'(s_axi_wdata);
            default: ;
          endcase
        end
      end
      // read channel: address registered, then one cycle for the
      // solution RAM, then the response
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      rd_pend <= {rd_pend[0], 1'b0};
      if (s_axi_arvalid && s_axi_arready) begin
        rd_pend <= 2'b01;
        ra_q    <= s_axi_araddr[17:2];
      end
      if (rd_pend[1]) begin
        s_axi_rvalid <= 1'b1;
        if (ra_q[15]) s_axi_rdata <= sol_rdata;
        else begin
          unique case (ra_q[3:0])
            4'h1: s_axi_rdata <= {20'd0, sticky, 5'd0, sol_busy, pre_busy, bld_busy};
            4'h2: s_axi_rdata <= 32'(n_hor);
            4'h3: s_axi_rdata <= 32'(i_mr);
            4'h4: s_axi_rdata <= 32'(m_base);
            4'h5: s_axi_rdata <= 32'(w_base);
            4'h6: s_axi_rdata <= 32'(rhs_base);
            4'h7: s_axi_rdata <= 32'(iter);
            default: s_axi_rdata <= '0;
          endcase
        end
      end
    end
  end

  // handshake rules: a response stays valid until it is accepted
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule

// row_sequencer: builder modes 3 and 4, the KKT matrix as a number stream.
//
// The KKT matrix of one interior-point iteration is held in a compact
// block form with ROWW = 3*NX+NU = 24 columns (four segments of widths NX,
// NU, NX, NX). Rows come in this order:
//   stage i = 0..N-1, NX state rows:  [Phi_xx,i  Phi_xu,i  -I   A_i^T]
//                     NU input rows:  [Phi_ux,i  Phi_uu,i   0   B_i^T]
//   terminal, NX rows:                [Phi_xx,N     0      -I   F_N^T]
//   lambda_0, NX rows:                [   -I        0       0     0  ]
//   lambda_i+1, NX rows per stage:    [   A_i      B_i     -I     0  ]
//   lambda_T, NT rows:                [   F_N       0       0     0  ]
// so there are kkt_dim(N) = N(2NX+NU)+2NX+NT rows. Each segment of a row
// multiplies a contiguous slice of the KKT vector [theta; lambda] (x_i,
// u_i, lambda_i, lambda_i+1, x_i+1, ...); `out_vidx` gives the index of
// the vector element each number multiplies. With `with_g` set (mode 4)
// each row is extended by 2*NU numbers: G_i^T for the stage rows (indexing
// the third part of m_k, which starts at kkt_dim(N)) and zeros elsewhere,
// so that the b_k product [H+Phi F^T G^T; F 0 0] m_k can be formed.
//
// One number leaves per clock (`out_first`/`out_last` mark the row ends).
// Phi blocks are read from the Phi RAM written by phi_builder; A_i, B_i,
// F_N and G_i from the data RAM via matrix_index lookups (idx_sel 0 = A,
// 1 = B, 2 = G, 3 = F; F is looked up at stage N). -I and 0 blocks are
// generated. The row order and block contents follow the document's
// compact form; the stream format and index bookkeeping are this design's.
//
// Timing: an element is addressed at cycle t and appears on the outputs at
// t+2 (index RAM, then data/Phi RAM). `done` pulses after the last element.
module row_sequencer
  import mpc_pkg::*;
#(
  parameter int NMAX = 20,
  parameter int AW   = 12,
  localparam int SW  = $clog2(NMAX + 1),
  localparam int PHI_DEPTH = NMAX * NS * NS + NX * NX,
  localparam int PW  = $clog2(PHI_DEPTH),
  localparam int KMAX = NMAX * (2 * NX + NU) + 2 * NX + NT,
  localparam int RW  = $clog2(KMAX),
  localparam int VW  = $clog2(KMAX + NMAX * NCS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 with_g,
  input  logic [SW-1:0]        n_hor,
  output logic                 busy,
  output logic                 done,
  // index RAM write bus
  input  logic                 idx_we,
  input  logic [2:0]           idx_sel,
  input  logic [SW-1:0]        idx_waddr,
  input  logic [AW-1:0]        idx_wdata,
  // data RAM and Phi RAM read ports
  output logic [AW-1:0]        dram_raddr,
  input  fp32_t                dram_rdata,
  output logic [PW-1:0]        phi_raddr,
  input  fp32_t                phi_rdata,
  // element stream
  output logic                 out_valid,
  output fp32_t                out_val,
  output logic [VW-1:0]        out_vidx,
  output logic [RW-1:0]        out_row,
  output logic [5:0]           out_col,
  output logic                 out_first,
  output logic                 out_last
);
  typedef enum logic [2:0] {R_PX, R_PN, R_L0, R_LI, R_LT} region_e;
  typedef enum logic [2:0] {SRC_CONST, SRC_PHI, SRC_A, SRC_B, SRC_F, SRC_G} src_e;

  logic          running;
  region_e       reg_q;
  logic [SW-1:0] i;
  logic [3:0]    k;
  logic [5:0]    col;
  logic [RW-1:0] row;
  logic [5:0]    rowlen;
  logic [3:0]    kmax;
  logic          row_end;

  // decode of the current element
  src_e          src;
  fp32_t         cval;
  logic [VW-1:0] vidx;
  logic [PW-1:0] paddr;
  logic [AW-1:0] moff;
  logic [1:0]    seg;
  logic [3:0]    j;
  logic          gcol;

  // vector-slice bases
  logic [VW-1:0] xb_i, ub_i, xb_i1, xb_n, lam_i, lam_i1, lam_n, lam_t, m3_i;
  logic [VW-1:0] pbase;

  assign rowlen = with_g ? 6'(ROWW + NCS) : 6'(ROWW);
  assign kmax   = (reg_q == R_PX) ? 4'(NS - 1) : (reg_q == R_LT) ? 4'(NT - 1) : 4'(NX - 1);
  assign row_end  = (col == rowlen - 1'b1);

  assign pbase  = VW'(n_hor) * VW'(NS) + VW'(NX);
  assign xb_i   = VW'(i) * VW'(NS);
  assign ub_i   = xb_i + VW'(NX);
  assign xb_i1  = xb_i + VW'(NS);
  assign xb_n   = VW'(n_hor) * VW'(NS);
  assign lam_i  = pbase + VW'(i) * VW'(NX);
  assign lam_i1 = lam_i + VW'(NX);
  assign lam_n  = pbase + VW'(n_hor) * VW'(NX);
  assign lam_t  = lam_n + VW'(NX);
  assign m3_i   = lam_t + VW'(NT) + VW'(i) * VW'(NCS);

  always_comb begin
    gcol = (col >= 6'(ROWW));
    if (col < 6'(NX))                begin seg = 2'd0; j = 4'(col); end
    else if (col < 6'(NX + NU))      begin seg = 2'd1; j = 4'(col - 6'(NX)); end
    else if (col < 6'(2 * NX + NU))  begin seg = 2'd2; j = 4'(col - 6'(NX + NU)); end
    else if (col < 6'(ROWW))         begin seg = 2'd3; j = 4'(col - 6'(2 * NX + NU)); end
    else                             begin seg = 2'd3; j = 4'(col - 6'(ROWW)); end

    src   = SRC_CONST;
    cval  = FP_ZERO;
    vidx  = '0;
    paddr = '0;
    moff  = '0;
    unique case (reg_q)
      R_PX: begin
        if (gcol) begin
          src = SRC_G; moff = AW'(j) * AW'(NS) + AW'(k); vidx = m3_i + VW'(j);
        end else begin
          case (seg)
            2'd0: begin
              src = SRC_PHI; vidx = xb_i + VW'(j);
              paddr = PW'(i) * PW'(NS * NS) + PW'(k) * PW'(NS) + PW'(j);
            end
            2'd1: begin
              src = SRC_PHI; vidx = ub_i + VW'(j);
              paddr = PW'(i) * PW'(NS * NS) + PW'(k) * PW'(NS) + PW'(NX) + PW'(j);
            end
            2'd2: begin
              cval = (k < 4'(NX) && j == k) ? FP_MONE : FP_ZERO; vidx = lam_i + VW'(j);
            end
            default: begin
              vidx = lam_i1 + VW'(j);
              if (k < 4'(NX)) begin src = SRC_A; moff = AW'(j) * AW'(NX) + AW'(k); end
              else begin src = SRC_B; moff = AW'(j) * AW'(NU) + AW'(k - 4'(NX)); end
            end
          endcase
        end
      end
      R_PN: if (!gcol) begin
        case (seg)
          2'd0: begin
            src = SRC_PHI; vidx = xb_n + VW'(j);
            paddr = PW'(n_hor) * PW'(NS * NS) + PW'(k) * PW'(NX) + PW'(j);
          end
          2'd2: begin cval = (j == k) ? FP_MONE : FP_ZERO; vidx = lam_n + VW'(j); end
          2'd3: begin src = SRC_F; moff = AW'(j) * AW'(NX) + AW'(k); vidx = lam_t + VW'(j); end
          default: ;
        endcase
      end
      R_L0: if (!gcol && seg == 2'd0) begin
        cval = (j == k) ? FP_MONE : FP_ZERO; vidx = VW'(j);
      end
      R_LI: if (!gcol) begin
        case (seg)
          2'd0: begin src = SRC_A; moff = AW'(k) * AW'(NX) + AW'(j); vidx = xb_i + VW'(j); end
          2'd1: begin src = SRC_B; moff = AW'(k) * AW'(NU) + AW'(j); vidx = ub_i + VW'(j); end
          2'd2: begin cval = (j == k) ? FP_MONE : FP_ZERO; vidx = xb_i1 + VW'(j); end
          default: ;
        endcase
      end
      R_LT: if (!gcol && seg == 2'd0) begin
        src = SRC_F; moff = AW'(k) * AW'(NX) + AW'(j); vidx = xb_n + VW'(j);
      end
      default: ;
    endcase
  end

  // matrix address lookups (registered: valid at t+1)
  logic [AW-1:0] a_addr, b_addr, f_addr, g_addr;
  matrix_index #(.NMAX(NMAX), .AW(AW)) u_ia (.clk(clk), .idx_we(idx_we && idx_sel == 3'd0),
    .idx_waddr(idx_waddr), .idx_wdata(idx_wdata), .stage(i), .offset(moff), .addr(a_addr));
  matrix_index #(.NMAX(NMAX), .AW(AW)) u_ib (.clk(clk), .idx_we(idx_we && idx_sel == 3'd1),
    .idx_waddr(idx_waddr), .idx_wdata(idx_wdata), .stage(i), .offset(moff), .addr(b_addr));
  matrix_index #(.NMAX(NMAX), .AW(AW)) u_ig (.clk(clk), .idx_we(idx_we && idx_sel == 3'd2),
    .idx_waddr(idx_waddr), .idx_wdata(idx_wdata), .stage(i), .offset(moff), .addr(g_addr));
  matrix_index #(.NMAX(NMAX), .AW(AW)) u_if (.clk(clk), .idx_we(idx_we && idx_sel == 3'd3),
    .idx_waddr(idx_waddr), .idx_wdata(idx_wdata), .stage(n_hor), .offset(moff), .addr(f_addr));

  // pipeline registers
  src_e          src1, src2;
  fp32_t         cval1, cval2;
  logic [1:0]    v_p;
  logic [VW-1:0] vidx1, vidx2;
  logic [RW-1:0] row1, row2;
  logic [5:0]    col1, col2;
  logic          first1, first2, last1, last2;

  always_comb begin
    unique case (src1)
      SRC_A:   dram_raddr = a_addr;
      SRC_B:   dram_raddr = b_addr;
      SRC_F:   dram_raddr = f_addr;
      SRC_G:   dram_raddr = g_addr;
      default: dram_raddr = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done <= 1'b0;
      reg_q <= R_PX; i <= '0; k <= '0; col <= '0; row <= '0;
      v_p <= '0;
      src1 <= SRC_CONST; src2 <= SRC_CONST;
      phi_raddr <= '0;
    end else begin
      done <= 1'b0;
      if (!running && start) begin
        running <= 1'b1;
        reg_q <= R_PX; i <= '0; k <= '0; col <= '0; row <= '0;
      end else if (running) begin
        col <= row_end ? '0 : col + 1'b1;
        if (row_end) begin
          row <= row + 1'b1;
          if (k != kmax) k <= k + 1'b1;
          else begin
            k <= '0;
            unique case (reg_q)
              R_PX: if (i == n_hor - 1'b1) begin reg_q <= R_PN; i <= '0; end
                    else i <= i + 1'b1;
              R_PN: reg_q <= R_L0;
              R_L0: reg_q <= R_LI;
              R_LI: if (i == n_hor - 1'b1) begin reg_q <= R_LT; i <= '0; end
                    else i <= i + 1'b1;
              default: running <= 1'b0;
            endcase
          end
        end
      end
      // stage t -> t+1
      v_p    <= {v_p[0], running};
      src1   <= src;   cval1 <= cval;  vidx1 <= vidx;
      row1   <= row;   col1  <= col;
      first1 <= (col == '0); last1 <= row_end;
      phi_raddr <= paddr;
      // stage t+1 -> t+2
      src2   <= src1;  cval2 <= cval1; vidx2 <= vidx1;
      row2   <= row1;  col2  <= col1;
      first2 <= first1; last2 <= last1;
      if (v_p[1] && last2 && !v_p[0]) done <= 1'b1;
    end
  end

  assign out_valid = v_p[1];
  assign out_val   = (src2 == SRC_CONST) ? cval2 : (src2 == SRC_PHI) ? phi_rdata : dram_rdata;
  assign out_vidx  = vidx2;
  assign out_row   = row2;
  assign out_col   = col2;
  assign out_first = first2;
  assign out_last  = last2;
  assign busy      = running || (v_p != 2'b00);
endmodule

// preconditioner: diagonal scaling of the KKT matrix and conversion to fixed point.
//
// MINRES is run on M A M with M = diag((sum_p |A_rp|)^-1/2), which keeps
// the Lanczos quantities inside [-1, 1] so they can be held in fixed point.
// The block works in three phases, as the document describes:
//   1. capture: the mode-3 element stream of the compact KKT form is
//      written to a single-port sequence RAM (value and KKT column index),
//      while |a| is accumulated per row in Q32.32 and each row sum is
//      stored;
//   2. M_r = rowsum_r^-1/2 for every row with fp_rsqrt, stored in the
//      preconditioner RAM (three read ports: two for phase 3, one for the
//      solver, which later reads M to scale b and the solution);
//   3. scale: the sequence RAM is read back in order, every element is
//      multiplied in float by M of its row and M of its column, converted
//      to sFix25_23 (saturating) and written to column RAM `col` at address
//      `row` (col_we is one-hot over the 24 columns).
// Phase 2 starts when the last element of row nk-1 has been captured and
// phase 3 follows phase 2; `done` pulses at the end. The Q32.32 row sums
// and the saturation are this design's choices.
// The busy output of fp_rsqrt is left open: phase 2 waits for its done
// pulse in a state of its own, so busy is not needed.
module preconditioner
  import mpc_pkg::*;
#(
  parameter int NMAX = 20,
  localparam int KMAX = NMAX * (2 * NX + NU) + 2 * NX + NT,
  localparam int RW  = $clog2(KMAX),
  localparam int VW  = $clog2(KMAX + NMAX * NCS),
  localparam int SQD = KMAX * ROWW,
  localparam int QW  = $clog2(SQD)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [RW:0]     nk,          // rows of the KKT system, kkt_dim(N)
  // element stream (mode 3)
  input  logic            in_valid,
  input  fp32_t           in_val,
  input  logic [VW-1:0]   in_vidx,
  input  logic [RW-1:0]   in_row,
  input  logic [5:0]      in_col,
  input  logic            in_first,
  input  logic            in_last,
  output logic            busy,
  output logic            done,
  // column RAM write bus
  output logic [ROWW-1:0] col_we,
  output logic [RW-1:0]   col_addr,
  output mat_t            col_data,
  // preconditioner read port for the solver (one-cycle latency)
  input  logic [RW-1:0]   m_raddr,
  output fp32_t           m_rdata
);
  typedef enum logic [2:0] {P_CAPTURE, P_RSQ_RD, P_RSQ_START, P_RSQ_WAIT, P_SCALE, P_DRAIN} phase_e;
  phase_e phase;

  // ---- phase 1: capture -------------------------------------------------
  q32_t  acc;
  q32_t  acc_next;
  logic  sum_we;
  logic [RW-1:0] sum_waddr;
  fp32_t sum_wdata;

  assign acc_next = (in_first ? q32_t'(0) : acc) + f_to_fix(f_abs(in_val), 32);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0; sum_we <= 1'b0; sum_waddr <= '0; sum_wdata <= '0;
    end else begin
      sum_we <= 1'b0;
      if (in_valid && phase == P_CAPTURE) begin
        acc <= acc_next;
        if (in_last) begin
          sum_we    <= 1'b1;
          sum_waddr <= in_row;
          sum_wdata <= fix_to_f(acc_next, 32);
        end
      end
    end
  end

  logic [QW-1:0] seq_waddr;
  assign seq_waddr = QW'(in_row) * QW'(ROWW) + QW'(in_col);

  logic [QW-1:0] seq_raddr;
  fp32_t         seq_rval;
  logic [VW-1:0] seq_rvidx;

  shared_ram #(.DEPTH(SQD), .W(32), .NRD(1)) u_seq_val (
    .clk(clk), .we(in_valid && phase == P_CAPTURE && in_col < 6'(ROWW)),
    .waddr(seq_waddr), .wdata(in_val), .raddr(seq_raddr), .rdata(seq_rval));
  shared_ram #(.DEPTH(SQD), .W(VW), .NRD(1)) u_seq_idx (
    .clk(clk), .we(in_valid && phase == P_CAPTURE && in_col < 6'(ROWW)),
    .waddr(seq_waddr), .wdata(in_vidx), .raddr(seq_raddr), .rdata(seq_rvidx));

  // ---- phase 2: M = rowsum^-1/2 -----------------------------------------
  logic [RW-1:0] r;
  fp32_t         sum_rdata;
  logic          rs_done;
  fp32_t         rs_y;

  shared_ram #(.DEPTH(KMAX), .W(32), .NRD(1)) u_rowsum (
    .clk(clk), .we(sum_we), .waddr(sum_waddr), .wdata(sum_wdata),
    .raddr(r), .rdata(sum_rdata));

  fp_rsqrt u_rsqrt (
    .clk(clk), .rst_n(rst_n), .start(phase == P_RSQ_START), .x(sum_rdata),
    .busy(), .done(rs_done), .y(rs_y));

  logic [2:0][RW-1:0] m_ra;
  fp32_t [2:0]        m_rd;
  logic [RW-1:0]      row_p1, row_p2;

  shared_ram #(.DEPTH(KMAX), .W(32), .NRD(3)) u_m (
    .clk(clk), .we(phase == P_RSQ_WAIT && rs_done), .waddr(r), .wdata(rs_y),
    .raddr(m_ra), .rdata(m_rd));

  // ---- phase 3: scale and write column RAMs -------------------------------
  logic [RW-1:0] srow;
  logic [5:0]    scol;
  logic [2:0]    sv;                 // valid pipeline
  logic [5:0]    col_p1, col_p2;
  fp32_t         val_p2;
  logic          scale_last;

  assign scale_last = (srow == RW'(nk - 1'b1)) && (scol == 6'(ROWW - 1));
  assign seq_raddr  = QW'(srow) * QW'(ROWW) + QW'(scol);
  assign m_ra[0]    = row_p1;
  assign m_ra[1]    = RW'(seq_rvidx);
  assign m_ra[2]    = m_raddr;
  assign m_rdata    = m_rd[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= P_CAPTURE;
      r <= '0; srow <= '0; scol <= '0; sv <= '0;
      row_p1 <= '0; row_p2 <= '0; col_p1 <= '0; col_p2 <= '0;
      val_p2 <= '0;
      col_we <= '0; col_addr <= '0; col_data <= '0;
      done <= 1'b0;
    end else begin
      done   <= 1'b0;
      col_we <= '0;
      unique case (phase)
        P_CAPTURE: if (in_valid && in_last && 32'(in_row) == 32'(nk) - 1) begin
          phase <= P_RSQ_RD;
          r <= '0;
        end
        P_RSQ_RD:    phase <= P_RSQ_START;     // rowsum RAM read latency
        P_RSQ_START: phase <= P_RSQ_WAIT;
        P_RSQ_WAIT: if (rs_done) begin
          if (32'(r) == 32'(nk) - 1) begin
            phase <= P_SCALE;
            srow <= '0; scol <= '0;
          end else begin
            r <= r + 1'b1;
            phase <= P_RSQ_RD;
          end
        end
        P_SCALE: begin
          if (scale_last) phase <= P_DRAIN;
          else if (scol == 6'(ROWW - 1)) begin scol <= '0; srow <= srow + 1'b1; end
          else scol <= scol + 1'b1;
        end
        P_DRAIN: if (sv == 3'b000) begin
          phase <= P_CAPTURE;
          done  <= 1'b1;
        end
        default: phase <= P_CAPTURE;
      endcase

      // t: sequence RAM address; t+1: value, vidx -> M RAM addresses;
      // t+2: M_row, M_col; t+3: column RAM write
      sv      <= {sv[1:0], phase == P_SCALE};
      row_p1  <= srow;   col_p1 <= scol;
      row_p2  <= row_p1; col_p2 <= col_p1;
      val_p2  <= seq_rval;
      if (sv[1]) begin
        col_we   <= ROWW'(1) << col_p2;
        col_addr <= row_p2;
        col_data <= mat_t'(sat_w(f_to_fix(f_mul(f_mul(val_p2, m_rd[0]), m_rd[1]), 23), 25));
      end
    end
  end

  assign busy = (phase != P_CAPTURE);
endmodule

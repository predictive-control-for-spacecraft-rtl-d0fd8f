// minres_solver: preconditioned MINRES for the KKT system of one PD-IP iteration.
//
// Solves A c = b (A the KKT matrix, n = kkt_dim(N) rows) as
// (M A M) c~ = M b / ||M b||,  c = M ||M b|| c~,  with M from the
// preconditioner. The Lanczos process runs in fixed point (matrix
// sFix25_23, vectors sFix35_33, inner products sFix52_50, 1/beta
// sFix64_32); the MINRES solution update (Givens rotations, search
// directions w, iterate x) runs in single-precision float, as in the
// document. Sub-blocks: preconditioner (fills 24 column RAMs, one per
// column of the compact KKT form), lanczos_matvec (24 multipliers and an
// adder tree, one row per clock), fix_rsqrt for 1/beta and fp_rsqrt for the
// rotation and the normalisation of M b.
//
// The vector v of the matrix-vector product is held in NX dual-port
// "x" RAMs, NX dual-port "lambda" RAMs and NU single-port "u" RAMs (element
// k of every state / multiplier / input slice in RAM k), so that the four
// slices a row of the compact form needs (x_i, u_i, lambda_i or x_i+1,
// lambda_i+1) are read in one cycle. The element vectors of the Lanczos and
// MINRES recurrences (v_j, v_j-1, z, w_j-1, w_j-2, x, M b, solution) are
// arrays indexed by row.
//
// One MINRES iteration j (Lanczos vectors v_j, v_j-1, beta_j given):
//   pass A  z = (M A M) v_j row by row; alpha = v_j' z
//   pass B  z = z - alpha v_j - beta_j v_j-1; zz = z' z
//           1/beta_j+1 = fix_rsqrt(zz), beta_j+1 = zz / beta_j+1
//   scalars delta = c1 alpha - c2 s1 beta_j, rho2 = s1 alpha + c2 c1 beta_j,
//           rho3 = s2 beta_j, r = (delta^2 + beta_j+1^2)^-1/2,
//           c = delta r, s = beta_j+1 r
//   pass C  w = (v_j - rho3 w_j-2 - rho2 w_j-1) r; x = x + c eta w;
//           v_j+1 = z / beta_j+1 (written to the v RAMs);  eta = -s eta
// The MINRES recurrence (Paige-Saunders, three-term form) and the
// three-pass schedule are this design's; the document gives the number
// formats, the multiplier bank and the RAM organisation.
//
// Interface: stream the mode-3 KKT elements (seq_*), which the
// preconditioner consumes, and the b_k stream (b_*), stored by row; pulse
// `start` once both are in (pre_busy low). After i_mr iterations the
// solution c_k (float) is readable at sol_raddr with one cycle of latency
// (sol_rsel = 1 reads the stored b_k instead)
// and `done` pulses. An iteration takes about 3n + 200 cycles.
//
// The busy outputs of the three reciprocal-square-root units are left
// open on purpose: the state machine starts each unit and waits in a state
// of its own for that unit's done pulse, so busy carries nothing it needs.
// The right-hand side b is kept intact (M b is parked in w1 until v_1 is
// formed); only a new b_k stream overwrites it.
module minres_solver
  import mpc_pkg::*;
#(
  parameter int NMAX = 20,
  localparam int SW  = $clog2(NMAX + 1),
  localparam int KMAX = NMAX * (2 * NX + NU) + 2 * NX + NT,
  localparam int RW  = $clog2(KMAX),
  localparam int VW  = $clog2(KMAX + NMAX * NCS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SW-1:0]   n_hor,
  input  logic [15:0]     i_mr,
  // mode-3 element stream to the preconditioner
  input  logic            seq_valid,
  input  fp32_t           seq_val,
  input  logic [VW-1:0]   seq_vidx,
  input  logic [RW-1:0]   seq_row,
  input  logic [5:0]      seq_col,
  input  logic            seq_first,
  input  logic            seq_last,
  // b_k stream
  input  logic            b_valid,
  input  logic [RW-1:0]   b_row,
  input  fp32_t           b_val,
  // control
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            pre_busy,
  output logic            pre_done,
  output logic [15:0]     iter,
  // solution read port
  input  logic [RW-1:0]   sol_raddr,
  input  logic            sol_rsel,
  output fp32_t           sol_rdata
);
  typedef enum logic [4:0] {
    S_IDLE, S_MB, S_NRM0, S_NRM, S_NRM_W, S_V0, S_A, S_B, S_FRSQ, S_FRSQ_W,
    S_SC0, S_SC1, S_GRSQ_W, S_C, S_SOL, S_END
  } state_e;
  typedef enum logic [2:0] {R_PX, R_PN, R_L0, R_LI, R_LT} region_e;

  state_e state;
  logic [RW:0] nk;
  assign nk = (RW + 1)'(n_hor) * (RW + 1)'(2 * NX + NU) + (RW + 1)'(2 * NX + NT);

  // ---------------- preconditioner and column RAMs -------------------------
  logic [ROWW-1:0] col_we;
  logic [RW-1:0]   col_waddr;
  mat_t            col_wdata;
  logic [RW-1:0]   m_raddr;
  fp32_t           m_rdata;

  preconditioner #(.NMAX(NMAX)) u_pre (
    .clk(clk), .rst_n(rst_n), .nk(nk),
    .in_valid(seq_valid), .in_val(seq_val), .in_vidx(seq_vidx), .in_row(seq_row),
    .in_col(seq_col), .in_first(seq_first), .in_last(seq_last),
    .busy(pre_busy), .done(pre_done),
    .col_we(col_we), .col_addr(col_waddr), .col_data(col_wdata),
    .m_raddr(m_raddr), .m_rdata(m_rdata));

  logic [RW-1:0]   r;          // row counter of the current pass
  mat_t [ROWW-1:0] arow;

  for (genvar c = 0; c < ROWW; c++) begin : g_col
    shared_ram #(.DEPTH(KMAX), .W(25), .NRD(1)) u_col (
      .clk(clk), .we(col_we[c]), .waddr(col_waddr), .wdata(col_wdata),
      .raddr(r), .rdata(arow[c]));
  end

  // ---------------- row walker -------------------------------------------
  // (region, i, k) of row r of the compact form; the same triple locates
  // element r of the KKT vector in the v RAMs.
  region_e       wreg;
  logic [SW-1:0] wi;
  logic [3:0]    wk;
  logic          walk_step, walk_rst;
  logic [3:0]    wkmax;

  assign wkmax = (wreg == R_PX) ? 4'(NS - 1) : (wreg == R_LT) ? 4'(NT - 1) : 4'(NX - 1);

  always_ff @(posedge clk) begin
    if (!rst_n || walk_rst) begin
      wreg <= R_PX; wi <= '0; wk <= '0;
    end else if (walk_step) begin
      if (wk != wkmax) wk <= wk + 1'b1;
      else begin
        wk <= '0;
        unique case (wreg)
          R_PX: if (wi == n_hor - 1'b1) begin wreg <= R_PN; wi <= '0; end else wi <= wi + 1'b1;
          R_PN: wreg <= R_L0;
          R_L0: wreg <= R_LI;
          R_LI: if (wi == n_hor - 1'b1) begin wreg <= R_LT; wi <= '0; end else wi <= wi + 1'b1;
          default: ;
        endcase
      end
    end
  end

  // ---------------- v RAMs -----------------------------------------------
  localparam int XD = NMAX + 1;
  localparam int LD = NMAX + 2;
  localparam int UD = NMAX;
  localparam int XAW = $clog2(XD);
  localparam int LAW = $clog2(LD);
  localparam int UAW = (UD > 1) ? $clog2(UD) : 1;

  logic [NX-1:0]          xw_en, lw_en;
  logic [NU-1:0]          uw_en;
  logic [XAW-1:0]         xw_a;
  logic [LAW-1:0]         lw_a;
  logic [UAW-1:0]         uw_a;
  vec_t                   vw_d;
  logic [1:0][XAW-1:0]    xr_a;
  logic [1:0][LAW-1:0]    lr_a;
  logic [UAW-1:0]         ur_a;
  vec_t [NX-1:0][1:0]     xr_d, lr_d;
  vec_t [NU-1:0]          ur_d;

  for (genvar k = 0; k < NX; k++) begin : g_xl
    shared_ram #(.DEPTH(XD), .W(35), .NRD(2)) u_x (
      .clk(clk), .we(xw_en[k]), .waddr(xw_a), .wdata(vw_d), .raddr(xr_a), .rdata(xr_d[k]));
    shared_ram #(.DEPTH(LD), .W(35), .NRD(2)) u_l (
      .clk(clk), .we(lw_en[k]), .waddr(lw_a), .wdata(vw_d), .raddr(lr_a), .rdata(lr_d[k]));
  end
  for (genvar k = 0; k < NU; k++) begin : g_u
    shared_ram #(.DEPTH(UD), .W(35), .NRD(1)) u_u (
      .clk(clk), .we(uw_en[k]), .waddr(uw_a), .wdata(vw_d), .raddr(ur_a), .rdata(ur_d[k]));
  end

  // write side: element r (at the walker position) of the new v
  logic v_we;
  always_comb begin
    xw_en = '0; lw_en = '0; uw_en = '0;
    xw_a = '0; lw_a = '0; uw_a = '0;
    unique case (wreg)
      R_PX: if (wk < 4'(NX)) begin xw_en[wk[2:0]] = v_we; xw_a = XAW'(wi); end
            else begin uw_en[3'(wk - 4'(NX))] = v_we; uw_a = UAW'(wi); end
      R_PN: begin xw_en[wk[2:0]] = v_we; xw_a = XAW'(n_hor); end
      R_L0: begin lw_en[wk[2:0]] = v_we; lw_a = '0; end
      R_LI: begin lw_en[wk[2:0]] = v_we; lw_a = LAW'(wi) + 1'b1; end
      default: begin lw_en[wk[2:0]] = v_we; lw_a = LAW'(n_hor) + 1'b1; end
    endcase
  end

  // read side: the four slices row r multiplies
  logic dual_row, dual_row_q;
  always_comb begin
    xr_a = '0; lr_a = '0; ur_a = '0;
    dual_row = 1'b0;
    unique case (wreg)
      R_PX: begin
        xr_a[0] = XAW'(wi); ur_a = UAW'(wi);
        lr_a[0] = LAW'(wi); lr_a[1] = LAW'(wi) + 1'b1;
      end
      R_PN: begin
        xr_a[0] = XAW'(n_hor);
        lr_a[0] = LAW'(n_hor); lr_a[1] = LAW'(n_hor) + 1'b1;
      end
      R_L0: begin xr_a[0] = '0; dual_row = 1'b1; end
      R_LI: begin
        xr_a[0] = XAW'(wi); ur_a = UAW'(wi); xr_a[1] = XAW'(wi) + 1'b1;
        dual_row = 1'b1;
      end
      default: begin xr_a[0] = XAW'(n_hor); dual_row = 1'b1; end
    endcase
  end

  vec_t [ROWW-1:0] vrow;
  always_comb begin
    for (int k = 0; k < NX; k++) begin
      vrow[k]               = xr_d[k][0];
      vrow[NX + NU + k]     = dual_row_q ? xr_d[k][1] : lr_d[k][0];
      vrow[2 * NX + NU + k] = lr_d[k][1];
    end
    for (int k = 0; k < NU; k++) vrow[NX + k] = ur_d[k];
  end

  // ---------------- matrix-vector product ------------------------------------
  logic mv_in, mv_out;
  vec_t z_mv;
  lanczos_matvec u_mv (
    .clk(clk), .rst_n(rst_n), .in_valid(mv_in), .arow(arow), .vrow(vrow),
    .out_valid(mv_out), .z(z_mv));

  // ---------------- element vectors --------------------------------------------
  fp32_t bvec [KMAX];
  vec_t  vcur [KMAX];
  vec_t  vprev[KMAX];
  vec_t  zvec [KMAX];
  fp32_t w1   [KMAX];
  fp32_t w2   [KMAX];
  fp32_t xs   [KMAX];
  fp32_t sol  [KMAX];

  // ---------------- scalars ----------------------------------------------
  logic signed [63:0] alpha, zz, beta_j, beta_n;   // Q.50
  q32_t               inv_beta;                    // Q32.32
  fp32_t              ss, inv_nrm, bnorm;
  fp32_t              c1, c2, s1, s2, eta;
  fp32_t              rho2, rho3, delta, r1inv, cc, sn, ceta, beta_nf;
  logic [RW-1:0]      rz;           // pass-A result counter
  logic               p1;           // one-cycle delayed "row issued"
  logic [RW-1:0]      r_q;
  logic               a_issued;     // pass A has issued its last row

  logic  mb_v;
  fp32_t mb;
  logic  frs_start, frs_done, grs_start, grs_done, nrs_start, nrs_done;
  q32_t  frs_y;
  fp32_t grs_y, nrs_y, grs_x;

  fix_rsqrt u_frs (.clk(clk), .rst_n(rst_n), .start(frs_start),
    .x(dot_t'(sat_w(zz, 52))), .busy(), .done(frs_done), .y(frs_y));
  fp_rsqrt u_grs (.clk(clk), .rst_n(rst_n), .start(grs_start), .x(grs_x),
    .busy(), .done(grs_done), .y(grs_y));
  fp_rsqrt u_nrs (.clk(clk), .rst_n(rst_n), .start(nrs_start), .x(ss),
    .busy(), .done(nrs_done), .y(nrs_y));

  // per-element arithmetic of passes B and C (combinational on row r)
  logic signed [99:0]  av_p, bv_p;
  logic signed [69:0]  zsq_p;
  logic signed [63:0]  zb;          // z after orthogonalisation, Q.33
  logic signed [98:0]  vn_p;
  vec_t                vnew;
  fp32_t               vf, wnew;
  logic signed [115:0] bn_p;

  always_comb begin
    av_p  = 100'(alpha) * 100'(vcur[r]);
    bv_p  = 100'(beta_j) * 100'(vprev[r]);
    zb    = 64'(zvec[r]) - 64'(av_p >>> 50) - 64'(bv_p >>> 50);
    zsq_p = 70'(zb) * 70'(zb);
    vn_p  = 99'(zvec[r]) * 99'(inv_beta);
    vnew  = vec_t'(sat_w(64'(vn_p >>> 32), 35));
    vf    = fix_to_f(64'(vcur[r]), 33);
    wnew  = f_mul(f_sub(f_sub(vf, f_mul(rho3, w2[r])), f_mul(rho2, w1[r])), r1inv);
    bn_p  = 116'(zz) * 116'(inv_beta);
    grs_x = f_add(f_mul(delta, delta), f_mul(beta_nf, beta_nf));
  end

  assign walk_rst  = (state == S_IDLE) || ((state == S_MB || state == S_V0 || state == S_A ||
                      state == S_C || state == S_B || state == S_SOL) && 32'(r) == 32'(nk) - 1
                      && walk_step);
  assign walk_step = (state == S_V0 || state == S_A || state == S_C);
  assign v_we      = (state == S_V0 || state == S_C);
  assign mv_in     = p1;
  assign m_raddr   = r;
  assign frs_start = (state == S_FRSQ);
  assign nrs_start = (state == S_NRM);
  assign grs_start = (state == S_SC1);
  assign vw_d      = (state == S_V0)
                     ? vec_t'(sat_w(f_to_fix(f_mul(w1[r], inv_nrm), 33), 35)) : vnew;

  always_ff @(posedge clk) begin
    if (b_valid) bvec[b_row] <= b_val;
    sol_rdata <= sol_rsel ? bvec[sol_raddr] : sol[sol_raddr];
    if (!rst_n) begin
      state <= S_IDLE;
      r <= '0; rz <= '0; p1 <= 1'b0; r_q <= '0; dual_row_q <= 1'b0; a_issued <= 1'b0;
      done <= 1'b0; iter <= '0;
      alpha <= '0; zz <= '0; beta_j <= '0; beta_n <= '0; inv_beta <= '0;
      inv_nrm <= '0; bnorm <= '0;
      c1 <= FP_ONE; c2 <= FP_ONE; s1 <= FP_ZERO; s2 <= FP_ZERO; eta <= FP_ONE;
      r1inv <= '0; cc <= '0; sn <= '0;
      ceta <= '0; beta_nf <= '0;
    end else begin
      done       <= 1'b0;
      p1         <= (state == S_A) && !a_issued;
      a_issued   <= (state == S_A) && (a_issued || 32'(r) == 32'(nk) - 1);
      r_q        <= r;
      dual_row_q <= dual_row;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_MB; r <= '0; ss <= FP_ZERO; iter <= '0;
        end
        // M b and its squared norm; M[r] arrives one cycle after r
        S_MB: begin
          if (32'(r) == 32'(nk) - 1) state <= S_NRM0;
          else r <= r + 1'b1;
        end
        S_NRM0: state <= S_NRM;        // last M b product lands in ss
        S_NRM: state <= S_NRM_W;
        S_NRM_W: if (nrs_done) begin
          inv_nrm <= nrs_y;
          bnorm   <= f_mul(ss, nrs_y);
          state   <= S_V0; r <= '0;
          c1 <= FP_ONE; c2 <= FP_ONE; s1 <= FP_ZERO; s2 <= FP_ZERO; eta <= FP_ONE;
          beta_j <= 64'sd1 <<< 50;
        end
        // v_1 = M b / ||M b|| (M b parked in w1), v_0 = 0, w = x = 0
        S_V0: begin
          vcur[r]  <= vw_d;
          vprev[r] <= '0;
          w1[r] <= FP_ZERO; w2[r] <= FP_ZERO; xs[r] <= FP_ZERO;
          if (32'(r) == 32'(nk) - 1) begin state <= S_A; r <= '0; alpha <= '0; rz <= '0; end
          else r <= r + 1'b1;
        end
        // pass A: issue rows; results come back LAT cycles later
        S_A: begin
          if (32'(r) != 32'(nk) - 1) r <= r + 1'b1;
          else r <= RW'(nk - 1'b1);
          if (mv_out) begin
            zvec[rz] <= z_mv;
            alpha    <= alpha + 64'((70'(vcur[rz]) * 70'(z_mv)) >>> 16);
            rz       <= rz + 1'b1;
            if (32'(rz) == 32'(nk) - 1) begin state <= S_B; r <= '0; zz <= '0; end
          end
        end
        S_B: begin
          zvec[r] <= vec_t'(sat_w(zb, 35));
          zz      <= zz + 64'(zsq_p >>> 16);
          if (32'(r) == 32'(nk) - 1) state <= S_FRSQ;
          else r <= r + 1'b1;
        end
        S_FRSQ: state <= S_FRSQ_W;
        S_FRSQ_W: if (frs_done) begin
          inv_beta <= frs_y;
          state    <= S_SC0;
        end
        S_SC0: begin
          beta_n  <= 64'(bn_p >>> 32);
          beta_nf <= fix_to_f(64'(bn_p >>> 32), 50);
          state   <= S_SC1;
        end
        S_SC1: state <= S_GRSQ_W;
        S_GRSQ_W: if (grs_done) begin
          r1inv <= grs_y;
          cc    <= f_mul(delta, grs_y);
          sn    <= f_mul(beta_nf, grs_y);
          ceta  <= f_mul(f_mul(delta, grs_y), eta);
          state <= S_C; r <= '0;
        end
        S_C: begin
          w1[r]    <= wnew;
          w2[r]    <= w1[r];
          xs[r]    <= f_add(xs[r], f_mul(ceta, wnew));
          vprev[r] <= vcur[r];
          vcur[r]  <= vnew;
          if (32'(r) == 32'(nk) - 1) begin
            eta    <= f_neg(f_mul(sn, eta));
            c2 <= c1; c1 <= cc; s2 <= s1; s1 <= sn;
            beta_j <= beta_n;
            iter   <= iter + 1'b1;
            r      <= '0;
            if (iter + 1'b1 == i_mr) state <= S_SOL;
            else begin state <= S_A; alpha <= '0; rz <= '0; end
          end else r <= r + 1'b1;
        end
        S_SOL: begin
          if (32'(r) == 32'(nk) - 1) state <= S_END;
          else r <= r + 1'b1;
        end
        S_END: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase

      // M b products and their squared norm, then the unscaled solution
      // (M[r] arrives one cycle after r)
      if (mb_v && (state == S_MB || state == S_NRM0)) begin
        w1[r_q] <= mb;
        ss      <= f_add(ss, f_mul(mb, mb));
      end
      if (mb_v && (state == S_SOL || state == S_END)) sol[r_q] <= mb;
      // delta, rho2, rho3 from alpha and beta_j while the new beta is formed
      if (state == S_FRSQ) begin
        delta <= f_sub(f_mul(c1, fix_to_f(alpha, 50)),
                       f_mul(f_mul(c2, s1), fix_to_f(beta_j, 50)));
        rho2  <= f_add(f_mul(s1, fix_to_f(alpha, 50)),
                       f_mul(f_mul(c2, c1), fix_to_f(beta_j, 50)));
        rho3  <= f_mul(s2, fix_to_f(beta_j, 50));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) mb_v <= 1'b0;
    else mb_v <= (state == S_MB) || (state == S_SOL);
  end
  assign mb = (state == S_SOL || state == S_END) ? f_mul(f_mul(xs[r_q], m_rdata), bnorm)
                                                : f_mul(bvec[r_q], m_rdata);

  assign busy = (state != S_IDLE);
endmodule

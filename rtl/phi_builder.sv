// phi_builder: builder mode 2, Phi_i = G_i^T diag(w_i) G_i + H_i.
//
// For every stage i < N and every element (p,q) of the (NX+NU)^2 stage
// block, a state machine runs a dot product over the 2*NU inequality rows
// c of G_i:  sum_c w[i*2NU+c] * G_i[c][p] * G_i[c][q],  starting from
// H_i[p][q]. The terminal block is H_N alone (NX^2 elements; the terminal
// state has no inequality rows). Results are written row-wise into the
// Phi RAM: stage i at i*(NX+NU)^2, the terminal block right after stage
// N-1. Each term costs one clock, so a horizon N takes
// N*(NX+NU)^2*2*NU + NX^2 cycles plus the pipeline latency.
//
// Matrix addresses come from matrix_index lookups (the G index RAM is held
// twice, for the two G operands, and the H index RAM once; all copies are
// written together from the index write bus, idx_sel 2 = G, 4 = H). The
// weight vector w is read at w_base + i*2NU + c. The data RAM has four
// read ports here: 0 = G[c][p], 1 = G[c][q], 2 = w, 3 = H.
//
// Pipeline: cycle t addresses, t+1 index RAMs, t+2 data RAM, t+3 float
// product w*G[c][p] registered, then fp_mac multiplies by G[c][q] and
// accumulates in Q32.32. The three-operand split is this design's; the
// document states the float-multiply / fixed-accumulate / float-result
// scheme and the RAM layout.
module phi_builder
  import mpc_pkg::*;
#(
  parameter int NMAX = 20,
  parameter int AW   = 12,
  localparam int SW  = $clog2(NMAX + 1),
  localparam int PHI_DEPTH = NMAX * NS * NS + NX * NX,
  localparam int PW  = $clog2(PHI_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [SW-1:0]        n_hor,
  input  logic [AW-1:0]        w_base,
  output logic                 busy,
  output logic                 done,
  // index RAM write bus
  input  logic                 idx_we,
  input  logic [2:0]           idx_sel,
  input  logic [SW-1:0]        idx_waddr,
  input  logic [AW-1:0]        idx_wdata,
  // data RAM read ports
  output logic [3:0][AW-1:0]   dram_raddr,
  input  fp32_t [3:0]          dram_rdata,
  // Phi RAM write port
  output logic                 phi_we,
  output logic [PW-1:0]        phi_waddr,
  output fp32_t                phi_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [SW-1:0] i;
  logic [3:0]    p, q, c;
  logic          term;       // i == n_hor: terminal block
  logic          issue;
  logic          last_elem;
  logic [3:0]    pq_max, c_max;

  logic [AW-1:0] g1_off, g2_off, h_off;
  logic [AW-1:0] w_addr_q;

  logic [2:0]    v_p, f_p, l_p, t_p;   // valid/first/last/terminal pipelines
  fp32_t         wg_q, gq_q, h_q;
  logic          mac_v, mac_f, mac_l;
  logic          out_v;
  fp32_t         out_val;
  logic [PW-1:0] wr_cnt;
  logic [PW-1:0] total;

  assign term   = (i == n_hor);
  assign pq_max = term ? 4'(NX - 1) : 4'(NS - 1);
  assign c_max  = term ? 4'd0 : 4'(NCS - 1);
  assign issue  = (state == S_RUN);
  assign last_elem = term && p == pq_max && q == pq_max;
  assign total  = PW'(n_hor) * PW'(NS * NS) + PW'(NX * NX);

  assign g1_off = AW'(c) * AW'(NS) + AW'(p);
  assign g2_off = AW'(c) * AW'(NS) + AW'(q);
  assign h_off  = term ? AW'(p) * AW'(NX) + AW'(q) : AW'(p) * AW'(NS) + AW'(q);

  matrix_index #(.NMAX(NMAX), .AW(AW)) u_g1 (
    .clk(clk), .idx_we(idx_we && idx_sel == 3'd2), .idx_waddr(idx_waddr), .idx_wdata(idx_wdata),
    .stage(i), .offset(g1_off), .addr(dram_raddr[0]));
  matrix_index #(.NMAX(NMAX), .AW(AW)) u_g2 (
    .clk(clk), .idx_we(idx_we && idx_sel == 3'd2), .idx_waddr(idx_waddr), .idx_wdata(idx_wdata),
    .stage(i), .offset(g2_off), .addr(dram_raddr[1]));
  matrix_index #(.NMAX(NMAX), .AW(AW)) u_h (
    .clk(clk), .idx_we(idx_we && idx_sel == 3'd4), .idx_waddr(idx_waddr), .idx_wdata(idx_wdata),
    .stage(i), .offset(h_off), .addr(dram_raddr[3]));
  assign dram_raddr[2] = w_addr_q;

  // loop counters: i, p, q, c (c innermost)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i <= '0; p <= '0; q <= '0; c <= '0;
      w_addr_q <= '0;
      done <= 1'b0;
    end else begin
      done     <= 1'b0;
      w_addr_q <= w_base + AW'(i) * AW'(NCS) + AW'(c);
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          i <= '0; p <= '0; q <= '0; c <= '0;
        end
        S_RUN: begin
          if (c != c_max) c <= c + 1'b1;
          else begin
            c <= '0;
            if (q != pq_max) q <= q + 1'b1;
            else begin
              q <= '0;
              if (p != pq_max) p <= p + 1'b1;
              else begin
                p <= '0;
                if (last_elem) state <= S_DRAIN;
                else i <= i + 1'b1;
              end
            end
          end
        end
        S_DRAIN: if (out_v && wr_cnt == total - 1'b1) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // control pipeline to line up with the data RAM outputs (t+2) and the
  // registered w*G[c][p] product (t+3)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_p <= '0; f_p <= '0; l_p <= '0; t_p <= '0;
      wg_q <= '0; gq_q <= '0; h_q <= '0;
    end else begin
      v_p <= {v_p[1:0], issue};
      f_p <= {f_p[1:0], c == 4'd0};
      l_p <= {l_p[1:0], c == c_max};
      t_p <= {t_p[1:0], term};
      // t+2 -> t+3
      wg_q <= t_p[1] ? FP_ZERO : f_mul(dram_rdata[2], dram_rdata[0]);
      gq_q <= t_p[1] ? FP_ZERO : dram_rdata[1];
      h_q  <= dram_rdata[3];
    end
  end

  assign mac_v = v_p[2];
  assign mac_f = f_p[2];
  assign mac_l = l_p[2];

  fp_mac u_mac (
    .clk(clk), .rst_n(rst_n), .in_valid(mac_v), .in_first(mac_f), .in_last(mac_l),
    .a(wg_q), .b(gq_q), .bias(h_q), .out_valid(out_v), .result(out_val));

  always_ff @(posedge clk) begin
    if (!rst_n || (state == S_IDLE && start)) wr_cnt <= '0;
    else if (out_v) wr_cnt <= wr_cnt + 1'b1;
  end

  assign phi_we    = out_v;
  assign phi_waddr = wr_cnt;
  assign phi_wdata = out_val;
  assign busy      = (state != S_IDLE);
endmodule

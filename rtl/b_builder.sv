// b_builder: builder mode 4, right-hand side b_k of the KKT system.
//
// b_k = [-h; f] - [H+Phi  F^T  G^T; F 0 0] m_k, one row at a time. The
// mode-4 element stream of row_sequencer (each row of the compact KKT
// form extended by the G^T terms, with the index of the m_k element every
// number multiplies) arrives here; for each number the matching m_k
// element is read from the data RAM at m_base + vidx and the pair goes to
// a second fp_mac (float multiply, Q32.32 accumulate). When the row ends,
// [-h; f]_r, read at rhs_base + row, has the dot product subtracted in
// float. This is the document's "second multiply-accumulate device and a
// subtractor"; the data RAM layout (bases set by the processor) is this
// design's.
//
// Timing: b_r is output (b_valid, registered) 5 cycles after the last
// element of row r. Rows must be at least 4 elements long.
module b_builder
  import mpc_pkg::*;
#(
  parameter int AW = 12,
  parameter int VW = 10,
  parameter int RW = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [AW-1:0]  m_base,
  input  logic [AW-1:0]  rhs_base,
  // element stream
  input  logic           in_valid,
  input  fp32_t          in_val,
  input  logic [VW-1:0]  in_vidx,
  input  logic [RW-1:0]  in_row,
  input  logic           in_first,
  input  logic           in_last,
  // data RAM read ports (one-cycle latency): 0 = m_k element, 1 = rhs
  output logic [1:0][AW-1:0] dram_raddr,
  input  fp32_t [1:0]    dram_rdata,
  // result stream
  output logic           b_valid,
  output logic [RW-1:0]  b_row,
  output fp32_t          b_val
);
  logic          v1, f1, l1;
  fp32_t         val1;
  logic [RW-1:0] row1, row_hold;
  fp32_t         rhs_hold;
  logic          mac_v;
  fp32_t         mac_r;

  assign dram_raddr[0] = m_base + AW'(in_vidx);
  assign dram_raddr[1] = rhs_base + AW'(in_row);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0;
      val1 <= '0; row1 <= '0; row_hold <= '0; rhs_hold <= '0;
    end else begin
      v1 <= in_valid; f1 <= in_first; l1 <= in_last;
      val1 <= in_val; row1 <= in_row;
      if (v1 && l1) begin
        rhs_hold <= dram_rdata[1];
        row_hold <= row1;
      end
    end
  end

  fp_mac u_mac (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_first(f1), .in_last(l1),
    .a(val1), .b(dram_rdata[0]), .bias(FP_ZERO), .out_valid(mac_v), .result(mac_r));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_val   <= '0;
      b_row   <= '0;
    end else begin
      b_valid <= mac_v;
      if (mac_v) begin
        b_val <= f_sub(rhs_hold, mac_r);
        b_row <= row_hold;
      end
    end
  end
endmodule

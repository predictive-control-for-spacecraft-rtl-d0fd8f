// tb_pcore_full: one complete accelerator run at full size: horizon
// N = 20 (the document's evaluation horizon, 378 KKT rows), the top at its
// default parameters, and I_MR = ceil(1.1 * 378) = 416, inside the range of
// iteration factors the document evaluates. The sequence and the checks
// are those of tb_pcore (tb_pcore_body.svh); the residual must fall below
// 2e-2.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_pcore_full;
  import mpc_pkg::*;
  localparam int  HOR     = 20;
  localparam int  IMR_NUM = 11;
  localparam int  IMR_DEN = 10;
  localparam real RES_TOL = 2e-2;
`include "tb_pcore_body.svh"
endmodule

// tb_pcore: end-to-end test of the accelerator at horizon N = 3 (72 KKT
// rows) with the top at its default sizes. The sequence and the checks are
// in tb_pcore_body.svh. I_MR is 1.2 times the number of KKT rows, the top
// of the range the document evaluates; the residual must fall below 2e-2.
`include "tb_util.svh"
`include "tb_kkt.svh"
module tb_pcore;
  import mpc_pkg::*;
  localparam int  HOR     = 3;
  localparam int  IMR_NUM = 12;
  localparam int  IMR_DEN = 10;
  localparam real RES_TOL = 2e-2;
`include "tb_pcore_body.svh"
endmodule

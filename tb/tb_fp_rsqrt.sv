// tb_fp_rsqrt: float inputs over many decades (odd and even exponents);
// result within 2^-20 relative of 1/sqrt(x); non-positive input gives 0.
`include "tb_util.svh"
module tb_fp_rsqrt;
  import mpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done; fp32_t x, y;
  int checks = 0, failures = 0;

  fp_rsqrt dut (.*);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input real xr);
    real yr, er;
    @(negedge clk); x = r2f(xr); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (xr <= 0.0) begin
      if (y != 32'h0) begin failures++; $display("x=%g gave %h", xr, y); end
    end else begin
      yr = f2r(y); er = 1.0 / $sqrt(f2r(x));
      if (rabs(yr - er) > 1.0e-6 * er) begin failures++; $display("x=%g y=%g exp %g", xr, yr, er); end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; x = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1.0); run(2.0); run(4.0); run(0.5); run(3.0); run(1.0e-6); run(12345.678); run(0.0); run(-2.0);
    for (int t = 0; t < 60; t++)
      run($itor($urandom_range(1, 1000000)) * (2.0 ** ($itor($urandom_range(0, 60)) - 40.0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fix_rsqrt: sFix52_50 inputs in (0, 2); the sFix64_32 result must match
// 1/sqrt(x) computed in real arithmetic to within the resolution of the
// integer root (about 2/isqrt(X) relative); also
// checks the 93-cycle latency and the zero-input saturation.
`include "tb_util.svh"
module tb_fix_rsqrt;
  import mpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done; dot_t x; q32_t y;
  int checks = 0, failures = 0;

  fix_rsqrt dut (.*);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input real xr);
    int cyc; real yr, er;
    @(negedge clk); x = dot_t'(longint'(xr * (2.0 ** 50))); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    yr = $itor(y) / (2.0 ** 32);
    er = 1.0 / $sqrt($itor(x) / (2.0 ** 50));
    checks++;
    if (rabs(yr - er) > (1e-7 + 2.0 * (2.0 ** -25) * er) * er) begin failures++; $display("x=%f y=%f exp %f", xr, yr, er); end
    checks++;
    if (cyc != 93) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    rst_n = 0; start = 0; x = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1.0); run(0.25); run(1.5); run(1.999); run(0.001); run(1.0e-6);
    for (int t = 0; t < 40; t++) run(1.99 * $itor($urandom_range(1, 1000000)) / 1.0e6);
    // zero saturates
    @(negedge clk); x = '0; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (y != 64'sh7fff_ffff_ffff_ffff) begin failures++; $display("zero input gave %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

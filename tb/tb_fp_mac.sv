// tb_fp_mac: random dot products of length 1..16 with a bias, issued back
// to back; the float result must match the real-arithmetic sum within
// 1e-5 (relative) and appear 3 cycles after the last term.
`include "tb_util.svh"
module tb_fp_mac;
  import mpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_first, in_last, out_valid;
  fp32_t a, b, bias, result;
  real   expq [$];
  int    lastq [$];
  int    cyc = 0;
  int    checks = 0, failures = 0;

  fp_mac dut (.*);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (!close(f2r(result), expq[0], 1e-5)) begin
      failures++; $display("got %g exp %g", f2r(result), expq[0]);
    end
    checks++;
    if (cyc - lastq[0] != 3) begin failures++; $display("latency %0d", cyc - lastq[0]); end
    void'(expq.pop_front()); void'(lastq.pop_front());
  end

  initial begin
    rst_n = 0; in_valid = 0; in_first = 0; in_last = 0; a = 0; b = 0; bias = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int d = 0; d < 200; d++) begin
      int n; real s; real br;
      n = $urandom_range(1, 16);
      br = ($itor($urandom_range(0, 2000)) - 1000.0) / 64.0;
      s = f2r(r2f(br));
      for (int t = 0; t < n; t++) begin
        real ar, bb;
        ar = ($itor($urandom_range(0, 4000)) - 2000.0) / 128.0;
        bb = ($itor($urandom_range(0, 4000)) - 2000.0) / 256.0;
        @(negedge clk);
        in_valid = 1; in_first = (t == 0); in_last = (t == n - 1);
        a = r2f(ar); b = r2f(bb); bias = r2f(br);
        s += f2r(a) * f2r(b);
        if (t == n - 1) begin expq.push_back(s); lastq.push_back(cyc); end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lanczos_matvec: random rows of sFix25_23 entries and sFix35_33 vector
// slices, one per cycle; each z must equal the exact dot product truncated
// to sFix35_33 (saturated), 8 cycles after the row.
module tb_lanczos_matvec;
  import mpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  mat_t [ROWW-1:0] arow; vec_t [ROWW-1:0] vrow; vec_t z;
  vec_t expq [$];
  int   tq [$];
  int   cyc = 0, checks = 0, failures = 0;

  lanczos_matvec dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (z != expq[0] || cyc - tq[0] != 8) begin
      failures++; $display("z %h exp %h lat %0d", z, expq[0], cyc - tq[0]);
    end
    void'(expq.pop_front()); void'(tq.pop_front());
  end

  initial begin
    rst_n = 0; in_valid = 0; arow = '0; vrow = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic signed [127:0] acc;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      acc = 0;
      for (int c = 0; c < ROWW; c++) begin
        // entries in [-1,1) scaled down so most sums fit; some rows saturate
        arow[c] = mat_t'($signed(25'($urandom)) >>> ((t % 7 == 0) ? 0 : 3));
        vrow[c] = vec_t'($signed(35'({$urandom, $urandom})));
        acc += 128'(arow[c]) * 128'(vrow[c]);
      end
      acc = acc >>> 23;
      if (acc > 128'sh3_ffff_ffff) acc = 128'sh3_ffff_ffff;
      if (acc < -128'sh4_0000_0000) acc = -128'sh4_0000_0000;
      if (in_valid) begin expq.push_back(vec_t'(acc)); tq.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d rows missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

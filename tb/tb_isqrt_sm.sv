// tb_isqrt_sm: random and edge radicands; root must satisfy
// root^2 <= x < (root+1)^2 and done must come W/2+1 cycles after start.
module tb_isqrt_sm;
  localparam int W = 52;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done; logic [W-1:0] x; logic [W/2-1:0] root;
  int checks = 0, failures = 0;

  isqrt_sm #(.W(W)) dut (.*);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [W-1:0] v);
    int cyc;
    logic [127:0] r, r1;
    @(negedge clk); x = v; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = 128'(root); r1 = r + 1;
    checks++;
    if (!(r * r <= 128'(v) && r1 * r1 > 128'(v))) begin
      failures++; $display("isqrt(%0d) = %0d wrong", v, root);
    end
    checks++;
    if (cyc != W / 2 + 1) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    rst_n = 0; start = 0; x = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run('0); run(52'd1); run(52'd4); run(52'd15); run({W{1'b1}}); run(52'd1 << 50);
    for (int t = 0; t < 100; t++) run({$urandom, $urandom} >> (12 + $urandom_range(0, 40)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

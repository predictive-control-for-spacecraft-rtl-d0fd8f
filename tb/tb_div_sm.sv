// tb_div_sm: random quotients checked against the simulator's division,
// plus the W+1-cycle latency.
module tb_div_sm;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done; logic [W-1:0] num, den, quo;
  int checks = 0, failures = 0;

  div_sm #(.W(W)) dut (.*);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [W-1:0] n, input logic [W-1:0] d);
    int cyc;
    @(negedge clk); num = n; den = d; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (quo != n / d) begin failures++; $display("%0d / %0d = %0d wrong", n, d, quo); end
    checks++;
    if (cyc != W + 1) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    rst_n = 0; start = 0; num = 0; den = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    run(64'd1 << 57, 64'd3); run(64'd100, 64'd7); run({W{1'b1}}, 64'd1); run(64'd5, 64'd9);
    for (int t = 0; t < 100; t++)
      run({$urandom, $urandom}, 64'({$urandom, $urandom} >> $urandom_range(1, 60)) | 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

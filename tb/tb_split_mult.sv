// tb_split_mult: random and extreme signed operands; the two-stage product
// must equal a*b exactly, two cycles later.
module tb_split_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [24:0] a; logic signed [34:0] b; logic signed [59:0] p;
  logic signed [59:0] expq [$];
  int checks = 0, failures = 0;

  split_mult dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = 0; b = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (t >= 2) begin
        checks++;
        if (p != expq[0]) begin failures++; $display("got %h exp %h", p, expq[0]); end
        void'(expq.pop_front());
      end
      if (t < 4) begin
        a = (t[0]) ? 25'sh100_0000 : 25'sh0ff_ffff;
        b = (t[1]) ? 35'sh4_0000_0000 : 35'sh3_ffff_ffff;
      end else begin
        a = 25'($urandom); b = 35'({$urandom, $urandom});
      end
      expq.push_back(60'(a) * 60'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_matrix_index: fills the index RAM with start addresses and checks that
// addr = index[stage] + offset appears one cycle after the request, with a
// new request every cycle.
module tb_matrix_index;
  localparam int NMAX = 20, AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic idx_we; logic [4:0] idx_waddr; logic [AW-1:0] idx_wdata;
  logic [4:0] stage; logic [AW-1:0] offset, addr;
  logic [AW-1:0] base [NMAX+1];
  int checks = 0, failures = 0;

  matrix_index #(.NMAX(NMAX), .AW(AW)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ps, po;
    idx_we = 0; idx_waddr = 0; idx_wdata = 0; stage = 0; offset = 0;
    for (int i = 0; i <= NMAX; i++) begin
      @(negedge clk); idx_we = 1; idx_waddr = 5'(i);
      idx_wdata = AW'(100 * i + $urandom_range(0, 50)); base[i] = idx_wdata;
    end
    @(negedge clk); idx_we = 0;
    // the answer to request t must be on addr at the next clock, while
    // request t+1 is already applied
    ps = -1; po = 0;
    for (int t = 0; t <= 300; t++) begin
      int s, o;
      s = $urandom_range(0, NMAX); o = $urandom_range(0, 143);
      @(negedge clk);
      stage = 5'(s); offset = AW'(o);
      #1;
      if (ps >= 0) begin
        checks++;
        if (addr != AW'(base[ps] + AW'(po))) begin
          failures++; $display("stage %0d off %0d got %0d exp %0d", ps, po, addr, base[ps] + po);
        end
      end
      ps = s; po = o;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

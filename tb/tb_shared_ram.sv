// tb_shared_ram: writes random words to a 3-read-port RAM and checks every
// port against a reference array, including the one-cycle read latency.
module tb_shared_ram;
  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [5:0] waddr; logic [15:0] wdata;
  logic [2:0][5:0] raddr; logic [2:0][15:0] rdata;
  logic [15:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  shared_ram #(.DEPTH(DEPTH), .W(16), .NRD(3)) dut (.*);

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = 16'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 200; t++) begin
      logic [2:0][5:0] ra;
      for (int p = 0; p < 3; p++) ra[p] = 6'($urandom);
      @(negedge clk); raddr = ra;
      // a concurrent write must not disturb the value read this cycle
      we = 1; waddr = ra[0]; wdata = 16'($urandom);
      @(negedge clk); we = 0;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] != ref_mem[ra[p]] && !(p > 0 && ra[p] == ra[0] && rdata[p] == ref_mem[ra[p]])) begin
          failures++;
          $display("port %0d addr %0d got %h exp %h", p, ra[p], rdata[p], ref_mem[ra[p]]);
        end
      end
      ref_mem[ra[0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// div_sm: unsigned integer divider as a state machine.
//
// quo = floor(num / den) by restoring division, one quotient bit per clock:
// W+1 cycles after `start` is sampled, `done` pulses for one cycle with `quo` valid.
// Division by zero returns all ones (this design's choice). The document
// asks for a standard integer division algorithm written as a state machine
// for the reciprocal in the reciprocal square root.
module div_sm #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo
);
  localparam int CW = $clog2(W + 1);
  logic [W-1:0]  d;
  logic [W:0]    rem;
  logic [W:0]    rem_sh;
  logic [CW-1:0] cnt;

  assign rem_sh = {rem[W-1:0], quo[W-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
      rem  <= '0;
      d    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        quo  <= num;
        d    <= den;
        rem  <= '0;
        cnt  <= CW'(W);
      end else if (busy) begin
        if (rem_sh >= {1'b0, d}) begin
          rem <= rem_sh - {1'b0, d};
          quo <= {quo[W-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          quo <= {quo[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule

// isqrt_sm: integer square root as a state machine.
//
// Computes root = floor(sqrt(x)) for an unsigned W-bit x (W even) by the
// restoring digit-by-digit method, one result bit per clock: W/2+1 cycles
// after `start` is sampled, `done` pulses for one cycle with `root` valid (root holds
// until the next start). The document calls for an integer square root
// state machine because the scalar word lengths are too long for a
// single-cycle block; the restoring method is this design's choice.
module isqrt_sm #(
  parameter int W = 52
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   x,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  localparam int CW = $clog2(W / 2 + 1);
  logic [W-1:0]   xs;
  logic [W/2+1:0] rem;
  logic [CW-1:0]  cnt;
  logic [W/2+1:0] rem_sh, trial;

  assign rem_sh = {rem[W/2-1:0], xs[W-1:W-2]};
  assign trial  = {root, 2'b01};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
      rem  <= '0;
      xs   <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        xs   <= x;
        rem  <= '0;
        root <= '0;
        cnt  <= CW'(W / 2);
      end else if (busy) begin
        xs <= xs << 2;
        if (rem_sh >= trial) begin
          rem  <= rem_sh - trial;
          root <= {root[W/2-2:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          root <= {root[W/2-2:0], 1'b0};
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

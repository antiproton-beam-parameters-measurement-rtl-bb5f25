// isqrt: integer square root, floor(sqrt(x)), two radicand bits per clock.
//
// A `start` pulse loads x (W bits, W even); W/2 clocks later `done` pulses
// and root (W/2 bits) is valid until the next start. Digit-by-digit
// restoring method. Helper of the bunched-beam amplitude block.
module isqrt #(
  parameter int unsigned W = 80
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   x,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);

  localparam int unsigned H = W / 2;

  logic [W-1:0]           rad;   // remaining radicand bits, MSBs first
  logic [H+1:0]           rem;
  logic [$clog2(H+1)-1:0] n;
  logic [H+3:0]           rem_sh, trial, diff;

  assign rem_sh = {rem, rad[W-1:W-2]};
  assign trial  = (H+4)'({root, 2'b01});
  assign diff   = rem_sh - trial;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
      rem  <= '0;
      rad  <= '0;
      n    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        rad  <= x;
        rem  <= '0;
        root <= '0;
        n    <= '0;
      end else if (busy) begin
        rad <= rad << 2;
        if (rem_sh >= trial) begin
          rem  <= diff[H+1:0];
          root <= {root[H-2:0], 1'b1};
        end else begin
          rem  <= rem_sh[H+1:0];
          root <= {root[H-2:0], 1'b0};
        end
        if (n == ($clog2(H+1))'(H - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        n <= n + 1'b1;
      end
    end
  end

endmodule

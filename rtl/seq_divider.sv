// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A `start` pulse loads dividend and divisor; W clocks later `done` pulses
// with quotient and remainder valid (they stay valid until the next
// start). Division by zero returns an all-ones quotient. Helper of the
// parameter calculator, the peak analyser and the bunched-beam fit.
module seq_divider #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  logic [W-1:0]         d;
  logic [W-1:0]         r;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0]           r_sh, r_sub;

  assign r_sh  = {r[W-1:0], quotient[W-1]};
  assign r_sub = r_sh - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
      r         <= '0;
      d         <= '0;
      n         <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        quotient <= dividend;
        d        <= divisor;
        r        <= '0;
        n        <= '0;
      end else if (busy) begin
        if (!r_sub[W]) begin
          r        <= r_sub[W-1:0];
          quotient <= {quotient[W-2:0], 1'b1};
        end else begin
          r        <= r_sh[W-1:0];
          quotient <= {quotient[W-2:0], 1'b0};
        end
        if (n == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          remainder <= !r_sub[W] ? r_sub[W-1:0] : r_sh[W-1:0];
        end
        n <= n + 1'b1;
      end
    end
  end

endmodule

// cordic_rotator: pipelined CORDIC that rotates a vector (x, y) by an angle.
//
// The angle is a 32-bit fraction of a turn. The first stage folds the angle
// into [-1/4, 1/4) turn by a half-turn negation of the vector; STAGES
// shift-and-add micro-rotations follow, one per pipeline register. The
// result carries the CORDIC gain of about 1.647, so the internal width W must
// hold the input magnitude times 1.647. Latency is STAGES+1 clock cycles, one
// new vector per cycle; in_valid travels with the data.
// This is the mixer of the down converter; its structure is a design choice,
// the system description only asks for a precise complex mixer.
module cordic_rotator
  import drx_pkg::*;
#(
  parameter int unsigned W      = 20,
  parameter int unsigned STAGES = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_x,
  input  logic signed [W-1:0] in_y,
  input  logic [31:0]         in_angle,
  output logic                out_valid,
  output logic signed [W-1:0] out_x,
  output logic signed [W-1:0] out_y
);

  logic signed [W-1:0] xs [STAGES+1];
  logic signed [W-1:0] ys [STAGES+1];
  logic signed [32:0]  zs [STAGES+1];
  logic [STAGES:0]     vs;

  // stage 0: quadrant fold
  always_ff @(posedge clk) begin
    if (rst) begin
      vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
    end
    if (in_angle[31] ^ in_angle[30]) begin
      xs[0] <= -in_x;
      ys[0] <= -in_y;
      zs[0] <= 33'(signed'(in_angle - 32'h8000_0000));
    end else begin
      xs[0] <= in_x;
      ys[0] <= in_y;
      zs[0] <= 33'(signed'(in_angle));
    end
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) vs[s+1] <= 1'b0;
      else     vs[s+1] <= vs[s];
      if (zs[s] >= 0) begin
        xs[s+1] <= xs[s] - (ys[s] >>> s);
        ys[s+1] <= ys[s] + (xs[s] >>> s);
        zs[s+1] <= zs[s] - 33'(CORDIC_ATAN[s]);
      end else begin
        xs[s+1] <= xs[s] + (ys[s] >>> s);
        ys[s+1] <= ys[s] - (xs[s] >>> s);
        zs[s+1] <= zs[s] + 33'(CORDIC_ATAN[s]);
      end
    end
  end

  assign out_valid = vs[STAGES];
  assign out_x     = xs[STAGES];
  assign out_y     = ys[STAGES];

endmodule

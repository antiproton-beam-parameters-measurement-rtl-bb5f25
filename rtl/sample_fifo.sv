// sample_fifo: first-in first-out buffer between a down converter and the
// processing controller.
//
// DEPTH words of WIDTH bits in a circular array with read and write
// pointers one bit wider than the address. half_full is high while at least
// DEPTH/2 words are stored: it is the request to the controller to move half
// of the FIFO into its local memory. A pop returns the word on rd_data with
// rd_valid one clock later. A push into a full FIFO is dropped and sets the
// sticky `overflow` flag; a pop from an empty FIFO is ignored. `flush`
// empties the FIFO and clears overflow.
// The FIFO and its half-full request follow the system description; the
// depth (not given) is this design's choice.
module sample_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     flush,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_valid,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     half_full,
  output logic                     full,
  output logic                     empty,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign count     = wptr - rptr;
  assign full      = (count == (AW+1)'(DEPTH));
  assign empty     = (count == '0);
  assign half_full = (count >= (AW+1)'(DEPTH/2));
  assign do_push   = push && !full;
  assign do_pop    = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wptr     <= '0;
      rptr     <= '0;
      rd_valid <= 1'b0;
      overflow <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= do_pop;
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop) begin
        rptr    <= rptr + 1'b1;
        rd_data <= mem[rptr[AW-1:0]];
      end
      if (push && full) overflow <= 1'b1;
    end
  end

  // DEPTH must be a power of two for the pointer arithmetic.
  initial assert ((DEPTH & (DEPTH - 1)) == 0) else $error("DEPTH not a power of two");

endmodule

// global_memory: dual-port memory shared by the host bus and the on-board
// controller.
//
// DEPTH words of W bits. Port A is the host (VME) side, port B the
// controller side; both can read and write in every clock. Reads return
// the stored word one clock after the address (read-before-write on the
// same port). If both ports write the same address in the same clock,
// the host write wins. Control parameters go in, results come out
// through this memory, as in the system description; the depth, width and
// collision rule are this design's choices.
module global_memory #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [W-1:0]             b_wdata,
  output logic [W-1:0]             b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
  end

endmodule

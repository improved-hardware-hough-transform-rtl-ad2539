// vote_ram: simple dual-port memory holding one row of the Hough space
// (1024 words of 10 bits, one word per integer rho).
//
// One write port and one read port share a single clock. The read is
// synchronous: the address presented in cycle t is registered and the word
// appears on q in cycle t+1. A read and a write to the same address at the
// same clock edge return the old word; the voting block forwards the new
// value itself, so the memory maps onto one embedded RAM block (a 10 kbit
// block holds the 1024 x 10 array). Contents are not reset: the voting
// block clears every word while it reads the results out.
module vote_ram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 10,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    q <= mem[raddr];
  end

endmodule

// cdp_ram: the 256 x 9 data RAM of a CDP.
//
// One write port and one read port, both addressed in the same cycle (the
// diagram's "Addr In" and "Addr Out"), so the RAM can serve as a FIFO or
// delay line, a dual-port RAM operator or local memory. The read is
// asynchronous and returns the old word when both ports hit the same
// address in one cycle (read-before-write); the word is registered by the
// caller (QE / PA). A second write port, used by configuration transfers,
// has priority. Port timing is this design's choice.
module cdp_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 9
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
endmodule

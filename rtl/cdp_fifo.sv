// cdp_fifo: one of the six FIFO stacks of a Configurable Data-Path.
//
// A synchronous FIFO of DEPTH words of WIDTH bits (8 x 9 in the FPOA), as
// the architecture specifies; the FIFOs decouple neighbouring data-paths so
// that no dead-lock can occur. Write and read may happen in the same cycle.
// The head word is visible combinationally on rdata while !empty; a pop
// takes effect at the clock edge. A push into a full FIFO or a pop from an
// empty one is ignored (and flagged by an assertion). 'count' is exposed so
// the controller can reserve room for results still in its pipeline.
// 'flush' empties the FIFO synchronously (restart command); the flush and
// pointer encoding are this design's choices.
module cdp_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  // The controller and switches must never overrun or underrun a stack.
  assert property (@(posedge clk) disable iff (!rst_n || flush) !(push && full))
    else $error("cdp_fifo: push into full FIFO");
  assert property (@(posedge clk) disable iff (!rst_n || flush) !(pop && empty))
    else $error("cdp_fifo: pop from empty FIFO");
endmodule

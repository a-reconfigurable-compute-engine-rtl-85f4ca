// scan_reg: one configuration scanpath segment.
//
// A WIDTH-bit shift register with parallel output. While 'shift' is high,
// each clock moves 'si' into bit 0 and every bit up by one; 'so' is the top
// bit, so a value is shifted in most-significant bit first. Reset clears
// it. The architecture programs every FPOA through daisy-chained 1-bit
// scanpaths; the bit order is this design's choice.
module scan_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             si,
  output logic             so,
  output logic [WIDTH-1:0] q
);
  assign so = q[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= WIDTH'({q, si});
  end
endmodule

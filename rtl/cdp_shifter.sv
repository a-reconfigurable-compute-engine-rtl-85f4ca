// cdp_shifter: logical shifter of a CDP (SHA, SHB: 8 bits; SHF: 16 bits).
//
// Shifts 'd' left or right by 'amt' places, filling with zeros; an amount
// of WIDTH or more gives zero. The shifters' positions and widths are those
// of the data-path diagram; logical shifts and the 4-bit amount are this
// design's choices. Combinational.
module cdp_shifter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] d,
  input  logic             left,
  input  logic [3:0]       amt,
  output logic [WIDTH-1:0] q
);
  always_comb begin
    if (32'(amt) >= WIDTH) q = '0;
    else if (left)         q = d << amt;
    else                   q = d >> amt;
  end
endmodule

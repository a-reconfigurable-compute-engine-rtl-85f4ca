// cdp_alu: the 16-bit 2901-type ALU of the third pipeline stage of a CDP.
//
// R is the PA register, S the PB register. The eight functions are those of
// the Am2901 arithmetic/logic unit (R+S, S-R, R-S, R|S, R&S, ~R&S, R^S,
// ~(R^S)); subtraction is done as in the 2901 by adding the complement with
// the carry input (so S-R with cin=1 is an exact difference). The flags
// printed on the data-path diagram are produced: COUT, OVR (two's complement
// overflow), A=B (R equals S), A>=B (R >= S, unsigned) and POS (result bit
// 15 clear). The comparison flags compare the operands, not the result;
// that and the unsigned comparison are this design's choices. Purely
// combinational.
module cdp_alu
  import dffc_pkg::*;
(
  input  alu_op_e     op,
  input  logic        cin,
  input  logic [15:0] r,
  input  logic [15:0] s,
  output logic [15:0] f,
  output logic        cout,
  output logic        ovr,
  output logic        eq,
  output logic        ge,
  output logic        pos
);
  logic [16:0] sum;
  logic [15:0] a, b;

  always_comb begin
    a = r;
    b = s;
    unique case (op)
      ALU_SUBR: a = ~r;   // S - R
      ALU_SUBS: b = ~s;   // R - S
      default: ;
    endcase
    sum  = {1'b0, a} + {1'b0, b} + {16'd0, cin};
    cout = 1'b0;
    ovr  = 1'b0;
    unique case (op)
      ALU_ADD, ALU_SUBR, ALU_SUBS: begin
        f    = sum[15:0];
        cout = sum[16];
        ovr  = (a[15] == b[15]) && (f[15] != a[15]);
      end
      ALU_OR:    f = r | s;
      ALU_AND:   f = r & s;
      ALU_NOTRS: f = ~r & s;
      ALU_EXOR:  f = r ^ s;
      default:   f = ~(r ^ s);
    endcase
    eq  = (r == s);
    ge  = (r >= s);
    pos = ~f[15];
  end
endmodule

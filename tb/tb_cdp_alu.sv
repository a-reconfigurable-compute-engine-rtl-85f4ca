// tb_cdp_alu: self-checking test of the 2901-type ALU.
// Random operands for all eight functions and both carry inputs, checked
// against an independent computation of the result and the COUT, OVR,
// A=B, A>=B and POS flags; plus directed corner cases.
module tb_cdp_alu;
  import dffc_pkg::*;
  alu_op_e op;
  logic cin, cout, ovr, eq, ge, pos;
  logic [15:0] r, s, f;
  int checks = 0, failures = 0;

  cdp_alu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one(alu_op_e o, logic [15:0] a, logic [15:0] b, logic c);
    int unsigned full;
    logic [15:0] e;
    logic ec, eo;
    op = o; r = a; s = b; cin = c;
    #1;
    ec = 0; eo = 0;
    case (o)
      ALU_ADD:  begin full = a + b + c;           e = 16'(full); ec = full[16];
                eo = (a[15] == b[15]) && (e[15] != a[15]); end
      ALU_SUBR: begin full = (a ^ 16'hFFFF) + b + c; e = 16'(full); ec = full[16];
                eo = (~a[15] == b[15]) && (e[15] != ~a[15]); end
      ALU_SUBS: begin full = a + (b ^ 16'hFFFF) + c; e = 16'(full); ec = full[16];
                eo = (a[15] == ~b[15]) && (e[15] != a[15]); end
      ALU_OR:    e = a | b;
      ALU_AND:   e = a & b;
      ALU_NOTRS: e = (a ^ 16'hFFFF) & b;
      ALU_EXOR:  e = a ^ b;
      default:   e = (a ^ b) ^ 16'hFFFF;
    endcase
    chk(f == e, $sformatf("op %0d %h %h c%0d: f %h exp %h", o, a, b, c, f, e));
    chk(cout == ec && ovr == eo, $sformatf("op %0d flags cout/ovr", o));
    chk(eq == (a == b) && ge == (a >= b) && pos == !e[15], "cmp flags");
  endtask

  initial begin
    one(ALU_SUBS, 16'd100, 16'd30, 1'b1);
    chk(f == 16'd70 && cout, "100-30 = 70 with carry out");
    one(ALU_SUBR, 16'd30, 16'd100, 1'b1);
    chk(f == 16'd70, "S-R");
    one(ALU_ADD, 16'h7FFF, 16'h0001, 1'b0);
    chk(ovr && !pos, "signed overflow");
    one(ALU_ADD, 16'hFFFF, 16'h0001, 1'b0);
    chk(cout && f == 0, "carry out");
    for (int i = 0; i < 4000; i++)
      one(alu_op_e'(i % 8), 16'($urandom), (i % 13 == 0) ? r : 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

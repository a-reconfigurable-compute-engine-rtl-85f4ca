// tb_cdp_shifter: self-checking test of the 8- and 16-bit shifters
// against multiplication / division by powers of two.
module tb_cdp_shifter;
  logic [7:0]  d8, q8;
  logic [15:0] d16, q16;
  logic left8, left16;
  logic [3:0] amt8, amt16;
  int checks = 0, failures = 0;

  cdp_shifter #(.WIDTH(8))  u8  (.d(d8),  .left(left8),  .amt(amt8),  .q(q8));
  cdp_shifter #(.WIDTH(16)) u16 (.d(d16), .left(left16), .amt(amt16), .q(q16));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] e8, e16;
      d8 = 8'($urandom); d16 = 16'($urandom);
      left8 = 1'($urandom); left16 = 1'($urandom);
      amt8 = 4'($urandom); amt16 = 4'($urandom);
      #1;
      e8  = left8  ? (32'(d8)  * (32'd1 << amt8))  : (32'(d8)  / (32'd1 << amt8));
      e16 = left16 ? (32'(d16) * (32'd1 << amt16)) : (32'(d16) / (32'd1 << amt16));
      checks += 2;
      if (q8 != ((amt8 >= 8) ? 8'd0 : 8'(e8))) begin failures++; $display("FAIL 8 %h %0d %0d -> %h", d8, left8, amt8, q8); end
      if (q16 != 16'(e16)) begin failures++; $display("FAIL 16 %h %0d %0d -> %h", d16, left16, amt16, q16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scan_reg: self-checking test of a scanpath segment: shifts random
// values in MSB first through two chained segments, checks the parallel
// outputs, that the value emerges on 'so' unchanged, and that it holds
// while shift is low.
module tb_scan_reg;
  logic clk = 0, rst_n = 0, shift = 0, si = 0, mid, so;
  logic [12:0] q1;
  logic [6:0]  q2;
  int checks = 0, failures = 0;

  scan_reg #(.WIDTH(13)) u1 (.clk, .rst_n, .shift, .si, .so(mid), .q(q1));
  scan_reg #(.WIDTH(7))  u2 (.clk, .rst_n, .shift, .si(mid), .so, .q(q2));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    chk(q1 == 0 && q2 == 0, "reset");
    for (int t = 0; t < 50; t++) begin
      logic [19:0] v, got;
      v = 20'($urandom);
      // chain is u1 then u2: u2 gets the first 7 bits shifted in
      for (int i = 19; i >= 0; i--) begin
        @(negedge clk); shift = 1; si = v[i];
      end
      @(negedge clk); shift = 0;
      chk({q2, q1} == v, $sformatf("parallel %h exp %h", {q2, q1}, v));
      repeat (3) @(negedge clk);
      chk({q2, q1} == v, "holds");
      for (int i = 19; i >= 0; i--) begin
        got[i] = so;
        shift = 1; si = 0;
        @(negedge clk);
      end
      shift = 0;
      chk(got == v, "shifted out unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

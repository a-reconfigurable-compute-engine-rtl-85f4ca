// tb_cdp_ram: self-checking test of the 256 x 9 data RAM: fills every
// word, reads them all back, then random simultaneous read/write traffic
// against an array model, including read-before-write on the same address.
module tb_cdp_ram;
  logic clk = 0, we = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [8:0] wdata = '0, rdata;
  logic [8:0] model [256];
  int checks = 0, failures = 0;

  cdp_ram #(.DEPTH(256), .WIDTH(9)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = 9'((a * 37 + 5) % 512);
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 256; a++) begin
      raddr = 8'(a); #1;
      chk(rdata == model[a], $sformatf("fill readback %0d", a));
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom); wdata = 9'($urandom);
      raddr = (i % 5 == 0) ? waddr : 8'($urandom);
      #1;
      chk(rdata == model[raddr], "read (old word on same-address write)");
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdp_fifo: self-checking test of the 8 x 9 FIFO stack.
// Random pushes and pops (never into a full or from an empty FIFO) are
// compared with a queue model: head word, empty, full and count every
// cycle. Fills to full, drains to empty, and checks flush.
module tb_cdp_fifo;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [8:0] wdata = '0, rdata;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [8:0] model[$];
  int saw_full = 0, saw_empty = 0;

  cdp_fifo #(.DEPTH(8), .WIDTH(9)) dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(count == 4'(model.size()), "count");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == 8), "full");
      if (model.size() > 0) chk(rdata == model[0], $sformatf("head %h vs %h", rdata, model[0]));
      if (full) saw_full++;
      if (empty) saw_empty++;
      // phases: mostly fill, then mostly drain
      push  = !full && ($urandom_range(0, 99) < ((i / 200) % 2 ? 30 : 75));
      pop   = !empty && ($urandom_range(0, 99) < ((i / 200) % 2 ? 75 : 30));
      wdata = 9'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
      push = 0; pop = 0;
    end
    chk(saw_full > 0 && saw_empty > 0, "reached full and empty");
    // flush
    @(negedge clk); push = 1; wdata = 9'h1AB;
    @(negedge clk); push = 0; flush = 1;
    @(negedge clk); flush = 0;
    chk(empty && count == 0, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

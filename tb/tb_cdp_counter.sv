// tb_cdp_counter: self-checking test of the CT counter.
// Checks preset load, down-counting, NULL, auto-reload at NULL in 8-bit
// mode (period KCT[7:0]+1) and the borrow into the high half in 16-bit
// cascade mode, against a software model.
module tb_cdp_counter;
  logic clk = 0, rst_n = 0, cascade = 0, load = 0, step = 0, null_o;
  logic [15:0] preset = '0, value;
  int checks = 0, failures = 0;
  int unsigned m;

  cdp_counter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    chk(value == 0 && null_o, "reset to zero");
    // 8-bit mode: preset 5 -> period 6
    cascade = 0; preset = 16'h0305;
    load = 1; @(negedge clk); load = 0;
    chk(value == 16'h0305 && !null_o, "load");
    step = 1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      m = 5 - ((i + 1) % 6);
      chk(value[7:0] == 8'(m), $sformatf("8-bit count %0d got %0d exp %0d", i, value[7:0], m));
      chk(null_o == (m == 0), "8-bit NULL");
      chk(value[15:8] == 8'h03, "high half idle in 8-bit mode");
    end
    step = 0;
    // cascade: preset 0x0102 counts 258 steps to NULL
    cascade = 1; preset = 16'h0102;
    load = 1; @(negedge clk); load = 0;
    m = 16'h0102;
    step = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      m = (m == 0) ? 16'h0102 : m - 1;
      chk(value == 16'(m), $sformatf("16-bit count %h exp %h", value, m));
      chk(null_o == (m == 0), "16-bit NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

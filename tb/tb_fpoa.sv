// tb_fpoa: self-checking test of one FPOA chip through its six
// programming lines and ten ports.
// All configuration goes through the scanpath: select a path, shift it
// most-significant bit first, and XFER the load registers into the
// program RAMs. Block 0 routes its West port (ext 2) to its Down port over
// a direct lane; the in-chip link carries the words to block 1's Up port,
// which feeds both its input FIFOs A and B; block 1 adds them and sends C
// on its East port (ext 8). Checks: each result, the 8-cycle latency of
// two blocks, that a path shifted through the chip comes out unchanged on
// scan_out, that HOLD stops the flow and RUN resumes it.
module tb_fpoa;
  import dffc_pkg::*;
  import dffc_tb_pkg::*;
  logic clk = 0, rst_n = 0, scan_in = 0, scan_out;
  cmd_e cmd = CMD_HOLD;
  chan_t [9:0] ext_tx, ext_rx;
  logic [9:0] ext_tx_ack, ext_rx_ack;
  logic [1:0][5:0] state;
  logic [1:0] issue;
  int checks = 0, failures = 0, held = 0;
  word_t got[$], sent[$];

  fpoa dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (ext_tx[8].valid && ext_tx_ack[8]) got.push_back(ext_tx[8].data);
    if (ext_rx[2].valid && ext_rx_ack[2]) sent.push_back(ext_rx[2].data);
  end

  task automatic command(cmd_e c);
    @(negedge clk); cmd = c;
    @(negedge clk); cmd = CMD_HOLD;
  endtask

  // shift 'bits' (width w) into path p, MSB first; returns what came out
  task automatic shift_path(int p, logic [127:0] bits, int w, output logic [127:0] out);
    command(cmd_e'(CMD_SEL0 + 4'(p)));
    out = '0;
    for (int i = w - 1; i >= 0; i--) begin
      @(negedge clk);
      out[i] = scan_out;
      cmd = CMD_SHIFT; scan_in = bits[i];
    end
    @(negedge clk); cmd = CMD_HOLD;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] dummy, back;
    cdp_static_t s0, s1;
    sw_cfg_t w0, w1;
    load_t l1;
    int lat;
    ext_rx = '0; ext_tx_ack = '1;
    repeat (2) @(negedge clk); rst_n = 1;
    s0 = route_cfg();
    w0 = sw_route(DIR_W, DIR_D);
    s1 = adder_cfg();
    w1 = sw_off();
    w1.mode[DIR_U] = IOP_RECV; w1.in_src[0] = 3'(DIR_U); w1.in_src[1] = 3'(DIR_U);
    w1.mode[DIR_E] = IOP_SEND; w1.out_src[DIR_E] = OF_C;
    l1 = '{en: 1'b1, prog: 1'b1, addr: 8'd0, data: 32'(adder_word(3'b001))};
    shift_path(0, 128'(s0), STATIC_W, dummy);
    shift_path(1, 128'(w0), SWCFG_W, dummy);
    shift_path(3, 128'(s1), STATIC_W, dummy);
    shift_path(4, 128'(w1), SWCFG_W, dummy);
    shift_path(5, 128'(l1), LOAD_W, dummy);
    command(CMD_XFER);
    // read back path 4 by shifting the same value through it
    shift_path(4, 128'(w1), SWCFG_W, back);
    chk(back[SWCFG_W-1:0] == SWCFG_W'(w1), "scan_out returns the shifted configuration");
    command(CMD_RESTART);
    @(negedge clk); cmd = CMD_RUN;
    // latency through two blocks
    ext_rx[2] = '{valid: 1'b1, data: 9'd77};
    @(negedge clk); ext_rx[2] = '0;
    lat = 1;
    while (!ext_tx[8].valid && lat < 40) begin @(negedge clk); lat++; end
    chk(lat == 8, $sformatf("latency through two blocks %0d, expected 8", lat));
    // stream, then HOLD for a while, then RUN
    for (int i = 0; i < 300; i++) begin
      if (i == 100) cmd = CMD_HOLD;
      if (i == 150) cmd = CMD_RUN;
      ext_tx_ack[8] = 1'($urandom);
      if (!ext_rx[2].valid || ext_rx_ack[2]) ext_rx[2] = '{valid: 1'b1, data: 9'($urandom_range(0, 255))};
      @(negedge clk);
      if (cmd == CMD_HOLD && issue[1]) held++;
      if (i == 140) chk(!issue[0] && !issue[1], "nothing issues during HOLD");
    end
    ext_rx[2] = '0; ext_tx_ack = '1;
    repeat (40) @(negedge clk);
    chk(held == 0, "HOLD stops the programs");
    chk(got.size() == sent.size() && got.size() > 50, $sformatf("sent %0d got %0d", sent.size(), got.size()));
    for (int i = 0; i < got.size() && i < sent.size(); i++)
      chk(got[i] == {1'b0, 8'(2 * int'(sent[i][7:0]))}, $sformatf("word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fpoa_block: self-checking test of one basic block (CDP, six IOPs and
// both switch matrices).
// Configuration: West port receives and feeds both input FIFOs A and B
// (replication); the program adds A + B, so C = low byte of 2x and D =
// high byte; C is sent on the East and North ports at once (fan-out); D
// loops through the South port in feedback mode into input FIFO E, which
// is routed directly to F and sent on the Up port. The neighbours on the
// links acknowledge at random (back-pressure). Checks every word on the
// three output links, the 4-cycle link-to-link latency of one block and that each
// mechanism occurred.
module tb_fpoa_block;
  import dffc_pkg::*;
  import dffc_tb_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, restart = 0, xfer = 0;
  cdp_static_t cfg;
  sw_cfg_t swcfg;
  load_t load;
  chan_t [NPORT-1:0] link_tx, link_rx;
  logic [NPORT-1:0] link_tx_ack, link_rx_ack;
  logic [5:0] state;
  logic issue;
  int checks = 0, failures = 0, stalls_ack = 0;
  word_t got_e[$], got_n[$], got_u[$], sent[$];

  fpoa_block dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (link_tx[DIR_E].valid && link_tx_ack[DIR_E]) got_e.push_back(link_tx[DIR_E].data);
    if (link_tx[DIR_N].valid && link_tx_ack[DIR_N]) got_n.push_back(link_tx[DIR_N].data);
    if (link_tx[DIR_U].valid && link_tx_ack[DIR_U]) got_u.push_back(link_tx[DIR_U].data);
    if (link_rx[DIR_W].valid && link_rx_ack[DIR_W]) sent.push_back(link_rx[DIR_W].data);
    if (run && !link_rx_ack[DIR_W]) stalls_ack++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, n;
    link_rx = '0; link_tx_ack = '0; load = '0;
    cfg = adder_cfg(); cfg.direct_ef = 1;
    swcfg = sw_off();
    swcfg.mode[DIR_W] = IOP_RECV;     swcfg.in_src[0] = 3'(DIR_W); swcfg.in_src[1] = 3'(DIR_W);
    swcfg.mode[DIR_E] = IOP_SEND;     swcfg.out_src[DIR_E] = OF_C;
    swcfg.mode[DIR_N] = IOP_SEND;     swcfg.out_src[DIR_N] = OF_C;
    swcfg.mode[DIR_S] = IOP_FEEDBACK; swcfg.out_src[DIR_S] = OF_D; swcfg.in_src[2] = 3'(DIR_S);
    swcfg.mode[DIR_U] = IOP_SEND;     swcfg.out_src[DIR_U] = OF_F;
    repeat (2) @(negedge clk); rst_n = 1;
    load = '{en: 1'b1, prog: 1'b1, addr: 8'd0, data: 32'(adder_word())};
    xfer = 1; @(negedge clk); xfer = 0;
    restart = 1; @(negedge clk); restart = 0; run = 1;
    // latency: one word, all neighbours ready
    link_tx_ack = '1;
    link_rx[DIR_W] = '{valid: 1'b1, data: 9'd150};
    @(negedge clk); link_rx[DIR_W] = '0;
    lat = 1;
    while (!link_tx[DIR_E].valid && lat < 20) begin @(negedge clk); lat++; end
    chk(lat == 4, $sformatf("link-to-link latency %0d, expected 4 (one basic block)", lat));
    repeat (10) @(negedge clk);
    chk(got_e.size() == 1 && got_e[0] == 9'd44, "150+150 low byte on East");
    chk(got_u.size() == 1 && got_u[0] == 9'd1, "high byte through feedback and direct lane on Up");
    // stream with random acknowledges
    n = 0;
    for (int i = 0; i < 3000 && n < 200; i++) begin
      link_tx_ack = 6'($urandom) | 6'($urandom);
      if (!link_rx[DIR_W].valid || link_rx_ack[DIR_W]) begin
        // previous word (if any) was taken at the last edge
        link_rx[DIR_W] = '{valid: 1'b1, data: 9'($urandom_range(0, 255))};
      end
      @(negedge clk);
      n = sent.size();
    end
    link_rx[DIR_W] = '0;
    link_tx_ack = '1;
    repeat (40) @(negedge clk);
    chk(got_e.size() == sent.size() && got_n.size() == sent.size() && got_u.size() == sent.size(),
        $sformatf("counts: sent %0d east %0d north %0d up %0d", sent.size(), got_e.size(), got_n.size(), got_u.size()));
    for (int i = 0; i < sent.size() && i < got_e.size() && i < got_n.size() && i < got_u.size(); i++) begin
      int s;
      s = 2 * int'(sent[i][7:0]);
      chk(got_e[i] == {1'b0, 8'(s)} && got_n[i] == got_e[i], $sformatf("east/north %0d", i));
      chk(got_u[i] == {1'b0, 8'(s >> 8)}, $sformatf("up %0d", i));
    end
    chk(stalls_ack > 0, "back-pressure reached the input link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

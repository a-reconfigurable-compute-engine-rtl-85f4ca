// tb_out_switch: self-checking test of the 3 -> 6 output switch matrix.
// Random port-to-FIFO selections (one FIFO often feeding several ports),
// random empty flags and acknowledges; checks that a FIFO pops only when
// it is non-empty and every port it feeds acknowledges, and that each
// port offers exactly that FIFO's head word in that cycle.
module tb_out_switch;
  import dffc_pkg::*;
  ofifo_e [NPORT-1:0] src;
  word_t [2:0] fifo_rdata;
  logic [2:0] fifo_empty, fifo_pop;
  chan_t [NPORT-1:0] tx;
  logic [NPORT-1:0] tx_ack;
  int checks = 0, failures = 0, fanout = 0;

  out_switch dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      for (int p = 0; p < NPORT; p++) src[p] = ofifo_e'($urandom_range(0, 3));
      for (int f = 0; f < 3; f++) fifo_rdata[f] = word_t'($urandom);
      fifo_empty = 3'($urandom) & 3'($urandom);
      tx_ack = 6'($urandom) | 6'($urandom);
      #1;
      for (int f = 0; f < 3; f++) begin
        bit used, all;
        int n;
        used = 0; all = 1; n = 0;
        for (int p = 0; p < NPORT; p++) if (src[p] == ofifo_e'(f)) begin used = 1; n++; all &= tx_ack[p]; end
        checks++;
        if (fifo_pop[f] != (used && all && !fifo_empty[f])) begin failures++; $display("FAIL pop %0d", f); end
        if (fifo_pop[f] && n > 1) fanout++;
      end
      for (int p = 0; p < NPORT; p++) begin
        checks++;
        if (src[p] == OF_NONE) begin
          if (tx[p].valid) begin failures++; $display("FAIL idle port %0d valid", p); end
        end else if (tx[p].valid != fifo_pop[src[p]] ||
                     (tx[p].valid && tx[p].data != fifo_rdata[src[p]])) begin
          failures++; $display("FAIL port %0d", p);
        end
      end
    end
    checks++;
    if (fanout == 0) begin failures++; $display("FAIL no fan-out exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

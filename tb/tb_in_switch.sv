// tb_in_switch: self-checking test of the 6 -> 3 input switch matrix.
// Random source selections (including one port feeding two or three
// FIFOs), random valid words and full flags; checks each FIFO's push and
// data and each port's acknowledge against a model of the replication
// rule (a port is acknowledged only when every FIFO it feeds has room).
module tb_in_switch;
  import dffc_pkg::*;
  logic [2:0][2:0] src;
  chan_t [NPORT-1:0] rx;
  logic [NPORT-1:0] rx_ack;
  logic [2:0] fifo_full, fifo_push;
  word_t [2:0] fifo_wdata;
  int checks = 0, failures = 0, replicated = 0;

  in_switch dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      for (int f = 0; f < 3; f++) src[f] = ($urandom_range(0, 7) == 7) ? SRC_NONE : 3'($urandom_range(0, 5));
      if (i % 4 == 0) begin src[1] = src[0]; src[2] = src[0]; end
      for (int p = 0; p < NPORT; p++) rx[p] = chan_t'($urandom);
      fifo_full = 3'($urandom) & 3'($urandom);
      #1;
      for (int p = 0; p < NPORT; p++) begin
        bit used, room;
        int n;
        used = 0; room = 1; n = 0;
        for (int f = 0; f < 3; f++) if (src[f] == 3'(p)) begin used = 1; n++; room &= !fifo_full[f]; end
        if (n > 1 && used && room && rx[p].valid) replicated++;
        checks++;
        if (rx_ack[p] != (used && room)) begin failures++; $display("FAIL ack port %0d", p); end
      end
      for (int f = 0; f < 3; f++) begin
        bit exp_push;
        exp_push = 0;
        if (src[f] != SRC_NONE) begin
          bit room;
          room = 1;
          for (int g = 0; g < 3; g++) if (src[g] == src[f]) room &= !fifo_full[g];
          exp_push = rx[src[f]].valid && room;
          checks++;
          if (exp_push && fifo_wdata[f] != rx[src[f]].data) begin failures++; $display("FAIL data %0d", f); end
        end
        checks++;
        if (fifo_push[f] != exp_push) begin failures++; $display("FAIL push fifo %0d", f); end
      end
    end
    checks++;
    if (replicated == 0) begin failures++; $display("FAIL no replication exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// out_switch: Output Switch Matrix (3 -> 6) of an FPOA basic block.
//
// Each IOP's sending part takes the head word of one of the three output
// FIFOs (C, D, F), chosen by src[p] (OF_NONE leaves it idle). One FIFO may
// feed one, two ... or all six ports, replicating the flow: its head word
// is offered on all its ports only in a cycle where every one of them is
// acknowledged, and is then popped once. The acknowledges from the links
// depend only on FIFO room downstream, so qualifying valid with them
// cannot form a loop. Combinational.
module out_switch
  import dffc_pkg::*;
(
  input  ofifo_e [NPORT-1:0] src,
  input  word_t [2:0]        fifo_rdata, // C, D, F heads
  input  logic [2:0]         fifo_empty,
  output logic [2:0]         fifo_pop,
  output chan_t [NPORT-1:0]  tx,
  input  logic [NPORT-1:0]   tx_ack
);
  logic [2:0] used, all_ack;

  always_comb begin
    for (int f = 0; f < 3; f++) begin
      used[f]    = 1'b0;
      all_ack[f] = 1'b1;
      for (int p = 0; p < NPORT; p++) begin
        if (src[p] == ofifo_e'(f)) begin
          used[f]    = 1'b1;
          all_ack[f] = all_ack[f] & tx_ack[p];
        end
      end
      fifo_pop[f] = used[f] & all_ack[f] & ~fifo_empty[f];
    end
    for (int p = 0; p < NPORT; p++) begin
      tx[p] = '0;
      if (src[p] != OF_NONE) begin
        tx[p].valid = fifo_pop[src[p]];
        tx[p].data  = fifo_rdata[src[p]];
      end
    end
  end
endmodule

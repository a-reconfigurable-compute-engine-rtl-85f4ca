// in_switch: Input Switch Matrix (6 -> 3) of an FPOA basic block.
//
// Each of the three input FIFOs (A, B, E) takes its words from the
// receiving part of one of the six IOPs, chosen by src[f] (SRC_NONE leaves
// it unconnected). One port may feed one, two or all three FIFOs, which
// replicates a data flow: the port is acknowledged only when every FIFO it
// feeds has room, and the word is then written into all of them in the
// same cycle. The acknowledge depends only on the FIFOs' full flags, never
// on valid, so no combinational loop can close through a link.
// Combinational.
module in_switch
  import dffc_pkg::*;
(
  input  logic [2:0][2:0]   src,
  input  chan_t [NPORT-1:0] rx,        // receiving parts of the IOPs
  output logic [NPORT-1:0]  rx_ack,
  input  logic [2:0]        fifo_full, // A, B, E
  output logic [2:0]        fifo_push,
  output word_t [2:0]       fifo_wdata
);
  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      logic used, room;
      used = 1'b0;
      room = 1'b1;
      for (int f = 0; f < 3; f++) begin
        if (src[f] == 3'(p)) begin
          used = 1'b1;
          room = room & ~fifo_full[f];
        end
      end
      rx_ack[p] = used & room;
    end
  end

  always_comb begin
    for (int f = 0; f < 3; f++) begin
      fifo_push[f]  = 1'b0;
      fifo_wdata[f] = '0;
      if (src[f] < 3'(NPORT)) begin
        fifo_push[f]  = rx[src[f]].valid & rx_ack[src[f]];
        fifo_wdata[f] = rx[src[f]].data;
      end
    end
  end
endmodule

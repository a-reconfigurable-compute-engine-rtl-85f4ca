// iop: Input/Output Port of an FPOA basic block.
//
// A port is one bidirectional link to a neighbour: 9 data bits forward and
// one acknowledge bit backward, used in one direction at a time. It is
// configured as a sending port (the output switch matrix drives the link),
// a receiving port (the link feeds the input switch matrix) or a feedback
// port (the sending part is looped back into the receiving part, so an
// output FIFO feeds an input FIFO of the same data-path). The shared
// bidirectional bus is modelled as two one-way channels (link_tx, link_rx)
// of which the port's mode enables one; this split and the forward valid
// strobe are this design's choices. A transfer happens in a cycle where
// valid and ack are both high. Combinational: the FIFO-to-FIFO hop between
// neighbours takes the one clock edge at which the receiving FIFO writes.
module iop
  import dffc_pkg::*;
(
  input  iop_mode_e mode,
  // core side
  input  chan_t     tx_in,       // from the output switch matrix
  output logic      tx_ack,
  output chan_t     rx_out,      // to the input switch matrix
  input  logic      rx_ack,
  // link side
  output chan_t     link_tx,
  input  logic      link_tx_ack,
  input  chan_t     link_rx,
  output logic      link_rx_ack
);
  // Each output is its own assignment so that the acknowledge paths stay
  // separate from the data paths (no false combinational loop).
  assign link_tx     = (mode == IOP_SEND) ? tx_in : '0;
  assign rx_out      = (mode == IOP_RECV) ? link_rx
                     : (mode == IOP_FEEDBACK) ? tx_in : '0;
  assign tx_ack      = (mode == IOP_SEND) ? link_tx_ack
                     : (mode == IOP_FEEDBACK) ? rx_ack : 1'b0;
  assign link_rx_ack = (mode == IOP_RECV) & rx_ack;
endmodule

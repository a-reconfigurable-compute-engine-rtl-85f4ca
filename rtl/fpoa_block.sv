// fpoa_block: one basic block of the Field-Programmable Operator Array.
//
// A Configurable Data-Path (cdp), six Input/Output Ports, an Input Switch
// Matrix (6 -> 3) and an Output Switch Matrix (3 -> 6), wired as in the
// basic-block diagram. The six ports face North, South, West, East, Up and
// Down (index order of dffc_pkg::dir_e), so basic blocks can be meshed into
// a 3-D array. 'swcfg' (the IOP and switch-matrix configuration register)
// chooses each port's mode, which port feeds each input FIFO and which
// output FIFO feeds each sending port; 'cfg' is the data-path's static
// programming register. Both come from scanpaths held by the enclosing
// FPOA. A word leaves an output FIFO and enters the neighbour's input FIFO
// at the same clock edge.
module fpoa_block
  import dffc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              restart,
  input  logic              xfer,
  input  cdp_static_t       cfg,
  input  sw_cfg_t           swcfg,
  input  load_t             load,
  output chan_t [NPORT-1:0] link_tx,
  input  logic [NPORT-1:0]  link_tx_ack,
  input  chan_t [NPORT-1:0] link_rx,
  output logic [NPORT-1:0]  link_rx_ack,
  output logic [5:0]        state,
  output logic              issue
);
  chan_t [NPORT-1:0] port_tx, port_rx;
  logic  [NPORT-1:0] port_tx_ack, port_rx_ack;
  logic  [2:0]       in_push, in_full, out_pop, out_empty;
  word_t [2:0]       in_wdata, out_rdata;

  for (genvar p = 0; p < NPORT; p++) begin : g_iop
    iop u_iop (
      .mode(swcfg.mode[p]),
      .tx_in(port_tx[p]), .tx_ack(port_tx_ack[p]),
      .rx_out(port_rx[p]), .rx_ack(port_rx_ack[p]),
      .link_tx(link_tx[p]), .link_tx_ack(link_tx_ack[p]),
      .link_rx(link_rx[p]), .link_rx_ack(link_rx_ack[p]));
  end

  in_switch u_isw (
    .src(swcfg.in_src), .rx(port_rx), .rx_ack(port_rx_ack),
    .fifo_full(in_full), .fifo_push(in_push), .fifo_wdata(in_wdata));

  out_switch u_osw (
    .src(swcfg.out_src), .fifo_rdata(out_rdata), .fifo_empty(out_empty),
    .fifo_pop(out_pop), .tx(port_tx), .tx_ack(port_tx_ack));

  cdp u_cdp (
    .clk, .rst_n, .run, .restart, .cfg, .xfer, .load,
    .in_push, .in_wdata, .in_full,
    .out_pop, .out_rdata, .out_empty,
    .state, .issue);
endmodule

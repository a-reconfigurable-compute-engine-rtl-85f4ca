// fpoa: the Field-Programmable Operator Array chip.
//
// Two basic blocks (fpoa_block) coupled vertically: the Down port of block
// 0 is wired inside the chip to the Up port of block 1, so the internal
// connection is the same kind of link as the external ones. The chip has
// ten external ports, indexed 0..4 = block 0 N, S, W, E, U and 5..9 =
// block 1 N, S, W, E, D.
// Programming uses six lines: clock, reset and a 4-bit command bus (cmd,
// see dffc_pkg::cmd_e), plus the 1-bit scanpath (scan_in/scan_out), which
// splits inside the chip into six scanpaths: for block k = 0, 1, path 3k is
// its static programming register, 3k+1 its IOP/switch configuration
// register and 3k+2 its load register (one program- or data-RAM word and
// its address). A SELn command picks the path that SHIFT moves by one bit
// per clock; paths not selected hold. XFER copies each enabled load
// register into its RAM, RUN lets the data-paths execute, HOLD stops them
// and RESTART sends the state machines to state 0 and empties the FIFOs
// and pipelines. The command encoding, the grouping into six paths and
// loading the RAMs from a load register (instead of through the input
// FIFOs) are this design's choices; only configuration registers are on
// the scanpaths, not the FIFOs, counters and pipeline registers.
module fpoa
  import dffc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  cmd_e          cmd,
  input  logic          scan_in,
  output logic          scan_out,
  output chan_t [9:0]   ext_tx,
  input  logic  [9:0]   ext_tx_ack,
  input  chan_t [9:0]   ext_rx,
  output logic  [9:0]   ext_rx_ack,
  output logic [1:0][5:0] state,
  output logic  [1:0]   issue
);
  logic [2:0] sel;
  logic       run, shift, xfer, restart;

  assign run     = (cmd == CMD_RUN);
  assign shift   = (cmd == CMD_SHIFT);
  assign xfer    = (cmd == CMD_XFER);
  assign restart = (cmd == CMD_RESTART);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                    sel <= '0;
    else if (cmd[3] && cmd[2:0] < 3'd6)            sel <= cmd[2:0];
  end

  // ---------------- scanpaths ----------------
  logic [5:0] so;
  cdp_static_t [1:0] cfg;
  sw_cfg_t     [1:0] swcfg;
  load_t       [1:0] load;

  for (genvar k = 0; k < 2; k++) begin : g_scan
    logic [STATIC_W-1:0] q_static;
    logic [SWCFG_W-1:0]  q_sw;
    logic [LOAD_W-1:0]   q_load;
    scan_reg #(.WIDTH(STATIC_W)) u_static (.clk, .rst_n, .shift(shift && sel == 3'(3*k)),
      .si(scan_in), .so(so[3*k]), .q(q_static));
    scan_reg #(.WIDTH(SWCFG_W)) u_sw (.clk, .rst_n, .shift(shift && sel == 3'(3*k+1)),
      .si(scan_in), .so(so[3*k+1]), .q(q_sw));
    scan_reg #(.WIDTH(LOAD_W)) u_load (.clk, .rst_n, .shift(shift && sel == 3'(3*k+2)),
      .si(scan_in), .so(so[3*k+2]), .q(q_load));
    assign cfg[k]   = cdp_static_t'(q_static);
    assign swcfg[k] = sw_cfg_t'(q_sw);
    assign load[k]  = load_t'(q_load);
  end

  assign scan_out = so[sel];

  // ---------------- the two basic blocks ----------------
  chan_t [1:0][NPORT-1:0] tx, rx;
  logic  [1:0][NPORT-1:0] tx_ack, rx_ack;

  for (genvar k = 0; k < 2; k++) begin : g_blk
    fpoa_block u_blk (
      .clk, .rst_n, .run, .restart, .xfer,
      .cfg(cfg[k]), .swcfg(swcfg[k]), .load(load[k]),
      .link_tx(tx[k]), .link_tx_ack(tx_ack[k]),
      .link_rx(rx[k]), .link_rx_ack(rx_ack[k]),
      .state(state[k]), .issue(issue[k]));
  end

  // External ports: N, S, W, E of both blocks, Up of block 0, Down of block 1.
  for (genvar d = 0; d < 4; d++) begin : g_ext
    assign ext_tx[d]      = tx[0][d];
    assign ext_tx[5+d]    = tx[1][d];
    assign tx_ack[0][d]   = ext_tx_ack[d];
    assign tx_ack[1][d]   = ext_tx_ack[5+d];
    assign rx[0][d]       = ext_rx[d];
    assign rx[1][d]       = ext_rx[5+d];
    assign ext_rx_ack[d]   = rx_ack[0][d];
    assign ext_rx_ack[5+d] = rx_ack[1][d];
  end
  assign ext_tx[4]        = tx[0][DIR_U];
  assign tx_ack[0][DIR_U] = ext_tx_ack[4];
  assign rx[0][DIR_U]     = ext_rx[4];
  assign ext_rx_ack[4]    = rx_ack[0][DIR_U];
  assign ext_tx[9]        = tx[1][DIR_D];
  assign tx_ack[1][DIR_D] = ext_tx_ack[9];
  assign rx[1][DIR_D]     = ext_rx[9];
  assign ext_rx_ack[9]    = rx_ack[1][DIR_D];

  // Internal link: block 0 Down <-> block 1 Up.
  assign rx[1][DIR_U]     = tx[0][DIR_D];
  assign tx_ack[0][DIR_D] = rx_ack[1][DIR_U];
  assign rx[0][DIR_D]     = tx[1][DIR_U];
  assign tx_ack[1][DIR_U] = rx_ack[0][DIR_D];
endmodule

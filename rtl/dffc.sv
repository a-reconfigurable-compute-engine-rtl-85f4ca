// dffc: the Data-Flow Functional Computer array.
//
// NB boards of NX x NY FPOAs (8 x 8 x 8 = 512 chips by default), giving a
// 3-D mesh of NX x NY x (2*NB) Configurable Data-Paths (8 x 8 x 16 = 1024).
// CDP (x, y, z) is block z%2 of the FPOA at (x, y, board z/2). Its North,
// South, West and East ports link to the CDPs at y-1, y+1, x-1, x+1 of the
// same layer; Up and Down link to layers z-1 and z+1 (inside a chip for
// the two blocks of one FPOA, between boards otherwise). All links are
// local: long connections are made by configuring CDPs as routing lanes.
// Ports on the outside of the mesh are brought out as the six faces below;
// this is where the video inputs and outputs, the I/O controller, the
// transputer network and RAM/FIFO boards attach. Face arrays are indexed
// [y][z] (west/east), [x][z] (north/south) and [x][y] (up = layer 0,
// down = last layer). Each face has an input channel with its
// acknowledge and an output channel with its acknowledge.
// Programming: all FPOAs share the clock, reset and 4-bit command bus,
// and their scanpaths are daisy-chained: scan_in enters FPOA 0 and
// scan_out leaves the last, FPOA index i = (board*NY + y)*NX + x, so the
// last FPOA's bits are shifted in first. Everything else is in fpoa.
module dffc
  import dffc_pkg::*;
#(
  parameter int unsigned NX = 8,  // FPOAs per board row
  parameter int unsigned NY = 8,  // FPOA rows per board
  parameter int unsigned NB = 8   // boards
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cmd_e  cmd,
  input  logic  scan_in,
  output logic  scan_out,
  // west face (x = 0) and east face (x = NX-1), [y][z]
  input  chan_t w_in      [NY][2*NB],
  output logic  w_in_ack  [NY][2*NB],
  output chan_t w_out     [NY][2*NB],
  input  logic  w_out_ack [NY][2*NB],
  input  chan_t e_in      [NY][2*NB],
  output logic  e_in_ack  [NY][2*NB],
  output chan_t e_out     [NY][2*NB],
  input  logic  e_out_ack [NY][2*NB],
  // north face (y = 0) and south face (y = NY-1), [x][z]
  input  chan_t n_in      [NX][2*NB],
  output logic  n_in_ack  [NX][2*NB],
  output chan_t n_out     [NX][2*NB],
  input  logic  n_out_ack [NX][2*NB],
  input  chan_t s_in      [NX][2*NB],
  output logic  s_in_ack  [NX][2*NB],
  output chan_t s_out     [NX][2*NB],
  input  logic  s_out_ack [NX][2*NB],
  // up face (z = 0) and down face (z = 2*NB-1), [x][y]
  input  chan_t u_in      [NX][NY],
  output logic  u_in_ack  [NX][NY],
  output chan_t u_out     [NX][NY],
  input  logic  u_out_ack [NX][NY],
  input  chan_t d_in      [NX][NY],
  output logic  d_in_ack  [NX][NY],
  output chan_t d_out     [NX][NY],
  input  logic  d_out_ack [NX][NY],
  // activity: CDPs that issued a state this cycle
  output logic  issue     [NX][NY][2*NB]
);
  localparam int unsigned NZ = 2 * NB;
  localparam int unsigned NF = NX * NY * NB;

  // Per-CDP view of its six ports: what it sends, the acknowledge it gets,
  // what it receives, the acknowledge it gives.
  chan_t tx     [NX][NY][NZ][NPORT];
  logic  tx_ack [NX][NY][NZ][NPORT];
  chan_t rx     [NX][NY][NZ][NPORT];
  logic  rx_ack [NX][NY][NZ][NPORT];
  logic  chain  [NF+1];

  assign chain[0] = scan_in;
  assign scan_out = chain[NF];

  for (genvar b = 0; b < NB; b++) begin : g_b
    for (genvar y = 0; y < NY; y++) begin : g_y
      for (genvar x = 0; x < NX; x++) begin : g_x
        localparam int unsigned I = (b * NY + y) * NX + x;
        chan_t [9:0] etx, erx;
        logic  [9:0] etx_ack, erx_ack;
        logic [1:0][5:0] st;
        logic [1:0] iss;
        fpoa u_fpoa (
          .clk, .rst_n, .cmd, .scan_in(chain[I]), .scan_out(chain[I+1]),
          .ext_tx(etx), .ext_tx_ack(etx_ack), .ext_rx(erx), .ext_rx_ack(erx_ack),
          .state(st), .issue(iss));
        // block 0 -> layer 2b (ports N,S,W,E,U), block 1 -> layer 2b+1 (N,S,W,E,D)
        for (genvar d = 0; d < 4; d++) begin : g_d
          assign tx[x][y][2*b][d]   = etx[d];
          assign tx[x][y][2*b+1][d] = etx[5+d];
          assign etx_ack[d]         = tx_ack[x][y][2*b][d];
          assign etx_ack[5+d]       = tx_ack[x][y][2*b+1][d];
          assign erx[d]             = rx[x][y][2*b][d];
          assign erx[5+d]           = rx[x][y][2*b+1][d];
          assign rx_ack[x][y][2*b][d]   = erx_ack[d];
          assign rx_ack[x][y][2*b+1][d] = erx_ack[5+d];
        end
        assign tx[x][y][2*b][DIR_U]     = etx[4];
        assign etx_ack[4]               = tx_ack[x][y][2*b][DIR_U];
        assign erx[4]                   = rx[x][y][2*b][DIR_U];
        assign rx_ack[x][y][2*b][DIR_U] = erx_ack[4];
        assign tx[x][y][2*b+1][DIR_D]     = etx[9];
        assign etx_ack[9]                 = tx_ack[x][y][2*b+1][DIR_D];
        assign erx[9]                     = rx[x][y][2*b+1][DIR_D];
        assign rx_ack[x][y][2*b+1][DIR_D] = erx_ack[9];
        // The in-chip Down/Up pair is not visible here; tie its view off.
        assign tx[x][y][2*b][DIR_D]       = '0;
        assign rx_ack[x][y][2*b][DIR_D]   = 1'b0;
        assign tx[x][y][2*b+1][DIR_U]     = '0;
        assign rx_ack[x][y][2*b+1][DIR_U] = 1'b0;
        assign issue[x][y][2*b]   = iss[0];
        assign issue[x][y][2*b+1] = iss[1];
      end
    end
  end

  // Mesh links and faces.
  for (genvar z = 0; z < NZ; z++) begin : g_lz
    for (genvar y = 0; y < NY; y++) begin : g_ly
      for (genvar x = 0; x < NX; x++) begin : g_lx
        // West / East
        if (x == 0) begin : g_wf
          assign rx[x][y][z][DIR_W]     = w_in[y][z];
          assign w_in_ack[y][z]         = rx_ack[x][y][z][DIR_W];
          assign w_out[y][z]            = tx[x][y][z][DIR_W];
          assign tx_ack[x][y][z][DIR_W] = w_out_ack[y][z];
        end else begin : g_wl
          assign rx[x][y][z][DIR_W]     = tx[x-1][y][z][DIR_E];
          assign tx_ack[x][y][z][DIR_W] = rx_ack[x-1][y][z][DIR_E];
        end
        if (x == NX - 1) begin : g_ef
          assign rx[x][y][z][DIR_E]     = e_in[y][z];
          assign e_in_ack[y][z]         = rx_ack[x][y][z][DIR_E];
          assign e_out[y][z]            = tx[x][y][z][DIR_E];
          assign tx_ack[x][y][z][DIR_E] = e_out_ack[y][z];
        end else begin : g_el
          assign rx[x][y][z][DIR_E]     = tx[x+1][y][z][DIR_W];
          assign tx_ack[x][y][z][DIR_E] = rx_ack[x+1][y][z][DIR_W];
        end
        // North / South
        if (y == 0) begin : g_nf
          assign rx[x][y][z][DIR_N]     = n_in[x][z];
          assign n_in_ack[x][z]         = rx_ack[x][y][z][DIR_N];
          assign n_out[x][z]            = tx[x][y][z][DIR_N];
          assign tx_ack[x][y][z][DIR_N] = n_out_ack[x][z];
        end else begin : g_nl
          assign rx[x][y][z][DIR_N]     = tx[x][y-1][z][DIR_S];
          assign tx_ack[x][y][z][DIR_N] = rx_ack[x][y-1][z][DIR_S];
        end
        if (y == NY - 1) begin : g_sf
          assign rx[x][y][z][DIR_S]     = s_in[x][z];
          assign s_in_ack[x][z]         = rx_ack[x][y][z][DIR_S];
          assign s_out[x][z]            = tx[x][y][z][DIR_S];
          assign tx_ack[x][y][z][DIR_S] = s_out_ack[x][z];
        end else begin : g_sl
          assign rx[x][y][z][DIR_S]     = tx[x][y+1][z][DIR_N];
          assign tx_ack[x][y][z][DIR_S] = rx_ack[x][y+1][z][DIR_N];
        end
        // Up / Down between boards (odd layer z-1 -> even layer z)
        if (z == 0) begin : g_uf
          assign rx[x][y][z][DIR_U]     = u_in[x][y];
          assign u_in_ack[x][y]         = rx_ack[x][y][z][DIR_U];
          assign u_out[x][y]            = tx[x][y][z][DIR_U];
          assign tx_ack[x][y][z][DIR_U] = u_out_ack[x][y];
        end else if (z % 2 == 0) begin : g_ul
          assign rx[x][y][z][DIR_U]     = tx[x][y][z-1][DIR_D];
          assign tx_ack[x][y][z][DIR_U] = rx_ack[x][y][z-1][DIR_D];
        end else begin : g_ui
          assign rx[x][y][z][DIR_U]     = '0;
          assign tx_ack[x][y][z][DIR_U] = 1'b0;
        end
        if (z == NZ - 1) begin : g_df
          assign rx[x][y][z][DIR_D]     = d_in[x][y];
          assign d_in_ack[x][y]         = rx_ack[x][y][z][DIR_D];
          assign d_out[x][y]            = tx[x][y][z][DIR_D];
          assign tx_ack[x][y][z][DIR_D] = d_out_ack[x][y];
        end else if (z % 2 == 1) begin : g_dl
          assign rx[x][y][z][DIR_D]     = tx[x][y][z+1][DIR_U];
          assign tx_ack[x][y][z][DIR_D] = rx_ack[x][y][z+1][DIR_U];
        end else begin : g_di
          assign rx[x][y][z][DIR_D]     = '0;
          assign tx_ack[x][y][z][DIR_D] = 1'b0;
        end
      end
    end
  end
endmodule

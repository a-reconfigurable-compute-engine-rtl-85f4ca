// dffc_e2e: end-to-end test body for the DFFC array, used by tb_dffc
// (reduced array) and tb_dffc_full (default 8 x 8 x 8 FPOAs, instantiated
// with no parameter override when FULL is set).
// Everything is configured through the single daisy-chained scanpath.
// The application graph, in CDP coordinates (x, y, z):
//   west face (y=0, z=0) -> (0,0,0) routing lane W -> E
//   (1,0,0): its West port feeds FIFOs A and B (replication); the program
//     adds them (C = low byte of 2v, D = high byte); C goes out on both the
//     East port (east face, z=0) and the Down port (fan-out); D loops
//     through the South port in feedback mode into E, routed directly to
//     F and out on the North port (north face, x=1, z=0)
//   (1,0,1): Up -> Down routing (the in-chip link to z=1, then the link
//     between two boards to z=2)
//   (1,0,2): Up -> East routing
//   (x,0,0) and (x,0,2) for x >= 2: West -> East routing to the east face
// The receivers on the faces acknowledge at random, so back-pressure
// reaches the input. Checks all words on the three outputs, the latency
// (4 cycles per basic block), HOLD and RESTART, and counts how often
// each mechanism occurred; one that never occurred is a failure.
module dffc_e2e
  import dffc_pkg::*;
  import dffc_tb_pkg::*;
#(
  parameter int unsigned NX = 2,
  parameter int unsigned NY = 2,
  parameter int unsigned NB = 2,
  parameter bit FULL = 0,
  parameter int WORDS = 200
) ();
  localparam int unsigned NZ = 2 * NB;
  localparam int unsigned NF = NX * NY * NB;

  logic clk = 0, rst_n = 0, scan_in = 0, scan_out;
  cmd_e cmd = CMD_HOLD;
  chan_t w_in [NY][NZ], w_out [NY][NZ], e_in [NY][NZ], e_out [NY][NZ];
  logic  w_in_ack [NY][NZ], w_out_ack [NY][NZ], e_in_ack [NY][NZ], e_out_ack [NY][NZ];
  chan_t n_in [NX][NZ], n_out [NX][NZ], s_in [NX][NZ], s_out [NX][NZ];
  logic  n_in_ack [NX][NZ], n_out_ack [NX][NZ], s_in_ack [NX][NZ], s_out_ack [NX][NZ];
  chan_t u_in [NX][NY], u_out [NX][NY], d_in [NX][NY], d_out [NX][NY];
  logic  u_in_ack [NX][NY], u_out_ack [NX][NY], d_in_ack [NX][NY], d_out_ack [NX][NY];
  logic  issue [NX][NY][NZ];

  if (FULL) begin : g_full
    dffc u_dut (.*);
  end else begin : g_red
    dffc #(.NX(NX), .NY(NY), .NB(NB)) u_dut (.*);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_route = 0, n_issue = 0, n_fanout = 0, n_feedback = 0, n_board = 0, n_stall = 0;
  word_t sent[$], got_e0[$], got_e2[$], got_n[$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (w_in[0][0].valid && w_in_ack[0][0]) sent.push_back(w_in[0][0].data);
    if (w_in[0][0].valid && !w_in_ack[0][0]) n_stall++;
    if (e_out[0][0].valid && e_out_ack[0][0]) got_e0.push_back(e_out[0][0].data);
    if (e_out[0][2].valid && e_out_ack[0][2]) begin got_e2.push_back(e_out[0][2].data); n_board++; end
    if (n_out[1][0].valid && n_out_ack[1][0]) begin got_n.push_back(n_out[1][0].data); n_feedback++; end
    if (e_out[0][0].valid && e_out_ack[0][0]) n_fanout++;
    if (issue[1][0][0]) n_issue++;
    if (issue[0][0][0]) n_route++;   // never: a routing CDP runs no program
  end

  // ---------------- configuration ----------------
  cdp_static_t st [int];
  sw_cfg_t     sw [int];
  load_t       ld [int];

  function automatic int cdp_id(int x, int y, int z);
    return (z * NY + y) * NX + x;
  endfunction

  // path p = 3*block + kind (0 static, 1 switch, 2 load), FPOA f
  function automatic logic [127:0] path_value(int p, int f, output int w);
    int x, y, b, z, id;
    x = f % NX; y = (f / NX) % NY; b = f / (NX * NY);
    z = 2 * b + p / 3;
    id = cdp_id(x, y, z);
    case (p % 3)
      0: begin w = STATIC_W; return st.exists(id) ? 128'(st[id]) : '0; end
      1: begin w = SWCFG_W;  return sw.exists(id) ? 128'(sw[id]) : '0; end
      default: begin w = LOAD_W; return ld.exists(id) ? 128'(ld[id]) : '0; end
    endcase
  endfunction

  task automatic command(cmd_e c);
    @(negedge clk); cmd = c;
    @(negedge clk); cmd = CMD_HOLD;
  endtask

  // The last FPOA's bits go in first, most-significant bit first.
  task automatic shift_path(int p);
    command(cmd_e'(CMD_SEL0 + 4'(p)));
    for (int f = int'(NF) - 1; f >= 0; f--) begin
      logic [127:0] v;
      int w;
      v = path_value(p, f, w);
      for (int i = w - 1; i >= 0; i--) begin
        @(negedge clk); cmd = CMD_SHIFT; scan_in = v[i];
      end
    end
    @(negedge clk); cmd = CMD_HOLD;
  endtask

  initial begin
    repeat (FULL ? 600000 : 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat0, lat2, id;
    sw_cfg_t s;
    cdp_static_t c;
    foreach (w_in[i, j]) begin w_in[i][j] = '0; e_in[i][j] = '0; w_out_ack[i][j] = 1; e_out_ack[i][j] = 1; end
    foreach (n_in[i, j]) begin n_in[i][j] = '0; s_in[i][j] = '0; n_out_ack[i][j] = 1; s_out_ack[i][j] = 1; end
    foreach (u_in[i, j]) begin u_in[i][j] = '0; d_in[i][j] = '0; u_out_ack[i][j] = 1; d_out_ack[i][j] = 1; end

    // (0,0,0): routing W -> E
    id = cdp_id(0, 0, 0); st[id] = route_cfg(); sw[id] = sw_route(DIR_W, DIR_E);
    // (1,0,0): adder with replication, fan-out and feedback
    id = cdp_id(1, 0, 0);
    c = adder_cfg(); c.direct_ef = 1; st[id] = c;
    s = sw_off();
    s.mode[DIR_W] = IOP_RECV;     s.in_src[0] = 3'(DIR_W); s.in_src[1] = 3'(DIR_W);
    s.mode[DIR_E] = IOP_SEND;     s.out_src[DIR_E] = OF_C;
    s.mode[DIR_D] = IOP_SEND;     s.out_src[DIR_D] = OF_C;
    s.mode[DIR_S] = IOP_FEEDBACK; s.out_src[DIR_S] = OF_D; s.in_src[2] = 3'(DIR_S);
    s.mode[DIR_N] = IOP_SEND;     s.out_src[DIR_N] = OF_F;
    sw[id] = s;
    ld[id] = '{en: 1'b1, prog: 1'b1, addr: 8'd0, data: 32'(adder_word())};
    // (1,0,1): Up -> Down, (1,0,2): Up -> East
    id = cdp_id(1, 0, 1); st[id] = route_cfg(); sw[id] = sw_route(DIR_U, DIR_D);
    id = cdp_id(1, 0, 2); st[id] = route_cfg(); sw[id] = sw_route(DIR_U, DIR_E);
    for (int x = 2; x < int'(NX); x++) begin
      id = cdp_id(x, 0, 0); st[id] = route_cfg(); sw[id] = sw_route(DIR_W, DIR_E);
      id = cdp_id(x, 0, 2); st[id] = route_cfg(); sw[id] = sw_route(DIR_W, DIR_E);
    end

    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 6; p++) shift_path(p);
    command(CMD_XFER);
    command(CMD_RESTART);
    $display("configured at cycle %0t", $time);
    @(negedge clk); cmd = CMD_RUN;

    // latency of one word: NX blocks to the east face at z=0, NX+2 to z=2
    w_in[0][0] = '{valid: 1'b1, data: 9'd90};
    @(negedge clk); w_in[0][0] = '0;
    lat0 = 1; lat2 = 0;
    for (int t = 2; t < 40 + 4 * int'(NX); t++) begin
      @(negedge clk);
      if (lat0 == 1 && e_out[0][0].valid) lat0 = t;
      if (lat2 == 0 && e_out[0][2].valid) lat2 = t;
    end
    chk(lat0 == 4 * int'(NX), $sformatf("latency to east face z=0: %0d, expected %0d", lat0, 4 * NX));
    chk(lat2 == 4 * int'(NX) + 8, $sformatf("latency to east face z=2: %0d, expected %0d", lat2, 4 * NX + 8));

    // stream with random acknowledges, a HOLD in the middle
    for (int i = 0; sent.size() < WORDS && i < 20 * WORDS; i++) begin
      if (i == 50) cmd = CMD_HOLD;
      if (i == 70) cmd = CMD_RUN;
      e_out_ack[0][0] = 1'($urandom);
      e_out_ack[0][2] = ($urandom_range(0, 3) != 0);
      n_out_ack[1][0] = 1'($urandom);
      if (!w_in[0][0].valid || w_in_ack[0][0]) w_in[0][0] = '{valid: 1'b1, data: 9'($urandom_range(0, 255))};
      @(negedge clk);
      if (i == 60) chk(!issue[1][0][0], "HOLD: no state issues");
    end
    w_in[0][0] = '0;
    e_out_ack[0][0] = 1; e_out_ack[0][2] = 1; n_out_ack[1][0] = 1;
    repeat (60 + 8 * NX) @(negedge clk);

    chk(got_e0.size() == sent.size() && got_e2.size() == sent.size() && got_n.size() == sent.size(),
        $sformatf("sent %0d, east0 %0d, east2 %0d, north %0d", sent.size(), got_e0.size(), got_e2.size(), got_n.size()));
    for (int i = 0; i < sent.size(); i++) begin
      int v;
      v = 2 * int'(sent[i][7:0]);
      if (i < got_e0.size()) chk(got_e0[i] == {1'b0, 8'(v)}, $sformatf("east z=0 word %0d", i));
      if (i < got_e2.size()) chk(got_e2[i] == {1'b0, 8'(v)}, $sformatf("east z=2 word %0d", i));
      if (i < got_n.size())  chk(got_n[i]  == {1'b0, 8'(v >> 8)}, $sformatf("north word %0d", i));
    end

    // restart empties the array: a word in flight is dropped, the next one passes
    w_in[0][0] = '{valid: 1'b1, data: 9'd5};
    @(negedge clk); w_in[0][0] = '0;
    command(CMD_RESTART);
    @(negedge clk); cmd = CMD_RUN;
    repeat (30 + 4 * NX) @(negedge clk);
    chk(got_e2.size() == sent.size() - 1, "RESTART dropped the word in flight");

    $display("mechanisms: program issues %0d, replication+fan-out %0d, feedback %0d, board link %0d, back-pressure %0d",
             n_issue, n_fanout, n_feedback, n_board, n_stall);
    chk(n_issue > 0, "program issued");
    chk(n_fanout > 0, "replication and fan-out used");
    chk(n_feedback > 0, "feedback port used");
    chk(n_board > 0, "in-chip and board links used by routing lanes");
    chk(n_stall > 0, "back-pressure reached the input");
    chk(n_route == 0, "routing-only CDP ran no program");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

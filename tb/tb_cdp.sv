// tb_cdp: self-checking test of one Configurable Data-Path.
// The test loads a static register and a program (through the transfer
// port) for each of several operators and streams words through the
// input FIFOs, collecting what reaches the output FIFOs:
//   1 adder A+B -> C (low byte), D (high byte): results, the 3-cycle
//     input-FIFO-to-output-FIFO latency and one result per cycle;
//     back-pressure: with C and D not read, the program must stop when
//     they are full and lose nothing;
//   2 8x8 multiplier SHA(A) * SHB(B) with shifts;
//   3 E -> F pixel delay of N words using the data RAM and CT counter
//     (RAM words preloaded through the transfer port);
//   4 line sum: B words summed until a ')' control token, the 16-bit sum
//     sent on C/D (token branch, ALU feedback into PA);
//   5 min/max and |A-B| on C;
//   6 direct routing lane A -> C while the program runs an adder on B, E;
//   7 8-bit histogram: each pixel (replicated on A and B) reads its bin
//     from the data RAM, the ALU adds one and the next state writes the
//     bin back; a second program then reads the bins out on C.
module tb_cdp;
  import dffc_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, restart = 0, xfer = 0;
  cdp_static_t cfg;
  load_t load;
  logic [2:0] in_push = '0, in_full, out_pop, out_empty;
  word_t [2:0] in_wdata, out_rdata;
  logic [5:0] state;
  logic issue;
  int checks = 0, failures = 0, cycle = 0;
  int stalls = 0;
  logic [2:0] pop_en = 3'b111;
  word_t got [3][$];

  cdp dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // collect output words
  assign out_pop = ~out_empty & pop_en;
  always @(posedge clk) for (int i = 0; i < 3; i++) if (out_pop[i]) got[i].push_back(out_rdata[i]);
  always @(posedge clk) if (run && !issue) stalls++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic uword_t uw(int nxt, int alt = 0, cond_e cond = C_NEXT,
      logic [2:0] pop = 0, logic [2:0] push = 0, pa_sel_e pa = PA_ZERO, pb_sel_e pb = PB_ZERO,
      out_sel_e o = OUT_ALU, logic ram_we = 0, logic ct_step = 0, logic q_sel = 0);
    uword_t w;
    w = '0;
    w.next = 6'(nxt); w.alt = 6'(alt); w.cond = cond; w.pop = pop; w.push = push;
    w.pa_sel = pa; w.pb_sel = pb; w.out_sel = o; w.ram_we = ram_we; w.ct_step = ct_step;
    w.q_sel = q_sel;
    return w;
  endfunction

  task automatic xfer_word(logic prog, int addr, logic [31:0] data);
    @(negedge clk);
    load = '{en: 1'b1, prog: prog, addr: 8'(addr), data: data};
    xfer = 1;
    @(negedge clk);
    xfer = 0;
  endtask

  task automatic start();
    @(negedge clk); run = 0; restart = 1;
    @(negedge clk); restart = 0;
    for (int i = 0; i < 3; i++) got[i].delete();
    run = 1;
  endtask

  // push one word per cycle into FIFO f while it has room
  task automatic feed(int f, word_t v);
    @(negedge clk);
    while (in_full[f]) @(negedge clk);
    in_wdata[f] = v; in_push[f] = 1;
    @(negedge clk);
    in_push[f] = 0;
  endtask

  task automatic wait_count(int f, int n, int limit);
    int t = 0;
    while (got[f].size() < n && t < limit) begin @(posedge clk); t++; end
    #1;
  endtask

  function automatic cdp_static_t base_cfg();
    cdp_static_t c;
    c = '0;
    c.alu_code = ALU_ADD; c.mul_k8 = 1; c.k8 = 8'd1; c.tag_c = TAG_D0; c.tag_d = TAG_D0;
    return c;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a[$], b[$];
    int t0, lat;
    cfg = base_cfg(); load = '0; in_wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1;

    // ---------------- 1: adder, latency, rate, back-pressure ----------------
    xfer_word(1, 0, 32'(uw(0, 0, C_NEXT, 3'b011, 3'b011, PA_MUL, PB_SHB, OUT_ALU)));
    start();
    // latency: one word on A and B in the same cycle
    @(negedge clk); in_wdata[0] = 9'd200; in_wdata[1] = 9'd100; in_push = 3'b011;
    @(negedge clk); in_push = 0;
    // the words are now at the heads of the input FIFOs: count edges until
    // the result is at the head of output FIFO C
    lat = 0;
    while (out_empty[0]) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("FIFO-to-FIFO latency %0d cycles, expected 3", lat));
    wait_count(1, 1, 20);
    chk(got[0][0] == 9'd44 && got[1][0] == 9'd1, "200+100 = 0x12C on C/D");
    // rate: 64 words back to back
    for (int i = 0; i < 64; i++) begin a.push_back(9'($urandom_range(0,255))); b.push_back(9'($urandom_range(0,255))); end
    fork
      for (int i = 0; i < 64; i++) feed(0, a[i]);
      for (int i = 0; i < 64; i++) feed(1, b[i]);
    join
    t0 = cycle;
    wait_count(0, 65, 400);
    chk(got[0].size() == 65, "64 sums");
    for (int i = 0; i < 64 && i + 1 < got[0].size(); i++) begin
      int s;
      s = int'(a[i][7:0]) + int'(b[i][7:0]);
      chk(got[0][i+1] == {1'b0, 8'(s)} && got[1][i+1] == {1'b0, 8'(s >> 8)}, $sformatf("sum %0d", i));
    end
    // back-pressure: stop reading C/D, send 30 words
    pop_en = 3'b100;
    a.delete(); b.delete();
    for (int i = 0; i < 30; i++) begin a.push_back(9'(i * 7)); b.push_back(9'(i * 3)); end
    stalls = 0;
    fork
      for (int i = 0; i < 30; i++) feed(0, a[i]);
      for (int i = 0; i < 30; i++) feed(1, b[i]);
      repeat (80) @(posedge clk);
    join_any
    repeat (40) @(posedge clk);
    chk(stalls > 10, $sformatf("program stalled on full outputs (%0d stall cycles)", stalls));
    chk(in_full[0], "input FIFO backed up while outputs full");
    pop_en = 3'b111;
    wait_count(0, 65 + 30, 400);
    for (int i = 0; i < 30; i++)
      chk(got[0][65+i] == {1'b0, 8'(i * 10)}, $sformatf("no word lost under back-pressure %0d", i));

    // ---------------- 2: multiplier with shifters ----------------
    cfg = base_cfg(); cfg.mul_k8 = 0; cfg.sha = '{left: 1'b0, amt: 4'd1}; cfg.shb = '{left: 1'b1, amt: 4'd1};
    xfer_word(1, 0, 32'(uw(0, 0, C_NEXT, 3'b011, 3'b011, PA_MUL, PB_ZERO, OUT_PA)));
    start();
    a.delete(); b.delete();
    for (int i = 0; i < 40; i++) begin a.push_back(9'($urandom_range(0,255))); b.push_back(9'($urandom_range(0,255))); end
    fork
      for (int i = 0; i < 40; i++) feed(0, a[i]);
      for (int i = 0; i < 40; i++) feed(1, b[i]);
    join
    wait_count(1, 40, 200);
    for (int i = 0; i < 40; i++) begin
      int p;
      p = int'(a[i][7:0] >> 1) * int'(8'(b[i][7:0] << 1));
      chk({got[1][i][7:0], got[0][i][7:0]} == 16'(p), $sformatf("product %0d", i));
    end

    // ---------------- 3: pixel delay through RAM ----------------
    cfg = base_cfg(); cfg.kct = 16'd4; cfg.ram_rd_ct = 1; cfg.ram_wr_ct = 1;
    // the counter keeps its value over a restart: a reset clears it to 0
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    xfer_word(1, 0, 32'(uw(0, 0, C_NEXT, 3'b100, 3'b100, PA_ZERO, PB_ZERO, OUT_ALU, 1'b1, 1'b1)));
    for (int k = 0; k < 5; k++) xfer_word(0, k, 32'(9'h1F0 + k));
    start();
    a.delete();
    for (int i = 0; i < 40; i++) begin a.push_back(9'($urandom_range(0, 255))); feed(2, a[i]); end
    wait_count(2, 40, 200);
    // counter addresses: 0, 4, 3, 2, 1, 0, 4, ... -> first outputs are RAM[0], RAM[4..1]
    chk(got[2][0] == 9'h1F0 && got[2][1] == 9'h1F4 && got[2][4] == 9'h1F1, "preloaded RAM words read out first");
    for (int i = 5; i < 40; i++) chk(got[2][i] == a[i-5], $sformatf("delay-5 output %0d", i));

    // ---------------- 4: line sum with tokens ----------------
    cfg = base_cfg();
    xfer_word(1, 0, 32'(uw(1, 2, C_TOKB, 0, 0, PA_ALU, PB_ZERO)));                 // dispatch on B head, fold PB into PA
    xfer_word(1, 1, 32'(uw(0, 0, C_NEXT, 3'b010, 0, PA_ALU, PB_SHB)));             // accumulate
    xfer_word(1, 2, 32'(uw(3, 0, C_NEXT, 3'b010, 0, PA_ALU, PB_ZERO)));            // eat token, fold
    xfer_word(1, 3, 32'(uw(4, 0, C_NEXT, 0, 3'b011, PA_ALU, PB_ZERO, OUT_PA)));    // send sum
    xfer_word(1, 4, 32'(uw(0, 0, C_NEXT, 0, 0, PA_ZERO, PB_ZERO)));                // clear
    start();
    begin
      int sums[3];
      for (int l = 0; l < 3; l++) begin
        sums[l] = 0;
        for (int i = 0; i < 20 + 7 * l; i++) begin
          word_t v;
          v = 9'($urandom_range(0, 255));
          sums[l] += int'(v);
          feed(1, v);
        end
        feed(1, TOK_CLOSE);
      end
      wait_count(1, 3, 400);
      for (int l = 0; l < 3; l++)
        chk(got[0].size() == 3 && {got[1][l][7:0], got[0][l][7:0]} == 16'(sums[l]),
            $sformatf("line %0d sum %0d got %h %h (%0d)", l, sums[l], got[1][l], got[0][l], got[0].size()));
    end

    // ---------------- 5: min / max / |a-b| ----------------
    foreach (sel_list[k]) begin
      cfg = base_cfg();
      cfg.alu_code = ALU_SUBS; cfg.cin = 1;
      xfer_word(1, 0, 32'(uw(0, 0, C_NEXT, 3'b011, 3'b001, PA_MUL, PB_SHB, sel_list[k])));
      start();
      a.delete(); b.delete();
      for (int i = 0; i < 20; i++) begin a.push_back(9'($urandom_range(0,255))); b.push_back(9'($urandom_range(0,255))); end
      fork
        for (int i = 0; i < 20; i++) feed(0, a[i]);
        for (int i = 0; i < 20; i++) feed(1, b[i]);
      join
      wait_count(0, 20, 200);
      for (int i = 0; i < 20; i++) begin
        int x, y, e;
        x = int'(a[i][7:0]); y = int'(b[i][7:0]);
        case (sel_list[k])
          OUT_MIN: e = (x < y) ? x : y;
          OUT_MAX: e = (x > y) ? x : y;
          default: e = (x > y) ? x - y : y - x;
        endcase
        chk(got[0][i] == 9'(e), $sformatf("op %0d item %0d: %0d vs %0d", sel_list[k], i, got[0][i], e));
      end
    end

    // ---------------- 6: direct lane A -> C beside an E+B program ----------------
    cfg = base_cfg(); cfg.direct_ac = 1; cfg.mul_k8 = 0;
    // program: pops A (masked: lane is direct), B; computes B*0 + ... uses D only
    xfer_word(1, 0, 32'(uw(0, 0, C_NEXT, 3'b011, 3'b011, PA_ZERO, PB_SHB, OUT_PB)));
    start();
    a.delete(); b.delete();
    for (int i = 0; i < 30; i++) begin a.push_back(9'($urandom)); b.push_back(9'($urandom_range(0,255))); end
    fork
      for (int i = 0; i < 30; i++) feed(0, a[i]);
      for (int i = 0; i < 30; i++) feed(1, b[i]);
    join
    wait_count(0, 30, 200);
    wait_count(1, 30, 200);
    for (int i = 0; i < 30; i++) begin
      chk(got[0][i] == a[i], $sformatf("direct lane word %0d (incl. bit 8)", i));
      chk(got[1][i] == {1'b0, 8'd0}, "program's D output (high byte of B)");
    end
    chk(got[0].size() == 30, "program pushes to C masked on a direct lane");

    // ---------------- 7: histogram in the data RAM ----------------
    cfg = base_cfg(); cfg.k16 = 16'd1; cfg.ram_din_alu = 1;
    for (int k = 0; k < 16; k++) xfer_word(0, k, 32'd0);
    // 0: bin -> PA (read at LA), PB = 1; 1: write PA + 1 back at LB
    xfer_word(1, 0, 32'(uw(1, 0, C_NEXT, 3'b011, 0, PA_RAM, PB_K16)));
    xfer_word(1, 1, 32'(uw(0, 0, C_NEXT, 0, 0, PA_ZERO, PB_ZERO, OUT_ALU, 1'b1)));
    start();
    begin
      int hist[16];
      for (int k = 0; k < 16; k++) hist[k] = 0;
      a.delete();
      for (int i = 0; i < 200; i++) begin
        a.push_back(9'($urandom_range(0, 15)));
        hist[a[i]]++;
      end
      // runs of equal pixels check the read-after-write order
      for (int i = 0; i < 6; i++) begin a.push_back(9'd3); hist[3]++; end
      fork
        foreach (a[i]) feed(0, a[i]);
        foreach (a[i]) feed(1, a[i]);
      join
      repeat (10) @(negedge clk);
      xfer_word(1, 0, 32'(uw(0, 0, C_NEXT, 3'b001, 3'b001, PA_RAM, PB_ZERO, OUT_PA)));
      start();
      for (int k = 0; k < 16; k++) feed(0, 9'(k));
      wait_count(0, 16, 200);
      chk(got[0].size() == 16, "histogram read-out length");
      for (int k = 0; k < 16; k++)
        chk(got[0][k] == 9'(hist[k]), $sformatf("bin %0d: %0d vs %0d", k, got[0][k], hist[k]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  out_sel_e sel_list[3] = '{OUT_MIN, OUT_MAX, OUT_ABS};
endmodule

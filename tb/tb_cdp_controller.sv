// tb_cdp_controller: self-checking test of the programmable state machine.
// A random 64-word program is loaded; then, cycle by cycle, random FIFO
// status (empty, token, room), direct-lane masks and flags are applied and
// the controller's issue decision, masked pops/pushes and next state are
// compared with a model of the rule: a state executes only when every
// input it reads holds a word and every output it writes has room.
module tb_cdp_controller;
  import dffc_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, restart = 0, pwe = 0;
  logic [5:0] paddr = '0, state;
  uword_t pdata = '0, word;
  logic [2:0] in_empty = '0, in_token = '0, out_room = '0, direct = '0;
  logic ct_null = 0, flag_eq = 0, flag_ge = 0, issue;
  uword_t prog [64];
  int checks = 0, failures = 0, n_issue = 0, n_wait = 0, n_alt = 0;
  logic [5:0] exp_state;

  cdp_controller #(.STATES(64)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      prog[a] = uword_t'($urandom);
      pwe = 1; paddr = 6'(a); pdata = prog[a];
      @(negedge clk);
    end
    pwe = 0;
    restart = 1; @(negedge clk); restart = 0;
    exp_state = 0;
    run = 1;
    for (int i = 0; i < 20000; i++) begin
      uword_t w;
      logic [2:0] pops, pushes, need;
      bit ok, c;
      in_empty = 3'($urandom) & 3'($urandom);
      in_token = 3'($urandom);
      out_room = 3'($urandom) | 3'($urandom);
      direct   = (i % 7 == 0) ? 3'($urandom) : 3'b000;
      ct_null = 1'($urandom); flag_eq = 1'($urandom); flag_ge = 1'($urandom);
      run = ($urandom_range(0, 9) != 0);
      #1;
      w = prog[exp_state];
      pops = w.pop & ~direct; pushes = w.push & ~direct;
      need = pops;
      if (w.cond == C_TOKA && !direct[0]) need[0] = 1;
      if (w.cond == C_TOKB && !direct[1]) need[1] = 1;
      if (w.cond == C_TOKE && !direct[2]) need[2] = 1;
      ok = run && ((need & in_empty) == 0) && ((pushes & ~out_room) == 0);
      case (w.cond)
        C_NEXT: c = 0;
        C_TOKA: c = in_token[0];
        C_TOKB: c = in_token[1];
        C_TOKE: c = in_token[2];
        C_NULL: c = ct_null;
        C_EQ:   c = flag_eq;
        C_GE:   c = flag_ge;
        default: c = 1;
      endcase
      chk(state == exp_state, $sformatf("state %0d exp %0d", state, exp_state));
      chk(issue == ok, "issue decision");
      chk(word.pop == pops && word.push == pushes, "direct lanes masked");
      if (ok) begin
        n_issue++;
        if (c) n_alt++;
        exp_state = c ? w.alt : w.next;
      end else n_wait++;
      @(negedge clk);
    end
    chk(n_issue > 1000 && n_wait > 1000 && n_alt > 100, "issued, waited and branched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

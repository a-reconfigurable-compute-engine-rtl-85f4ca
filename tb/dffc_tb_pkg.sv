// dffc_tb_pkg: helpers shared by the FPOA-level testbenches: building
// state-machine words, static registers and switch configurations, and a
// routine that lists the scan bits of one FPOA in shifting order.
package dffc_tb_pkg;
  import dffc_pkg::*;

  function automatic uword_t uw(int nxt, int alt = 0, cond_e cond = C_NEXT,
      logic [2:0] pop = 0, logic [2:0] push = 0, pa_sel_e pa = PA_ZERO, pb_sel_e pb = PB_ZERO,
      out_sel_e o = OUT_ALU);
    uword_t w;
    w = '0;
    w.next = 6'(nxt); w.alt = 6'(alt); w.cond = cond; w.pop = pop; w.push = push;
    w.pa_sel = pa; w.pb_sel = pb; w.out_sel = o;
    return w;
  endfunction

  // static register of an adder C/D = A + B (PA = A * 1, PB = B)
  function automatic cdp_static_t adder_cfg();
    cdp_static_t c;
    c = '0;
    c.alu_code = ALU_ADD; c.mul_k8 = 1; c.k8 = 8'd1; c.tag_c = TAG_D0; c.tag_d = TAG_D0;
    return c;
  endfunction

  // push selects the output FIFOs written (C = low byte, D = high byte)
  function automatic uword_t adder_word(logic [2:0] push = 3'b011);
    return uw(0, 0, C_NEXT, 3'b011, push, PA_MUL, PB_SHB, OUT_ALU);
  endfunction

  // a switch configuration with every port off and every FIFO unconnected
  function automatic sw_cfg_t sw_off();
    sw_cfg_t s;
    s.in_src = {SRC_NONE, SRC_NONE, SRC_NONE};
    for (int p = 0; p < NPORT; p++) begin s.mode[p] = IOP_OFF; s.out_src[p] = OF_NONE; end
    return s;
  endfunction

  // a data-path used only for routing: port 'from' -> A -> C -> port 'to'
  function automatic sw_cfg_t sw_route(dir_e from, dir_e to);
    sw_cfg_t s;
    s = sw_off();
    s.mode[from] = IOP_RECV; s.in_src[0] = 3'(from);
    s.mode[to] = IOP_SEND;   s.out_src[to] = OF_C;
    return s;
  endfunction

  function automatic cdp_static_t route_cfg();
    cdp_static_t c;
    c = '0;
    c.direct_ac = 1; c.direct_bd = 1; c.direct_ef = 1;
    return c;
  endfunction
endpackage

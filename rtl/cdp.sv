// cdp: Configurable Data-Path, the operating cell of the FPOA.
//
// Three input FIFO stacks (A, B, E) feed a three-stage pipeline whose
// results go to three output FIFO stacks (C, D, F), all 8 x 9 bits.
//   Stage 1 (issue): the state machine checks its inputs and output room,
//     pops the input FIFOs into the LA, LB, LE registers and passes the
//     word's commands on.
//   Stage 2 (8-bit): SHA and SHB shifters, 8x8 multiplier (B operand SHB
//     or the K8 constant), data RAM 256x9 read and write, CT counter; loads
//     the 16-bit PA, PB registers and the 9-bit QA, QB, QE registers.
//   Stage 3 (16-bit): 2901-type ALU on PA, PB, absolute value, min/max and
//     SHF output shift; the 16-bit result's low byte goes to SC and its high
//     byte to SD, each with a ninth bit or token chosen by the static
//     register (0, 1, '(', ')', or a flag word: COUT/POS for SC, OVR/NULL
//     for SD); QA, QB may be sent instead; QE always feeds SF.
// A word popped in cycle t is written into an output FIFO at the end of
// cycle t+2 and can reach a neighbour's input FIFO at the end of t+3: four
// cycles per basic block, as the architecture states.
// Routing lanes: when direct_ac (bd, ef) is set in the static register,
// lane A (B, E) bypasses the program and flows A -> LA -> QA -> C on its
// own, so a data-path can route while it computes on its other lanes.
// With all three lanes direct the state machine is held, whatever the
// program RAM contains.
// The unit list, widths and register names follow the data-path diagram;
// the multiplexer choices, the operand extension, lane bypass through the
// Q registers and the static-register/microword layouts are this design's.
// Configuration: 'cfg' is the static register; 'xfer' writes one word
// into the program or data RAM; 'restart' empties FIFOs and pipeline.
module cdp
  import dffc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        restart,
  input  cdp_static_t cfg,
  input  logic        xfer,
  input  load_t       load,
  // input FIFO write side (from the input switch matrix)
  input  logic [2:0]  in_push,
  input  word_t [2:0] in_wdata,
  output logic [2:0]  in_full,
  // output FIFO read side (to the output switch matrix)
  input  logic [2:0]  out_pop,
  output word_t [2:0] out_rdata,
  output logic [2:0]  out_empty,
  // observation
  output logic [5:0]  state,
  output logic        issue
);
  localparam int unsigned CW = $clog2(FIFO_D + 1);

  // ---------------- FIFOs ----------------
  word_t [2:0]         in_rdata;
  logic  [2:0]         in_empty, in_pop, out_push, out_full;
  word_t [2:0]         out_wdata;
  logic  [2:0][CW-1:0] in_count, out_count;

  for (genvar i = 0; i < 3; i++) begin : g_fifo
    cdp_fifo #(.DEPTH(FIFO_D), .WIDTH(WORD_W)) u_in (
      .clk, .rst_n, .flush(restart),
      .push(in_push[i]), .wdata(in_wdata[i]), .pop(in_pop[i]),
      .rdata(in_rdata[i]), .empty(in_empty[i]), .full(in_full[i]), .count(in_count[i]));
    cdp_fifo #(.DEPTH(FIFO_D), .WIDTH(WORD_W)) u_out (
      .clk, .rst_n, .flush(restart),
      .push(out_push[i]), .wdata(out_wdata[i]), .pop(out_pop[i]),
      .rdata(out_rdata[i]), .empty(out_empty[i]), .full(out_full[i]), .count(out_count[i]));
  end

  // ---------------- pipeline state ----------------
  typedef struct packed {
    logic       ram_we, ct_step, ct_load;
    pa_sel_e    pa_sel;
    pb_sel_e    pb_sel;
    out_sel_e   out_sel;
    logic       q_sel;
    logic [2:0] push;
  } cmd_t;

  logic [2:0] direct;
  logic       v2, v3;         // programmed op in stage 2 / 3
  cmd_t       c2, c3;
  logic [2:0] dv2, dv3;       // direct-lane word in stage 2 / 3
  word_t      la, lb, le, qa, qb, qe;
  logic [15:0] pa, pb;
  logic       flag_eq, flag_ge;

  assign direct = {cfg.direct_ef, cfg.direct_bd, cfg.direct_ac};

  // Room: words already in the FIFO plus words on their way must leave a slot.
  logic [2:0] out_room;
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      logic [CW+1:0] pend;
      pend = (CW+2)'(out_count[i]) + (CW+2)'(v2 & c2.push[i]) + (CW+2)'(v3 & c3.push[i])
           + (CW+2)'(dv2[i]) + (CW+2)'(dv3[i]);
      out_room[i] = pend < (CW+2)'(FIFO_D);
    end
  end

  // ---------------- stage 1: controller ----------------
  uword_t     w;
  logic [2:0] dgo;
  logic       ct_null;

  cdp_controller #(.STATES(PROG_D)) u_ctrl (
    .clk, .rst_n, .run(run && !(&direct)), .restart,
    .pwe(xfer & load.en & load.prog), .paddr(load.addr[5:0]), .pdata(uword_t'(load.data)),
    .in_empty, .in_token({in_rdata[2][8], in_rdata[1][8], in_rdata[0][8]}),
    .out_room, .direct, .ct_null, .flag_eq, .flag_ge,
    .issue, .word(w), .state);

  assign dgo    = direct & ~in_empty & out_room & {3{run}};
  assign in_pop = (issue ? w.pop : 3'b000) | dgo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; dv2 <= '0; c2 <= '0;
      la <= '0; lb <= '0; le <= '0;
    end else if (restart) begin
      v2 <= 1'b0; dv2 <= '0;
    end else begin
      v2  <= issue;
      dv2 <= dgo;
      c2  <= '{ram_we: w.ram_we, ct_step: w.ct_step, ct_load: w.ct_load,
               pa_sel: w.pa_sel, pb_sel: w.pb_sel, out_sel: w.out_sel,
               q_sel: w.q_sel, push: w.push};
      if (in_pop[0]) la <= in_rdata[0];
      if (in_pop[1]) lb <= in_rdata[1];
      if (in_pop[2]) le <= in_rdata[2];
    end
  end

  // ---------------- stage 2: 8-bit operations ----------------
  logic [7:0]  sha_q, shb_q, mul_b;
  logic [15:0] mul_q, alu_f, ct_value;
  word_t       ram_q;
  logic        ram_we;

  cdp_shifter #(.WIDTH(8)) u_sha (.d(la[7:0]), .left(cfg.sha.left), .amt(cfg.sha.amt), .q(sha_q));
  cdp_shifter #(.WIDTH(8)) u_shb (.d(lb[7:0]), .left(cfg.shb.left), .amt(cfg.shb.amt), .q(shb_q));

  assign mul_b = cfg.mul_k8 ? cfg.k8 : shb_q;
  assign mul_q = 16'(sha_q) * 16'(mul_b);

  function automatic logic [15:0] ext8(logic [7:0] v, logic sgn);
    return sgn ? {{8{v[7]}}, v} : {8'd0, v};
  endfunction

  cdp_counter u_ct (
    .clk, .rst_n, .cascade(cfg.ct_cascade), .preset(cfg.kct),
    .load(v2 & c2.ct_load), .step(v2 & c2.ct_step),
    .value(ct_value), .null_o(ct_null));

  // Configuration transfers have priority over the program's writes.
  logic        xfer_data;
  logic [7:0]  ram_waddr;
  word_t       ram_wdata;
  assign xfer_data = xfer & load.en & ~load.prog;
  assign ram_we    = xfer_data | (v2 & c2.ram_we);
  assign ram_waddr = xfer_data ? load.addr : (cfg.ram_wr_ct ? ct_value[7:0] : lb[7:0]);
  assign ram_wdata = xfer_data ? load.data[8:0]
                   : (cfg.ram_din_alu ? {1'b0, alu_f[7:0]} : le);

  cdp_ram #(.DEPTH(RAM_D), .WIDTH(WORD_W)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(cfg.ram_rd_ct ? ct_value[7:0] : la[7:0]), .rdata(ram_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; dv3 <= '0; c3 <= '0;
      pa <= '0; pb <= '0; qa <= '0; qb <= '0; qe <= '0;
    end else if (restart) begin
      v3 <= 1'b0; dv3 <= '0;
    end else begin
      v3  <= v2;
      dv3 <= dv2;
      c3  <= c2;
      if (v2) begin
        unique case (c2.pa_sel)
          PA_ZERO: pa <= '0;
          PA_MUL:  pa <= cfg.asigned ? ext8(mul_q[7:0], 1'b1) : mul_q;
          PA_RAM:  pa <= ext8(ram_q[7:0], cfg.asigned);
          default: pa <= alu_f;
        endcase
        unique case (c2.pb_sel)
          PB_ZERO: pb <= '0;
          PB_SHB:  pb <= ext8(shb_q, cfg.bsigned);
          PB_K16:  pb <= cfg.k16;
          default: pb <= alu_f;
        endcase
      end
      if (v2 || dv2[0]) qa <= la;
      if (v2 || dv2[1]) qb <= lb;
      if (dv2[2])       qe <= le;
      else if (v2)      qe <= ram_q;
    end
  end

  // ---------------- stage 3: 16-bit operations ----------------
  logic        cout, ovr, eq, ge, pos;
  logic [15:0] shf_q, res;

  cdp_alu u_alu (.op(cfg.alu_code), .cin(cfg.cin), .r(pa), .s(pb),
                 .f(alu_f), .cout, .ovr, .eq, .ge, .pos);
  cdp_shifter #(.WIDTH(16)) u_shf (.d(alu_f), .left(cfg.shf.left), .amt(cfg.shf.amt), .q(shf_q));

  always_comb begin
    unique case (c3.out_sel)
      OUT_ALU: res = alu_f;
      OUT_PA:  res = pa;
      OUT_PB:  res = pb;
      OUT_ABS: res = alu_f[15] ? 16'(-alu_f) : alu_f;
      OUT_SHF: res = shf_q;
      OUT_MIN: res = ge ? pb : pa;
      OUT_MAX: res = ge ? pa : pb;
      default: res = ct_value;
    endcase
  end

  function automatic word_t tag_word(tag_e t, logic [7:0] b, logic f1, logic f2);
    unique case (t)
      TAG_D1:    return {1'b1, b};
      TAG_OPEN:  return TOK_OPEN;
      TAG_CLOSE: return TOK_CLOSE;
      TAG_FLAG1: return {8'd0, f1};
      TAG_FLAG2: return {8'd0, f2};
      default:   return {1'b0, b};
    endcase
  endfunction

  always_comb begin
    out_push[0] = dv3[0] | (v3 & c3.push[0]);
    out_push[1] = dv3[1] | (v3 & c3.push[1]);
    out_push[2] = dv3[2] | (v3 & c3.push[2]);
    out_wdata[0] = (dv3[0] | c3.q_sel) ? qa : tag_word(cfg.tag_c, res[7:0], cout, pos);
    out_wdata[1] = (dv3[1] | c3.q_sel) ? qb : tag_word(cfg.tag_d, res[15:8], ovr, ct_null);
    out_wdata[2] = qe;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_eq <= 1'b0;
      flag_ge <= 1'b0;
    end else if (v3) begin
      flag_eq <= eq;
      flag_ge <= ge;
    end
  end
endmodule

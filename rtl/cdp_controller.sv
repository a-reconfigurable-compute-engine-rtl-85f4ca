// cdp_controller: the programmable state machine that drives a CDP.
//
// The program is STATES 32-bit words (64 in the FPOA). Each word names the
// input FIFOs it consumes, the operations of the later pipeline stages, the
// output FIFOs it fills and the next state. As the architecture requires, a
// state executes ("issues") only when every input FIFO it reads holds a
// word and every output FIFO it writes has room; otherwise the controller
// waits in that state and the pipeline receives a bubble. Room is decided
// by the caller, which counts words still travelling in the pipeline.
// Branching is this design's own: a word holds a second successor 'alt'
// taken when its condition holds (head of an input FIFO is a control
// token, counter NULL, or a flag of the last ALU result). Lanes routed
// directly (direct_ac/bd/ef) are masked out of the word's pops and pushes.
// The program RAM is written through a separate port by configuration
// transfers; 'restart' returns to state 0. Issue is decided
// combinationally in the cycle the state is current.
module cdp_controller
  import dffc_pkg::*;
#(
  parameter int unsigned STATES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        restart,
  // program load
  input  logic        pwe,
  input  logic [$clog2(STATES)-1:0] paddr,
  input  uword_t      pdata,
  // status
  input  logic [2:0]  in_empty,   // A, B, E
  input  logic [2:0]  in_token,   // bit 8 of each input FIFO head
  input  logic [2:0]  out_room,   // C, D, F can take one more word
  input  logic [2:0]  direct,     // lanes A->C, B->D, E->F routed directly
  input  logic        ct_null,
  input  logic        flag_eq,
  input  logic        flag_ge,
  // command to the pipeline
  output logic        issue,
  output uword_t      word,
  output logic [5:0]  state
);
  uword_t prog [STATES];
  uword_t w;
  logic   cond_true, inputs_ok, room_ok;
  logic [2:0] need_in;

  assign w = prog[state[$clog2(STATES)-1:0]];

  always_comb begin
    word      = w;
    word.pop  = w.pop & ~direct;
    word.push = w.push & ~direct;
    need_in   = word.pop;
    unique case (w.cond)
      C_TOKA:  need_in[0] = ~direct[0];
      C_TOKB:  need_in[1] = ~direct[1];
      C_TOKE:  need_in[2] = ~direct[2];
      default: ;
    endcase
    inputs_ok = ((need_in & in_empty) == 3'b000);
    room_ok   = ((word.push & ~out_room) == 3'b000);
    issue     = run && inputs_ok && room_ok;
    unique case (w.cond)
      C_NEXT: cond_true = 1'b0;
      C_TOKA: cond_true = in_token[0];
      C_TOKB: cond_true = in_token[1];
      C_TOKE: cond_true = in_token[2];
      C_NULL: cond_true = ct_null;
      C_EQ:   cond_true = flag_eq;
      C_GE:   cond_true = flag_ge;
      default: cond_true = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= '0;
    else if (restart) state <= '0;
    else if (issue)   state <= cond_true ? w.alt : w.next;
  end

  always_ff @(posedge clk) begin
    if (pwe) prog[paddr] <= pdata;
  end
endmodule

// dffc_pkg: types and constants shared by the Field-Programmable Operator
// Array (FPOA) and the Data-Flow Functional Computer (DFFC) array.
//
// Data words are 9 bits: bit 8 marks a control token (beginning/end of a
// line or frame), bits 7:0 carry a pixel value. A link between two ports
// carries a word forward and a one-bit acknowledge backward; the forward
// "valid" strobe is this design's own addition (a FIFO-like transfer needs
// one). The microword, static-register and switch-configuration layouts
// are this design's own encodings of the fields the architecture names.
package dffc_pkg;

  localparam int unsigned WORD_W   = 9;   // FIFO / link data width
  localparam int unsigned FIFO_D   = 8;   // words per FIFO stack
  localparam int unsigned NPORT    = 6;   // IOPs per basic block
  localparam int unsigned PROG_D   = 64;  // state-machine program words
  localparam int unsigned PROG_W   = 32;  // bits per program word
  localparam int unsigned RAM_D    = 256; // data RAM words

  typedef logic [WORD_W-1:0] word_t;

  // Port directions of a basic block.
  typedef enum logic [2:0] {
    DIR_N = 3'd0, DIR_S = 3'd1, DIR_W = 3'd2,
    DIR_E = 3'd3, DIR_U = 3'd4, DIR_D = 3'd5
  } dir_e;

  // Forward half of a link; the acknowledge travels in a separate bit.
  typedef struct packed {
    logic  valid;
    word_t data;
  } chan_t;

  // Control tokens (bit 8 set) written by the '(' and ')' output choices.
  localparam word_t TOK_OPEN  = 9'h128;
  localparam word_t TOK_CLOSE = 9'h129;

  // IOP configuration.
  typedef enum logic [1:0] {
    IOP_OFF = 2'd0, IOP_SEND = 2'd1, IOP_RECV = 2'd2, IOP_FEEDBACK = 2'd3
  } iop_mode_e;

  // Input FIFO source (IOP index 0..5, or none) and output FIFO choice.
  localparam logic [2:0] SRC_NONE = 3'd7;
  typedef enum logic [1:0] {
    OF_C = 2'd0, OF_D = 2'd1, OF_F = 2'd2, OF_NONE = 2'd3
  } ofifo_e;

  // Switch / IOP configuration register of one basic block (33 bits).
  typedef struct packed {
    logic [2:0][2:0]        in_src;   // [f] source IOP of input FIFO A,B,E
    iop_mode_e [NPORT-1:0]  mode;     // [p] mode of IOP p
    ofifo_e    [NPORT-1:0]  out_src;  // [p] output FIFO feeding IOP p
  } sw_cfg_t;

  // 2901-type ALU functions (R = PA, S = PB).
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUBR = 3'd1, ALU_SUBS = 3'd2, ALU_OR = 3'd3,
    ALU_AND = 3'd4, ALU_NOTRS = 3'd5, ALU_EXOR = 3'd6, ALU_EXNOR = 3'd7
  } alu_op_e;

  // Choice of the word written to SC / SD when the computed result is sent.
  typedef enum logic [2:0] {
    TAG_D0 = 3'd0,    // {0, byte}
    TAG_D1 = 3'd1,    // {1, byte}
    TAG_OPEN = 3'd2,  // '(' token
    TAG_CLOSE = 3'd3, // ')' token
    TAG_FLAG1 = 3'd4, // SC: COUT  SD: OVR
    TAG_FLAG2 = 3'd5  // SC: POS   SD: NULL
  } tag_e;

  // Shift field: left when dir is set, by amt places (logical).
  typedef struct packed {
    logic       left;
    logic [3:0] amt;
  } shift_t;

  // Static programming register of a CDP (field names after the
  // configuration editor: ALUCODE, CIN, SHA, SHB, SHF, KB, K16, KCT, ...).
  typedef struct packed {
    logic    direct_ac;   // route A -> C through LA/QA, bypassing the program
    logic    direct_bd;   // route B -> D through LB/QB
    logic    direct_ef;   // route E -> F through LE/QE
    alu_op_e alu_code;
    logic    cin;
    logic    asigned;     // sign-extend 8-bit operands feeding PA
    logic    bsigned;     // sign-extend 8-bit operands feeding PB
    shift_t  sha;
    shift_t  shb;
    shift_t  shf;
    logic    mul_k8;      // multiplier B operand: 1 = K8 constant, 0 = SHB
    logic [7:0]  k8;
    logic [15:0] k16;
    logic [15:0] kct;     // counter preset
    logic    ct_cascade;  // 1 = one 16-bit counter, 0 = 8-bit counter
    logic    ram_rd_ct;   // read address: 1 = CT, 0 = LA
    logic    ram_wr_ct;   // write address: 1 = CT, 0 = LB
    logic    ram_din_alu; // write data: 1 = ALU result byte, 0 = LE
    tag_e    tag_c;
    tag_e    tag_d;
  } cdp_static_t;

  // PA / PB / output multiplexer selections.
  typedef enum logic [1:0] {PA_ZERO = 2'd0, PA_MUL = 2'd1, PA_RAM = 2'd2, PA_ALU = 2'd3} pa_sel_e;
  typedef enum logic [1:0] {PB_ZERO = 2'd0, PB_SHB = 2'd1, PB_K16 = 2'd2, PB_ALU = 2'd3} pb_sel_e;
  typedef enum logic [2:0] {
    OUT_ALU = 3'd0, OUT_PA = 3'd1, OUT_PB = 3'd2, OUT_ABS = 3'd3,
    OUT_SHF = 3'd4, OUT_MIN = 3'd5, OUT_MAX = 3'd6, OUT_CT = 3'd7
  } out_sel_e;

  // Branch conditions of the state machine.
  typedef enum logic [2:0] {
    C_NEXT = 3'd0,  // always 'next'
    C_TOKA = 3'd1,  // head of A is a control token
    C_TOKB = 3'd2,
    C_TOKE = 3'd3,
    C_NULL = 3'd4,  // counter NULL
    C_EQ   = 3'd5,  // last ALU result: A = B
    C_GE   = 3'd6,  // last ALU result: A >= B
    C_ALT  = 3'd7   // always 'alt'
  } cond_e;

  // One 32-bit state-machine word.
  typedef struct packed {
    logic       q_sel;    // SC/SD take QA/QB instead of the result
    logic       ct_load;  // load counter from KCT
    logic       ct_step;  // count (auto-reload from KCT at NULL)
    logic       ram_we;   // write data RAM
    out_sel_e   out_sel;
    pb_sel_e    pb_sel;
    pa_sel_e    pa_sel;
    logic [2:0] push;     // C, D, F
    logic [2:0] pop;      // A, B, E
    cond_e      cond;
    logic [5:0] alt;
    logic [5:0] next;
  } uword_t;

  // Command bus of an FPOA (4 bits).
  typedef enum logic [3:0] {
    CMD_RUN     = 4'h0,  // execute
    CMD_HOLD    = 4'h1,  // state machines and transfers idle
    CMD_SHIFT   = 4'h2,  // shift the selected scanpath by one bit
    CMD_XFER    = 4'h3,  // copy load registers into program / data RAM
    CMD_RESTART = 4'h4,  // controllers to state 0, pipelines and FIFOs emptied
    CMD_SEL0    = 4'h8   // 8..13: select scanpath 0..5
  } cmd_e;

  // Load register: one RAM word waiting for a transfer.
  typedef struct packed {
    logic        en;     // take part in the next transfer
    logic        prog;   // 1 = program RAM, 0 = data RAM
    logic [7:0]  addr;
    logic [31:0] data;
  } load_t;

  localparam int unsigned STATIC_W = $bits(cdp_static_t);
  localparam int unsigned SWCFG_W  = $bits(sw_cfg_t);
  localparam int unsigned LOAD_W   = $bits(load_t);

  function automatic dir_e opposite(dir_e d);
    case (d)
      DIR_N: return DIR_S;
      DIR_S: return DIR_N;
      DIR_W: return DIR_E;
      DIR_E: return DIR_W;
      DIR_U: return DIR_D;
      default: return DIR_U;
    endcase
  endfunction

endpackage

// momr_pkg: types and constants shared by the MOMR (multi-word operands,
// multi-word result) core.
//
// Instruction word (32 bits, an encoding chosen for this design):
//   [31:26] opcode      [25] gs (group start)   [24] gc (group continue)
//   [23:22] sp, stage pair of a PERM instruction (0: stages 0-1, 1: 2-3, 2: 4-5)
//   [14:10] rs1   [9:5] rs2   [4:0] rd
// The gs/gc meanings follow the group-bit table of the method-2 ISA:
// 00 normal, 10 first of a group, 01 continuation, 11 reserved.
// A PERM instruction sets two stages of a 6-stage (inverse) butterfly
// network from rs2 (32 switch bits per stage) and permutes rs1; three of them
// with sp = 0,1,2 make one arbitrary 6-stage pass over a 64-bit word.
package momr_pkg;

  parameter int unsigned XLEN   = 64;  // word size
  parameter int unsigned NREG   = 32;  // architectural registers
  parameter int unsigned RADDR  = 5;
  parameter int unsigned FETCH_W = 4;  // instructions per fetch block (decoders of the detection unit)
  parameter int unsigned NSTAGE = 6;   // log2(XLEN) network stages

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [RADDR-1:0] reg_t;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,
    OP_SUB   = 6'd2,
    OP_AND   = 6'd3,
    OP_OR    = 6'd4,
    OP_XOR   = 6'd5,
    OP_SLL   = 6'd6,
    OP_SRL   = 6'd7,
    OP_PMIN  = 6'd8,   // 4 x 16-bit unsigned subword minimum
    OP_PMAX  = 6'd9,   // 4 x 16-bit unsigned subword maximum
    OP_MULL  = 6'd10,  // low word of rs1*rs2
    OP_MULH  = 6'd11,  // high word of rs1*rs2 (unsigned)
    OP_PERMB = 6'd12,  // two stages of a butterfly network
    OP_PERMI = 6'd13   // two stages of an inverse butterfly network
  } opcode_e;

  typedef enum logic [1:0] {FU_ALU = 2'd0, FU_PU = 2'd1, FU_MUL = 2'd2} fu_e;

  // Kind of operation a group (head entry with C = 1 plus the next entry) performs.
  typedef enum logic [2:0] {
    GK_NONE    = 3'd0,
    GK_PERM    = 3'd1,  // (4,1): data, cfg0 (head); cfg2, cfg1 (tail, transformed order)
    GK_MUL64   = 3'd2,  // (2,2): low and high word of a 64x64 product
    GK_MUL128L = 3'd3,  // (4,2): low 128 bits of a 128x128 product
    GK_MUL128H = 3'd4,  // (4,2): high 128 bits of a 128x128 product
    GK_MINMAX  = 3'd5   // PMIN/PMAX pair issued together
  } gkind_e;

  typedef enum logic [1:0] {GM_NONE = 2'd0, GM_METHOD1 = 2'd1, GM_METHOD2 = 2'd2} gmode_e;

  typedef struct packed {
    logic    valid;
    opcode_e op;
    logic    gs;
    logic    gc;
    logic [1:0] sp;
    reg_t    rs1;
    reg_t    rs2;
    reg_t    rd;
    logic    use1;    // reads rs1
    logic    use2;    // reads rs2
    logic    wr;      // writes rd
    fu_e     fu;
    logic    is_perm;
  } dec_t;

  // Issue-window entry: decoded instruction plus the C-bit and group kind.
  typedef struct packed {
    dec_t   d;
    logic   c;        // this entry and the next one form a group
    gkind_e gk;       // valid on the head (c = 1)
  } iw_entry_t;

  // Event counters brought out of the core.
  typedef struct packed {
    logic [31:0] cycles;        // cycles not idle
    logic [31:0] dispatched;    // instructions written to the issue window
    logic [31:0] folded;        // PERM instructions removed by the code transformer
    logic [31:0] grp_perm;      // groups formed, by kind
    logic [31:0] grp_mul;       // MUL64 and MUL128 groups
    logic [31:0] grp_minmax;
    logic [31:0] bad_group;     // gs/gc bits that did not form a legitimate group
    logic [31:0] issued;        // instructions issued
    logic [31:0] grp_issued;    // groups issued (two entries in one grant)
    logic [31:0] dual_issued;   // cycles with two independent instructions issued
    logic [31:0] pu_ops;        // operations on the permutation unit
    logic [31:0] mul_ops;       // operations on the multiplier
    logic [31:0] window_full;   // cycles a fetch block waited for window space
    logic [31:0] wb_block;      // cycles issue was held for a multiplier write-back
    logic [31:0] bypass;        // cycles an operand came from a write port
  } stats_t;

  function automatic logic [31:0] enc(opcode_e op, logic gs, logic gc, logic [1:0] sp,
                                      reg_t rs1, reg_t rs2, reg_t rd);
    return {op, gs, gc, sp, 7'd0, rs1, rs2, rd};
  endfunction

endpackage

// instr_decoder: decodes one 32-bit instruction word (format in momr_pkg)
// into the fields the group logic and the issue window use: opcode, gs/gc
// subop bits, PERM stage pair, register numbers, which operands are read,
// whether rd is written, the functional unit and the isPERM flag of the
// sequence-detection drawing. Unknown opcodes decode as NOP; the reserved
// gs = gc = 1 combination decodes as a normal instruction (both bits
// cleared). Combinational; one instance per fetch-block slot.
module instr_decoder
  import momr_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] instr,
  output dec_t        dec
);
  opcode_e op;
  logic    known;

  always_comb begin
    known = instr[31:26] <= 6'(OP_PERMI);
    op    = known ? opcode_e'(instr[31:26]) : OP_NOP;

    dec         = '0;
    dec.valid   = valid;
    dec.op      = op;
    dec.gs      = instr[25] & ~instr[24];
    dec.gc      = instr[24] & ~instr[25];
    dec.sp      = instr[23:22];
    dec.rs1     = instr[14:10];
    dec.rs2     = instr[9:5];
    dec.rd      = instr[4:0];
    dec.use1    = valid && op != OP_NOP;
    dec.use2    = valid && op != OP_NOP;
    dec.wr      = valid && op != OP_NOP;
    dec.is_perm = op == OP_PERMB || op == OP_PERMI;
    unique case (op)
      OP_MULL, OP_MULH:   dec.fu = FU_MUL;
      OP_PERMB, OP_PERMI: dec.fu = FU_PU;
      default:            dec.fu = FU_ALU;
    endcase
  end
endmodule

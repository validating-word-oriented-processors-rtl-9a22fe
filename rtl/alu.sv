// alu: standard (2,1) 64-bit functional unit (ALU1 and ALU2 of the 2-way
// datapath).
//
// Two word operands in, one word out, combinational within the execute
// cycle. Operations: ADD, SUB, AND, OR, XOR, SLL and SRL (shift amount in
// b[5:0]), and PMIN/PMAX, which take the unsigned minimum or maximum of each
// of the four 16-bit subwords. The document only names PMIN and PMAX (as a
// pair that may be grouped); their subword size and signedness are this
// design's choice. Other opcodes give 0.
module alu
  import momr_pkg::*;
(
  input  opcode_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    y = '0;
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[5:0];
      OP_SRL:  y = a >> b[5:0];
      OP_PMIN, OP_PMAX: begin
        for (int k = 0; k < XLEN/16; k++) begin
          y[16*k +: 16] = ((op == OP_PMIN) == (a[16*k +: 16] < b[16*k +: 16]))
                          ? a[16*k +: 16] : b[16*k +: 16];
        end
      end
      default: y = '0;
    endcase
  end
endmodule

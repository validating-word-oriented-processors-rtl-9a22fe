// tb_instr_decoder: encodes random instructions and checks every decoded
// field, the unit classification, the reserved gs = gc = 1 case and unknown
// opcodes.
module tb_instr_decoder;
  import momr_pkg::*;
  logic        valid;
  logic [31:0] instr;
  dec_t        dec;
  int checks = 0, failures = 0;

  instr_decoder dut (.valid(valid), .instr(instr), .dec(dec));

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h, expected %h (instr %h)", what, got, exp, instr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int o, gs, gc, sp, r1, r2, rd;
      o = $urandom % 16; gs = $urandom % 2; gc = $urandom % 2; sp = $urandom % 4;
      r1 = $urandom % 32; r2 = $urandom % 32; rd = $urandom % 32;
      valid = ($urandom % 8) != 0;
      instr = (o << 26) | (gs << 25) | (gc << 24) | (sp << 22) | (r1 << 10) | (r2 << 5) | rd;
      #1;
      if (o > 13) o = 0;
      expect_eq(dec.valid, valid, "valid");
      expect_eq(dec.op, o, "op");
      expect_eq(dec.gs, gs && !gc, "gs");
      expect_eq(dec.gc, gc && !gs, "gc");
      expect_eq(dec.sp, sp, "sp");
      expect_eq(dec.rs1, r1, "rs1");
      expect_eq(dec.rs2, r2, "rs2");
      expect_eq(dec.rd, rd, "rd");
      expect_eq(dec.wr, valid && o != 0, "wr");
      expect_eq(dec.use1, valid && o != 0, "use1");
      expect_eq(dec.is_perm, o == 12 || o == 13, "is_perm");
      expect_eq(dec.fu, (o == 10 || o == 11) ? FU_MUL : (o == 12 || o == 13) ? FU_PU : FU_ALU, "fu");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

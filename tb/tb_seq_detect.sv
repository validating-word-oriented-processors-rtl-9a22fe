// tb_seq_detect: directed cases for method-1 group detection: the 3-PERM
// chain at slot 0 and slot 1, every rule that must break it (stage pairs,
// opcode, serial dependency, extra RAW, destinations, block boundary), the
// MUL,L/MUL,H and PMIN/PMAX pairs and their hazards, and first-match
// priority.
module tb_seq_detect;
  import momr_pkg::*;
  dec_t   [FETCH_W-1:0] dec;
  logic   [FETCH_W-1:0] c, drop;
  gkind_e [FETCH_W-1:0] gk;
  int checks = 0, failures = 0;

  seq_detect dut (.dec(dec), .c(c), .gk(gk), .drop(drop));

  function automatic dec_t d(opcode_e op, int sp, int rs1, int rs2, int rd);
    dec_t x;
    x = '0;
    x.valid = 1; x.op = op; x.sp = 2'(sp); x.rs1 = 5'(rs1); x.rs2 = 5'(rs2); x.rd = 5'(rd);
    x.use1 = 1; x.use2 = 1; x.wr = 1;
    x.is_perm = op == OP_PERMB || op == OP_PERMI;
    x.fu = (op == OP_MULL || op == OP_MULH) ? FU_MUL : x.is_perm ? FU_PU : FU_ALU;
    return x;
  endfunction

  function automatic int low(logic [3:0] v);
    for (int i = 0; i < 4; i++) if (v[i]) return i;
    return 0;
  endfunction

  task automatic expect_grp(logic [3:0] ec, logic [3:0] edrop, gkind_e k, string what);
    #1;
    checks++;
    if (c !== ec || drop !== edrop || (ec != 0 && gk[low(ec)] !== k)) begin
      failures++;
      $display("FAIL %s: c=%b drop=%b, expected c=%b drop=%b", what, c, drop, ec, edrop);
    end
  endtask

  dec_t nop;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nop = d(OP_ADD, 0, 20, 21, 22);
    // chain at slot 0 (PERM rs,rc1,rd / PERM rd,rc2,rd / PERM rd,rc3,rd)
    dec = {nop, d(OP_PERMB, 2, 7, 4, 7), d(OP_PERMB, 1, 7, 3, 7), d(OP_PERMB, 0, 1, 2, 7)};
    expect_grp(4'b0001, 4'b0100, GK_PERM, "chain at 0");
    dec = {d(OP_PERMI, 2, 7, 4, 7), d(OP_PERMI, 1, 7, 3, 7), d(OP_PERMI, 0, 1, 2, 7), nop};
    expect_grp(4'b0010, 4'b1000, GK_PERM, "chain at 1");
    dec = {nop, d(OP_PERMB, 2, 7, 4, 7), d(OP_PERMI, 1, 7, 3, 7), d(OP_PERMB, 0, 1, 2, 7)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "mixed opcodes");
    dec = {nop, d(OP_PERMB, 1, 7, 4, 7), d(OP_PERMB, 2, 7, 3, 7), d(OP_PERMB, 0, 1, 2, 7)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "stage pairs out of order");
    dec = {nop, d(OP_PERMB, 2, 5, 4, 7), d(OP_PERMB, 1, 7, 3, 7), d(OP_PERMB, 0, 1, 2, 7)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "no serial dependency");
    dec = {nop, d(OP_PERMB, 2, 7, 7, 7), d(OP_PERMB, 1, 7, 3, 7), d(OP_PERMB, 0, 1, 2, 7)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "config reads chain result");
    dec = {nop, d(OP_PERMB, 2, 8, 4, 9), d(OP_PERMB, 1, 7, 3, 8), d(OP_PERMB, 0, 1, 2, 7)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "different destinations");
    dec = {d(OP_PERMB, 1, 7, 3, 7), d(OP_PERMB, 0, 1, 2, 7), nop, nop};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "chain cut by block end");
    dec = {nop, d(OP_PERMB, 2, 7, 4, 7), d(OP_PERMB, 1, 7, 3, 7), d(OP_PERMB, 0, 1, 2, 7)};
    dec[2].valid = 1'b0;
    expect_grp(4'b0000, 4'b0000, GK_NONE, "invalid slot");
    // MUL,L / MUL,H
    dec = {nop, nop, d(OP_MULH, 0, 1, 2, 4), d(OP_MULL, 0, 1, 2, 3)};
    expect_grp(4'b0001, 4'b0000, GK_MUL64, "mul pair");
    dec = {nop, d(OP_MULH, 0, 1, 2, 4), d(OP_MULL, 0, 1, 2, 3), nop};
    expect_grp(4'b0010, 4'b0000, GK_MUL64, "mul pair at 1");
    dec = {nop, nop, d(OP_MULH, 0, 1, 5, 4), d(OP_MULL, 0, 1, 2, 3)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "mul different sources");
    dec = {nop, nop, d(OP_MULH, 0, 1, 2, 3), d(OP_MULL, 0, 1, 2, 3)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "mul same destination");
    dec = {nop, nop, d(OP_MULH, 0, 1, 1, 4), d(OP_MULL, 0, 1, 1, 1)};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "mul RAW");
    // PMIN / PMAX
    dec = {d(OP_PMAX, 0, 5, 6, 9), d(OP_PMIN, 0, 3, 4, 8), nop, nop};
    expect_grp(4'b0100, 4'b0000, GK_MINMAX, "min/max pair");
    dec = {d(OP_PMAX, 0, 8, 6, 9), d(OP_PMIN, 0, 3, 4, 8), nop, nop};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "min/max RAW");
    dec = {d(OP_PMIN, 0, 5, 6, 9), d(OP_PMAX, 0, 3, 4, 8), nop, nop};
    expect_grp(4'b0000, 4'b0000, GK_NONE, "max before min");
    // two groups in one block
    dec = {d(OP_PMAX, 0, 5, 6, 9), d(OP_PMIN, 0, 3, 4, 8), d(OP_MULH, 0, 1, 2, 4), d(OP_MULL, 0, 1, 2, 3)};
    expect_grp(4'b0101, 4'b0000, GK_MUL64, "two groups");
    checks++;
    if (gk[2] !== GK_MINMAX) begin failures++; $display("FAIL second group kind"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_group_check: directed cases for method-2 group checking: every legal
// gs/gc pair kind, and pairs that must be refused (missing gc, hazards,
// mismatched opcodes, block end), with the flag for malformed group bits.
module tb_group_check;
  import momr_pkg::*;
  dec_t   [FETCH_W-1:0] dec;
  logic   [FETCH_W-1:0] c, bad;
  gkind_e [FETCH_W-1:0] gk;
  int checks = 0, failures = 0;

  group_check dut (.dec(dec), .c(c), .gk(gk), .bad(bad));

  function automatic dec_t d(opcode_e op, int gs, int gc, int rs1, int rs2, int rd);
    dec_t x;
    x = '0;
    x.valid = 1; x.op = op; x.gs = gs[0]; x.gc = gc[0];
    x.rs1 = 5'(rs1); x.rs2 = 5'(rs2); x.rd = 5'(rd);
    x.use1 = 1; x.use2 = 1; x.wr = 1;
    x.is_perm = op == OP_PERMB || op == OP_PERMI;
    return x;
  endfunction

  function automatic int low(logic [3:0] v);
    for (int i = 0; i < 4; i++) if (v[i]) return i;
    return 0;
  endfunction

  task automatic expect_grp(logic [3:0] ec, gkind_e k, logic [3:0] ebad, string what);
    #1;
    checks++;
    if (c !== ec || bad !== ebad || (ec != 0 && gk[low(ec)] !== k)) begin
      failures++;
      $display("FAIL %s: c=%b bad=%b, expected c=%b bad=%b", what, c, bad, ec, ebad);
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
    nop = d(OP_ADD, 0, 0, 20, 21, 22);
    dec = {nop, nop, d(OP_PERMB, 0, 1, 3, 4, 7), d(OP_PERMB, 1, 0, 1, 2, 7)};
    expect_grp(4'b0001, GK_PERM, 4'b0000, "PERM,gs/PERM,gc");
    dec = {nop, nop, d(OP_PERMB, 0, 1, 7, 4, 7), d(OP_PERMB, 1, 0, 1, 2, 7)};
    expect_grp(4'b0000, GK_NONE, 4'b0011, "PERM group with RAW");
    dec = {nop, nop, d(OP_PERMI, 0, 1, 3, 4, 7), d(OP_PERMB, 1, 0, 1, 2, 7)};
    expect_grp(4'b0000, GK_NONE, 4'b0011, "PERM opcodes differ");
    dec = {nop, nop, d(OP_PERMB, 0, 1, 3, 4, 8), d(OP_PERMB, 1, 0, 1, 2, 7)};
    expect_grp(4'b0000, GK_NONE, 4'b0011, "PERM destinations differ");
    dec = {nop, d(OP_MULH, 0, 1, 1, 2, 4), d(OP_MULL, 1, 0, 1, 2, 3), nop};
    expect_grp(4'b0010, GK_MUL64, 4'b0000, "MUL,L,gs/MUL,H,gc");
    dec = {d(OP_MULL, 0, 1, 5, 6, 4), d(OP_MULL, 1, 0, 1, 2, 3), nop, nop};
    expect_grp(4'b0100, GK_MUL128L, 4'b0000, "128-bit low group");
    dec = {d(OP_MULH, 0, 1, 5, 6, 4), d(OP_MULH, 1, 0, 1, 2, 3), nop, nop};
    expect_grp(4'b0100, GK_MUL128H, 4'b0000, "128-bit high group");
    dec = {d(OP_MULH, 0, 1, 5, 6, 4), d(OP_MULH, 1, 0, 1, 2, 3), d(OP_MULL, 0, 1, 5, 6, 2), d(OP_MULL, 1, 0, 1, 2, 1)};
    expect_grp(4'b0101, GK_MUL128L, 4'b0000, "full 128x128 product");
    dec = {d(OP_MULH, 0, 1, 3, 6, 4), d(OP_MULH, 1, 0, 1, 2, 3), nop, nop};
    expect_grp(4'b0000, GK_NONE, 4'b1100, "MUL group with RAW");
    dec = {d(OP_MULH, 0, 1, 5, 6, 3), d(OP_MULH, 1, 0, 1, 2, 3), nop, nop};
    expect_grp(4'b0000, GK_NONE, 4'b1100, "MUL group same destination");
    dec = {d(OP_PMAX, 0, 1, 5, 6, 4), d(OP_PMIN, 1, 0, 1, 2, 3), nop, nop};
    expect_grp(4'b0100, GK_MINMAX, 4'b0000, "PMIN,gs/PMAX,gc");
    dec = {d(OP_PMIN, 0, 1, 5, 6, 4), d(OP_PMAX, 1, 0, 1, 2, 3), nop, nop};
    expect_grp(4'b0000, GK_NONE, 4'b1100, "PMAX,gs/PMIN,gc");
    dec = {d(OP_PERMB, 1, 0, 1, 2, 7), nop, nop, nop};
    expect_grp(4'b0000, GK_NONE, 4'b1000, "gs at block end");
    dec = {nop, nop, d(OP_ADD, 0, 0, 3, 4, 7), d(OP_PERMB, 1, 0, 1, 2, 7)};
    expect_grp(4'b0000, GK_NONE, 4'b0001, "gs without gc");
    dec = {nop, nop, d(OP_PERMB, 0, 1, 3, 4, 7), nop};
    expect_grp(4'b0000, GK_NONE, 4'b0010, "gc without gs");
    dec = {nop, nop, d(OP_PERMB, 0, 1, 3, 4, 7), d(OP_PERMB, 1, 0, 1, 2, 7)};
    dec[1].valid = 1'b0;
    expect_grp(4'b0000, GK_NONE, 4'b0001, "gc slot not valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

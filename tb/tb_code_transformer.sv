// tb_code_transformer: checks the 3-to-2 PERM transformation (second
// instruction reads rc3 in place of its data operand, third dropped, C-bit on
// the first), the method-2 operand swap, pass-through of other groups, the
// no-grouping mode and the packing of valid slots.
module tb_code_transformer;
  import momr_pkg::*;
  gmode_e                  mode;
  dec_t      [FETCH_W-1:0] dec;
  logic      [FETCH_W-1:0] c, drop;
  gkind_e    [FETCH_W-1:0] gk;
  iw_entry_t [FETCH_W-1:0] out;
  logic [$clog2(FETCH_W+1)-1:0] cnt;
  int checks = 0, failures = 0;

  code_transformer dut (.*);

  function automatic dec_t d(opcode_e op, int rs1, int rs2, int rd);
    dec_t x;
    x = '0;
    x.valid = 1; x.op = op; x.rs1 = 5'(rs1); x.rs2 = 5'(rs2); x.rd = 5'(rd); x.wr = 1;
    return x;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // method 1: PERM rs=1,rc1=2,rd=7 / PERM 7,3,7 / PERM 7,4,7 / ADD 10,11,12
    mode = GM_METHOD1;
    dec  = {d(OP_ADD, 10, 11, 12), d(OP_PERMB, 7, 4, 7), d(OP_PERMB, 7, 3, 7), d(OP_PERMB, 1, 2, 7)};
    c    = 4'b0001; drop = 4'b0100; gk = {GK_NONE, GK_NONE, GK_NONE, GK_PERM};
    #1;
    chk(cnt == 3, "method 1 count");
    chk(out[0].c && out[0].gk == GK_PERM && out[0].d.rs1 == 1 && out[0].d.rs2 == 2 && out[0].d.rd == 7, "first instruction");
    chk(!out[1].c && out[1].d.rs1 == 4 && out[1].d.rs2 == 3 && out[1].d.rd == 7, "second reads rc3, rc2");
    chk(!out[2].c && out[2].d.op == OP_ADD && out[2].d.rd == 12, "packed follower");
    // grouping off: everything passes unchanged
    mode = GM_NONE;
    #1;
    chk(cnt == 4 && out[0].c == 0 && out[1].d.rs1 == 7 && out[2].d.rs2 == 4, "grouping off");
    // method 2: PERM,gs 1,2,7 / PERM,gc 3,4,7 -> tail reads 4,3
    mode = GM_METHOD2;
    dec  = {d(OP_ADD, 10, 11, 12), d(OP_ADD, 13, 14, 15), d(OP_PERMB, 3, 4, 7), d(OP_PERMB, 1, 2, 7)};
    c    = 4'b0001; drop = 4'b0100; gk = {GK_NONE, GK_NONE, GK_NONE, GK_PERM};
    #1;
    chk(cnt == 4, "method 2 keeps all (drop ignored)");
    chk(out[0].c && out[1].d.rs1 == 4 && out[1].d.rs2 == 3, "method 2 operand swap");
    // MUL group passes unchanged apart from C
    dec  = {d(OP_ADD, 10, 11, 12), d(OP_ADD, 13, 14, 15), d(OP_MULL, 5, 6, 4), d(OP_MULL, 1, 2, 3)};
    c    = 4'b0001; drop = 4'b0000; gk = {GK_NONE, GK_NONE, GK_NONE, GK_MUL128L};
    #1;
    chk(out[0].c && out[0].gk == GK_MUL128L && out[1].d.rs1 == 5 && out[1].d.rs2 == 6, "MUL group unchanged");
    // packing around invalid slots
    mode = GM_NONE;
    dec[0].valid = 0; dec[2].valid = 0;
    #1;
    chk(cnt == 2 && out[0].d.rd == 4 && out[1].d.rd == 12, "packing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

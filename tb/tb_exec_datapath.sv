// tb_exec_datapath: drives issue grants into the datapath by hand and
// checks the register file afterwards against values computed here:
// dual ALU issue, a PERM group (data + 3 configuration words over all four
// read ports), a single PERM on slot 2, a 128-bit (4,2) multiply group (high
// half) after exactly MUL_LAT cycles, a (2,2) MUL64 group, a PMIN/PMAX
// group, and a back-to-back dependent pair that must take its operand from
// the write port.
module tb_exec_datapath;
  import momr_pkg::*;
  localparam int MUL_LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      s1_valid, s1_pair, s2_valid, ld_we, bypassed;
  iw_entry_t s1_head, s1_tail, s2_ent;
  reg_t      ld_addr, dbg_addr;
  word_t     ld_data, dbg_data;
  logic [1:0] wb_valid;
  word_t     r [NREG];
  int checks = 0, failures = 0;

  exec_datapath #(.MUL_LAT(MUL_LAT)) dut (.*);

  function automatic word_t net(word_t x, word_t c0, word_t c1, word_t c2, logic iv);
    word_t v, nv;
    word_t c [3];
    c[0] = c0; c[1] = c1; c[2] = c2;
    v = x;
    for (int s = 0; s < 6; s++) begin
      int lg, d;
      lg = iv ? s : 5 - s;
      d  = 1 << lg;
      nv = v;
      for (int p = 0; p < 64; p++)
        if (((p >> lg) & 1) == 0 && c[s/2][(s%2)*32 + (((p >> (lg + 1)) << lg) | (p & (d - 1)))]) begin
          nv[p] = v[p + d]; nv[p + d] = v[p];
        end
      v = nv;
    end
    return v;
  endfunction

  function automatic iw_entry_t e(opcode_e op, int rs1, int rs2, int rd, int sp = 0, logic c = 0, gkind_e gk = GK_NONE);
    iw_entry_t x;
    x = '0;
    x.d.valid = 1; x.d.op = op; x.d.rs1 = 5'(rs1); x.d.rs2 = 5'(rs2); x.d.rd = 5'(rd); x.d.sp = 2'(sp);
    x.d.use1 = 1; x.d.use2 = 1; x.d.wr = 1;
    x.d.is_perm = op == OP_PERMB || op == OP_PERMI;
    x.d.fu = (op == OP_MULL || op == OP_MULH) ? FU_MUL : x.d.is_perm ? FU_PU : FU_ALU;
    x.c = c; x.gk = gk;
    return x;
  endfunction

  task automatic issue(logic v1, logic pair, iw_entry_t h, iw_entry_t t, logic v2, iw_entry_t s);
    s1_valid = v1; s1_pair = pair; s1_head = h; s1_tail = t; s2_valid = v2; s2_ent = s;
    @(negedge clk);
    s1_valid = 0; s1_pair = 0; s2_valid = 0;
  endtask

  task automatic expect_reg(int a, word_t v, string what);
    dbg_addr = 5'(a);
    #1;
    checks++;
    if (dbg_data !== v) begin failures++; $display("FAIL %s: r%0d = %h, expected %h", what, a, dbg_data, v); end
  endtask

  function automatic word_t pm(word_t a, word_t b, logic mx);
    word_t y;
    for (int k = 0; k < 4; k++)
      y[16*k +: 16] = (mx ^ (a[16*k +: 16] < b[16*k +: 16])) ? a[16*k +: 16] : b[16*k +: 16];
    return y;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int byp_seen = 0;
  always @(posedge clk) if (bypassed) byp_seen++;

  iw_entry_t nop;
  initial begin
    logic [255:0] p;
    nop = '0;
    s1_valid = 0; s1_pair = 0; s2_valid = 0; s1_head = '0; s1_tail = '0; s2_ent = '0;
    ld_we = 0; ld_addr = '0; ld_data = '0; dbg_addr = '0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      r[i] = {$urandom, $urandom};
      ld_we = 1; ld_addr = 5'(i); ld_data = r[i];
      @(negedge clk);
    end
    ld_we = 0;
    // dual ALU issue
    issue(1, 0, e(OP_ADD, 1, 2, 10), nop, 1, e(OP_XOR, 3, 4, 11));
    @(negedge clk);
    expect_reg(10, r[1] + r[2], "ALU1");
    expect_reg(11, r[3] ^ r[4], "ALU2");
    // PERM group: head PERMB 1,2 -> 12; tail reads rc3 = r4, rc2 = r3
    issue(1, 1, e(OP_PERMB, 1, 2, 12, 0, 1, GK_PERM), e(OP_PERMB, 4, 3, 12), 0, nop);
    @(negedge clk);
    expect_reg(12, net(r[1], r[2], r[3], r[4], 0), "PERM group");
    // single PERMI, stage pair 1, on slot 2 next to an ALU op
    issue(1, 0, e(OP_SUB, 5, 6, 13), nop, 1, e(OP_PERMI, 7, 1, 14, 1));
    @(negedge clk);
    expect_reg(13, r[5] - r[6], "ALU beside PU");
    expect_reg(14, net(r[7], 0, r[1], 0, 1), "single PERMI");
    // 128-bit high-half group
    p = 256'({r[3], r[1]}) * 256'({r[4], r[2]});
    issue(1, 1, e(OP_MULH, 1, 2, 15, 0, 1, GK_MUL128H), e(OP_MULH, 3, 4, 16), 0, nop);
    repeat (MUL_LAT - 1) @(negedge clk);
    expect_reg(15, 0, "MUL result not early");
    @(negedge clk);
    expect_reg(15, p[191:128], "MUL128 high, low word");
    expect_reg(16, p[255:192], "MUL128 high, high word");
    // (2,2) MUL64 group
    p = 256'(r[5]) * 256'(r[6]);
    issue(1, 1, e(OP_MULL, 5, 6, 17, 0, 1, GK_MUL64), e(OP_MULH, 5, 6, 18), 0, nop);
    repeat (MUL_LAT) @(negedge clk);
    expect_reg(17, p[63:0], "MUL64 low");
    expect_reg(18, p[127:64], "MUL64 high");
    // PMIN/PMAX group
    issue(1, 1, e(OP_PMIN, 1, 2, 19, 0, 1, GK_MINMAX), e(OP_PMAX, 3, 4, 20), 0, nop);
    @(negedge clk);
    expect_reg(19, pm(r[1], r[2], 0), "PMIN");
    expect_reg(20, pm(r[3], r[4], 1), "PMAX");
    // back-to-back dependency through the bypass
    issue(1, 0, e(OP_ADD, 1, 2, 21), nop, 0, nop);
    issue(1, 0, e(OP_ADD, 21, 21, 22), nop, 1, e(OP_SLL, 21, 3, 23));
    @(negedge clk);
    expect_reg(22, 2 * (r[1] + r[2]), "bypassed operand, slot 1");
    expect_reg(23, (r[1] + r[2]) << r[3][5:0], "bypassed operand, slot 2");
    checks++;
    if (byp_seen == 0) begin failures++; $display("FAIL bypass never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

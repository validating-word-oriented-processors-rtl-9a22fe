// tb_issue_window: directed scenarios for the issue window. Each
// instruction gets its own destination register, and the cycle in which it
// issues is recorded; the checks compare those cycles:
//   independent instructions issue together (dual issue);
//   a dependent ALU instruction issues 1 cycle after its producer, a
//   dependent one after a multiply MUL_LAT cycles after it;
//   a group issues as one grant, only once all four of its operands are
//   ready, and its head never issues alone;
//   a younger writer waits for an older reader of the same register (WAR);
//   in the cycle before a multiplier write-back only multiplies issue;
//   the window refuses a block when fewer than FETCH_W entries are free.
module tb_issue_window;
  import momr_pkg::*;
  localparam int IW = 16, MUL_LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid, in_ready, s1_valid, s1_pair, s2_valid, empty, busy, wb_hold;
  logic [$clog2(FETCH_W+1)-1:0] in_cnt;
  iw_entry_t [FETCH_W-1:0] in_ent;
  iw_entry_t s1_head, s1_tail, s2_ent;
  int checks = 0, failures = 0;

  issue_window #(.IW(IW), .MUL_LAT(MUL_LAT)) dut (.*);

  int cyc = 0;
  int hold_seen = 0, hold_bad = 0;
  always @(posedge clk)
    if (rst_n && wb_hold) begin
      hold_seen++;
      if ((s1_valid && s1_head.d.fu != FU_MUL) || (s2_valid && s2_ent.d.fu != FU_MUL)) hold_bad++;
    end
  int icyc [int];        // issue cycle by destination register
  int pair_seen [int];   // head rd -> tail rd issued in the same grant
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (s1_valid) icyc[s1_head.d.rd] = cyc;
      if (s1_valid && s1_pair) begin icyc[s1_tail.d.rd] = cyc; pair_seen[s1_head.d.rd] = s1_tail.d.rd; end
      if (s2_valid) icyc[s2_ent.d.rd] = cyc;
    end
  end

  function automatic iw_entry_t e(opcode_e op, int rs1, int rs2, int rd, logic c = 0, gkind_e gk = GK_NONE);
    iw_entry_t x;
    x = '0;
    x.d.valid = 1; x.d.op = op; x.d.rs1 = 5'(rs1); x.d.rs2 = 5'(rs2); x.d.rd = 5'(rd);
    x.d.use1 = 1; x.d.use2 = 1; x.d.wr = 1;
    x.d.is_perm = op == OP_PERMB || op == OP_PERMI;
    x.d.fu = (op == OP_MULL || op == OP_MULH) ? FU_MUL : x.d.is_perm ? FU_PU : FU_ALU;
    x.c = c; x.gk = gk;
    return x;
  endfunction

  task automatic restart();
    @(negedge clk);
    rst_n = 0; in_valid = 0;
    @(negedge clk);
    rst_n = 1;
    icyc.delete(); pair_seen.delete();
  endtask

  task automatic send(iw_entry_t a, iw_entry_t b, iw_entry_t c, iw_entry_t d, int n);
    in_ent = {d, c, b, a}; in_cnt = 3'(n); in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    repeat (30) @(negedge clk);
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int at(int r);
    return icyc.exists(r) ? icyc[r] : -1000;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iw_entry_t nop;
  initial begin
    nop = '0; in_valid = 0; in_ent = '0; in_cnt = '0;
    // 1. independent pair, then a dependent ALU chain
    restart();
    send(e(OP_ADD, 1, 2, 10), e(OP_XOR, 3, 4, 11), e(OP_ADD, 10, 1, 12), e(OP_SUB, 12, 12, 13), 4);
    drain();
    chk(at(10) == at(11), "independent instructions dual-issue");
    chk(at(12) == at(10) + 1, "ALU result used next cycle");
    chk(at(13) == at(12) + 1, "chain continues");
    chk(empty && !busy, "window drains");
    // 2. multiply latency and write-back hold
    restart();
    send(e(OP_MULL, 1, 2, 10), e(OP_ADD, 10, 3, 11), nop, nop, 2);
    drain();
    chk(at(11) - at(10) == MUL_LAT, "multiply-to-use latency");
    restart();
    send(e(OP_MULL, 1, 2, 10), e(OP_ADD, 5, 5, 20), e(OP_ADD, 20, 5, 21), e(OP_ADD, 21, 5, 22), 4);
    send(e(OP_ADD, 22, 5, 23), e(OP_ADD, 23, 5, 24), nop, nop, 2);
    drain();
    chk(at(23) == at(10) + MUL_LAT - 2, "dependent chain runs one per cycle");
    chk(at(24) == at(10) + MUL_LAT, "ALU issue held in the cycle before the multiplier write-back");
    chk(hold_seen > 0 && hold_bad == 0, "only multiplies issue during a write-back hold");
    // 3. a group waits for all four operands; its head is ready first
    restart();
    send(e(OP_MULL, 1, 2, 9), nop, nop, nop, 1);
    send(e(OP_PERMB, 1, 2, 10, 1, GK_PERM), e(OP_PERMB, 9, 3, 10), e(OP_ADD, 4, 4, 11), nop, 3);
    drain();
    chk(pair_seen.exists(10), "group issued as one grant");
    chk(at(10) - at(9) == MUL_LAT, "group waits for the tail operand");
    chk(at(11) < at(10), "younger independent instruction overtakes the waiting group");
    // 4. WAR: a younger writer of r9 waits for the older reader of r9
    restart();
    send(e(OP_MULL, 1, 2, 8), e(OP_ADD, 8, 9, 12), e(OP_ADD, 3, 4, 9), nop, 3);
    drain();
    chk(at(9) >= at(12), "WAR respected");
    // 5. window full: 6 blocks of 4 dependent-on-multiply instructions
    restart();
    begin
      int refused;
      refused = 0;
      send(e(OP_MULL, 1, 2, 5), nop, nop, nop, 1);
      for (int b = 0; b < 5; b++) begin
        in_ent = {e(OP_ADD, 5, 5, 4*b+12), e(OP_ADD, 5, 5, 4*b+13), e(OP_ADD, 5, 5, 4*b+14), e(OP_ADD, 5, 5, 4*b+15)};
        for (int k = 0; k < 4; k++) in_ent[k].d.rd = 5'(12 + (4*b + k) % 16);
        in_cnt = 3'd4; in_valid = 1;
        @(posedge clk);
        if (!in_ready) refused++;
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
      chk(refused > 0, "window full back-pressure");
    end
    drain();
    chk(empty, "window empties after full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

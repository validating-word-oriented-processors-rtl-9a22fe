// tb_momr_core: end-to-end test of the MOMR core.
//
// Builds programs of fetch blocks, runs each with the three grouping modes
// (none, method 1, method 2), and compares the final register file with an
// instruction-level reference model written here independently of the RTL
// (its own network model, its own group rules). Program classes:
//   1. one full arbitrary 64-bit permutation written as 6 PERM instructions
//      (3 butterfly + 3 inverse butterfly); method 1 must issue it in 2
//      cycles, the baseline in 6;
//   2. a multiply followed by a dependent add: issue distance = MUL_LAT;
//   3. method-2 code with gs/gc groups: PERM pairs, MUL,L/MUL,H (2,2), 128-bit
//      MUL,L and MUL,H (4,2) groups, PMIN/PMAX, plus malformed groups;
//   4. long random programs mixing everything, which also fill the window.
// Every mechanism of the core is counted and must occur at least once.
module tb_momr_core;
  import momr_pkg::*;

  localparam int MAXB    = 400;
  localparam int MUL_LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  gmode_e                   grp_mode;
  logic                     fb_valid, fb_ready, ld_we, idle;
  logic [FETCH_W-1:0][31:0] fb_instr;
  logic [FETCH_W-1:0]       fb_mask;
  reg_t                     ld_addr, dbg_addr;
  word_t                    ld_data, dbg_data;
  stats_t                   stats;

  momr_core dut (.*);

  int checks = 0, failures = 0;

  // ---------------- program store ----------------
  logic [31:0] prog [MAXB][FETCH_W];
  logic [FETCH_W-1:0] pmask [MAXB];
  int nblk;
  int slot;

  function automatic logic [31:0] mk(opcode_e op, logic gs, logic gc, int sp, int rs1, int rs2, int rd);
    return {op, gs, gc, 2'(sp), 7'd0, 5'(rs1), 5'(rs2), 5'(rd)};
  endfunction

  task automatic clear_prog();
    nblk = 0; slot = 0;
    for (int b = 0; b < MAXB; b++) begin pmask[b] = '0; for (int s = 0; s < FETCH_W; s++) prog[b][s] = '0; end
  endtask
  task automatic emit(logic [31:0] w);
    if (slot == FETCH_W) begin slot = 0; nblk++; end
    prog[nblk][slot] = w; pmask[nblk][slot] = 1'b1; slot++;
  endtask
  task automatic new_block();   // start the next instruction in a fresh block
    if (slot != 0) begin slot = 0; nblk++; end
  endtask
  function automatic int nblocks();
    return (slot == 0) ? nblk : nblk + 1;
  endfunction

  // ---------------- reference model ----------------
  word_t init_rf [NREG];
  word_t ref_rf  [NREG];

  function automatic word_t net(word_t x, word_t c0, word_t c1, word_t c2, logic inv);
    word_t cw [3];
    word_t v;
    cw[0] = c0; cw[1] = c1; cw[2] = c2;
    v = x;
    for (int s = 0; s < 6; s++) begin
      int lg, d, j;
      word_t nv;
      lg = inv ? s : 5 - s;
      d  = 1 << lg;
      nv = v;
      for (int p = 0; p < 64; p++) begin
        if (((p >> lg) & 1) == 0) begin
          j = ((p >> (lg + 1)) << lg) | (p & (d - 1));   // switch number in the stage
          if (cw[s/2][(s%2)*32 + j]) begin
            nv[p] = v[p + d]; nv[p + d] = v[p];
          end
        end
      end
      v = nv;
    end
    return v;
  endfunction

  function automatic word_t sub16(word_t a, word_t b, logic mx);
    word_t y;
    for (int k = 0; k < 4; k++) begin
      logic [15:0] x0, x1;
      x0 = a[16*k +: 16]; x1 = b[16*k +: 16];
      y[16*k +: 16] = mx ? ((x0 > x1) ? x0 : x1) : ((x0 < x1) ? x0 : x1);
    end
    return y;
  endfunction

  function automatic void ref_exec(logic [31:0] w);
    opcode_e op;
    word_t a, b, y;
    logic [127:0] p;
    word_t c [3];
    int sp;
    if (w[31:26] > 6'(OP_PERMI)) return;
    op = opcode_e'(w[31:26]);
    a = ref_rf[w[14:10]]; b = ref_rf[w[9:5]];
    sp = int'(w[23:22]);
    p = 128'(a) * 128'(b);
    case (op)
      OP_NOP:  return;
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[5:0];
      OP_SRL:  y = a >> b[5:0];
      OP_PMIN: y = sub16(a, b, 1'b0);
      OP_PMAX: y = sub16(a, b, 1'b1);
      OP_MULL: y = p[63:0];
      OP_MULH: y = p[127:64];
      default: begin
        c[0] = 0; c[1] = 0; c[2] = 0;
        if (sp < 3) c[sp] = b;
        y = net(a, c[0], c[1], c[2], op == OP_PERMI);
      end
    endcase
    ref_rf[w[4:0]] = y;
  endfunction

  // Method-2 group rules, as the ISA defines them.
  function automatic int grp2(logic [31:0] x, logic [31:0] z);
    logic gsx, gcz;
    opcode_e ox, oz;
    if (x[31:26] > 6'(OP_PERMI) || z[31:26] > 6'(OP_PERMI)) return 0;
    ox = opcode_e'(x[31:26]); oz = opcode_e'(z[31:26]);
    gsx = x[25] && !x[24]; gcz = z[24] && !z[25];
    if (!gsx || !gcz) return 0;
    if (x[4:0] == z[14:10] || x[4:0] == z[9:5]) return 0;
    if ((ox == OP_PERMB || ox == OP_PERMI) && oz == ox) return (x[4:0] == z[4:0]) ? 1 : 0;
    if (x[4:0] == z[4:0]) return 0;
    if (ox == OP_MULL && oz == OP_MULH && x[14:10] == z[14:10] && x[9:5] == z[9:5]) return 2;
    if (ox == OP_MULL && oz == OP_MULL) return 3;
    if (ox == OP_MULH && oz == OP_MULH) return 4;
    if (ox == OP_PMIN && oz == OP_PMAX) return 5;
    return 0;
  endfunction

  function automatic void ref_run(gmode_e m);
    for (int r = 0; r < NREG; r++) ref_rf[r] = init_rf[r];
    for (int b = 0; b < nblocks(); b++) begin
      int s;
      s = 0;
      while (s < FETCH_W) begin
        int k;
        logic [31:0] x, z;
        x = prog[b][s];
        z = (s + 1 < FETCH_W) ? prog[b][s+1] : 32'd0;
        k = 0;
        if (m == GM_METHOD2 && s + 1 < FETCH_W && pmask[b][s] && pmask[b][s+1]) k = grp2(x, z);
        if (!pmask[b][s]) begin
          s++;
        end else if (k == 0) begin
          ref_exec(x); s++;
        end else begin
          word_t a0, b0, a1, b1;
          logic [255:0] pp;
          a0 = ref_rf[x[14:10]]; b0 = ref_rf[x[9:5]];
          a1 = ref_rf[z[14:10]]; b1 = ref_rf[z[9:5]];
          case (k)
            1: ref_rf[z[4:0]] = net(a0, b0, a1, b1, x[31:26] == 6'(OP_PERMI));
            2: begin pp = 256'(a0) * 256'(b0);
                     ref_rf[x[4:0]] = pp[63:0]; ref_rf[z[4:0]] = pp[127:64]; end
            3, 4: begin pp = 256'({a1, a0}) * 256'({b1, b0});
                     if (k == 3) begin ref_rf[x[4:0]] = pp[63:0];    ref_rf[z[4:0]] = pp[127:64];  end
                     else        begin ref_rf[x[4:0]] = pp[191:128]; ref_rf[z[4:0]] = pp[255:192]; end
                  end
            default: begin ref_rf[x[4:0]] = sub16(a0, b0, 1'b0); ref_rf[z[4:0]] = sub16(a1, b1, 1'b1); end
          endcase
          s += 2;
        end
      end
    end
  endfunction

  // ---------------- issue monitor ----------------
  int cyc = 0, first_issue, last_issue;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.s1_valid || dut.s2_valid) begin
      if (first_issue < 0) first_issue = cyc;
      last_issue = cyc;
    end
  end

  // ---------------- running a program ----------------
  int run_cycles;
  // totals over all runs of each mechanism
  int n_grp_perm, n_folded, n_grp_mul, n_grp_mm, n_bad, n_grp_iss, n_dual, n_pu, n_mul,
      n_full, n_wbblk, n_byp, n_mul128;
  initial begin
    n_grp_perm = 0; n_folded = 0; n_grp_mul = 0; n_grp_mm = 0; n_bad = 0; n_grp_iss = 0;
    n_dual = 0; n_pu = 0; n_mul = 0; n_full = 0; n_wbblk = 0; n_byp = 0; n_mul128 = 0;
  end
  always @(posedge clk)
    if (dut.s1_valid && dut.s1_pair &&
        (dut.s1_head.gk == GK_MUL128L || dut.s1_head.gk == GK_MUL128H)) n_mul128++;

  task automatic run(gmode_e m, string name);
    int b, t0;
    // reset, load registers
    @(negedge clk);
    rst_n = 1'b0; fb_valid = 1'b0; ld_we = 1'b0; grp_mode = m;
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NREG; r++) begin
      ld_we = 1'b1; ld_addr = 5'(r); ld_data = init_rf[r];
      @(negedge clk);
    end
    ld_we = 1'b0;
    first_issue = -1; last_issue = -1;
    t0 = cyc;
    b = 0;
    while (b < nblocks()) begin
      fb_valid = 1'b1;
      for (int s = 0; s < FETCH_W; s++) fb_instr[s] = prog[b][s];
      fb_mask = pmask[b];
      @(posedge clk);
      if (fb_ready) b++;
      @(negedge clk);
    end
    fb_valid = 1'b0;
    @(negedge clk);
    while (!idle) @(negedge clk);
    run_cycles = cyc - t0;
    n_grp_perm += int'(stats.grp_perm);  n_folded += int'(stats.folded);
    n_grp_mul  += int'(stats.grp_mul);   n_grp_mm += int'(stats.grp_minmax);
    n_bad      += int'(stats.bad_group); n_grp_iss += int'(stats.grp_issued);
    n_dual     += int'(stats.dual_issued); n_pu += int'(stats.pu_ops);
    n_mul      += int'(stats.mul_ops);   n_full += int'(stats.window_full);
    n_wbblk    += int'(stats.wb_block);  n_byp += int'(stats.bypass);
    ref_run(m);
    for (int r = 0; r < NREG; r++) begin
      dbg_addr = 5'(r);
      #1;
      checks++;
      if (dbg_data !== ref_rf[r]) begin
        failures++;
        if (failures < 10) $display("FAIL %s mode %0d r%0d = %h, expected %h", name, m, r, dbg_data, ref_rf[r]);
      end
    end
  endtask

  task automatic rand_init();
    for (int r = 0; r < NREG; r++) init_rf[r] = {$urandom, $urandom};
  endtask

  function automatic int rr(int n);
    return int'($urandom % n);
  endfunction

  task automatic rand_prog(int nins, logic with_gs);
    opcode_e ops [14];
    ops = '{OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL,
            OP_PMIN, OP_PMAX, OP_MULL, OP_MULH, OP_PERMB, OP_PERMI};
    for (int i = 0; i < nins; i++) begin
      int kind, rd, rc;
      kind = rr(10);
      rd = rr(12); rc = rr(12);
      if (kind == 0) begin                      // PERM chain of 3
        opcode_e o;
        int st;
        o = rr(2) ? OP_PERMB : OP_PERMI;
        st = rr(12);
        if (rr(2)) new_block();
        emit(mk(o, 0, 0, 0, st, (rd + 1 + rr(11)) % 12, rd));
        emit(mk(o, 0, 0, 1, rd, (rd + 1 + rr(11)) % 12, rd));
        emit(mk(o, 0, 0, 2, rd, (rd + 1 + rr(11)) % 12, rd));
      end else if (kind == 1) begin             // MUL,L / MUL,H pair
        int a, bb, rh;
        a = rr(12); bb = rr(12); rh = (rd + 1 + rr(11)) % 12;
        emit(mk(OP_MULL, with_gs, 0, 0, a, bb, rd));
        emit(mk(OP_MULH, 0, with_gs, 0, a, bb, rh));
      end else if (kind == 2) begin             // PMIN / PMAX pair
        int rh;
        rh = (rd + 1 + rr(11)) % 12;
        emit(mk(OP_PMIN, with_gs, 0, 0, rr(12), rr(12), rd));
        emit(mk(OP_PMAX, 0, with_gs, 0, rr(12), rr(12), rh));
      end else if (kind == 3 && with_gs) begin  // method-2 PERM pair or 128-bit MUL groups
        if (rr(2)) begin
          opcode_e o;
          o = rr(2) ? OP_PERMB : OP_PERMI;
          emit(mk(o, 1, 0, 0, rr(12), rr(12), rd));
          emit(mk(o, 0, 1, 0, (rd + 1 + rr(11)) % 12, (rd + 1 + rr(11)) % 12, rd));
        end else begin
          int a1, a2, b1, b2, c1, c2, d1, d2;
          a1 = rr(12); a2 = rr(12); b1 = rr(12); b2 = rr(12);
          c1 = 12 + rr(4); c2 = 16 + rr(4); d1 = 20 + rr(4); d2 = 24 + rr(4);
          new_block();
          emit(mk(OP_MULL, 1, 0, 0, a1, b1, c1));
          emit(mk(OP_MULL, 0, 1, 0, a2, b2, c2));
          emit(mk(OP_MULH, 1, 0, 0, a1, b1, d1));
          emit(mk(OP_MULH, 0, 1, 0, a2, b2, d2));
          emit(mk(OP_ADD, 0, 0, 0, c1, d2, rd));
        end
      end else begin                            // random single instruction
        opcode_e o;
        logic gs, gc;
        o = ops[rr(14)];
        gs = with_gs && (rr(16) == 0);
        gc = with_gs && (rr(16) == 0);
        emit(mk(o, gs, gc, rr(4), rr(12), rr(12), rd));
      end
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  int c_m0, c_m1;
  initial begin
    $urandom(1234);
    fb_valid = 1'b0; fb_instr = '0; fb_mask = '0; ld_we = 1'b0; ld_addr = '0; ld_data = '0;
    dbg_addr = '0; grp_mode = GM_NONE;

    // 1. one arbitrary 64-bit permutation (6 PERM, two groups)
    rand_init();
    clear_prog();
    emit(mk(OP_PERMB, 0, 0, 0, 1, 2, 7));
    emit(mk(OP_PERMB, 0, 0, 1, 7, 3, 7));
    emit(mk(OP_PERMB, 0, 0, 2, 7, 4, 7));
    new_block();
    emit(mk(OP_PERMI, 0, 0, 0, 7, 5, 7));
    emit(mk(OP_PERMI, 0, 0, 1, 7, 6, 7));
    emit(mk(OP_PERMI, 0, 0, 2, 7, 8, 7));
    run(GM_NONE, "perm64");
    c_m0 = last_issue - first_issue + 1;
    run(GM_METHOD1, "perm64");
    c_m1 = last_issue - first_issue + 1;
    checks += 2;
    if (c_m0 != 6) begin failures++; $display("FAIL baseline permutation took %0d issue cycles, expected 6", c_m0); end
    if (c_m1 != 2) begin failures++; $display("FAIL method-1 permutation took %0d issue cycles, expected 2", c_m1); end
    $display("64-bit permutation: %0d issue cycles baseline, %0d with method 1", c_m0, c_m1);

    // same permutation in method-2 form (4 instructions)
    clear_prog();
    emit(mk(OP_PERMB, 1, 0, 0, 1, 2, 7));
    emit(mk(OP_PERMB, 0, 1, 0, 3, 4, 7));
    emit(mk(OP_PERMI, 1, 0, 0, 7, 5, 7));
    emit(mk(OP_PERMI, 0, 1, 0, 6, 8, 7));
    run(GM_METHOD2, "perm64_m2");
    checks++;
    if (last_issue - first_issue + 1 != 2) begin
      failures++; $display("FAIL method-2 permutation took %0d issue cycles", last_issue - first_issue + 1);
    end

    // 2. multiplier latency
    clear_prog();
    emit(mk(OP_MULL, 0, 0, 0, 1, 2, 3));
    emit(mk(OP_ADD,  0, 0, 0, 3, 3, 4));
    run(GM_NONE, "mul_lat");
    checks++;
    if (last_issue - first_issue != MUL_LAT) begin
      failures++; $display("FAIL multiply-to-use distance %0d, expected %0d", last_issue - first_issue, MUL_LAT);
    end

    // 3 + 4. random programs, all modes
    for (int t = 0; t < 6; t++) begin
      rand_init();
      clear_prog();
      rand_prog(150, t >= 3);
      for (int m = 0; m < 3; m++) begin
        run(gmode_e'(m), $sformatf("random%0d", t));
        $display("random program %0d mode %0d: %0d cycles", t, m, run_cycles);
      end
    end

    // every mechanism must have happened
    $display("perm groups %0d, folded PERMs %0d, mul groups %0d (128-bit issued %0d), min/max groups %0d,",
             n_grp_perm, n_folded, n_grp_mul, n_mul128, n_grp_mm);
    $display("bad groups %0d, groups issued %0d, dual issues %0d, PU ops %0d, MUL ops %0d,",
             n_bad, n_grp_iss, n_dual, n_pu, n_mul);
    $display("window-full stalls %0d, write-back holds %0d, bypasses %0d", n_full, n_wbblk, n_byp);
    checks += 13;
    if (n_grp_perm == 0) begin failures++; $display("FAIL no PERM group"); end
    if (n_folded == 0)   begin failures++; $display("FAIL no PERM folded"); end
    if (n_grp_mul == 0)  begin failures++; $display("FAIL no MUL group"); end
    if (n_mul128 == 0)   begin failures++; $display("FAIL no 128-bit MUL group issued"); end
    if (n_grp_mm == 0)   begin failures++; $display("FAIL no PMIN/PMAX group"); end
    if (n_bad == 0)      begin failures++; $display("FAIL no malformed group seen"); end
    if (n_grp_iss == 0)  begin failures++; $display("FAIL no group issued"); end
    if (n_dual == 0)     begin failures++; $display("FAIL no dual issue"); end
    if (n_pu == 0)       begin failures++; $display("FAIL no PU op"); end
    if (n_mul == 0)      begin failures++; $display("FAIL no MUL op"); end
    if (n_full == 0)     begin failures++; $display("FAIL window never full"); end
    if (n_wbblk == 0)    begin failures++; $display("FAIL no write-back hold"); end
    if (n_byp == 0)      begin failures++; $display("FAIL no bypass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workload_kernels: runs the two kernels the MOMR core is meant to speed
// up on the full core at its default parameters.
//
//  1. Arbitrary 64-bit bit permutations (the permutation steps of DES are of
//     this kind; the DES initial permutation IP and its inverse are among the
//     ones tried). Each permutation is given as a source index per result bit.
//     The testbench routes it through the 12-stage network formed by a
//     butterfly followed by an inverse butterfly (a Benes network with a
//     doubled middle stage) with the looping algorithm, writes the six
//     configuration words to registers and runs the permutation as
//       - 6 PERM instructions (3 PERMB, 3 PERMI) with grouping off,
//       - the same 6 instructions with method-1 detection,
//       - 4 instructions with gs/gc bits (method 2).
//     The result is compared with the bits gathered directly from the index
//     list, and the issue cycles are counted: 6 per permutation without
//     grouping, 2 per permutation with either method.
//  2. 128 x 128-bit multiplications (the building block of multi-word integer
//     multiplication) written as two (4,2) groups: MUL,L gs/gc for the low 128
//     bits and MUL,H gs/gc for the high 128 bits of the 256-bit product. Each
//     product takes 2 issue cycles, and the first result words are written
//     (and bypassed) MUL_LAT cycles after the first group issues.
module tb_workload_kernels;
  import momr_pkg::*;

  localparam int MUL_LAT = 5;
  localparam int NPERM   = 4;     // permutations per run (registers: 1 data + 6 config each)
  localparam int RUNS    = 10;

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

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program and register image ----------------
  localparam int MAXB = 64;
  logic [31:0]        prog  [MAXB][FETCH_W];
  logic [FETCH_W-1:0] pmask [MAXB];
  int nblk, slot;
  word_t init_rf [NREG];

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
  task automatic new_block();
    if (slot != 0) begin slot = 0; nblk++; end
  endtask
  function automatic int nblocks();
    return (slot == 0) ? nblk : nblk + 1;
  endfunction

  // ---------------- issue monitor ----------------
  int cyc = 0, first_issue, last_issue, first_mul_wb;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.s1_valid || dut.s2_valid) begin
      if (first_issue < 0) first_issue = cyc;
      last_issue = cyc;
    end
    if (dut.u_dp.mo_v && first_mul_wb < 0) first_mul_wb = cyc;
  end

  task automatic run(gmode_e m);
    int b;
    @(negedge clk);
    rst_n = 1'b0; fb_valid = 1'b0; ld_we = 1'b0; grp_mode = m;
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NREG; r++) begin
      ld_we = 1'b1; ld_addr = 5'(r); ld_data = init_rf[r];
      @(negedge clk);
    end
    ld_we = 1'b0;
    first_issue = -1; last_issue = -1; first_mul_wb = -1;
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
  endtask

  task automatic check_reg(int r, word_t exp, string what);
    dbg_addr = 5'(r);
    #1;
    checks++;
    if (dbg_data !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: r%0d = %h, expected %h", what, r, dbg_data, exp);
    end
  endtask

  // ---------------- permutation routing ----------------
  // src[o] = index of the input bit that lands on result bit o.
  // Network: butterfly stages s = 0..5 (switch distance 32 >> s), then
  // inverse butterfly stages s = 0..5 (distance 1 << s). Stage s of either
  // network takes its 32 switch bits from configuration word s/2, half s%2;
  // switch j of a stage with distance d joins positions p and p + d with
  // j = (p / 2d) * d + p % d.
  // Level L of the recursion handles sub-networks of m = 64 >> L positions:
  // its input switches are butterfly stage L, its output switches inverse
  // butterfly stage 5 - L, and the halves of each sub-network are its upper
  // and lower sub-networks.
  function automatic void route(input int src [64], output word_t cb [3], output word_t ci [3]);
    int cur [64], nxt [64], inv [64], sub [64];
    for (int k = 0; k < 3; k++) begin cb[k] = '0; ci[k] = '0; end
    cur = src;
    for (int lvl = 0; lvl < 6; lvl++) begin
      int m, h, lg;
      m = 64 >> lvl; h = m / 2; lg = 5 - lvl;
      for (int base = 0; base < 64; base += m) begin
        for (int k = 0; k < m; k++) inv[cur[base+k] - base] = k;
        for (int k = 0; k < m; k++) sub[k] = -1;
        // looping: outputs a and a+h use different halves, and so do the
        // outputs fed by inputs i and i+h
        for (int a = 0; a < h; a++) begin
          if (sub[a] < 0) begin
            int o, op, i, o2;
            o = a;
            sub[o] = 0;
            forever begin
              op = o ^ h;
              sub[op] = 1;
              i  = cur[base+op] - base;
              o2 = inv[i ^ h];
              if (sub[o2] >= 0) break;
              sub[o2] = 0;
              o = o2;
            end
          end
        end
        for (int a = 0; a < h; a++) begin
          int p, j, oU, oL;
          logic sw_out, sw_in;
          p = base + a;
          j = ((p >> (lg + 1)) << lg) | (p & ((1 << lg) - 1));
          sw_out = (sub[a] == 1);             // result a comes from the lower half
          sw_in  = (sub[inv[a]] == 1);        // input a goes to the lower half
          ci[lg/2][(lg%2)*32 + j]   = sw_out;
          cb[lvl/2][(lvl%2)*32 + j] = sw_in;
          oU = sw_out ? a + h : a;
          oL = sw_out ? a : a + h;
          nxt[base+a]   = base     + ((cur[base+oU] - base) & (h - 1));
          nxt[base+h+a] = base + h + ((cur[base+oL] - base) & (h - 1));
        end
      end
      cur = nxt;
    end
  endfunction

  function automatic word_t gather(word_t x, int src [64]);
    word_t y;
    for (int o = 0; o < 64; o++) y[o] = x[src[o]];
    return y;
  endfunction

  // DES initial permutation in bit index form. DES numbers bits 1..64 from
  // the most significant end; result bit i (1-based) of row r = (i-1)/8,
  // column c = (i-1)%8 is input bit 58 + 2r - 8c for r < 4 and
  // 57 + 2(r-4) - 8c for r >= 4.
  function automatic void des_ip(output int src [64], input logic inverse);
    int fwd [64];
    for (int i = 0; i < 64; i++) begin
      int r, c, sbit;
      r = i / 8; c = i % 8;
      sbit = ((r < 4) ? 58 + 2 * r : 57 + 2 * (r - 4)) - 8 * c;
      fwd[63 - i] = 64 - sbit;                 // to little-endian bit indices
    end
    if (!inverse) src = fwd;
    else for (int o = 0; o < 64; o++) src[fwd[o]] = o;
  endfunction

  task automatic rand_perm(output int src [64]);
    for (int i = 0; i < 64; i++) src[i] = i;
    for (int i = 63; i > 0; i--) begin
      int j, t;
      j = int'($urandom % (i + 1));
      t = src[i]; src[i] = src[j]; src[j] = t;
    end
  endtask

  // ---------------- test sequence ----------------
  int    psrc [NPERM][64];
  word_t pdata [NPERM];
  int    icyc [3];
  int    n_perm_ok, n_mul_ok;

  initial begin
    $urandom(99);
    fb_valid = 1'b0; fb_instr = '0; fb_mask = '0; ld_we = 1'b0; ld_addr = '0; ld_data = '0;
    dbg_addr = '0; grp_mode = GM_NONE;
    n_perm_ok = 0; n_mul_ok = 0;

    // ---- 1. permutations ----
    for (int run_i = 0; run_i < RUNS; run_i++) begin
      for (int r = 0; r < NREG; r++) init_rf[r] = {$urandom, $urandom};
      for (int t = 0; t < NPERM; t++) begin
        word_t cb [3], ci [3];
        if (run_i == 0 && t == 0)      des_ip(psrc[t], 1'b0);
        else if (run_i == 0 && t == 1) des_ip(psrc[t], 1'b1);
        else                           rand_perm(psrc[t]);
        route(psrc[t], cb, ci);
        pdata[t] = init_rf[7*t];
        for (int k = 0; k < 3; k++) begin
          init_rf[7*t + 1 + k] = cb[k];
          init_rf[7*t + 4 + k] = ci[k];
        end
      end
      for (int m = 0; m < 3; m++) begin
        clear_prog();
        for (int t = 0; t < NPERM; t++) begin
          int d, res;
          d = 7 * t; res = 28 + t;
          if (m != 2) begin
            new_block();
            emit(mk(OP_PERMB, 0, 0, 0, d,   d + 1, res));
            emit(mk(OP_PERMB, 0, 0, 1, res, d + 2, res));
            emit(mk(OP_PERMB, 0, 0, 2, res, d + 3, res));
            new_block();
            emit(mk(OP_PERMI, 0, 0, 0, res, d + 4, res));
            emit(mk(OP_PERMI, 0, 0, 1, res, d + 5, res));
            emit(mk(OP_PERMI, 0, 0, 2, res, d + 6, res));
          end else begin
            emit(mk(OP_PERMB, 1, 0, 0, d,     d + 1, res));
            emit(mk(OP_PERMB, 0, 1, 0, d + 2, d + 3, res));
            emit(mk(OP_PERMI, 1, 0, 0, res,   d + 4, res));
            emit(mk(OP_PERMI, 0, 1, 0, d + 5, d + 6, res));
          end
        end
        run(gmode_e'(m));
        icyc[m] = last_issue - first_issue + 1;
        for (int t = 0; t < NPERM; t++) begin
          int f0;
          f0 = failures;
          check_reg(28 + t, gather(pdata[t], psrc[t]), $sformatf("permutation %0d.%0d mode %0d", run_i, t, m));
          if (failures == f0) n_perm_ok++;
        end
      end
      checks += 3;
      if (icyc[0] != 6 * NPERM) begin failures++; $display("FAIL no grouping: %0d issue cycles for %0d permutations", icyc[0], NPERM); end
      if (icyc[1] != 2 * NPERM) begin failures++; $display("FAIL method 1: %0d issue cycles for %0d permutations", icyc[1], NPERM); end
      if (icyc[2] != 2 * NPERM) begin failures++; $display("FAIL method 2: %0d issue cycles for %0d permutations", icyc[2], NPERM); end
      if (run_i == 0)
        $display("%0d permutations: %0d issue cycles without grouping, %0d with method 1, %0d with method 2",
                 NPERM, icyc[0], icyc[1], icyc[2]);
    end

    // ---- 2. 128 x 128-bit multiplications ----
    for (int run_i = 0; run_i < RUNS; run_i++) begin
      logic [255:0] prod [4];
      for (int r = 0; r < NREG; r++) init_rf[r] = {$urandom, $urandom};
      if (run_i == 0) for (int r = 0; r < 16; r++) init_rf[r] = '1;   // all-ones operands
      clear_prog();
      for (int t = 0; t < 4; t++) begin
        int a, o;
        a = 4 * t; o = 16 + 4 * t;   // A = {r(a+1), r(a)}, B = {r(a+3), r(a+2)}
        prod[t] = 256'({init_rf[a+1], init_rf[a]}) * 256'({init_rf[a+3], init_rf[a+2]});
        emit(mk(OP_MULL, 1, 0, 0, a,     a + 2, o));
        emit(mk(OP_MULL, 0, 1, 0, a + 1, a + 3, o + 1));
        emit(mk(OP_MULH, 1, 0, 0, a,     a + 2, o + 2));
        emit(mk(OP_MULH, 0, 1, 0, a + 1, a + 3, o + 3));
      end
      run(GM_METHOD2);
      checks += 2;
      if (last_issue - first_issue + 1 != 8) begin
        failures++; $display("FAIL 4 products took %0d issue cycles, expected 8", last_issue - first_issue + 1);
      end
      if (first_mul_wb - first_issue != MUL_LAT) begin
        failures++; $display("FAIL first product word written %0d cycles after issue", first_mul_wb - first_issue);
      end
      for (int t = 0; t < 4; t++) begin
        int f0;
        f0 = failures;
        for (int k = 0; k < 4; k++)
          check_reg(16 + 4 * t + k, prod[t][64*k +: 64], $sformatf("product %0d.%0d word %0d", run_i, t, k));
        if (failures == f0) n_mul_ok++;
      end
    end

    $display("%0d permutations and %0d 128-bit products correct", n_perm_ok, n_mul_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

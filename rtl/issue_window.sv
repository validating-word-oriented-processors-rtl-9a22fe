// issue_window: ordered issue window with a C-bit per entry, operand
// readiness, modified wakeup and modified select, for a 2-way machine.
//
// Entries are kept in program order (entry 0 oldest) and the window
// collapses as entries issue, so the two instructions of a group always sit
// in adjacent entries. Up to FETCH_W entries are written per cycle (`in_*`),
// accepted only when FETCH_W entries are free. Each cycle at most two issue
// slots are granted: slot 1 (ALU1 selector) either a single instruction or a
// whole group (head + tail), slot 2 (ALU2 selector) a single instruction.
// Grants are combinational outputs in the cycle the register file is read.
//
// Readiness. There is no renaming stage in this design, so the window
// itself resolves all hazards on architectural registers:
//   rdy1/rdy2 - the operand is not written by an older entry still in the
//     window and its value is in the register file or on a write bus this
//     cycle (per-register countdown `sb`, set to the unit latency at issue);
//   rdy2 also requires that rd may be written: no older entry reads or writes
//     rd and no result for rd is still more than one cycle away.
// The other member of an entry's own group is left out of these checks; the
// group rules guarantee that a group has no internal RAW hazard, and it reads
// all its operands at once. wakeup_logic then combines the ready bits of
// grouped entries, and select_logic picks the grants.
// Write ports: the multiplier returns two words MUL_LAT cycles after issue
// on both write ports, so in the cycle before that only multiplier
// instructions may issue. The PU and the ALUs take one cycle.
module issue_window
  import momr_pkg::*;
#(
  parameter int unsigned IW      = 16,  // window entries
  parameter int unsigned MUL_LAT = 5    // multiplier issue-to-use latency
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(FETCH_W+1)-1:0] in_cnt,
  input  iw_entry_t [FETCH_W-1:0] in_ent,
  output logic                   in_ready,
  output logic                   s1_valid,
  output logic                   s1_pair,
  output iw_entry_t              s1_head,
  output iw_entry_t              s1_tail,
  output logic                   s2_valid,
  output iw_entry_t              s2_ent,
  output logic                   empty,
  output logic                   busy,    // a result is still outstanding
  output logic                   wb_hold  // issue limited to the multiplier this cycle
);
  localparam int unsigned IWB = $clog2(IW);
  localparam int unsigned SBW = $clog2(MUL_LAT + 1);

  iw_entry_t [IW-1:0]     ent;
  logic      [IW-1:0]     vld;
  logic [$clog2(IW+1)-1:0] count;
  logic [SBW-1:0]         sb [NREG];
  logic [MUL_LAT-1:0]     ms;           // ms[k]: a multiplier op issued k+1 cycles ago

  logic [IW-1:0] rdy1, rdy2, iready, req, cbit;
  fu_e  [IW-1:0] fu;

  function automatic logic sb_ok(logic [SBW-1:0] v);
    return v <= SBW'(1);
  endfunction

  // Operand and destination readiness.
  always_comb begin
    for (int i = 0; i < IW; i++) begin
      logic r1, r2, dok;
      dec_t d;
      d   = ent[i].d;
      r1  = !d.use1 || sb_ok(sb[d.rs1]);
      r2  = !d.use2 || sb_ok(sb[d.rs2]);
      dok = !d.wr   || sb_ok(sb[d.rd]);
      for (int k = 0; k < i; k++) begin
        logic partner;
        partner = (k == i - 1) && ent[k].c;
        if (vld[k] && !partner) begin
          if (ent[k].d.wr && d.use1 && ent[k].d.rd == d.rs1) r1 = 1'b0;
          if (ent[k].d.wr && d.use2 && ent[k].d.rd == d.rs2) r2 = 1'b0;
          if (d.wr && ((ent[k].d.wr   && ent[k].d.rd  == d.rd) ||
                       (ent[k].d.use1 && ent[k].d.rs1 == d.rd) ||
                       (ent[k].d.use2 && ent[k].d.rs2 == d.rd))) dok = 1'b0;
        end
      end
      rdy1[i] = vld[i] && r1;
      rdy2[i] = vld[i] && r2 && dok;
      cbit[i] = vld[i] && ent[i].c;
      fu[i]   = ent[i].d.fu;
    end
  end

  for (genvar i = 0; i < IW; i++) begin : g_wake
    wakeup_logic u_wake (
      .c_prev   (i > 0      ? cbit[(i+IW-1)%IW] : 1'b0),
      .rdy1_prev(i > 0      ? rdy1[(i+IW-1)%IW] : 1'b0),
      .rdy2_prev(i > 0      ? rdy2[(i+IW-1)%IW] : 1'b0),
      .c_i      (cbit[i]),
      .rdy1_i   (rdy1[i]),
      .rdy2_i   (rdy2[i]),
      .rdy1_next(i < IW - 1 ? rdy1[(i+1)%IW] : 1'b0),
      .rdy2_next(i < IW - 1 ? rdy2[(i+1)%IW] : 1'b0),
      .iready   (iready[i])
    );
  end

  // Requests: heads and single instructions only; in the cycle before a
  // multiplier write-back only multiplier instructions.
  logic block1;
  assign block1  = (MUL_LAT >= 2) ? ms[MUL_LAT-2] : 1'b0;
  assign wb_hold = block1;

  always_comb begin
    for (int i = 0; i < IW; i++) begin
      logic tail;
      tail   = (i > 0) && cbit[(i+IW-1)%IW];
      req[i] = vld[i] && iready[i] && !tail && (!block1 || fu[i] == FU_MUL);
    end
  end

  logic           g1_valid, g1_pair, g2_valid;
  logic [IWB-1:0] g1_idx, g2_idx;

  select_logic #(.N(IW)) u_sel (
    .req(req), .c(cbit), .fu(fu),
    .g1_valid(g1_valid), .g1_idx(g1_idx), .g1_pair(g1_pair),
    .g2_valid(g2_valid), .g2_idx(g2_idx)
  );

  assign s1_valid = g1_valid;
  assign s1_pair  = g1_pair;
  assign s1_head  = ent[g1_idx];
  assign s1_tail  = ent[(32'(g1_idx) + 1) % IW];
  assign s2_valid = g2_valid;
  assign s2_ent   = ent[g2_idx];

  assign in_ready = (IW - 32'(count)) >= FETCH_W;
  assign empty    = count == 0;

  always_comb begin
    busy = |ms;
    for (int r = 0; r < NREG; r++) if (sb[r] != '0) busy = 1'b1;
  end

  // Collapse issued entries, append incoming ones, update the scoreboard.
  logic [IW-1:0] granted;
  always_comb begin
    granted = '0;
    if (g1_valid) granted[g1_idx] = 1'b1;
    if (g1_valid && g1_pair) granted[(32'(g1_idx) + 1) % IW] = 1'b1;
    if (g2_valid) granted[g2_idx] = 1'b1;
  end

  function automatic logic [SBW-1:0] lat(iw_entry_t e);
    return (e.d.fu == FU_MUL) ? SBW'(MUL_LAT) : SBW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent   <= '0;
      vld   <= '0;
      count <= '0;
      ms    <= '0;
      for (int r = 0; r < NREG; r++) sb[r] <= '0;
    end else begin
      iw_entry_t [IW-1:0] n_ent;
      logic      [IW-1:0] n_vld;
      int unsigned        n;
      n_ent = '0;
      n_vld = '0;
      n     = 0;
      for (int i = 0; i < IW; i++) begin
        if (vld[i] && !granted[i]) begin
          n_ent[n] = ent[i];
          n_vld[n] = 1'b1;
          n++;
        end
      end
      if (in_valid && in_ready) begin
        for (int k = 0; k < FETCH_W; k++) begin
          if (k < int'(in_cnt)) begin
            n_ent[n % IW] = in_ent[k];
            n_vld[n % IW] = 1'b1;
            n++;
          end
        end
      end
      ent   <= n_ent;
      vld   <= n_vld;
      count <= ($clog2(IW+1))'(n);

      ms <= {ms[MUL_LAT-2:0], (g1_valid && s1_head.d.fu == FU_MUL) ||
                              (g2_valid && s2_ent.d.fu == FU_MUL)};

      for (int r = 0; r < NREG; r++) begin
        logic [SBW-1:0] v;
        v = (sb[r] != '0) ? sb[r] - 1'b1 : '0;
        if (g1_valid && s1_head.d.wr && s1_head.d.rd == RADDR'(r)) v = lat(s1_head);
        if (g1_valid && g1_pair && s1_tail.d.wr && s1_tail.d.rd == RADDR'(r)) v = lat(s1_tail);
        if (g2_valid && s2_ent.d.wr && s2_ent.d.rd == RADDR'(r)) v = lat(s2_ent);
        sb[r] <= v;
      end
    end
  end
endmodule

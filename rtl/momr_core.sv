// momr_core: 2-way superscalar back end with datarich MOMR execution (top).
//
// The core shows how a word-oriented 2-way machine, whose (4,2) datapath
// already has four register read ports and two write ports, can run
// multi-word operations: a (4,1) permutation unit that applies a 6-stage
// butterfly or inverse butterfly pass with three 64-bit configuration words
// in one operation, and a (4,2) 128-bit multiplier. Instructions stay
// word-sized; consecutive instructions that together carry the operands of
// one datarich operation form a group, which the issue logic sends to the
// datarich unit as one operation over both issue slots.
//
// Pipeline (one stage each):
//   fetch/decode: a fetch block of FETCH_W instructions is registered, then
//     decoded; in parallel the groups are found:
//       grp_mode = GM_METHOD1: seq_detect recognises PERM x3, MUL,L/MUL,H and
//         PMIN/PMAX sequences; code_transformer folds each 3-PERM sequence
//         into a 2-instruction group;
//       grp_mode = GM_METHOD2: group_check validates the gs/gc group bits;
//       grp_mode = GM_NONE: no groups (the plain 2-way baseline).
//   dispatch: the (transformed) instructions enter the issue window with
//     their C-bits; a block waits until FETCH_W entries are free.
//   wakeup/select + register read: up to two grants per cycle, or one group.
//   execute/write-back: ALU1, ALU2, PU in one cycle, multiplier in MUL_LAT.
// Interface: fetch blocks on a valid/ready handshake (fb_*); `fb_mask` marks
// the valid slots of a block. The register file can be loaded (ld_*) and
// read (dbg_*) from outside while the core is idle; these ports stand in for
// the memory side, which is not part of this design. grp_mode may only
// change while `idle` is high. `stats` counts the core's events.
// The instruction encoding, the window size and the absence of register
// renaming are this design's choices; the datapath shape, the grouping
// methods, the group rules, the unit latencies and the widths follow the
// document.
module momr_core
  import momr_pkg::*;
#(
  parameter int unsigned IW      = 16,
  parameter int unsigned MUL_LAT = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  gmode_e                  grp_mode,
  input  logic                    fb_valid,
  input  logic [FETCH_W-1:0][31:0] fb_instr,
  input  logic [FETCH_W-1:0]      fb_mask,
  output logic                    fb_ready,
  input  logic                    ld_we,
  input  reg_t                    ld_addr,
  input  word_t                   ld_data,
  input  reg_t                    dbg_addr,
  output word_t                   dbg_data,
  output logic                    idle,
  output stats_t                  stats
);
  // ---------------- fetch/decode register ----------------
  logic                     q_valid;
  logic [FETCH_W-1:0][31:0] q_instr;
  logic [FETCH_W-1:0]       q_mask;
  logic                     iw_ready;

  assign fb_ready = !q_valid || iw_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_instr <= '0;
      q_mask  <= '0;
    end else if (fb_ready) begin
      q_valid <= fb_valid;
      q_instr <= fb_instr;
      q_mask  <= fb_mask;
    end
  end

  // ---------------- decode, group detection, transformation ----------------
  dec_t   [FETCH_W-1:0] dec;
  logic   [FETCH_W-1:0] c1, drop1, c2, bad2, c_sel;
  gkind_e [FETCH_W-1:0] gk1, gk2, gk_sel;

  for (genvar i = 0; i < FETCH_W; i++) begin : g_dec
    instr_decoder u_dec (.valid(q_valid && q_mask[i]), .instr(q_instr[i]), .dec(dec[i]));
  end

  seq_detect  u_detect (.dec(dec), .c(c1), .gk(gk1), .drop(drop1));
  group_check u_check  (.dec(dec), .c(c2), .gk(gk2), .bad(bad2));

  assign c_sel  = (grp_mode == GM_METHOD2) ? c2  : c1;
  assign gk_sel = (grp_mode == GM_METHOD2) ? gk2 : gk1;

  iw_entry_t [FETCH_W-1:0]      xf;
  logic [$clog2(FETCH_W+1)-1:0] xf_cnt;

  code_transformer u_xform (
    .mode(grp_mode), .dec(dec), .c(c_sel), .gk(gk_sel), .drop(drop1),
    .out(xf), .cnt(xf_cnt)
  );

  // ---------------- issue window ----------------
  logic      s1_valid, s1_pair, s2_valid, iw_empty, iw_busy, wb_hold;
  iw_entry_t s1_head, s1_tail, s2_ent;

  issue_window #(.IW(IW), .MUL_LAT(MUL_LAT)) u_iw (
    .clk, .rst_n,
    .in_valid(q_valid), .in_cnt(xf_cnt), .in_ent(xf), .in_ready(iw_ready),
    .s1_valid, .s1_pair, .s1_head, .s1_tail, .s2_valid, .s2_ent,
    .empty(iw_empty), .busy(iw_busy), .wb_hold(wb_hold)
  );

  // ---------------- datapath ----------------
  logic [1:0] wb_valid;
  logic       bypassed;

  exec_datapath #(.MUL_LAT(MUL_LAT)) u_dp (
    .clk, .rst_n,
    .s1_valid, .s1_pair, .s1_head, .s1_tail, .s2_valid, .s2_ent,
    .ld_we, .ld_addr, .ld_data, .dbg_addr, .dbg_data,
    .wb_valid, .bypassed
  );

  assign idle = !q_valid && iw_empty && !iw_busy;

  // ---------------- event counters ----------------
  logic dispatch;
  assign dispatch = q_valid && iw_ready;

  function automatic logic [31:0] popc(logic [FETCH_W-1:0] v);
    logic [31:0] n;
    n = '0;
    for (int i = 0; i < FETCH_W; i++) n += 32'(v[i]);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      logic [FETCH_W-1:0] gp, gm, gx;
      for (int i = 0; i < FETCH_W; i++) begin
        gp[i] = c_sel[i] && gk_sel[i] == GK_PERM;
        gm[i] = c_sel[i] && (gk_sel[i] == GK_MUL64 || gk_sel[i] == GK_MUL128L
                             || gk_sel[i] == GK_MUL128H);
        gx[i] = c_sel[i] && gk_sel[i] == GK_MINMAX;
      end
      if (!idle) stats.cycles <= stats.cycles + 1;
      if (dispatch) begin
        stats.dispatched <= stats.dispatched + 32'(xf_cnt);
        if (grp_mode != GM_NONE) begin
          stats.grp_perm   <= stats.grp_perm + popc(gp);
          stats.grp_mul    <= stats.grp_mul + popc(gm);
          stats.grp_minmax <= stats.grp_minmax + popc(gx);
        end
        if (grp_mode == GM_METHOD1) stats.folded    <= stats.folded + popc(drop1);
        if (grp_mode == GM_METHOD2) stats.bad_group <= stats.bad_group + popc(bad2);
      end
      if (q_valid && !iw_ready) stats.window_full <= stats.window_full + 1;
      stats.issued <= stats.issued + 32'(s1_valid) + 32'(s1_valid && s1_pair) + 32'(s2_valid);
      if (s1_valid && s1_pair) stats.grp_issued  <= stats.grp_issued + 1;
      if (s1_valid && s2_valid) stats.dual_issued <= stats.dual_issued + 1;
      if ((s1_valid && s1_head.d.fu == FU_PU) || (s2_valid && s2_ent.d.fu == FU_PU))
        stats.pu_ops <= stats.pu_ops + 1;
      if ((s1_valid && s1_head.d.fu == FU_MUL) || (s2_valid && s2_ent.d.fu == FU_MUL))
        stats.mul_ops <= stats.mul_ops + 1;
      if (wb_hold && !iw_empty) stats.wb_block <= stats.wb_block + 1;
      if (bypassed) stats.bypass <= stats.bypass + 1;
    end
  end
endmodule

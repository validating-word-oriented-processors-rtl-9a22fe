// group_check: group checking for method 2 (groups marked in the ISA with
// the gs and gc subop bits).
//
// For each adjacent pair in a fetch block where slot i has gs = 1 and slot
// i+1 has gc = 1, it checks that the pair is a legitimate, complete group and
// sets the C-bit of slot i:
//   PERM,gs + PERM,gc   same PERM opcode, same rd, rd_i not read by i+1   -> GK_PERM
//   MUL,L,gs + MUL,H,gc same rs1/rs2, different rd, no RAW               -> GK_MUL64
//   MUL,L,gs + MUL,L,gc different rd, no RAW (128-bit low half)          -> GK_MUL128L
//   MUL,H,gs + MUL,H,gc different rd, no RAW (128-bit high half)         -> GK_MUL128H
//   PMIN,gs + PMAX,gc   different rd, no RAW                              -> GK_MINMAX
// "No RAW" means rd_i is neither rs1 nor rs2 of slot i+1. An instruction that
// carries gs or gc but is not part of a legitimate group is flagged in `bad`
// and then runs as an ordinary instruction. The pair rules follow the
// document's group table; the same-rd rule for PERM, the different-rd rule
// and the handling of bad groups are this design's choices. A group must sit
// inside one fetch block. Purely combinational.
module group_check
  import momr_pkg::*;
(
  input  dec_t   [FETCH_W-1:0] dec,
  output logic   [FETCH_W-1:0] c,
  output gkind_e [FETCH_W-1:0] gk,
  output logic   [FETCH_W-1:0] bad
);
  function automatic gkind_e pair_kind(dec_t a, dec_t b);
    logic noraw;
    noraw = a.rd != b.rs1 && a.rd != b.rs2;
    if (!(a.valid && b.valid && a.gs && b.gc && noraw)) return GK_NONE;
    if (a.is_perm && b.op == a.op && a.rd == b.rd)                       return GK_PERM;
    if (a.rd == b.rd)                                                     return GK_NONE;
    if (a.op == OP_MULL && b.op == OP_MULH && a.rs1 == b.rs1 && a.rs2 == b.rs2) return GK_MUL64;
    if (a.op == OP_MULL && b.op == OP_MULL)                              return GK_MUL128L;
    if (a.op == OP_MULH && b.op == OP_MULH)                              return GK_MUL128H;
    if (a.op == OP_PMIN && b.op == OP_PMAX)                              return GK_MINMAX;
    return GK_NONE;
  endfunction

  always_comb begin
    logic [FETCH_W-1:0] ok;
    ok  = '0;
    c   = '0;
    gk  = {FETCH_W{GK_NONE}};
    for (int i = 0; i + 1 < FETCH_W; i++) begin
      gkind_e k;
      k = pair_kind(dec[i], dec[i+1]);
      if (k != GK_NONE) begin
        c[i] = 1'b1; gk[i] = k; ok[i] = 1'b1; ok[i+1] = 1'b1;
      end
    end
    for (int i = 0; i < FETCH_W; i++)
      bad[i] = dec[i].valid && (dec[i].gs || dec[i].gc) && !ok[i];
  end
endmodule

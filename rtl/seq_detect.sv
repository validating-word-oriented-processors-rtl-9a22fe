// seq_detect: group sequence detection for method 1 (groups found by the
// microarchitecture, no ISA change).
//
// Looks at the decoded instructions of one fetch block (FETCH_W = 4 slots)
// and marks, with the C-bit of the first instruction, the groups that a
// datarich unit can execute together. Groups never span two fetch blocks.
// Scanning from the oldest slot, the first match wins and its
// instructions are not reused:
//   PERM x3 (slots i..i+2, i <= 1): same PERM opcode, stage pairs 0,1,2,
//     serial dependency rd_i = rs1_{i+1}, rd_{i+1} = rs1_{i+2}, one common
//     destination rd_i = rd_{i+1} = rd_{i+2}, and no other RAW hazard: no
//     configuration operand (rs2_{i+1}, rs2_{i+2}) is written inside the
//     group. Kind GK_PERM; drop[i+2] tells the transformer to fold slot i+2.
//   MUL,L then MUL,H: same rs1 and rs2, different rd, rd_i not read by i+1.
//     Kind GK_MUL64.
//   PMIN then PMAX: rd_i not read by i+1 and different rd. Kind GK_MINMAX.
// The serial-dependency, same-source and no-RAW rules follow the document's
// group-definition table; the common destination of a PERM chain, the
// stage-pair order, and the different-rd rule for PMIN/PMAX are this
// design's additions so that no intermediate value escapes a group.
// Purely combinational (it runs beside decode).
module seq_detect
  import momr_pkg::*;
(
  input  dec_t   [FETCH_W-1:0] dec,
  output logic   [FETCH_W-1:0] c,
  output gkind_e [FETCH_W-1:0] gk,
  output logic   [FETCH_W-1:0] drop
);
  function automatic logic perm3(dec_t a, dec_t b, dec_t x);
    return a.valid && b.valid && x.valid && a.is_perm && b.op == a.op && x.op == a.op
        && a.sp == 2'd0 && b.sp == 2'd1 && x.sp == 2'd2
        && a.rd == b.rs1 && b.rd == x.rs1 && a.rd == b.rd && b.rd == x.rd
        && a.rd != b.rs2 && a.rd != x.rs2 && b.rd != x.rs2;
  endfunction

  function automatic logic mulpair(dec_t a, dec_t b);
    return a.valid && b.valid && a.op == OP_MULL && b.op == OP_MULH
        && a.rs1 == b.rs1 && a.rs2 == b.rs2 && a.rd != b.rd
        && a.rd != b.rs1 && a.rd != b.rs2;
  endfunction

  function automatic logic mmpair(dec_t a, dec_t b);
    return a.valid && b.valid && a.op == OP_PMIN && b.op == OP_PMAX
        && a.rd != b.rs1 && a.rd != b.rs2 && a.rd != b.rd;
  endfunction

  always_comb begin
    logic [FETCH_W-1:0] used;
    used = '0;
    c    = '0;
    drop = '0;
    gk   = {FETCH_W{GK_NONE}};
    for (int i = 0; i < FETCH_W; i++) begin
      if (!used[i]) begin
        if (i + 2 < FETCH_W && !used[i+1] && perm3(dec[i], dec[i+1], dec[(i+2) % FETCH_W])) begin
          c[i] = 1'b1; gk[i] = GK_PERM; drop[(i+2) % FETCH_W] = 1'b1;
          used[i] = 1'b1; used[i+1] = 1'b1; used[(i+2) % FETCH_W] = 1'b1;
        end else if (i + 1 < FETCH_W && mulpair(dec[i], dec[(i+1) % FETCH_W])) begin
          c[i] = 1'b1; gk[i] = GK_MUL64;
          used[i] = 1'b1; used[(i+1) % FETCH_W] = 1'b1;
        end else if (i + 1 < FETCH_W && mmpair(dec[i], dec[(i+1) % FETCH_W])) begin
          c[i] = 1'b1; gk[i] = GK_MINMAX;
          used[i] = 1'b1; used[(i+1) % FETCH_W] = 1'b1;
        end
      end
    end
  end
endmodule

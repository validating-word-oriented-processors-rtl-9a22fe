// code_transformer: instruction transformation plus the multiplexers in
// front of the issue window.
//
// Method 1: a 3-instruction PERM group (C-bit on slot i, drop on slot i+2)
// becomes a 2-instruction group: slot i is kept as it is (data rs and
// configuration rc1, C = 1); in slot i+1 the data operand is replaced by the
// configuration operand of slot i+2 (so it reads rc3 and rc2); slot i+2 is
// discarded. Method 2: the C-bit comes from the gs/gc check, and the PERM,gc
// instruction (rc2, rc3) has its two operands swapped so that both methods
// hand the issue window the same internal form. Other groups pass unchanged
// apart from their C-bit. With grouping off (GM_NONE) the original
// instructions pass with C = 0. The surviving instructions are then packed
// to the low slots in program order; `cnt` says how many are valid.
// Purely combinational (it runs beside rename).
module code_transformer
  import momr_pkg::*;
(
  input  gmode_e                   mode,
  input  dec_t      [FETCH_W-1:0]  dec,
  input  logic      [FETCH_W-1:0]  c,
  input  gkind_e    [FETCH_W-1:0]  gk,
  input  logic      [FETCH_W-1:0]  drop,
  output iw_entry_t [FETCH_W-1:0]  out,
  output logic [$clog2(FETCH_W+1)-1:0] cnt
);
  iw_entry_t [FETCH_W-1:0] xf;   // transformed, not yet packed
  logic      [FETCH_W-1:0] keep;

  always_comb begin
    for (int i = 0; i < FETCH_W; i++) begin
      xf[i].d  = dec[i];
      xf[i].c  = 1'b0;
      xf[i].gk = GK_NONE;
      keep[i]  = dec[i].valid;
    end
    if (mode != GM_NONE) begin
      for (int i = 0; i < FETCH_W; i++) begin
        xf[i].c  = c[i];
        xf[i].gk = c[i] ? gk[i] : GK_NONE;
        if (mode == GM_METHOD1 && drop[i]) keep[i] = 1'b0;
      end
      for (int i = 0; i + 1 < FETCH_W; i++) begin
        if (c[i] && gk[i] == GK_PERM) begin
          if (mode == GM_METHOD1 && i + 2 < FETCH_W) begin
            xf[i+1].d.rs1 = dec[(i+2) % FETCH_W].rs2;
          end else if (mode == GM_METHOD2) begin
            xf[i+1].d.rs1 = dec[i+1].rs2;
            xf[i+1].d.rs2 = dec[i+1].rs1;
          end
        end
      end
    end
    // pack
    out = '0;
    cnt = '0;
    for (int i = 0; i < FETCH_W; i++) begin
      if (keep[i]) begin
        out[cnt] = xf[i];
        cnt      = cnt + 1'b1;
      end
    end
  end
endmodule

// perm_unit: (4,1) permutation functional unit.
//
// Takes four word-sized operands, a 64-bit data word and three 64-bit
// configuration words, and produces one permuted word. It holds both
// networks of the design: PU1, a 6-stage butterfly network, and PU2, a
// 6-stage inverse butterfly network; `inv` selects which one this operation
// uses (in a 2-way machine only one is used per cycle). A complete arbitrary
// 64-bit permutation is one butterfly pass followed by one inverse butterfly
// pass, i.e. two grouped operations. Configuration word k sets stages 2k and
// 2k+1 (see bfly_net). A single, ungrouped PERM instruction reaches the unit
// with the two unused configuration words at zero, so those four stages
// pass their data straight through. Purely combinational: it fits in the one
// execute cycle of the datapath.
module perm_unit
  import momr_pkg::*;
(
  input  word_t       data,
  input  word_t [2:0] cfg,
  input  logic        inv,    // 0: butterfly (PU1), 1: inverse butterfly (PU2)
  output word_t       result
);
  logic [NSTAGE-1:0][XLEN/2-1:0] ctrl;
  word_t r_bfly, r_ibfly;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      ctrl[2*k]   = cfg[k][XLEN/2-1:0];
      ctrl[2*k+1] = cfg[k][XLEN-1:XLEN/2];
    end
  end

  bfly_net  #(.N(XLEN)) u_pu1 (.din(data), .ctrl(ctrl), .dout(r_bfly));
  ibfly_net #(.N(XLEN)) u_pu2 (.din(data), .ctrl(ctrl), .dout(r_ibfly));

  assign result = inv ? r_ibfly : r_bfly;
endmodule

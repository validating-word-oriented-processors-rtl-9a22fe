// wakeup_logic: modified wakeup for one issue-window entry i.
//
// A normal instruction is ready when both of its operands are ready. The two
// instructions of a group must issue together, so both become ready only
// when all four operands of the group are ready:
//   C_i = 1     (i starts a group):    Iready_i = rdy1_i & rdy2_i & rdy1_{i+1} & rdy2_{i+1}
//   C_{i-1} = 1 (i continues a group): Iready_i = rdy1_{i-1} & rdy2_{i-1} & rdy1_i & rdy2_i
//   otherwise:                         Iready_i = rdy1_i & rdy2_i
// The inputs are those of the wakeup drawing (C and the two ready bits of
// entries i-1, i and i+1); the equations are this design's reading of the
// text. Combinational.
module wakeup_logic (
  input  logic c_prev,   // C-bit of entry i-1
  input  logic rdy1_prev,
  input  logic rdy2_prev,
  input  logic c_i,      // C-bit of entry i
  input  logic rdy1_i,
  input  logic rdy2_i,
  input  logic rdy1_next,
  input  logic rdy2_next,
  output logic iready
);
  always_comb begin
    if (c_i)         iready = rdy1_i & rdy2_i & rdy1_next & rdy2_next;
    else if (c_prev) iready = rdy1_prev & rdy2_prev & rdy1_i & rdy2_i;
    else             iready = rdy1_i & rdy2_i;
  end
endmodule

// select_logic: issue select for ALU1 and ALU2 with C-bit propagation.
//
// Entries are in program order, entry 0 oldest; the oldest requesting
// entry wins each selector.
//   Select for ALU1 picks entry i. Control unit 1 tests C_i: if set it
//   grants i and i+1 together (the group goes to the datarich unit over
//   both issue slots) and the ALU2 selector is bypassed; otherwise it grants
//   i and lets the ALU2 selector run.
//   Select for ALU2 picks the oldest other requesting entry j. Control unit
//   2 grants j only if C_j is clear.
// `req` must already exclude entries that continue a group. The ALU2
// selector also skips entries that need the same single unit (permutation
// unit or multiplier, from `fu`) as the ALU1 choice, so two instructions never
// meet on the one PU or the one multiplier; that check is this design's.
// Combinational; outputs are one-hot grant vectors plus indices.
module select_logic
  import momr_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] req,
  input  logic [N-1:0] c,
  input  fu_e  [N-1:0] fu,
  output logic         g1_valid,
  output logic [$clog2(N)-1:0] g1_idx,
  output logic         g1_pair,   // g1_idx+1 granted with it
  output logic         g2_valid,
  output logic [$clog2(N)-1:0] g2_idx
);
  always_comb begin
    logic found;
    found    = 1'b0;
    g1_valid = 1'b0; g1_idx = '0; g1_pair = 1'b0;
    g2_valid = 1'b0; g2_idx = '0;
    // Select for ALU1.
    for (int k = N - 1; k >= 0; k--)
      if (req[k]) begin g1_valid = 1'b1; g1_idx = k[$clog2(N)-1:0]; end
    // Control unit 1.
    if (g1_valid && c[g1_idx]) begin
      g1_pair = 1'b1;
    end else if (g1_valid) begin
      // Select for ALU2, then control unit 2.
      for (int k = 0; k < N; k++) begin
        if (!found && req[k] && k != int'(g1_idx)
            && !(fu[k] != FU_ALU && fu[k] == fu[g1_idx])) begin
          found = 1'b1;
          g2_idx = k[$clog2(N)-1:0];
        end
      end
      g2_valid = found && !c[g2_idx];
    end
  end
endmodule

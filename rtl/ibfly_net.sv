// ibfly_net: 64-bit, 6-stage inverse butterfly network (the network of PU2).
//
// Stage s (s = 0..5) pairs bit positions that differ only in bit s of
// their index, i.e. at distance 1, 2, 4, 8, 16, 32 (the butterfly stages in
// reverse order, so a butterfly pass followed by an inverse butterfly pass
// forms a Benes network that can realise any permutation). Each stage has 32 2x2
// switches; switch j of a stage with distance d joins positions
// p = (j / d) * 2d + (j % d) and p + d, and swaps them when its control bit
// is 1. The control is 3 words of 64 bits; word k drives stage 2k with its
// bits [31:0] and stage 2k+1 with its bits [63:32] (6 x 32 = 3 x 64 bits,
// as in the PU drawing). Purely combinational. With every control bit set the
// network reverses the bit order. The stage order and the mapping of control
// bits to switches are this design's choice.
module ibfly_net #(
  parameter int unsigned N = 64          // word width, a power of two
) (
  input  logic [N-1:0]            din,
  input  logic [$clog2(N)-1:0][N/2-1:0] ctrl,   // per-stage switch controls
  output logic [N-1:0]            dout
);
  localparam int unsigned S = $clog2(N);

  logic [S:0][N-1:0] v;

  assign v[0] = din;

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int unsigned D = 1 << s;         // distance of this stage
    for (genvar j = 0; j < N/2; j++) begin : g_sw
      localparam int unsigned P = (j / D) * 2 * D + (j % D);
      always_comb begin
        v[s+1][P]   = ctrl[s][j] ? v[s][P+D] : v[s][P];
        v[s+1][P+D] = ctrl[s][j] ? v[s][P]   : v[s][P+D];
      end
    end
  end

  assign dout = v[S];
endmodule

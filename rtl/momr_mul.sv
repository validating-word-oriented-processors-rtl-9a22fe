// momr_mul: datarich (4,2) MOMR multiplier built around one 128 x 128-bit
// unsigned multiplier.
//
// Operands are two 128-bit numbers given as word pairs, A = {a[1], a[0]} and
// B = {b[1], b[0]}; the 256-bit product P is returned as two words selected
// by `rsel`:
//   RS_LOW  : r[0] = P[63:0],    r[1] = P[127:64]   (MUL,L/MUL,H (2,2) group with
//             a[1] = b[1] = 0, the MUL,L,gs/MUL,L,gc (4,2) group, single MUL,L)
//   RS_MID  : r[0] = P[127:64]                      (single MUL,H)
//   RS_HIGH : r[0] = P[191:128], r[1] = P[255:192]  (MUL,H,gs/MUL,H,gc group)
// The unit is fully pipelined and accepts one operation per cycle. The
// result appears STAGES cycles after the operands; a `tag` travels alongside
// (the core puts the destination registers in it). The default STAGES = 5
// is the 5-cycle latency assumed for a 128-bit multiplier. Where in the pipeline the product is
// formed is left to retiming: the product is computed from the input
// registers and then delayed.
module momr_mul
  import momr_pkg::*;
#(
  parameter int unsigned STAGES = 5,   // register stages, at least 1
  parameter int unsigned TAG_W  = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  word_t [1:0]       a,
  input  word_t [1:0]       b,
  input  logic [1:0]        rsel,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output word_t [1:0]       r,
  output logic [TAG_W-1:0]  out_tag
);
  localparam logic [1:0] RS_LOW = 2'd0, RS_MID = 2'd1, RS_HIGH = 2'd2;

  // Input registers (stage 1).
  logic [2*XLEN-1:0] a_q, b_q;
  logic [1:0]        rsel_q;
  logic              v_q;
  logic [TAG_W-1:0]  tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; a_q <= '0; b_q <= '0; rsel_q <= RS_LOW; tag_q <= '0;
    end else begin
      v_q    <= in_valid;
      a_q    <= {a[1], a[0]};
      b_q    <= {b[1], b[0]};
      rsel_q <= rsel;
      tag_q  <= in_tag;
    end
  end

  logic [4*XLEN-1:0] p;
  word_t [1:0]       sel;
  assign p = a_q * b_q;

  always_comb begin
    unique case (rsel_q)
      RS_MID:  sel = {word_t'(0), p[2*XLEN-1:XLEN]};
      RS_HIGH: sel = {p[4*XLEN-1:3*XLEN], p[3*XLEN-1:2*XLEN]};
      default: sel = {p[2*XLEN-1:XLEN], p[XLEN-1:0]};
    endcase
  end

  // Remaining STAGES-1 delay stages.
  logic [STAGES-1:0]             v_pipe;
  word_t [STAGES-1:0][1:0]       r_pipe;
  logic  [STAGES-1:0][TAG_W-1:0] t_pipe;

  assign v_pipe[0] = v_q;
  assign r_pipe[0] = sel;
  assign t_pipe[0] = tag_q;

  for (genvar s = 1; s < STAGES; s++) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_pipe[s] <= 1'b0; r_pipe[s] <= '0; t_pipe[s] <= '0;
      end else begin
        v_pipe[s] <= v_pipe[s-1];
        r_pipe[s] <= r_pipe[s-1];
        t_pipe[s] <= t_pipe[s-1];
      end
    end
  end

  assign out_valid = v_pipe[STAGES-1];
  assign r         = r_pipe[STAGES-1];
  assign out_tag   = t_pipe[STAGES-1];
endmodule

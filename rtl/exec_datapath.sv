// exec_datapath: the (4,2) datapath of a 2-way superscalar machine with a
// (4,1) permutation unit and a (4,2) MOMR multiplier added.
//
// Issue cycle: the four register read ports are addressed by the granted
// instructions (ports 0/1 by the slot-1 instruction, ports 2/3 by the slot-2
// instruction, or by the second instruction of a group, which therefore uses
// all four ports). Each operand takes the value on a write port this cycle
// if one writes its register (bypass), else the register file value.
// Operands for the ALUs and the PU are registered; multiplier operands go
// straight into the multiplier's own input registers.
// Execute cycle (one cycle later): ALU1, ALU2 and the PU compute and write
// through write ports 0 and 1 at the end of the cycle. The multiplier writes
// both ports MUL_LAT cycles after issue; the issue window keeps the ports
// free for it. The only hardware added to the baseline datapath is the PU,
// the multiplier and the extra result multiplexing on the write ports.
//
// Operand routing of the groups (head operands o0 = rs1, o1 = rs2, tail
// operands o2 = rs1, o3 = rs2):
//   PERM    data o0, configuration words o1, o3, o2 (rc1, rc2, rc3); result to rd
//   MUL64   o0 x o1, low word to the head's rd, high word to the tail's rd
//   MUL128  {o2,o0} x {o3,o1}; low (L group) or high (H group) 128 bits to
//           the head's rd (low word) and the tail's rd (high word)
//   MINMAX  ALU1 runs PMIN on o0,o1, ALU2 runs PMAX on o2,o3
// A single PERM uses its stage-pair field to place rs2 in one configuration
// word; the other two are zero.
module exec_datapath
  import momr_pkg::*;
#(
  parameter int unsigned MUL_LAT = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      s1_valid,
  input  logic      s1_pair,
  input  iw_entry_t s1_head,
  input  iw_entry_t s1_tail,
  input  logic      s2_valid,
  input  iw_entry_t s2_ent,
  input  logic      ld_we,
  input  reg_t      ld_addr,
  input  word_t     ld_data,
  input  reg_t      dbg_addr,
  output word_t     dbg_data,
  output logic [1:0] wb_valid,   // write ports active this cycle
  output logic      bypassed     // an operand was taken from a write port
);
  localparam logic [1:0] RS_LOW = 2'd0, RS_MID = 2'd1, RS_HIGH = 2'd2;

  // ---------------- register read and bypass ----------------
  reg_t  [3:0] raddr;
  word_t [3:0] rdata, opnd;
  logic  [1:0] we;
  reg_t  [1:0] waddr;
  word_t [1:0] wdata;

  always_comb begin
    raddr[0] = s1_head.d.rs1;
    raddr[1] = s1_head.d.rs2;
    raddr[2] = s1_pair ? s1_tail.d.rs1 : s2_ent.d.rs1;
    raddr[3] = s1_pair ? s1_tail.d.rs2 : s2_ent.d.rs2;
    bypassed = 1'b0;
    for (int p = 0; p < 4; p++) begin
      opnd[p] = rdata[p];
      if (we[0] && waddr[0] == raddr[p]) opnd[p] = wdata[0];
      if (we[1] && waddr[1] == raddr[p]) opnd[p] = wdata[1];
      if ((we[0] && waddr[0] == raddr[p]) || (we[1] && waddr[1] == raddr[p]))
        if ((p < 2 && s1_valid) || (p >= 2 && (s1_pair || s2_valid))) bypassed = 1'b1;
    end
  end

  regfile u_rf (
    .clk, .rst_n,
    .raddr(raddr), .rdata(rdata),
    .we(we), .waddr(waddr), .wdata(wdata),
    .ld_we, .ld_addr, .ld_data, .dbg_addr, .dbg_data
  );

  // ---------------- issue-cycle routing ----------------
  gkind_e gk;
  assign gk = s1_pair ? s1_head.gk : GK_NONE;

  logic        s1_mul, s2_mul;
  logic        m_v;
  word_t [1:0] m_a, m_b;
  logic  [1:0] m_rsel;
  logic [11:0] m_tag;

  assign s1_mul = s1_valid && s1_head.d.fu == FU_MUL;
  assign s2_mul = s2_valid && s2_ent.d.fu == FU_MUL;

  always_comb begin
    m_v    = s1_mul || s2_mul;
    m_a    = '0;
    m_b    = '0;
    m_rsel = RS_LOW;
    m_tag  = '0;
    if (s1_mul) begin
      m_a[0] = opnd[0];
      m_b[0] = opnd[1];
      if (gk == GK_MUL128L || gk == GK_MUL128H) begin
        m_a[1] = opnd[2];
        m_b[1] = opnd[3];
      end
      if (gk == GK_MUL128H)                          m_rsel = RS_HIGH;
      else if (gk == GK_NONE && s1_head.d.op == OP_MULH) m_rsel = RS_MID;
      m_tag = {s1_head.d.wr, s1_head.d.rd, s1_pair && s1_tail.d.wr, s1_tail.d.rd};
    end else if (s2_mul) begin
      m_a[0] = opnd[2];
      m_b[0] = opnd[3];
      if (s2_ent.d.op == OP_MULH) m_rsel = RS_MID;
      m_tag = {s2_ent.d.wr, s2_ent.d.rd, 1'b0, s2_ent.d.rd};
    end
  end

  // Execute-stage registers.
  typedef struct packed {
    logic    v;
    opcode_e op;
    word_t   a;
    word_t   b;
    reg_t    rd;
    logic    wr;
  } alu_op_t;

  typedef struct packed {
    logic        v;
    logic        inv;
    logic        port;   // write port used
    word_t       data;
    word_t [2:0] cfg;
    reg_t        rd;
    logic        wr;
  } pu_op_t;

  alu_op_t [1:0] alu_d, alu_q;
  pu_op_t        pu_d, pu_q;

  function automatic word_t [2:0] single_cfg(logic [1:0] sp, word_t c);
    word_t [2:0] r;
    r = '0;
    if (sp <= 2'd2) r[sp] = c;
    return r;
  endfunction

  always_comb begin
    alu_d = '0;
    pu_d  = '0;
    if (s1_valid && !s1_mul) begin
      if (gk == GK_PERM) begin
        pu_d = '{v: 1'b1, inv: s1_head.d.op == OP_PERMI, port: 1'b0, data: opnd[0],
                 cfg: {opnd[2], opnd[3], opnd[1]}, rd: s1_head.d.rd, wr: s1_head.d.wr};
      end else if (gk == GK_MINMAX) begin
        alu_d[0] = '{v: 1'b1, op: s1_head.d.op, a: opnd[0], b: opnd[1], rd: s1_head.d.rd, wr: s1_head.d.wr};
        alu_d[1] = '{v: 1'b1, op: s1_tail.d.op, a: opnd[2], b: opnd[3], rd: s1_tail.d.rd, wr: s1_tail.d.wr};
      end else if (s1_head.d.fu == FU_PU) begin
        pu_d = '{v: 1'b1, inv: s1_head.d.op == OP_PERMI, port: 1'b0, data: opnd[0],
                 cfg: single_cfg(s1_head.d.sp, opnd[1]), rd: s1_head.d.rd, wr: s1_head.d.wr};
      end else begin
        alu_d[0] = '{v: 1'b1, op: s1_head.d.op, a: opnd[0], b: opnd[1], rd: s1_head.d.rd, wr: s1_head.d.wr};
      end
    end
    if (s2_valid && !s2_mul) begin
      if (s2_ent.d.fu == FU_PU) begin
        pu_d = '{v: 1'b1, inv: s2_ent.d.op == OP_PERMI, port: 1'b1, data: opnd[2],
                 cfg: single_cfg(s2_ent.d.sp, opnd[3]), rd: s2_ent.d.rd, wr: s2_ent.d.wr};
      end else begin
        alu_d[1] = '{v: 1'b1, op: s2_ent.d.op, a: opnd[2], b: opnd[3], rd: s2_ent.d.rd, wr: s2_ent.d.wr};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alu_q <= '0;
      pu_q  <= '0;
    end else begin
      alu_q <= alu_d;
      pu_q  <= pu_d;
    end
  end

  // ---------------- execute ----------------
  word_t [1:0] alu_y;
  word_t       pu_y;

  alu u_alu1 (.op(alu_q[0].op), .a(alu_q[0].a), .b(alu_q[0].b), .y(alu_y[0]));
  alu u_alu2 (.op(alu_q[1].op), .a(alu_q[1].a), .b(alu_q[1].b), .y(alu_y[1]));

  perm_unit u_pu (.data(pu_q.data), .cfg(pu_q.cfg), .inv(pu_q.inv), .result(pu_y));

  logic        mo_v;
  word_t [1:0] mo_r;
  logic [11:0] mo_tag;

  momr_mul #(.STAGES(MUL_LAT), .TAG_W(12)) u_mul (
    .clk, .rst_n,
    .in_valid(m_v), .a(m_a), .b(m_b), .rsel(m_rsel), .in_tag(m_tag),
    .out_valid(mo_v), .r(mo_r), .out_tag(mo_tag)
  );

  // ---------------- write-back (result multiplexers) ----------------
  always_comb begin
    we    = '0;
    waddr = '0;
    wdata = '0;
    if (mo_v) begin
      we    = {mo_tag[5], mo_tag[11]};
      waddr = {mo_tag[4:0], mo_tag[10:6]};
      wdata = mo_r;
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (pu_q.v && 32'(pu_q.port) == p) begin
          we[p] = pu_q.wr; waddr[p] = pu_q.rd; wdata[p] = pu_y;
        end else if (alu_q[p].v) begin
          we[p] = alu_q[p].wr; waddr[p] = alu_q[p].rd; wdata[p] = alu_y[p];
        end
      end
    end
  end

  assign wb_valid = we;

  // The issue window keeps the write ports free for the multiplier.
  a_wb_free: assert property (@(posedge clk) disable iff (!rst_n)
                              mo_v |-> !(pu_q.v || alu_q[0].v || alu_q[1].v));
  a_one_pu:  assert property (@(posedge clk) disable iff (!rst_n)
                              !(s1_valid && s2_valid && s1_head.d.fu == FU_PU && s2_ent.d.fu == FU_PU));
endmodule

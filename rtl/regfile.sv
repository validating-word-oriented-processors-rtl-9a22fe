// regfile: register file of the (4,2) datapath: 4 read ports and 2 write
// ports, as in the 2-way superscalar baseline, plus one load/inspect port
// that stands in for the memory path (the load/store side is not part of
// this design).
//
// Reads are combinational. Writes take effect at the rising clock edge; if
// both write ports name the same register, port 1 wins (the issue logic
// never lets that happen). The load port writes when `ld_we` is set, and
// has the lowest priority. All registers reset to zero.
module regfile
  import momr_pkg::*;
#(
  parameter int unsigned NR = 4,   // read ports
  parameter int unsigned NW = 2    // write ports
) (
  input  logic               clk,
  input  logic               rst_n,
  input  reg_t  [NR-1:0]     raddr,
  output word_t [NR-1:0]     rdata,
  input  logic  [NW-1:0]     we,
  input  reg_t  [NW-1:0]     waddr,
  input  word_t [NW-1:0]     wdata,
  input  logic               ld_we,
  input  reg_t               ld_addr,
  input  word_t              ld_data,
  input  reg_t               dbg_addr,
  output word_t              dbg_data
);
  word_t mem [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) mem[i] <= '0;
    end else begin
      if (ld_we) mem[ld_addr] <= ld_data;
      for (int p = 0; p < NW; p++)
        if (we[p]) mem[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) rdata[p] = mem[raddr[p]];
  end
  assign dbg_data = mem[dbg_addr];
endmodule

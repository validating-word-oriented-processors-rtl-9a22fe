// tb_regfile: checks the 4-read/2-write register file against an array
// model: random writes on both ports and the load port, port-1 priority,
// combinational reads and reset to zero.
module tb_regfile;
  import momr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_t  [3:0] raddr;
  word_t [3:0] rdata;
  logic  [1:0] we;
  reg_t  [1:0] waddr;
  word_t [1:0] wdata;
  logic        ld_we;
  reg_t        ld_addr, dbg_addr;
  word_t       ld_data, dbg_data;
  word_t       m [NREG];
  int checks = 0, failures = 0;

  regfile dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; ld_we = 0; raddr = '0; waddr = '0; wdata = '0; ld_addr = '0; ld_data = '0; dbg_addr = '0;
    for (int r = 0; r < NREG; r++) m[r] = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check reads of the current state
      for (int p = 0; p < 4; p++) raddr[p] = 5'($urandom);
      dbg_addr = 5'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== m[raddr[p]]) begin failures++; if (failures < 10) $display("FAIL read r%0d", raddr[p]); end
      end
      checks++;
      if (dbg_data !== m[dbg_addr]) failures++;
      // schedule writes
      we = 2'($urandom); ld_we = ($urandom % 4) == 0;
      for (int p = 0; p < 2; p++) begin waddr[p] = 5'($urandom % 8); wdata[p] = {$urandom, $urandom}; end
      ld_addr = 5'($urandom % 8); ld_data = {$urandom, $urandom};
      @(posedge clk);
      if (ld_we) m[ld_addr] = ld_data;
      for (int p = 0; p < 2; p++) if (we[p]) m[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_momr_mul: checks the MOMR multiplier: the 256-bit product of two
// 128-bit operands in all three result selections, the 64-bit (2,2) case,
// a result exactly STAGES cycles after the operands, one operation accepted
// every cycle, and the tag travelling with the result.
module tb_momr_mul;
  import momr_pkg::*;
  localparam int STAGES = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  word_t [1:0] a, b, r;
  logic [1:0]  rsel;
  logic [11:0] in_tag, out_tag;
  int checks = 0, failures = 0;

  momr_mul #(.STAGES(STAGES), .TAG_W(12)) dut (.*);

  // expected results, indexed by issue cycle
  word_t [1:0] exp_r [int];
  logic [11:0] exp_t [int];
  int cyc = 0;

  function automatic word_t [1:0] model(word_t [1:0] x, word_t [1:0] y, logic [1:0] s);
    logic [255:0] p;
    word_t [1:0] o;
    p = 256'({x[1], x[0]}) * 256'({y[1], y[0]});
    case (s)
      2'd1:    o = {64'd0, p[127:64]};
      2'd2:    o = {p[255:192], p[191:128]};
      default: o = {p[127:64], p[63:0]};
    endcase
    return o;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      exp_r[cyc + STAGES] = model(a, b, rsel);
      exp_t[cyc + STAGES] = in_tag;
    end
    if (rst_n) begin
      if (exp_r.exists(cyc)) begin
        checks++;
        if (!out_valid || r !== exp_r[cyc] || out_tag !== exp_t[cyc]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: valid %0d r %h, expected %h", cyc, out_valid, r, exp_r[cyc]);
        end
        exp_r.delete(cyc);
      end else if (out_valid) begin
        checks++; failures++;
        $display("FAIL unexpected result at cycle %0d", cyc);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; a = '0; b = '0; rsel = 0; in_tag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      a[0] = {$urandom, $urandom}; b[0] = {$urandom, $urandom};
      a[1] = ($urandom % 2) ? {$urandom, $urandom} : 64'd0;
      b[1] = ($urandom % 2) ? {$urandom, $urandom} : 64'd0;
      if (t < 4) begin a = '1; b = '1; end      // largest operands
      rsel = 2'($urandom % 3);
      in_tag = 12'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (STAGES + 2) @(negedge clk);
    checks++;
    if (exp_r.num() != 0) begin failures++; $display("FAIL %0d results missing", exp_r.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

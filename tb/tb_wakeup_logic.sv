// tb_wakeup_logic: exhaustive check of the group wakeup over all 256 input
// combinations that can occur (an entry is never both head and tail of a
// group, so c_prev and c_i are not both set).
module tb_wakeup_logic;
  logic c_prev, rdy1_prev, rdy2_prev, c_i, rdy1_i, rdy2_i, rdy1_next, rdy2_next, iready;
  int checks = 0, failures = 0;

  wakeup_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic exp;
      {c_prev, rdy1_prev, rdy2_prev, c_i, rdy1_i, rdy2_i, rdy1_next, rdy2_next} = 8'(v);
      if (c_prev && c_i) continue;
      #1;
      // an entry waits for every operand of the group it belongs to
      exp = rdy1_i && rdy2_i;
      if (c_i)    exp = exp && rdy1_next && rdy2_next;
      if (c_prev) exp = exp && rdy1_prev && rdy2_prev;
      checks++;
      if (iready !== exp) begin failures++; $display("FAIL inputs %b: %b", 8'(v), iready); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

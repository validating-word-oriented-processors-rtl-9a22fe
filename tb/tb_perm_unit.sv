// tb_perm_unit: checks the (4,1) permutation unit: both networks against a
// bit-level model, configuration word k driving stages 2k and 2k+1, and a
// single configuration word (the other two zero) touching only its two
// stages.
module tb_perm_unit;
  import momr_pkg::*;
  word_t       data, result;
  word_t [2:0] cfg;
  logic        inv;
  int checks = 0, failures = 0;

  perm_unit dut (.data(data), .cfg(cfg), .inv(inv), .result(result));

  function automatic word_t model(word_t x, word_t [2:0] c, logic iv);
    word_t v, nv;
    v = x;
    for (int s = 0; s < 6; s++) begin
      int lg, d;
      lg = iv ? s : 5 - s;
      d  = 1 << lg;
      nv = v;
      for (int p = 0; p < 64; p++)
        if (((p >> lg) & 1) == 0 && c[s/2][(s%2)*32 + (((p >> (lg + 1)) << lg) | (p & (d - 1)))]) begin
          nv[p] = v[p + d]; nv[p + d] = v[p];
        end
      v = nv;
    end
    return v;
  endfunction

  task automatic check(string what);
    word_t exp;
    #1;
    exp = model(data, cfg, inv);
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s inv=%0d: %h -> %h, expected %h", what, inv, data, result, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // stage 0 of the butterfly swaps bits 0 and 32 with cfg[0][0]
    data = 64'h1; cfg = '0; cfg[0][0] = 1'b1; inv = 1'b0;
    #1; checks++;
    if (result !== 64'h1_0000_0000) begin failures++; $display("FAIL bfly stage 0 distance"); end
    // stage 0 of the inverse butterfly swaps bits 0 and 1
    inv = 1'b1;
    #1; checks++;
    if (result !== 64'h2) begin failures++; $display("FAIL ibfly stage 0 distance"); end
    // cfg[2][63] drives the last switch of stage 5
    data = 64'h8000_0000_0000_0000; cfg = '0; cfg[2][63] = 1'b1; inv = 1'b0;
    #1; checks++;
    if (result !== 64'h4000_0000_0000_0000) begin failures++; $display("FAIL bfly stage 5"); end
    for (int t = 0; t < 3000; t++) begin
      data = {$urandom, $urandom};
      inv  = $urandom;
      for (int k = 0; k < 3; k++) cfg[k] = {$urandom, $urandom};
      if (t % 4 == 0) begin
        int keep;
        keep = t % 3;
        for (int k = 0; k < 3; k++) if (k != keep) cfg[k] = '0;
      end
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

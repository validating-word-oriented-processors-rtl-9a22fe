// tb_bfly_net: checks the 64-bit butterfly network against a
// bit-level model of the network written here: random data and controls,
// all-zero controls (identity) and all-one controls (bit reversal).
module tb_bfly_net;
  logic [63:0]        din, dout;
  logic [5:0][31:0]   ctrl;
  int checks = 0, failures = 0;

  bfly_net #(.N(64)) dut (.din(din), .ctrl(ctrl), .dout(dout));

  function automatic logic [63:0] model(logic [63:0] x, logic [5:0][31:0] c);
    logic [63:0] v, nv;
    v = x;
    for (int s = 0; s < 6; s++) begin
      int lg, d;
      lg = 0 ? s : 5 - s;
      d  = 1 << lg;
      nv = v;
      for (int p = 0; p < 64; p++)
        if (((p >> lg) & 1) == 0 && c[s][((p >> (lg + 1)) << lg) | (p & (d - 1))]) begin
          nv[p] = v[p + d]; nv[p + d] = v[p];
        end
      v = nv;
    end
    return v;
  endfunction

  function automatic logic [63:0] rev(logic [63:0] x);
    for (int i = 0; i < 64; i++) rev[i] = x[63 - i];
  endfunction

  task automatic check(logic [63:0] exp, string what);
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: din %h -> %h, expected %h", what, din, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      din = {$urandom, $urandom}; ctrl = '0;
      check(din, "identity");
      ctrl = '1;
      check(rev(din), "reversal");
    end
    // single switches: exactly two bits trade places
    for (int s = 0; s < 6; s++)
      for (int j = 0; j < 32; j += 7) begin
        din = {$urandom, $urandom}; ctrl = '0; ctrl[s][j] = 1'b1;
        check(model(din, ctrl), "single switch");
      end
    for (int t = 0; t < 2000; t++) begin
      din = {$urandom, $urandom};
      for (int s = 0; s < 6; s++) ctrl[s] = $urandom;
      check(model(din, ctrl), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_select_logic: checks the ALU1/ALU2 select with C-bit propagation
// against a model on random request patterns, plus directed cases: a group
// at the oldest position takes both slots; a group picked by the ALU2
// selector is not granted; two multiplier or PU instructions never share a
// cycle.
module tb_select_logic;
  import momr_pkg::*;
  localparam int N = 16;
  logic [N-1:0] req, c;
  fu_e  [N-1:0] fu;
  logic g1_valid, g1_pair, g2_valid;
  logic [3:0] g1_idx, g2_idx;
  int checks = 0, failures = 0;

  select_logic #(.N(N)) dut (.*);

  task automatic check_model();
    int i, j;
    logic ev1, ep, ev2;
    i = -1; j = -1;
    for (int k = 0; k < N; k++) if (req[k] && i < 0) i = k;
    ev1 = i >= 0;
    ep  = ev1 && c[i];
    if (ev1 && !ep)
      for (int k = 0; k < N; k++)
        if (req[k] && k != i && j < 0 && !(fu[k] != FU_ALU && fu[k] == fu[i])) j = k;
    ev2 = j >= 0 && !c[j];
    #1;
    checks++;
    if (g1_valid !== ev1 || (ev1 && g1_idx !== 4'(i)) || g1_pair !== ep ||
        g2_valid !== ev2 || (ev2 && g2_idx !== 4'(j))) begin
      failures++;
      if (failures < 10) $display("FAIL req %b c %b: g1 %0d/%0d pair %0d g2 %0d/%0d, expected %0d/%0d %0d %0d/%0d",
                                  req, c, g1_valid, g1_idx, g1_pair, g2_valid, g2_idx, ev1, i, ep, ev2, j);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // group oldest: both entries, ALU2 bypassed
    req = 16'b0000_0000_0001_0100; c = 16'b0000_0000_0000_0100; fu = '0;
    check_model();
    checks++;
    if (!(g1_valid && g1_idx == 2 && g1_pair && !g2_valid)) begin failures++; $display("FAIL group grant"); end
    // single oldest, group next: the group is not granted to ALU2
    req = 16'b0000_0000_0001_0101; c = 16'b0000_0000_0000_0100;
    check_model();
    checks++;
    if (!(g1_valid && g1_idx == 0 && !g1_pair && !g2_valid)) begin failures++; $display("FAIL control unit 2"); end
    // two multiplier instructions: the second waits, an ALU op goes instead
    req = 16'b0000_0000_0000_0111; c = '0; fu = '0; fu[0] = FU_MUL; fu[1] = FU_MUL;
    check_model();
    checks++;
    if (!(g2_valid && g2_idx == 2)) begin failures++; $display("FAIL unit conflict"); end
    for (int t = 0; t < 5000; t++) begin
      req = 16'($urandom) & 16'($urandom);
      c   = 16'($urandom) & 16'($urandom) & 16'($urandom);
      for (int k = 0; k < N; k++) fu[k] = fu_e'($urandom % 3);
      check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_alu: checks every ALU operation on random and edge operands against a
// model written here (the subword min/max is computed from unpacked
// 16-bit values).
module tb_alu;
  import momr_pkg::*;
  opcode_e op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t model(opcode_e o, word_t x, word_t z);
    word_t r;
    int unsigned xs [4], zs [4];
    for (int k = 0; k < 4; k++) begin xs[k] = x[16*k +: 16]; zs[k] = z[16*k +: 16]; end
    case (o)
      OP_ADD: r = x + z;
      OP_SUB: r = x - z;
      OP_AND: r = x & z;
      OP_OR:  r = x | z;
      OP_XOR: r = x ^ z;
      OP_SLL: r = x << int'(z % 64);
      OP_SRL: r = x >> int'(z % 64);
      OP_PMIN: for (int k = 0; k < 4; k++) r[16*k +: 16] = 16'((xs[k] < zs[k]) ? xs[k] : zs[k]);
      OP_PMAX: for (int k = 0; k < 4; k++) r[16*k +: 16] = 16'((xs[k] > zs[k]) ? xs[k] : zs[k]);
      default: r = 0;
    endcase
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_e ops [9];
    ops = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_PMIN, OP_PMAX};
    for (int t = 0; t < 3000; t++) begin
      op = ops[t % 9];
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (t % 50 == 1) a = '1;
      if (t % 50 == 2) b = '1;
      if (t % 17 == 0) b[15:0] = a[15:0];
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %s %h %h -> %h", op.name(), a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_int_alu: random operands for every ALU operation against reference
// arithmetic written independently, plus corner values (overflow, negative
// comparison, shift by 31).
module tb_int_alu;
  import drf_pkg::*;
  op_e op;
  word_t a, b, y;
  int_alu dut (.*);
  int checks = 0, failures = 0;

  function automatic word_t refv(op_e o, word_t x, word_t z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      OP_ADD: return word_t'(longint'(x) + longint'(z));
      OP_SUB: return word_t'(longint'(x) - longint'(z));
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_SLT: return (sx < sz) ? 1 : 0;
      OP_SLL: return word_t'(longint'(x) * (longint'(1) << z[4:0]));
      OP_SRL: return word_t'(longint'(x) / (longint'(1) << z[4:0]));
      default: return 0;
    endcase
  endfunction

  task automatic t(op_e o, word_t x, word_t z);
    op = o; a = x; b = z; #1;
    checks++;
    if (y !== refv(o, x, z)) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h %h: got %h expected %h", o.name(), x, z, y, refv(o, x, z));
    end
  endtask

  initial begin
    t(OP_ADD, 32'hffffffff, 1); t(OP_SUB, 0, 1); t(OP_SLT, 32'h80000000, 1);
    t(OP_SLT, 1, 32'h80000000); t(OP_SLL, 1, 31); t(OP_SRL, 32'h80000000, 31);
    t(OP_MUL, 3, 4);
    for (int k = 0; k < 20000; k++) t(op_e'($urandom_range(0, 7)), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

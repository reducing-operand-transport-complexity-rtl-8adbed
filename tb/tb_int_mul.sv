// tb_int_mul: random and corner operands against the low 32 bits of a 64-bit
// product computed in the testbench; a non-multiply operation must give zero.
module tb_int_mul;
  import drf_pkg::*;
  op_e op;
  word_t a, b, y;
  int_mul dut (.*);
  int checks = 0, failures = 0;

  task automatic t(op_e o, word_t x, word_t z);
    word_t e;
    op = o; a = x; b = z; #1;
    e = (o == OP_MUL) ? word_t'(longint'(unsigned'(x)) * longint'(unsigned'(z))) : '0;
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", x, z, y, e);
    end
  endtask

  initial begin
    t(OP_MUL, 32'hffffffff, 32'hffffffff); t(OP_MUL, 32'h10000, 32'h10000);
    t(OP_MUL, 32'hfffffffd, 7); t(OP_ADD, 5, 6);
    for (int k = 0; k < 20000; k++) t(OP_MUL, $urandom, $urandom);
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

// int_alu: integer ALU of an IntALU cluster.
//
// Single-cycle combinational unit: add, subtract, and, or, xor, signed
// set-less-than and logical shifts (shift amount = low 5 bits of b). The
// operation set is this design's own choice of a minimal integer ALU; an
// operation it does not implement yields zero.
module int_alu
  import drf_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLT:  y = word_t'($signed(a) < $signed(b));
      OP_SLL:  y = a << b[4:0];
      OP_SRL:  y = a >> b[4:0];
      default: y = '0;
    endcase
  end

endmodule

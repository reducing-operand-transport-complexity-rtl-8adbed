// int_mul: integer multiplier of an IntMUL cluster.
//
// Returns the low 32 bits of a * b (identical for signed and unsigned
// operands). It is purely combinational; the cluster around it adds the
// pipeline registers that give the multiplier its latency (MUL_LAT, this
// design's own choice). Any operation other than multiply yields zero.
module int_mul
  import drf_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  assign y = (op == OP_MUL) ? a * b : '0;

endmodule

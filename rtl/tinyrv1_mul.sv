// TinyRV1 multiplier.
//
// Combinational 32 x 32-bit multiplier returning the low 32 bits of the
// product, as the RISC-V mul instruction does (the low half is the same for
// signed and unsigned operands). It sits beside the ALU in the execute
// stage and completes in the same cycle.
module tinyrv1_mul
  import tinyrv1_pkg::*;
(
  input  word_t in0,
  input  word_t in1,
  output word_t out
);

  assign out = in0 * in1;

endmodule

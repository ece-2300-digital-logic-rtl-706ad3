// TinyRV1 arithmetic unit.
//
// Adds its two 32-bit operands (add, addi, the address of lw and sw, and
// pc + 4 for jal) and reports whether they are equal, which drives the
// branch decision of bne. Purely combinational. TinyRV1 needs no other ALU
// function, so the unit has no function select.
module tinyrv1_alu
  import tinyrv1_pkg::*;
(
  input  word_t in0,
  input  word_t in1,
  output word_t out,
  output logic  eq
);

  assign out = in0 + in1;
  assign eq  = (in0 == in1);

endmodule

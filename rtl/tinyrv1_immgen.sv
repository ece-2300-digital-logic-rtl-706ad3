// TinyRV1 immediate generator.
//
// Extracts and sign-extends the immediate of a 32-bit instruction in one of
// the four RISC-V formats TinyRV1 uses, chosen by imm_type: I (addi, lw),
// S (sw), B (bne, a byte offset with bit 0 zero) and J (jal, likewise).
// Purely combinational. The block and its imm_type select follow the
// TinyRV1 datapaths; the bit layouts are the standard RISC-V ones.
module tinyrv1_immgen
  import tinyrv1_pkg::*;
(
  input  word_t     inst,
  input  imm_type_e imm_type,
  output word_t     imm
);

  always_comb begin
    unique case (imm_type)
      IMM_I:   imm = {{20{inst[31]}}, inst[31:20]};
      IMM_S:   imm = {{20{inst[31]}}, inst[31:25], inst[11:7]};
      IMM_B:   imm = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_J:   imm = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule

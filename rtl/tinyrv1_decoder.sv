// TinyRV1 control-signal table.
//
// Decodes one 32-bit instruction into the control bundle cs_t that steers
// the pipelined datapaths: which source registers are read (rs1_en, rs2_en),
// whether and where the result is written (rf_wen, rf_waddr), the immediate
// format, the operand selects, the execute-result select, the write-back
// select and the data-memory request. Purely combinational. A word that is
// not one of the eight TinyRV1 instructions decodes with inst_val low and all
// enables low, so it moves down the pipeline as a bubble.
//
// The register-read and register-write columns follow the instruction table
// of TinyRV1 (jal writes rd and reads nothing, jr reads rs1 and writes
// nothing, sw and bne write nothing). Jal's written value pc + 4 is formed by
// the ALU with op1 = pc and op2 = 4; that and the encodings are choices of
// this design.
module tinyrv1_decoder
  import tinyrv1_pkg::*;
(
  input  word_t inst,
  output cs_t   cs
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct7 = inst[31:25];

  always_comb begin
    cs          = CS_NOP;
    cs.rf_waddr = inst[11:7];
    unique case (opcode)
      OPC_OP: begin
        if (funct3 == 3'b000 && funct7 == 7'b0000000) begin
          cs.inst_val = 1'b1; cs.op = OP_ADD;
          cs.rs1_en = 1'b1; cs.rs2_en = 1'b1; cs.rf_wen = 1'b1;
        end else if (funct3 == 3'b000 && funct7 == 7'b0000001) begin
          cs.inst_val = 1'b1; cs.op = OP_MUL;
          cs.rs1_en = 1'b1; cs.rs2_en = 1'b1; cs.rf_wen = 1'b1;
          cs.result_sel = RES_MUL;
        end
      end
      OPC_OP_IMM: if (funct3 == 3'b000) begin
        cs.inst_val = 1'b1; cs.op = OP_ADDI;
        cs.rs1_en = 1'b1; cs.rf_wen = 1'b1;
        cs.imm_type = IMM_I; cs.op2_sel = OP2_IMM;
      end
      OPC_LOAD: if (funct3 == 3'b010) begin
        cs.inst_val = 1'b1; cs.op = OP_LW;
        cs.rs1_en = 1'b1; cs.rf_wen = 1'b1;
        cs.imm_type = IMM_I; cs.op2_sel = OP2_IMM;
        cs.wb_sel = WB_MEM; cs.mem_rd = 1'b1;
      end
      OPC_STORE: if (funct3 == 3'b010) begin
        cs.inst_val = 1'b1; cs.op = OP_SW;
        cs.rs1_en = 1'b1; cs.rs2_en = 1'b1;
        cs.imm_type = IMM_S; cs.op2_sel = OP2_IMM;
        cs.mem_wr = 1'b1;
      end
      OPC_JAL: begin
        cs.inst_val = 1'b1; cs.op = OP_JAL;
        cs.rf_wen = 1'b1;
        cs.imm_type = IMM_J; cs.op1_sel = OP1_PC; cs.op2_sel = OP2_FOUR;
      end
      OPC_JALR: if (funct3 == 3'b000) begin
        cs.inst_val = 1'b1; cs.op = OP_JR;
        cs.rs1_en = 1'b1;
      end
      OPC_BRANCH: if (funct3 == 3'b001) begin
        cs.inst_val = 1'b1; cs.op = OP_BNE;
        cs.rs1_en = 1'b1; cs.rs2_en = 1'b1;
        cs.imm_type = IMM_B;
      end
      default: ;
    endcase
    if (!cs.inst_val) cs.rf_waddr = '0;
  end

endmodule

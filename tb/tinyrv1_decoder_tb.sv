// Self-checking testbench of the TinyRV1 control-signal table.
//
// Encodes each of the eight instructions with random register fields and
// immediates and checks every control signal against the expected row,
// written out here from the instruction table (which registers each
// instruction reads and writes, its immediate format, operand, result and
// write-back selects and memory access). Words that are not TinyRV1
// instructions (other opcodes, wrong funct3 or funct7) must decode as
// bubbles with every enable low.
module tinyrv1_decoder_tb;
  import tinyrv1_pkg::*;
  import tinyrv1_tb_pkg::*;

  word_t inst;
  cs_t   cs;
  int unsigned checks = 0, failures = 0;

  tinyrv1_decoder dut (.inst, .cs);

  // Expected row: rs1_en rs2_en rf_wen imm op1 op2 res wb rd wr
  task automatic expect_row(string name, op_e op, logic r1, logic r2, logic wen,
                            imm_type_e it, op1_sel_e o1, op2_sel_e o2,
                            result_sel_e rs, wb_sel_e wb, logic mrd, logic mwr,
                            rid_t rd);
    logic ok;
    inst = img[widx(RESET_PC)];
    #1;
    ok = cs.inst_val && cs.op == op && cs.rs1_en == r1 && cs.rs2_en == r2
      && cs.rf_wen == wen && (!wen || cs.rf_waddr == rd)
      && (op inside {OP_ADD, OP_MUL, OP_JR} || cs.imm_type == it)
      && cs.op1_sel == o1 && (op inside {OP_JR} || cs.op2_sel == o2)
      && cs.result_sel == rs && cs.wb_sel == wb
      && cs.mem_rd == mrd && cs.mem_wr == mwr;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (%h) decoded as %p", name, inst, cs);
    end
  endtask

  task automatic expect_bubble(word_t w);
    inst = w;
    #1;
    checks++;
    if (cs.inst_val || cs.rs1_en || cs.rs2_en || cs.rf_wen || cs.mem_rd || cs.mem_wr) begin
      failures++;
      $display("FAIL: %h is not a TinyRV1 instruction but decoded as %p", w, cs);
    end
  endtask

  initial begin
    int rd, r1, r2;
    img_clear();
    for (int n = 0; n < 200; n++) begin
      rd = int'($urandom_range(0, 31)); r1 = int'($urandom_range(0, 31));
      r2 = int'($urandom_range(0, 31));
      asm_pc = RESET_PC; add(rd, r1, r2);
      expect_row("add", OP_ADD, 1, 1, 1, IMM_I, OP1_RS1, OP2_RS2, RES_ALU, WB_RESULT, 0, 0, rid_t'(rd));
      asm_pc = RESET_PC; mul(rd, r1, r2);
      expect_row("mul", OP_MUL, 1, 1, 1, IMM_I, OP1_RS1, OP2_RS2, RES_MUL, WB_RESULT, 0, 0, rid_t'(rd));
      asm_pc = RESET_PC; addi(rd, r1, int'($urandom_range(0, 4095)) - 2048);
      expect_row("addi", OP_ADDI, 1, 0, 1, IMM_I, OP1_RS1, OP2_IMM, RES_ALU, WB_RESULT, 0, 0, rid_t'(rd));
      asm_pc = RESET_PC; lw(rd, r1, int'($urandom_range(0, 4095)) - 2048);
      expect_row("lw", OP_LW, 1, 0, 1, IMM_I, OP1_RS1, OP2_IMM, RES_ALU, WB_MEM, 1, 0, rid_t'(rd));
      asm_pc = RESET_PC; sw(r2, r1, int'($urandom_range(0, 4095)) - 2048);
      expect_row("sw", OP_SW, 1, 1, 0, IMM_S, OP1_RS1, OP2_IMM, RES_ALU, WB_RESULT, 0, 1, '0);
      asm_pc = RESET_PC; jal(rd, 2 * (int'($urandom_range(0, 1000)) - 500));
      expect_row("jal", OP_JAL, 0, 0, 1, IMM_J, OP1_PC, OP2_FOUR, RES_ALU, WB_RESULT, 0, 0, rid_t'(rd));
      asm_pc = RESET_PC; jr(r1);
      expect_row("jr", OP_JR, 1, 0, 0, IMM_I, OP1_RS1, OP2_RS2, RES_ALU, WB_RESULT, 0, 0, '0);
      asm_pc = RESET_PC; bne(r1, r2, 2 * (int'($urandom_range(0, 1000)) - 500));
      expect_row("bne", OP_BNE, 1, 1, 0, IMM_B, OP1_RS1, OP2_RS2, RES_ALU, WB_RESULT, 0, 0, '0);
      // Not TinyRV1: lui, sub, and, beq, lb, sb, auipc
      expect_bubble({20'($urandom), 5'(rd), 7'b0110111});
      expect_bubble({7'b0100000, 5'(r2), 5'(r1), 3'b000, 5'(rd), 7'b0110011});
      expect_bubble({7'b0000000, 5'(r2), 5'(r1), 3'b111, 5'(rd), 7'b0110011});
      expect_bubble({7'($urandom), 5'(r2), 5'(r1), 3'b000, 5'($urandom), 7'b1100011});
      expect_bubble({12'($urandom), 5'(r1), 3'b000, 5'(rd), 7'b0000011});
      expect_bubble({7'($urandom), 5'(r2), 5'(r1), 3'b000, 5'($urandom), 7'b0100011});
      expect_bubble({20'($urandom), 5'(rd), 7'b0010111});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

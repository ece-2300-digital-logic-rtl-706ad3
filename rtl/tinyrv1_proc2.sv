// Two-stage pipelined TinyRV1 processor.
//
// Stage A fetches at pc_A, decodes, reads the register file, selects the
// operands and computes the jump/branch target pc_A + imm. Stage B runs the
// ALU and the multiplier, accesses data memory and writes the register
// file. The pipeline registers between them are val_AB, cs_AB, op1_AB,
// op2_AB, sd_AB and btarg_AB.
//
// Hazards:
//  * RAW through registers: the only producer still in flight is the
//    instruction in B, and its write-back value (load data included, since
//    memory answers within the cycle) is bypassed to A as bypass_from_B.
//    No RAW stall is therefore ever needed.
//  * Control: jal and jr are resolved in A and redirect the next fetch with
//    no lost cycle. bne is resolved in B with always-not-taken prediction:
//    squash_A = val_B && (op_B == bne) && !eq_B kills the instruction in A
//    and fetches btarg_AB (one lost cycle).
// The two-stage split, the bypass path and the squash condition follow the
// two-stage TinyRV1 pipeline; that jr takes the value of rs1 as its target
// unchanged, the reset address and the interface details are choices of
// this design.
//
// Interface: as tinyrv1_proc5. Instruction and data memory answer
// combinationally in the same cycle; dmemreq_val asks for a word access,
// dmemreq_wen marks a write. rst is synchronous and active high.
module tinyrv1_proc2
  import tinyrv1_pkg::*;
(
  input  logic  clk,
  input  logic  rst,

  output word_t imemreq_addr,
  input  word_t imemresp_data,

  output logic  dmemreq_val,
  output logic  dmemreq_wen,
  output word_t dmemreq_addr,
  output word_t dmemreq_data,
  input  word_t dmemresp_data
);

  logic    squash_A;
  pc_sel_e pc_sel_A;
  word_t   bypass_from_B;
  word_t   btarg_AB;
  logic    val_AB;
  cs_t     cs_AB;

  // ---------------------------------------------------------------------
  // A stage
  // ---------------------------------------------------------------------
  word_t pc_A, pc_plus4_A, pc_next_A;
  word_t inst_A;
  cs_t   cs_A;
  rid_t  rs1_A, rs2_A;
  word_t rf_rdata1_A, rf_rdata2_A;
  word_t rs1_byp_A, rs2_byp_A;
  word_t imm_A, targ_A;
  word_t op1_A, op2_A;
  logic  op1_byp_sel_A, op2_byp_sel_A;   // 1: take bypass_from_B

  // Register-file write port, driven from B.
  logic  rf_wen_B;
  rid_t  rf_waddr_B;

  assign imemreq_addr = pc_A;
  assign inst_A       = imemresp_data;
  assign rs1_A        = inst_A[19:15];
  assign rs2_A        = inst_A[24:20];

  tinyrv1_decoder u_decoder (
    .inst (inst_A),
    .cs   (cs_A)
  );

  tinyrv1_regfile u_regfile (
    .clk    (clk),
    .raddr0 (rs1_A),
    .rdata0 (rf_rdata1_A),
    .raddr1 (rs2_A),
    .rdata1 (rf_rdata2_A),
    .wen    (rf_wen_B),
    .waddr  (rf_waddr_B),
    .wdata  (bypass_from_B)
  );

  tinyrv1_immgen u_immgen (
    .inst     (inst_A),
    .imm_type (cs_A.imm_type),
    .imm      (imm_A)
  );

  assign targ_A = pc_A + imm_A;

  // Bypass from B when B writes a register that A reads.
  assign op1_byp_sel_A = cs_A.rs1_en && val_AB && cs_AB.rf_wen
                      && (rs1_A == cs_AB.rf_waddr) && (cs_AB.rf_waddr != '0);
  assign op2_byp_sel_A = cs_A.rs2_en && val_AB && cs_AB.rf_wen
                      && (rs2_A == cs_AB.rf_waddr) && (cs_AB.rf_waddr != '0);

  assign rs1_byp_A = op1_byp_sel_A ? bypass_from_B : rf_rdata1_A;
  assign rs2_byp_A = op2_byp_sel_A ? bypass_from_B : rf_rdata2_A;

  assign op1_A = (cs_A.op1_sel == OP1_PC) ? pc_A : rs1_byp_A;

  always_comb begin
    unique case (cs_A.op2_sel)
      OP2_IMM:  op2_A = imm_A;
      OP2_FOUR: op2_A = 32'd4;
      default:  op2_A = rs2_byp_A;
    endcase
  end

  // Next PC: a taken branch in B wins over a jump in A.
  assign pc_plus4_A = pc_A + 32'd4;

  always_comb begin
    if (squash_A)                pc_sel_A = PC_BTARG;
    else if (cs_A.op == OP_JAL)  pc_sel_A = PC_JTARG;
    else if (cs_A.op == OP_JR)   pc_sel_A = PC_JR;
    else                         pc_sel_A = PC_PLUS4;
  end

  always_comb begin
    unique case (pc_sel_A)
      PC_BTARG: pc_next_A = btarg_AB;
      PC_JTARG: pc_next_A = targ_A;
      PC_JR:    pc_next_A = rs1_byp_A;
      default:  pc_next_A = pc_plus4_A;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc_A <= RESET_PC;
    else     pc_A <= pc_next_A;
  end

  // A/B pipeline register
  word_t op1_AB, op2_AB, sd_AB;

  always_ff @(posedge clk) begin
    if (rst) begin
      val_AB   <= 1'b0;
      cs_AB    <= CS_NOP;
      op1_AB   <= '0;
      op2_AB   <= '0;
      sd_AB    <= '0;
      btarg_AB <= '0;
    end else begin
      val_AB   <= !squash_A;
      cs_AB    <= cs_A;
      op1_AB   <= op1_A;
      op2_AB   <= op2_A;
      sd_AB    <= rs2_byp_A;
      btarg_AB <= targ_A;
    end
  end

  // ---------------------------------------------------------------------
  // B stage
  // ---------------------------------------------------------------------
  word_t alu_out_B, mul_out_B, result_B;
  logic  eq_B;

  tinyrv1_alu u_alu (
    .in0 (op1_AB),
    .in1 (op2_AB),
    .out (alu_out_B),
    .eq  (eq_B)
  );

  tinyrv1_mul u_mul (
    .in0 (op1_AB),
    .in1 (op2_AB),
    .out (mul_out_B)
  );

  assign result_B = (cs_AB.result_sel == RES_MUL) ? mul_out_B : alu_out_B;
  assign squash_A = val_AB && (cs_AB.op == OP_BNE) && !eq_B;

  assign dmemreq_val  = val_AB && (cs_AB.mem_rd || cs_AB.mem_wr);
  assign dmemreq_wen  = val_AB && cs_AB.mem_wr;
  assign dmemreq_addr = result_B;
  assign dmemreq_data = sd_AB;

  assign bypass_from_B = (cs_AB.wb_sel == WB_MEM) ? dmemresp_data : result_B;

  assign rf_wen_B   = val_AB && cs_AB.rf_wen;
  assign rf_waddr_B = cs_AB.rf_waddr;

  // A data-memory request is a read or a write, never both.
  a_mem_one_kind: assert property (@(posedge clk) disable iff (rst)
    !(val_AB && cs_AB.mem_rd && cs_AB.mem_wr));

endmodule

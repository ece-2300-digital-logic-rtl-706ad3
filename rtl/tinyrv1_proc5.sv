// Five-stage pipelined TinyRV1 processor.
//
// Stages: F fetches at pc_F; D decodes, reads the register file, selects
// bypassed operands and computes the jump/branch target pc_FD + imm; X runs
// the ALU and the multiplier and resolves bne; M accesses data memory; W
// writes the register file. Pipeline registers are named after the two
// stages they separate (ir_FD, op1_DX, result_XM, result_MW, ...), and each
// carries a valid bit and the decoded control bundle cs_t.
//
// Hazards:
//  * RAW through registers is resolved by full bypassing: each source
//    operand in D takes the newest of bypass_from_X (the X result),
//    bypass_from_M (the M write-back value, load data included) and
//    bypass_from_W (result_MW) whose destination matches, else the register
//    file. The only stall left is load-use: a lw in X whose destination a
//    D instruction reads holds F and D for one cycle and sends a bubble
//    into X (stall_D, stall_F = stall_D).
//  * Control: the hardware predicts not taken. jal and jr redirect the PC
//    from D and squash the instruction in F (one lost cycle); a taken bne
//    redirects from X to btarg_DX and squashes the instructions in F and D
//    (two lost cycles). A squash from X wins over a jump in D.
//  * Loads and stores reach memory in order in M, so RAW through memory
//    needs nothing more.
// The stage split, the bypass paths, the stall and squash conditions and the
// not-taken policy follow the fully bypassed TinyRV1 pipeline; that jr
// takes the value of rs1 as its target unchanged, the reset address and the
// interface details are choices of this design.
//
// Interface: instruction and data memory answer combinationally in the same
// cycle. imemreq_addr is the fetch address, always valid after reset, and
// imemresp_data the instruction word. dmemreq_val asks for a word access at
// dmemreq_addr, a write of dmemreq_data when dmemreq_wen is high; on a read
// dmemresp_data returns the word in the same cycle. rst is synchronous and
// active high; the first fetch is at RESET_PC in the cycle after reset.
module tinyrv1_proc5
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

  // ---------------------------------------------------------------------
  // Signals used across stages
  // ---------------------------------------------------------------------
  logic  stall_F, stall_D;
  logic  squash_F, squash_D;
  logic  squash_X;          // taken bne in X
  logic  jump_D;            // jal or jr leaving D this cycle
  logic  reg_en_F, reg_en_D;
  pc_sel_e pc_sel_F;

  word_t bypass_from_X, bypass_from_M, bypass_from_W;
  word_t btarg_DX, jtarg_D, jr_D;

  logic  val_FD, val_DX, val_XM, val_MW;
  cs_t   cs_DX, cs_XM, cs_MW;

  // ---------------------------------------------------------------------
  // F stage
  // ---------------------------------------------------------------------
  word_t pc_F, pc_plus4_F, pc_next_F;

  assign pc_plus4_F = pc_F + 32'd4;

  always_comb begin
    unique case (pc_sel_F)
      PC_BTARG: pc_next_F = btarg_DX;
      PC_JTARG: pc_next_F = jtarg_D;
      PC_JR:    pc_next_F = jr_D;
      default:  pc_next_F = pc_plus4_F;
    endcase
  end

  assign reg_en_F = !stall_F;

  always_ff @(posedge clk) begin
    if (rst)           pc_F <= RESET_PC;
    else if (reg_en_F) pc_F <= pc_next_F;
  end

  assign imemreq_addr = pc_F;

  // F/D pipeline register
  word_t ir_FD, pc_FD;

  assign reg_en_D = !stall_D;

  always_ff @(posedge clk) begin
    if (rst) begin
      val_FD <= 1'b0;
      ir_FD  <= '0;
      pc_FD  <= '0;
    end else if (reg_en_D) begin
      val_FD <= !squash_F;
      ir_FD  <= imemresp_data;
      pc_FD  <= pc_F;
    end
  end

  // ---------------------------------------------------------------------
  // D stage
  // ---------------------------------------------------------------------
  cs_t   cs_D;
  logic  val_D;
  rid_t  rs1_D, rs2_D;
  word_t rf_rdata1_D, rf_rdata2_D;
  word_t rs1_byp_D, rs2_byp_D;
  word_t imm_D, targ_D;
  word_t op1_D, op2_D;
  byp_sel_e op1_byp_sel_D, op2_byp_sel_D;

  // Register-file write port, driven from W.
  logic  rf_wen_W;
  rid_t  rf_waddr_W;
  word_t result_MW;

  tinyrv1_decoder u_decoder (
    .inst (ir_FD),
    .cs   (cs_D)
  );

  // A squashed instruction in D is no longer valid.
  assign val_D = val_FD && !squash_D;
  assign rs1_D = ir_FD[19:15];
  assign rs2_D = ir_FD[24:20];

  tinyrv1_regfile u_regfile (
    .clk    (clk),
    .raddr0 (rs1_D),
    .rdata0 (rf_rdata1_D),
    .raddr1 (rs2_D),
    .rdata1 (rf_rdata2_D),
    .wen    (rf_wen_W),
    .waddr  (rf_waddr_W),
    .wdata  (result_MW)
  );

  tinyrv1_immgen u_immgen (
    .inst     (ir_FD),
    .imm_type (cs_D.imm_type),
    .imm      (imm_D)
  );

  // Jump and branch target adder.
  assign targ_D  = pc_FD + imm_D;
  assign jtarg_D = targ_D;

  // Hazard detection: a later stage that will write a register the D
  // instruction reads. The X match splits into bypass (ALU/mul result) and
  // load-use stall (load data not ready until M).
  logic waddr_X_rs1_D, waddr_X_rs2_D;
  logic bypass_waddr_X_rs1_D, bypass_waddr_X_rs2_D;
  logic bypass_waddr_M_rs1_D, bypass_waddr_M_rs2_D;
  logic bypass_waddr_W_rs1_D, bypass_waddr_W_rs2_D;
  logic stall_load_use_X_rs1_D, stall_load_use_X_rs2_D;

  assign waddr_X_rs1_D = val_D && cs_D.rs1_en && val_DX && cs_DX.rf_wen
                      && (rs1_D == cs_DX.rf_waddr) && (cs_DX.rf_waddr != '0);
  assign waddr_X_rs2_D = val_D && cs_D.rs2_en && val_DX && cs_DX.rf_wen
                      && (rs2_D == cs_DX.rf_waddr) && (cs_DX.rf_waddr != '0);

  assign stall_load_use_X_rs1_D = waddr_X_rs1_D && (cs_DX.op == OP_LW);
  assign stall_load_use_X_rs2_D = waddr_X_rs2_D && (cs_DX.op == OP_LW);
  assign bypass_waddr_X_rs1_D   = waddr_X_rs1_D && (cs_DX.op != OP_LW);
  assign bypass_waddr_X_rs2_D   = waddr_X_rs2_D && (cs_DX.op != OP_LW);

  assign bypass_waddr_M_rs1_D = val_D && cs_D.rs1_en && val_XM && cs_XM.rf_wen
                             && (rs1_D == cs_XM.rf_waddr) && (cs_XM.rf_waddr != '0);
  assign bypass_waddr_M_rs2_D = val_D && cs_D.rs2_en && val_XM && cs_XM.rf_wen
                             && (rs2_D == cs_XM.rf_waddr) && (cs_XM.rf_waddr != '0);
  assign bypass_waddr_W_rs1_D = val_D && cs_D.rs1_en && val_MW && cs_MW.rf_wen
                             && (rs1_D == cs_MW.rf_waddr) && (cs_MW.rf_waddr != '0);
  assign bypass_waddr_W_rs2_D = val_D && cs_D.rs2_en && val_MW && cs_MW.rf_wen
                             && (rs2_D == cs_MW.rf_waddr) && (cs_MW.rf_waddr != '0);

  assign stall_D = val_D && (stall_load_use_X_rs1_D || stall_load_use_X_rs2_D);
  assign stall_F = stall_D;

  // Bypass mux selects: the youngest producer wins.
  always_comb begin
    if      (bypass_waddr_X_rs1_D) op1_byp_sel_D = BYP_X;
    else if (bypass_waddr_M_rs1_D) op1_byp_sel_D = BYP_M;
    else if (bypass_waddr_W_rs1_D) op1_byp_sel_D = BYP_W;
    else                           op1_byp_sel_D = BYP_RF;
    if      (bypass_waddr_X_rs2_D) op2_byp_sel_D = BYP_X;
    else if (bypass_waddr_M_rs2_D) op2_byp_sel_D = BYP_M;
    else if (bypass_waddr_W_rs2_D) op2_byp_sel_D = BYP_W;
    else                           op2_byp_sel_D = BYP_RF;
  end

  always_comb begin
    unique case (op1_byp_sel_D)
      BYP_X:   rs1_byp_D = bypass_from_X;
      BYP_M:   rs1_byp_D = bypass_from_M;
      BYP_W:   rs1_byp_D = bypass_from_W;
      default: rs1_byp_D = rf_rdata1_D;
    endcase
    unique case (op2_byp_sel_D)
      BYP_X:   rs2_byp_D = bypass_from_X;
      BYP_M:   rs2_byp_D = bypass_from_M;
      BYP_W:   rs2_byp_D = bypass_from_W;
      default: rs2_byp_D = rf_rdata2_D;
    endcase
  end

  assign jr_D = rs1_byp_D;

  // Operand selects.
  assign op1_D = (cs_D.op1_sel == OP1_PC) ? pc_FD : rs1_byp_D;

  always_comb begin
    unique case (cs_D.op2_sel)
      OP2_IMM:  op2_D = imm_D;
      OP2_FOUR: op2_D = 32'd4;
      default:  op2_D = rs2_byp_D;
    endcase
  end

  // Jumps leave D only when D is not stalled (jr may wait for a load).
  assign jump_D = val_D && !stall_D
               && ((cs_D.op == OP_JAL) || (cs_D.op == OP_JR));

  // Squash and PC select. A taken branch in X squashes F and D; a jump in D
  // squashes F.
  assign squash_D = squash_X;
  assign squash_F = squash_X || jump_D;

  always_comb begin
    if (squash_X)                       pc_sel_F = PC_BTARG;
    else if (jump_D && cs_D.op == OP_JAL) pc_sel_F = PC_JTARG;
    else if (jump_D)                    pc_sel_F = PC_JR;
    else                                pc_sel_F = PC_PLUS4;
  end

  // D/X pipeline register
  word_t op1_DX, op2_DX, sd_DX;

  always_ff @(posedge clk) begin
    if (rst) begin
      val_DX   <= 1'b0;
      cs_DX    <= CS_NOP;
      op1_DX   <= '0;
      op2_DX   <= '0;
      sd_DX    <= '0;
      btarg_DX <= '0;
    end else begin
      val_DX   <= val_D && !stall_D;
      cs_DX    <= cs_D;
      op1_DX   <= op1_D;
      op2_DX   <= op2_D;
      sd_DX    <= rs2_byp_D;
      btarg_DX <= targ_D;
    end
  end

  // ---------------------------------------------------------------------
  // X stage
  // ---------------------------------------------------------------------
  word_t alu_out_X, mul_out_X, result_X;
  logic  eq_X;

  tinyrv1_alu u_alu (
    .in0 (op1_DX),
    .in1 (op2_DX),
    .out (alu_out_X),
    .eq  (eq_X)
  );

  tinyrv1_mul u_mul (
    .in0 (op1_DX),
    .in1 (op2_DX),
    .out (mul_out_X)
  );

  assign result_X      = (cs_DX.result_sel == RES_MUL) ? mul_out_X : alu_out_X;
  assign bypass_from_X = result_X;
  assign squash_X      = val_DX && (cs_DX.op == OP_BNE) && !eq_X;

  // X/M pipeline register
  word_t result_XM, sd_XM;

  always_ff @(posedge clk) begin
    if (rst) begin
      val_XM    <= 1'b0;
      cs_XM     <= CS_NOP;
      result_XM <= '0;
      sd_XM     <= '0;
    end else begin
      val_XM    <= val_DX;
      cs_XM     <= cs_DX;
      result_XM <= result_X;
      sd_XM     <= sd_DX;
    end
  end

  // ---------------------------------------------------------------------
  // M stage
  // ---------------------------------------------------------------------
  word_t wb_M;

  assign dmemreq_val  = val_XM && (cs_XM.mem_rd || cs_XM.mem_wr);
  assign dmemreq_wen  = val_XM && cs_XM.mem_wr;
  assign dmemreq_addr = result_XM;
  assign dmemreq_data = sd_XM;

  assign wb_M          = (cs_XM.wb_sel == WB_MEM) ? dmemresp_data : result_XM;
  assign bypass_from_M = wb_M;

  // M/W pipeline register
  always_ff @(posedge clk) begin
    if (rst) begin
      val_MW    <= 1'b0;
      cs_MW     <= CS_NOP;
      result_MW <= '0;
    end else begin
      val_MW    <= val_XM;
      cs_MW     <= cs_XM;
      result_MW <= wb_M;
    end
  end

  // ---------------------------------------------------------------------
  // W stage
  // ---------------------------------------------------------------------
  assign rf_wen_W      = val_MW && cs_MW.rf_wen;
  assign rf_waddr_W    = cs_MW.rf_waddr;
  assign bypass_from_W = result_MW;

  // ---------------------------------------------------------------------
  // Rules of the pipeline control
  // ---------------------------------------------------------------------
  // A load-use stall and a taken branch both originate in X and cannot
  // coincide.
  a_stall_squash_excl: assert property (@(posedge clk) disable iff (rst)
    !(stall_D && squash_X));
  // A jump never leaves D while D is stalled.
  a_jump_not_stalled: assert property (@(posedge clk) disable iff (rst)
    !(jump_D && stall_D));

endmodule

// TinyRV1 shared definitions.
//
// TinyRV1 is an eight-instruction subset of RV32I/RV32M: add, addi, mul,
// lw, sw, jal, jr and bne. This package holds the standard RISC-V encodings
// of those instructions, the select encodings of the datapath muxes and the
// control-signal bundle that the decoder produces and the pipelines carry
// from stage to stage. The instruction set and the mux names follow the
// pipelined TinyRV1 datapaths; the binary encodings are the RISC-V ones, and
// the select encodings and reset address are choices of this design.
package tinyrv1_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      rid_t;

  // Address the program counter takes after reset.
  localparam word_t RESET_PC = 32'h0000_0200;

  // Major opcodes (instruction bits 6:0).
  localparam logic [6:0] OPC_OP     = 7'b0110011;  // add, mul
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;  // addi
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;  // lw
  localparam logic [6:0] OPC_STORE  = 7'b0100011;  // sw
  localparam logic [6:0] OPC_JAL    = 7'b1101111;  // jal
  localparam logic [6:0] OPC_JALR   = 7'b1100111;  // jr
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;  // bne

  // The instruction an operation decodes as.
  typedef enum logic [3:0] {
    OP_INV  = 4'd0,  // not a TinyRV1 instruction
    OP_ADD  = 4'd1,
    OP_ADDI = 4'd2,
    OP_MUL  = 4'd3,
    OP_LW   = 4'd4,
    OP_SW   = 4'd5,
    OP_JAL  = 4'd6,
    OP_JR   = 4'd7,
    OP_BNE  = 4'd8
  } op_e;

  // imm_type: which immediate immgen produces.
  typedef enum logic [1:0] {
    IMM_I = 2'd0,
    IMM_S = 2'd1,
    IMM_B = 2'd2,
    IMM_J = 2'd3
  } imm_type_e;

  // op1_sel: first ALU/multiplier operand.
  typedef enum logic {
    OP1_RS1 = 1'b0,
    OP1_PC  = 1'b1
  } op1_sel_e;

  // op2_sel: second ALU/multiplier operand.
  typedef enum logic [1:0] {
    OP2_RS2   = 2'd0,
    OP2_IMM   = 2'd1,
    OP2_FOUR  = 2'd2   // constant 4, so that jal writes pc + 4
  } op2_sel_e;

  // result_sel: execute-stage result.
  typedef enum logic {
    RES_ALU = 1'b0,
    RES_MUL = 1'b1
  } result_sel_e;

  // wb_sel: value written back.
  typedef enum logic {
    WB_RESULT = 1'b0,
    WB_MEM    = 1'b1
  } wb_sel_e;

  // Bypass-mux select in the five-stage pipeline (op1_byp_sel / op2_byp_sel).
  typedef enum logic [1:0] {
    BYP_RF = 2'd0,
    BYP_X  = 2'd1,
    BYP_M  = 2'd2,
    BYP_W  = 2'd3
  } byp_sel_e;

  // pc_sel: next fetch address.
  typedef enum logic [1:0] {
    PC_PLUS4 = 2'd0,
    PC_JR    = 2'd1,
    PC_JTARG = 2'd2,
    PC_BTARG = 2'd3
  } pc_sel_e;

  // One row of the control-signal table.
  typedef struct packed {
    logic        inst_val;   // a TinyRV1 instruction
    op_e         op;
    logic        rs1_en;     // reads rs1
    logic        rs2_en;     // reads rs2
    logic        rf_wen;     // writes rd
    rid_t        rf_waddr;
    imm_type_e   imm_type;
    op1_sel_e    op1_sel;
    op2_sel_e    op2_sel;
    result_sel_e result_sel;
    wb_sel_e     wb_sel;
    logic        mem_rd;     // lw
    logic        mem_wr;     // sw
  } cs_t;

  // Control signals of an empty pipeline slot.
  localparam cs_t CS_NOP = '{
    inst_val:   1'b0,
    op:         OP_INV,
    rs1_en:     1'b0,
    rs2_en:     1'b0,
    rf_wen:     1'b0,
    rf_waddr:   5'd0,
    imm_type:   IMM_I,
    op1_sel:    OP1_RS1,
    op2_sel:    OP2_RS2,
    result_sel: RES_ALU,
    wb_sel:     WB_RESULT,
    mem_rd:     1'b0,
    mem_wr:     1'b0
  };

endpackage

// Test support for the TinyRV1 processors.
//
// Holds a memory image that tests fill with an assembler (one encoder
// function per TinyRV1 instruction, emitting at asm_pc), and an
// instruction-set reference model that runs the same image with one
// instruction per step. Besides the final registers and memory, the model
// reports how many load-use pairs, jumps and taken branches the program
// executed, and from those how many cycles each pipeline takes from its
// first instruction to its halt instruction, counted in the decode stage:
//   five-stage: one cycle per instruction, plus 1 per load followed
//               directly by an instruction that reads its destination,
//               plus 1 per jal or jr, plus 2 per taken bne;
//   two-stage:  one cycle per instruction, plus 1 per taken bne.
// Programs end with "jal x0, 0", a jump to itself, at halt_pc. Every branch
// and jump target must lie at or before halt_pc, and halt_pc must only be
// reached once, at the end.
package tinyrv1_tb_pkg;
  import tinyrv1_pkg::*;

  localparam int unsigned MEM_WORDS = 16384;          // 64 KiB
  localparam int unsigned MEM_AW    = $clog2(MEM_WORDS);

  // Table the register prologue loads from: word r holds x<r>'s value.
  localparam word_t REG_TABLE = 32'h0000_0100;

  word_t img [MEM_WORDS];
  word_t asm_pc;

  function automatic int unsigned widx(word_t addr);
    return int'(addr[MEM_AW+1:2]);
  endfunction

  function automatic void img_clear();
    foreach (img[i]) img[i] = '0;
    asm_pc = RESET_PC;
  endfunction

  function automatic void poke(word_t addr, word_t data);
    img[widx(addr)] = data;
  endfunction

  function automatic void emit(word_t inst);
    img[widx(asm_pc)] = inst;
    asm_pc += 32'd4;
  endfunction

  // ---- encoders --------------------------------------------------------
  function automatic word_t enc_r(logic [6:0] f7, int rd, int rs1, int rs2);
    return {f7, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011};
  endfunction
  function automatic word_t enc_i(logic [6:0] opc, logic [2:0] f3,
                                  int rd, int rs1, int imm);
    logic [11:0] i12 = 12'(imm);
    return {i12, 5'(rs1), f3, 5'(rd), opc};
  endfunction

  function automatic void add (int rd, int rs1, int rs2); emit(enc_r(7'b0000000, rd, rs1, rs2)); endfunction
  function automatic void mul (int rd, int rs1, int rs2); emit(enc_r(7'b0000001, rd, rs1, rs2)); endfunction
  function automatic void addi(int rd, int rs1, int imm); emit(enc_i(7'b0010011, 3'b000, rd, rs1, imm)); endfunction
  function automatic void lw  (int rd, int rs1, int imm); emit(enc_i(7'b0000011, 3'b010, rd, rs1, imm)); endfunction
  function automatic void jr  (int rs1);                  emit(enc_i(7'b1100111, 3'b000, 0, rs1, 0)); endfunction
  function automatic void sw  (int rs2, int rs1, int imm);
    logic [11:0] i12 = 12'(imm);
    emit({i12[11:5], 5'(rs2), 5'(rs1), 3'b010, i12[4:0], 7'b0100011});
  endfunction
  // Branch and jump offsets are in bytes, relative to the instruction.
  function automatic void bne (int rs1, int rs2, int off);
    logic [12:0] o = 13'(off);
    emit({o[12], o[10:5], 5'(rs2), 5'(rs1), 3'b001, o[4:1], o[11], 7'b1100011});
  endfunction
  function automatic void jal (int rd, int off);
    logic [20:0] o = 21'(off);
    emit({o[20], o[10:1], o[11], o[19:12], 5'(rd), 7'b1101111});
  endfunction
  function automatic void halt(); jal(0, 0); endfunction

  // Load x1..x31 from REG_TABLE.
  function automatic void reg_prologue();
    for (int r = 1; r < 32; r++) lw(r, 0, int'(REG_TABLE) + 4 * r);
  endfunction
  function automatic void set_reg(int r, word_t v);
    poke(REG_TABLE + 32'(4 * r), v);
  endfunction

  // ---- reference model -------------------------------------------------
  word_t       ref_mem [MEM_WORDS];
  word_t       ref_rf  [32];
  int unsigned ref_insts, ref_load_use, ref_jumps, ref_taken;
  int unsigned ref_cycles5, ref_cycles2;   // cycles to the halt instruction
  logic        ref_ok;

  function automatic void ref_run(word_t halt_pc, int unsigned max_steps);
    word_t pc = RESET_PC;
    word_t inst, nxt, imm_i, imm_s, imm_b, imm_j;
    logic  prev_lw = 1'b0;
    int    prev_rd = 0;
    int    rd, rs1, rs2, pen;
    logic  rd1, rd2;
    foreach (ref_mem[i]) ref_mem[i] = img[i];
    foreach (ref_rf[i])  ref_rf[i]  = '0;
    ref_insts = 0; ref_load_use = 0; ref_jumps = 0; ref_taken = 0;
    ref_cycles5 = 0; ref_cycles2 = 0; ref_ok = 1'b0;
    for (int unsigned step = 0; step < max_steps; step++) begin
      if (pc == halt_pc) begin ref_ok = 1'b1; return; end
      inst  = ref_mem[widx(pc)];
      rd    = int'(inst[11:7]);
      rs1   = int'(inst[19:15]);
      rs2   = int'(inst[24:20]);
      imm_i = {{20{inst[31]}}, inst[31:20]};
      imm_s = {{20{inst[31]}}, inst[31:25], inst[11:7]};
      imm_b = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
      imm_j = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
      nxt   = pc + 4;
      pen   = 0;
      rd1   = 1'b0; rd2 = 1'b0;
      case (inst[6:0])
        7'b0110011: begin
          rd1 = 1'b1; rd2 = 1'b1;
          if (rd != 0) ref_rf[rd] = inst[25] ? ref_rf[rs1] * ref_rf[rs2]
                                             : ref_rf[rs1] + ref_rf[rs2];
        end
        7'b0010011: begin rd1 = 1'b1; if (rd != 0) ref_rf[rd] = ref_rf[rs1] + imm_i; end
        7'b0000011: begin rd1 = 1'b1; if (rd != 0) ref_rf[rd] = ref_mem[widx(ref_rf[rs1] + imm_i)]; end
        7'b0100011: begin rd1 = 1'b1; rd2 = 1'b1; ref_mem[widx(ref_rf[rs1] + imm_s)] = ref_rf[rs2]; end
        7'b1101111: begin
          if (rd != 0) ref_rf[rd] = pc + 4;
          nxt = pc + imm_j; pen = 1; ref_jumps++;
        end
        7'b1100111: begin rd1 = 1'b1; nxt = ref_rf[rs1]; pen = 1; ref_jumps++; end
        7'b1100011: begin
          rd1 = 1'b1; rd2 = 1'b1;
          if (ref_rf[rs1] != ref_rf[rs2]) begin
            nxt = pc + imm_b; pen = 2; ref_taken++;
            ref_cycles2++;
          end
        end
        default: ;
      endcase
      // A load directly followed by a reader of its destination.
      if (prev_lw && prev_rd != 0 && ((rd1 && rs1 == prev_rd) || (rd2 && rs2 == prev_rd))) begin
        ref_load_use++;
        ref_cycles5++;
      end
      prev_lw = (inst[6:0] == 7'b0000011);
      prev_rd = rd;
      ref_cycles5 += 1 + pen;
      ref_cycles2 += 1;
      ref_insts++;
      pc = nxt;
    end
  endfunction

  // ---- random programs -------------------------------------------------
  // One random instruction over x1..x8 that neither branches nor jumps;
  // loads and stores are based on x20.
  function automatic void rand_op();
    int rd = int'($urandom_range(1, 8));
    int r1 = int'($urandom_range(0, 8));
    int r2 = int'($urandom_range(0, 8));
    case ($urandom_range(0, 6))
      0, 1:    add(rd, r1, r2);
      2:       addi(rd, r1, int'($urandom_range(0, 15)) - 8);
      3:       mul(rd, r1, r2);
      4, 5:    lw(rd, 20, 4 * int'($urandom_range(0, 63)));
      default: sw(r2, 20, 4 * int'($urandom_range(0, 63)));
    endcase
  endfunction

  // Random code over x1..x8 with loads and stores based on x20, forward
  // bne and jal, and counted loops: "addi x9, x0, k", a body of 1 to 4
  // random instructions, "addi x9, x9, -1", "bne x9, x0, body". Forward
  // branches and jumps never cross a loop or pass the halt. n items are
  // generated; returns halt_pc.
  function automatic word_t gen_random(int unsigned n);
    int unsigned len [];   // instructions per item; > 1 marks a loop
    int unsigned pos, next_loop, skip;
    int          body, rd, r1, r2;
    reg_prologue();
    for (int r = 1; r < 32; r++) set_reg(r, $urandom);
    for (int r = 1; r <= 8; r++) set_reg(r, $urandom_range(0, 7));
    set_reg(20, 32'h0000_3000);
    for (int i = 0; i < 64; i++) poke(32'h0000_3000 + 32'(4 * i), $urandom);
    // Plan the items so that branch ranges are known in advance.
    len = new[n];
    foreach (len[i]) len[i] = ($urandom_range(0, 19) == 0) ? 3 + $urandom_range(1, 4) : 1;
    for (int unsigned i = 0; i < n; i++) begin
      if (len[i] > 1) begin
        body = int'(len[i]) - 3;
        addi(9, 0, int'($urandom_range(1, 3)));
        for (int k = 0; k < body; k++) rand_op();
        addi(9, 9, -1);
        bne(9, 0, -4 * (body + 1));
      end else begin
        // Instructions between here and the next loop or the halt.
        next_loop = 0;
        for (int unsigned j = i + 1; j < n && len[j] == 1; j++) next_loop++;
        skip = 1 + $urandom_range(0, 2);
        if (skip > next_loop + 1) skip = next_loop + 1;
        rd = int'($urandom_range(1, 8));
        r1 = int'($urandom_range(0, 8));
        r2 = int'($urandom_range(0, 8));
        case ($urandom_range(0, 9))
          8:       bne(r1, r2, 4 * int'(skip));
          9:       jal(($urandom_range(0, 1) == 0) ? 0 : rd, 4 * int'(skip));
          default: rand_op();
        endcase
      end
    end
    pos = asm_pc;
    halt();
    return pos;
  endfunction

  // ---- directed programs -----------------------------------------------
  // Registers and data hold word addresses in 0x1000..0x1ffc, so that the
  // examples' loads and stores stay in that region.
  function automatic word_t rand_addr();
    return 32'h0000_1000 + 32'(4 * $urandom_range(0, 1023));
  endfunction

  // The short hazard sequences of the pipeline design examples, followed
  // by mul, jr and linked jal cases. Returns halt_pc.
  function automatic word_t build_examples();
    word_t p;
    img_clear();
    reg_prologue();
    for (int r = 1; r < 32; r++) set_reg(r, rand_addr());
    for (int i = 0; i < 1024; i++) poke(32'h0000_1000 + 32'(4 * i), rand_addr());
    // RAW through registers, stalling example
    addi(1, 0, 100); addi(2, 0, 4); add(3, 1, 2); lw(4, 3, 0); sw(4, 5, 0); addi(6, 7, 1);
    // bypassing from X, M and W
    addi(2, 10, 1); addi(2, 11, 1); addi(1, 2, 1); addi(3, 4, 1); addi(5, 3, 1);
    add(6, 1, 3); sw(5, 1, 0);
    // load-use
    lw(1, 2, 0); addi(2, 1, 4); lw(3, 2, 0); lw(4, 3, 0); addi(4, 4, 1); addi(4, 4, 1);
    // jal over one instruction, bne taken over one
    addi(1, 0, 1); jal(0, 8); addi(2, 0, 1); bne(0, 1, 8); addi(3, 0, 1); addi(4, 0, 1);
    // jal over two, bne taken over three
    addi(1, 0, 1); jal(0, 12); addi(12, 12, 1); addi(13, 13, 1);
    addi(2, 3, 1); bne(0, 1, 16); addi(14, 14, 1); addi(15, 15, 1); addi(16, 16, 1);
    addi(4, 5, 1);
    // not-taken then taken bne
    addi(1, 0, 0); bne(1, 0, 12); addi(2, 0, 1); addi(3, 0, 1);
    bne(2, 0, 12); addi(4, 0, 1); addi(5, 0, 1); addi(6, 0, 1);
    // mul with bypassing
    addi(7, 0, 7); mul(8, 7, 7); mul(9, 8, 7); add(10, 9, 8);
    // jr on a loaded target (load-use), jal with link, jr on an ALU result
    p = asm_pc;
    poke(32'h0000_0180, p + 12);
    lw(22, 0, 'h180); jr(22); addi(23, 0, 1);
    jal(25, 8); addi(26, 0, 1);
    add(27, 25, 0);
    p = asm_pc;
    addi(28, 0, int'(p) + 12); jr(28); addi(29, 0, 1);
    // RAW through memory
    addi(4, 2, 0); addi(1, 0, 55); sw(1, 2, 0); lw(3, 4, 0); add(30, 3, 3);
    // store of a just-loaded value, load-use on the store address
    lw(11, 20, 0); sw(11, 21, 4); lw(12, 21, 0); sw(12, 12, 0);
    p = asm_pc;
    halt();
    return p;
  endfunction

  // Vector-vector add, dest[i] = src0[i] + src1[i] for i < n, with
  // src0 at 0x2000, src1 at 0x2400 and dest at 0x2800. Returns halt_pc and
  // the address of the loop head.
  function automatic word_t build_vvadd(int n, output word_t loop_pc);
    word_t p;
    img_clear();
    reg_prologue();
    for (int r = 1; r < 32; r++) set_reg(r, '0);
    set_reg(1, 32'h0000_2000);   // src0
    set_reg(2, 32'h0000_2400);   // src1
    set_reg(3, 32'h0000_2800);   // dest
    set_reg(4, 32'(n));
    for (int i = 0; i < n; i++) begin
      poke(32'h0000_2000 + 32'(4 * i), $urandom);
      poke(32'h0000_2400 + 32'(4 * i), $urandom);
    end
    loop_pc = asm_pc;
    lw(5, 1, 0); lw(6, 2, 0); add(7, 5, 6); sw(7, 3, 0);
    addi(1, 1, 4); addi(2, 2, 4); addi(3, 3, 4); addi(4, 4, -1);
    bne(4, 0, -32);
    p = asm_pc;
    halt();
    return p;
  endfunction

endpackage

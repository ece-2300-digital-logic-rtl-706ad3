// Self-checking testbench of the five-stage TinyRV1 pipeline.
//
// Runs three kinds of program on tinyrv1_proc5 with a same-cycle test
// memory, and compares each against the instruction-set reference model of
// tinyrv1_tb_pkg:
//  1. the short hazard sequences of the pipeline's design examples (RAW
//     through registers with bypassing from X, M and W, load-use, jal and
//     jr, taken and not-taken bne, RAW through memory) plus mul and
//     linked jumps;
//  2. vector-vector add, dest[i] = src0[i] + src1[i], with n = 8;
//  3. random programs with forward branches and jumps and counted loops.
// Checked for every program: all 31 registers, the whole memory, the cycle
// in which the halt instruction reaches D (from the reference model's count
// of load-use pairs, jumps and taken branches), and that the number of
// stall, jump and squash cycles equals those counts. For vector-vector add
// each loop iteration must take 12 cycles: 9 instructions, 1 load-use stall
// and 2 squashed by the taken bne.
module tinyrv1_proc5_tb;
  import tinyrv1_pkg::*;
  import tinyrv1_tb_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  word_t imemreq_addr, imemresp_data;
  logic  dmemreq_val, dmemreq_wen;
  word_t dmemreq_addr, dmemreq_data, dmemresp_data;

  int unsigned checks = 0, failures = 0;
  int unsigned n_byp_x = 0, n_byp_m = 0, n_byp_w = 0;

  always #5 clk = ~clk;

  tinyrv1_proc5 dut (
    .clk, .rst,
    .imemreq_addr, .imemresp_data,
    .dmemreq_val, .dmemreq_wen, .dmemreq_addr, .dmemreq_data, .dmemresp_data
  );

  tinyrv1_test_mem #(.WORDS(MEM_WORDS)) mem (
    .clk,
    .imem_addr  (imemreq_addr),
    .imem_data  (imemresp_data),
    .dmem_val   (dmemreq_val),
    .dmem_wen   (dmemreq_wen),
    .dmem_addr  (dmemreq_addr),
    .dmem_wdata (dmemreq_data),
    .dmem_rdata (dmemresp_data)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run the program in img up to halt_pc, then compare with the model.
  // loop_pc, when non-zero, is a loop head whose iterations must each take
  // loop_cycles cycles.
  task automatic run_program(input string name, input word_t halt_pc,
                             input word_t loop_pc, input int unsigned loop_cycles);
    int unsigned cyc = 0, n_stall = 0, n_jump = 0, n_squash = 0;
    int unsigned last_loop = 0, n_loop = 0, bad_loop = 0;
    logic done = 1'b0;
    int mem_bad = 0;
    ref_run(halt_pc, 100000);
    check(ref_ok, {name, ": reference model reached halt"});
    rst = 1'b1;
    repeat (2) @(negedge clk);
    // Loaded once reset has emptied the pipeline.
    foreach (mem.m[i]) mem.m[i] = img[i];
    rst = 1'b0;
    @(negedge clk);           // cycle 0: first instruction in D
    while (!done && cyc < 50000) begin
      if (dut.val_D && dut.pc_FD == halt_pc) begin
        done = 1'b1;
      end else begin
        if (dut.stall_D)  n_stall++;
        if (dut.jump_D)   n_jump++;
        if (dut.squash_X) n_squash++;
        if (dut.op1_byp_sel_D == BYP_X || dut.op2_byp_sel_D == BYP_X) n_byp_x++;
        if (dut.op1_byp_sel_D == BYP_M || dut.op2_byp_sel_D == BYP_M) n_byp_m++;
        if (dut.op1_byp_sel_D == BYP_W || dut.op2_byp_sel_D == BYP_W) n_byp_w++;
        if (loop_pc != 0 && dut.val_D && !dut.stall_D && dut.pc_FD == loop_pc) begin
          if (n_loop > 0 && cyc - last_loop != loop_cycles) bad_loop++;
          last_loop = cyc;
          n_loop++;
        end
        @(negedge clk);
        cyc++;
      end
    end
    check(done, {name, ": halt reached"});
    // Let the instructions ahead of the halt drain.
    repeat (6) @(negedge clk);
    check(cyc == ref_cycles5,
          $sformatf("%s: halt in D at cycle %0d, expected %0d", name, cyc, ref_cycles5));
    check(n_stall == ref_load_use,
          $sformatf("%s: %0d load-use stalls, expected %0d", name, n_stall, ref_load_use));
    check(n_jump == ref_jumps,
          $sformatf("%s: %0d jumps, expected %0d", name, n_jump, ref_jumps));
    check(n_squash == ref_taken,
          $sformatf("%s: %0d branch squashes, expected %0d", name, n_squash, ref_taken));
    for (int r = 1; r < 32; r++)
      check(dut.u_regfile.regs[r] == ref_rf[r],
            $sformatf("%s: x%0d = %h, expected %h", name, r, dut.u_regfile.regs[r], ref_rf[r]));
    foreach (mem.m[i]) if (mem.m[i] != ref_mem[i]) begin
      if (mem_bad < 4) $display("  word %h: %h, expected %h", 4 * i, mem.m[i], ref_mem[i]);
      mem_bad++;
    end
    check(mem_bad == 0, $sformatf("%s: %0d memory words differ", name, mem_bad));
    if (loop_pc != 0) begin
      check(n_loop > 2, $sformatf("%s: %0d loop iterations seen", name, n_loop));
      check(bad_loop == 0,
            $sformatf("%s: %0d iterations not %0d cycles long", name, bad_loop, loop_cycles));
    end
    $display("%s: %0d instructions, %0d cycles, %0d load-use, %0d jumps, %0d taken",
             name, ref_insts, cyc, ref_load_use, ref_jumps, ref_taken);
  endtask

  initial begin
    word_t h, lp;
    h = build_examples();
    run_program("examples", h, '0, 0);
    check(n_byp_x > 0 && n_byp_m > 0 && n_byp_w > 0,
          $sformatf("bypass from X/M/W used %0d/%0d/%0d times", n_byp_x, n_byp_m, n_byp_w));
    h = build_vvadd(8, lp);
    run_program("vvadd8", h, lp, 12);
    for (int t = 0; t < 20; t++) begin
      img_clear();
      h = gen_random(150);
      run_program($sformatf("random%0d", t), h, '0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

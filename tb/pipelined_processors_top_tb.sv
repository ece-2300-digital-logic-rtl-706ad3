// End-to-end testbench of the whole collection, at default parameters.
//
// Both TinyRV1 pipelines run, side by side, each with its own same-cycle
// test memory: first the hazard examples program, then three independent
// addi instructions repeated ten times, then vector-vector add with n = 64
// (576 loop instructions). Each result is compared with the
// instruction-set reference model (all registers, the whole memory) and
// each run's length with the model's cycle count; for vector-vector add
// every loop iteration must take 12 cycles in the five-stage pipeline and
// 10 in the two-stage one. Meanwhile all three quad adders get random
// traffic and are checked against a + b + c + d and their latencies (2, 4
// and 4 cycles after the accepting cycle).
//
// Every mechanism is counted and must occur at least once: five-stage
// bypasses from X, M and W, load-use stalls, squashes by jumps in D and by
// taken branches in X; two-stage bypasses from B and branch squashes;
// back-pressure of the multi-cycle quad adder; back-to-back results of
// the pipelined one.
module pipelined_processors_top_tb;
  import tinyrv1_pkg::*;
  import tinyrv1_tb_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  word_t p5_imemreq_addr, p5_imemresp_data, p5_dmemreq_addr, p5_dmemreq_data, p5_dmemresp_data;
  word_t p2_imemreq_addr, p2_imemresp_data, p2_dmemreq_addr, p2_dmemreq_data, p2_dmemresp_data;
  logic  p5_dmemreq_val, p5_dmemreq_wen, p2_dmemreq_val, p2_dmemreq_wen;
  logic       qsc_in_val, qsc_out_val, qmc_in_val, qmc_in_rdy, qmc_out_val, qpp_in_val, qpp_out_val;
  logic [3:0] qsc_a, qsc_b, qsc_c, qsc_d, qsc_z;
  logic [3:0] qmc_a, qmc_b, qmc_c, qmc_d, qmc_z;
  logic [3:0] qpp_a, qpp_b, qpp_c, qpp_d, qpp_z;

  int unsigned checks = 0, failures = 0;
  // mechanism counters
  int unsigned n5_byp_x = 0, n5_byp_m = 0, n5_byp_w = 0, n5_stall = 0, n5_jump = 0, n5_squash = 0;
  int unsigned n2_byp = 0, n2_squash = 0;
  int unsigned nq_backpressure = 0, nq_back_to_back = 0;
  logic        quad_done = 1'b0;

  pipelined_processors_top dut (.*);

  tinyrv1_test_mem #(.WORDS(MEM_WORDS)) mem5 (
    .clk, .imem_addr (p5_imemreq_addr), .imem_data (p5_imemresp_data),
    .dmem_val (p5_dmemreq_val), .dmem_wen (p5_dmemreq_wen), .dmem_addr (p5_dmemreq_addr),
    .dmem_wdata (p5_dmemreq_data), .dmem_rdata (p5_dmemresp_data)
  );
  tinyrv1_test_mem #(.WORDS(MEM_WORDS)) mem2 (
    .clk, .imem_addr (p2_imemreq_addr), .imem_data (p2_imemresp_data),
    .dmem_val (p2_dmemreq_val), .dmem_wen (p2_dmemreq_wen), .dmem_addr (p2_dmemreq_addr),
    .dmem_wdata (p2_dmemreq_data), .dmem_rdata (p2_dmemresp_data)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_program(input string name, input word_t halt_pc, input word_t loop_pc);
    int unsigned cyc = 0, c5 = 0, c2 = 0, l5 = 0, l2 = 0, k5 = 0, k2 = 0, bad5 = 0, bad2 = 0;
    logic d5 = 1'b0, d2 = 1'b0;
    int bad_mem5 = 0, bad_mem2 = 0;
    ref_run(halt_pc, 100000);
    check(ref_ok, {name, ": reference model reached halt"});
    rst = 1'b1;
    repeat (2) @(negedge clk);
    foreach (mem5.m[i]) begin mem5.m[i] = img[i]; mem2.m[i] = img[i]; end
    rst = 1'b0;
    @(negedge clk);
    while (!(d5 && d2) && cyc < 50000) begin
      if (!d5) begin
        if (dut.u_proc5.val_D && dut.u_proc5.pc_FD == halt_pc) begin
          d5 = 1'b1; c5 = cyc;
        end else begin
          if (dut.u_proc5.op1_byp_sel_D == BYP_X || dut.u_proc5.op2_byp_sel_D == BYP_X) n5_byp_x++;
          if (dut.u_proc5.op1_byp_sel_D == BYP_M || dut.u_proc5.op2_byp_sel_D == BYP_M) n5_byp_m++;
          if (dut.u_proc5.op1_byp_sel_D == BYP_W || dut.u_proc5.op2_byp_sel_D == BYP_W) n5_byp_w++;
          if (dut.u_proc5.stall_D)  n5_stall++;
          if (dut.u_proc5.jump_D)   n5_jump++;
          if (dut.u_proc5.squash_X) n5_squash++;
          if (loop_pc != 0 && dut.u_proc5.val_D && !dut.u_proc5.stall_D
              && dut.u_proc5.pc_FD == loop_pc) begin
            if (k5 > 0 && cyc - l5 != 12) bad5++;
            l5 = cyc; k5++;
          end
        end
      end
      if (!d2) begin
        if (!dut.u_proc2.squash_A && dut.u_proc2.pc_A == halt_pc) begin
          d2 = 1'b1; c2 = cyc + 1;
        end else begin
          if (dut.u_proc2.op1_byp_sel_A || dut.u_proc2.op2_byp_sel_A) n2_byp++;
          if (dut.u_proc2.squash_A) n2_squash++;
          if (loop_pc != 0 && !dut.u_proc2.squash_A && dut.u_proc2.pc_A == loop_pc) begin
            if (k2 > 0 && cyc - l2 != 10) bad2++;
            l2 = cyc; k2++;
          end
        end
      end
      @(negedge clk);
      cyc++;
    end
    check(d5 && d2, {name, ": both processors reached halt"});
    repeat (6) @(negedge clk);
    check(c5 == ref_cycles5, $sformatf("%s: five-stage %0d cycles, expected %0d", name, c5, ref_cycles5));
    check(c2 == ref_cycles2, $sformatf("%s: two-stage %0d cycles, expected %0d", name, c2, ref_cycles2));
    for (int r = 1; r < 32; r++) begin
      check(dut.u_proc5.u_regfile.regs[r] == ref_rf[r], $sformatf("%s: five-stage x%0d", name, r));
      check(dut.u_proc2.u_regfile.regs[r] == ref_rf[r], $sformatf("%s: two-stage x%0d", name, r));
    end
    foreach (ref_mem[i]) begin
      if (mem5.m[i] != ref_mem[i]) bad_mem5++;
      if (mem2.m[i] != ref_mem[i]) bad_mem2++;
    end
    check(bad_mem5 == 0, $sformatf("%s: five-stage %0d memory words differ", name, bad_mem5));
    check(bad_mem2 == 0, $sformatf("%s: two-stage %0d memory words differ", name, bad_mem2));
    if (loop_pc != 0) begin
      check(k5 > 2 && bad5 == 0, $sformatf("%s: five-stage %0d of %0d iterations not 12 cycles", name, bad5, k5));
      check(k2 > 2 && bad2 == 0, $sformatf("%s: two-stage %0d of %0d iterations not 10 cycles", name, bad2, k2));
    end
    $display("%s: %0d instructions; five-stage %0d cycles, two-stage %0d cycles",
             name, ref_insts, c5, c2);
  endtask

  // Processors
  initial begin
    word_t h, lp;
    h = build_examples();
    run_program("examples", h, '0);
    // Three independent addi instructions repeated ten times: no hazards,
    // one instruction per cycle in both pipelines.
    img_clear();
    reg_prologue();
    for (int r = 1; r < 32; r++) set_reg(r, $urandom);
    for (int k = 0; k < 10; k++) begin addi(1, 2, 1); addi(3, 4, 1); addi(5, 6, 1); end
    h = asm_pc;
    halt();
    run_program("addi3x10", h, '0);
    check(ref_cycles5 == 31 + 30 && ref_cycles2 == 31 + 30, "addi3x10: one instruction per cycle");
    h = build_vvadd(64, lp);
    run_program("vvadd64", h, lp);
    wait (quad_done);
    check(n5_byp_x > 0, "five-stage bypass from X happened");
    check(n5_byp_m > 0, "five-stage bypass from M happened");
    check(n5_byp_w > 0, "five-stage bypass from W happened");
    check(n5_stall > 0, "five-stage load-use stall happened");
    check(n5_jump > 0, "five-stage jump squash happened");
    check(n5_squash > 0, "five-stage branch squash happened");
    check(n2_byp > 0, "two-stage bypass from B happened");
    check(n2_squash > 0, "two-stage branch squash happened");
    check(nq_backpressure > 0, "multi-cycle quad adder back-pressure happened");
    check(nq_back_to_back > 0, "pipelined quad adder back-to-back results happened");
    $display("five-stage: bypass X/M/W %0d/%0d/%0d, load-use stalls %0d, jumps %0d, branch squashes %0d",
             n5_byp_x, n5_byp_m, n5_byp_w, n5_stall, n5_jump, n5_squash);
    $display("two-stage: bypasses %0d, branch squashes %0d", n2_byp, n2_squash);
    $display("quad adders: back-pressure %0d, back-to-back %0d", nq_backpressure, nq_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Quad adders: histories of what each should put out, by cycles ago.
  logic       sc_v [3], pp_v [5], mc_v [5];
  logic [3:0] sc_s [3], pp_s [5], mc_s [5];

  initial begin
    logic prev_pp;
    qsc_in_val = 0; qmc_in_val = 0; qpp_in_val = 0;
    {qsc_a, qsc_b, qsc_c, qsc_d, qmc_a, qmc_b, qmc_c, qmc_d, qpp_a, qpp_b, qpp_c, qpp_d} = '0;
    foreach (sc_v[i]) begin sc_v[i] = 0; sc_s[i] = 0; end
    foreach (pp_v[i]) begin pp_v[i] = 0; pp_s[i] = 0; mc_v[i] = 0; mc_s[i] = 0; end
    prev_pp = 1'b0;
    wait (!rst);
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      check(qsc_out_val === sc_v[2] && (!qsc_out_val || qsc_z === sc_s[2]), $sformatf("single-cycle quad adder cycle %0d", t));
      check(qpp_out_val === pp_v[4] && (!qpp_out_val || qpp_z === pp_s[4]), $sformatf("pipelined quad adder cycle %0d", t));
      check(qmc_out_val === mc_v[4] && (!qmc_out_val || qmc_z === mc_s[4]), $sformatf("multi-cycle quad adder cycle %0d", t));
      if (qpp_out_val && prev_pp) nq_back_to_back++;
      prev_pp = qpp_out_val;
      qsc_in_val = $urandom_range(0, 1) == 1;
      qpp_in_val = (t < 100) || ($urandom_range(0, 1) == 1);
      qmc_in_val = $urandom_range(0, 1) == 1;
      {qsc_a, qsc_b, qsc_c, qsc_d} = 16'($urandom);
      {qpp_a, qpp_b, qpp_c, qpp_d} = 16'($urandom);
      {qmc_a, qmc_b, qmc_c, qmc_d} = 16'($urandom);
      #1;
      if (qmc_in_val && !qmc_in_rdy) nq_backpressure++;
      for (int i = 2; i > 0; i--) begin sc_v[i] = sc_v[i-1]; sc_s[i] = sc_s[i-1]; end
      for (int i = 4; i > 0; i--) begin
        pp_v[i] = pp_v[i-1]; pp_s[i] = pp_s[i-1];
        mc_v[i] = mc_v[i-1]; mc_s[i] = mc_s[i-1];
      end
      sc_v[1] = qsc_in_val; sc_s[1] = qsc_a + qsc_b + qsc_c + qsc_d;
      pp_v[1] = qpp_in_val; pp_s[1] = qpp_a + qpp_b + qpp_c + qpp_d;
      mc_v[1] = qmc_in_val && qmc_in_rdy; mc_s[1] = qmc_a + qmc_b + qmc_c + qmc_d;
      // The processors' runs reset everything in between: the next edge
      // empties the quad adders too.
      if (rst) begin
        foreach (sc_v[i]) sc_v[i] = 1'b0;
        foreach (pp_v[i]) begin pp_v[i] = 1'b0; mc_v[i] = 1'b0; end
      end
      @(negedge clk);
    end
    quad_done = 1'b1;
  end

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

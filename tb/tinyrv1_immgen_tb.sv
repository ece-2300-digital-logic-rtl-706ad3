// Self-checking testbench of the TinyRV1 immediate generator.
//
// Builds random instructions from random immediates in each of the I, S,
// B and J layouts and checks that the generator returns the immediate that
// was packed in, sign-extended.
module tinyrv1_immgen_tb;
  import tinyrv1_pkg::*;

  word_t     inst, imm;
  imm_type_e imm_type;
  int unsigned checks = 0, failures = 0;

  tinyrv1_immgen dut (.inst, .imm_type, .imm);

  task automatic try(imm_type_e t, word_t expect_imm, word_t word);
    imm_type = t; inst = word;
    #1;
    checks++;
    if (imm !== expect_imm) begin
      failures++;
      $display("FAIL: type %0d inst %h: imm %h, expected %h", t, word, imm, expect_imm);
    end
  endtask

  initial begin
    logic [11:0] i12;
    logic [12:0] b13;
    logic [20:0] j21;
    word_t r;
    for (int n = 0; n < 500; n++) begin
      r = $urandom;
      i12 = 12'($urandom);
      try(IMM_I, {{20{i12[11]}}, i12}, {i12, r[19:0]});
      try(IMM_S, {{20{i12[11]}}, i12}, {i12[11:5], r[24:12], i12[4:0], r[6:0]});
      b13 = {13'($urandom) >> 1, 1'b0};
      try(IMM_B, {{19{b13[12]}}, b13},
          {b13[12], b13[10:5], r[24:12], b13[4:1], b13[11], r[6:0]});
      j21 = {21'($urandom) >> 1, 1'b0};
      try(IMM_J, {{11{j21[20]}}, j21},
          {j21[20], j21[10:1], j21[11], j21[19:12], r[11:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

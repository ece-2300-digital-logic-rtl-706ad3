// Self-checking testbench of the TinyRV1 arithmetic unit.
//
// Random and equal operand pairs: the sum must wrap modulo 2^32 and eq
// must be high exactly when the operands are equal.
module tinyrv1_alu_tb;
  import tinyrv1_pkg::*;

  word_t in0, in1, out;
  logic  eq;
  int unsigned checks = 0, failures = 0;

  tinyrv1_alu dut (.in0, .in1, .out, .eq);

  initial begin
    logic [32:0] wide;
    for (int n = 0; n < 2000; n++) begin
      in0 = $urandom;
      in1 = (n % 4 == 0) ? in0 : ((n % 4 == 1) ? in0 ^ (32'd1 << ((n / 4) % 32)) : $urandom);
      #1;
      wide = {1'b0, in0} + {1'b0, in1};
      checks++;
      if (out !== wide[31:0] || eq !== (in0 == in1)) begin
        failures++;
        $display("FAIL: %h + %h = %h eq %b", in0, in1, out, eq);
      end
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

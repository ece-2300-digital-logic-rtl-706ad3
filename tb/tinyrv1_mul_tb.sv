// Self-checking testbench of the TinyRV1 multiplier.
//
// Random operands, small and negative ones included: the output must be
// the low 32 bits of the 64-bit product, worked out here with 64-bit
// arithmetic.
module tinyrv1_mul_tb;
  import tinyrv1_pkg::*;

  word_t in0, in1, out;
  int unsigned checks = 0, failures = 0;

  tinyrv1_mul dut (.in0, .in1, .out);

  initial begin
    longint unsigned p;
    for (int n = 0; n < 2000; n++) begin
      case (n % 3)
        0:       begin in0 = $urandom; in1 = $urandom; end
        1:       begin in0 = $urandom_range(0, 100); in1 = $urandom_range(0, 100); end
        default: begin in0 = -$urandom_range(1, 1000); in1 = $urandom_range(0, 1000); end
      endcase
      #1;
      p = longint'(in0) * longint'(in1);
      checks++;
      if (out !== p[31:0]) begin
        failures++;
        $display("FAIL: %h * %h = %h, expected %h", in0, in1, out, p[31:0]);
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

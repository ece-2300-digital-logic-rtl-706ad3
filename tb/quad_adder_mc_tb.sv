// Self-checking testbench of the multi-cycle quad adder.
//
// Offers random inputs with in_val high back to back for a while, then
// with random gaps. Each accepted set (in_val and in_rdy) must come out as
// a + b + c + d (mod 16) with out_val exactly four cycles after the cycle
// it was accepted in (one to load the input registers, three adder steps),
// and out_val must be low otherwise. With in_val always high a
// new set must be accepted every third cycle.
module quad_adder_mc_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_val, in_rdy, out_val;
  logic [3:0] a, b, c, d, z;
  logic       val_hist [5];
  logic [3:0] sum_hist [5];
  int unsigned checks = 0, failures = 0, accepted = 0;

  always #5 clk = ~clk;

  quad_adder_mc dut (.clk, .rst, .in_val, .in_rdy, .a, .b, .c, .d, .out_val, .z);

  initial begin
    in_val = 1'b0; a = '0; b = '0; c = '0; d = '0;
    foreach (val_hist[i]) begin val_hist[i] = 1'b0; sum_hist[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      checks++;
      if (out_val !== val_hist[4] || (out_val && z !== sum_hist[4])) begin
        failures++;
        $display("FAIL: cycle %0d out_val %b z %h, expected %b %h",
                 t, out_val, z, val_hist[4], sum_hist[4]);
      end
      in_val = (t < 300) ? 1'b1 : ($urandom_range(0, 3) == 0);
      a = 4'($urandom); b = 4'($urandom); c = 4'($urandom); d = 4'($urandom);
      #1;
      if (t == 300) begin
        // 300 cycles of constant offers, the first at cycle 0: one per 3.
        checks++;
        if (accepted != 100) begin
          failures++;
          $display("FAIL: %0d sets accepted in 300 cycles, expected 100", accepted);
        end
      end
      for (int i = 4; i > 0; i--) begin
        val_hist[i] = val_hist[i-1];
        sum_hist[i] = sum_hist[i-1];
      end
      val_hist[1] = in_val && in_rdy;
      sum_hist[1] = a + b + c + d;
      if (in_val && in_rdy) accepted++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the single-cycle quad adder.
//
// Drives a random set of inputs, valid or not, every cycle and checks that
// each valid set comes out as a + b + c + d (mod 16) exactly two cycles
// later (input registers, then Z), and that out_val is low otherwise.
module quad_adder_sc_tb;
  localparam int unsigned LAT = 2;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_val, out_val;
  logic [3:0] a, b, c, d, z;
  logic       val_hist [LAT+1];
  logic [3:0] sum_hist [LAT+1];
  int unsigned checks = 0, failures = 0, results = 0;

  always #5 clk = ~clk;

  quad_adder_sc dut (.clk, .rst, .in_val, .a, .b, .c, .d, .out_val, .z);

  initial begin
    in_val = 1'b0; a = '0; b = '0; c = '0; d = '0;
    foreach (val_hist[i]) begin val_hist[i] = 1'b0; sum_hist[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      // Outputs now belong to the inputs driven LAT cycles ago.
      checks++;
      if (out_val !== val_hist[LAT] || (out_val && z !== sum_hist[LAT])) begin
        failures++;
        $display("FAIL: cycle %0d out_val %b z %h, expected %b %h",
                 t, out_val, z, val_hist[LAT], sum_hist[LAT]);
      end
      if (out_val) results++;
      in_val = (t < 500) ? 1'b1 : ($urandom_range(0, 2) != 0);
      a = 4'($urandom); b = 4'($urandom); c = 4'($urandom); d = 4'($urandom);
      for (int i = LAT; i > 0; i--) begin
        val_hist[i] = val_hist[i-1];
        sum_hist[i] = sum_hist[i-1];
      end
      val_hist[1] = in_val;
      sum_hist[1] = a + b + c + d;
      @(negedge clk);
    end
    // Back-to-back inputs must give one result per cycle.
    checks++;
    if (results < 500 - LAT) begin
      failures++;
      $display("FAIL: only %0d results", results);
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

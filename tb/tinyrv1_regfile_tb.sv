// Self-checking testbench of the TinyRV1 register file.
//
// Writes random values to random registers for many cycles while reading
// two random registers each cycle, and compares both read ports with a
// shadow array: x0 must always read zero, a write must be visible from the
// next cycle, and a read in the cycle of a write must still return the old
// value.
module tinyrv1_regfile_tb;
  import tinyrv1_pkg::*;

  logic  clk = 1'b0;
  rid_t  raddr0, raddr1, waddr;
  word_t rdata0, rdata1, wdata;
  logic  wen;
  word_t shadow [32];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  tinyrv1_regfile dut (.clk, .raddr0, .rdata0, .raddr1, .rdata1, .wen, .waddr, .wdata);

  initial begin
    // Fill every register first.
    wen = 1'b1;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      waddr = rid_t'(r); wdata = $urandom; raddr0 = '0; raddr1 = '0;
      shadow[r] = (r == 0) ? '0 : wdata;
    end
    @(negedge clk);
    wen = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raddr0 = rid_t'($urandom); raddr1 = rid_t'($urandom);
      wen = $urandom_range(0, 1) == 1; waddr = rid_t'($urandom); wdata = $urandom;
      if (i % 50 == 0) begin waddr = raddr0; wen = 1'b1; end
      #1;
      checks++;
      if (rdata0 !== shadow[raddr0] || rdata1 !== shadow[raddr1]) begin
        failures++;
        $display("FAIL: read x%0d=%h x%0d=%h, expected %h %h",
                 raddr0, rdata0, raddr1, rdata1, shadow[raddr0], shadow[raddr1]);
      end
      @(posedge clk);
      if (wen && waddr != 0) shadow[waddr] = wdata;
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

// Single-cycle quad adder.
//
// Adds four W-bit numbers, z = a + b + c + d modulo 2^W, with three chained
// adders (W = a + b, X = W + c, Y = X + d) between a row of input registers
// and the output register Z, so the whole sum is formed in one long clock
// cycle. A new set of inputs is taken every cycle. in_val travels beside
// the data: out_val is high two cycles after in_val (one cycle in the input
// registers, one in Z). The adder chain, the 4-bit width and the register
// placement follow the single-cycle quad adder; the valid bits are this
// design's addition so that a user can tell results from idle cycles.
module quad_adder_sc #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_val,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic         out_val,
  output logic [W-1:0] z
);

  logic [W-1:0] a_r, b_r, c_r, d_r;
  logic         val_r;
  logic [W-1:0] sum_w, sum_x, sum_y;

  always_ff @(posedge clk) begin
    a_r <= a;
    b_r <= b;
    c_r <= c;
    d_r <= d;
  end

  assign sum_w = a_r + b_r;
  assign sum_x = sum_w + c_r;
  assign sum_y = sum_x + d_r;

  always_ff @(posedge clk) z <= sum_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      val_r   <= 1'b0;
      out_val <= 1'b0;
    end else begin
      val_r   <= in_val;
      out_val <= val_r;
    end
  end

endmodule

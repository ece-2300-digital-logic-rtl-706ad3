// Pipelined quad adder.
//
// Adds four W-bit numbers, z = a + b + c + d modulo 2^W, in three stages:
// S1 adds the first two inputs, S2 adds the third, S3 adds the fourth, with
// a register row between stages that carries the partial sum and the inputs
// still to be added. One adder per stage, one new set of inputs per cycle.
// Timing: inputs are registered, then pass S1, S2 and S3, so out_val and z
// appear four cycles after in_val, and a result leaves every cycle once the
// pipeline is full. The stage split, the 4-bit width and the register
// placement follow the pipelined quad adder; the valid bits are this
// design's addition.
module quad_adder_pipe #(
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

  // Input registers
  logic [W-1:0] a_r, b_r, c_r, d_r;
  // S1/S2 registers
  logic [W-1:0] sum_12, c_12, d_12;
  // S2/S3 registers
  logic [W-1:0] sum_23, d_23;
  // Valid bit of each register row
  logic         val_r, val_12, val_23;

  always_ff @(posedge clk) begin
    a_r    <= a;
    b_r    <= b;
    c_r    <= c;
    d_r    <= d;
    sum_12 <= a_r + b_r;        // S1
    c_12   <= c_r;
    d_12   <= d_r;
    sum_23 <= sum_12 + c_12;    // S2
    d_23   <= d_12;
    z      <= sum_23 + d_23;    // S3
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      val_r   <= 1'b0;
      val_12  <= 1'b0;
      val_23  <= 1'b0;
      out_val <= 1'b0;
    end else begin
      val_r   <= in_val;
      val_12  <= val_r;
      val_23  <= val_12;
      out_val <= val_23;
    end
  end

endmodule

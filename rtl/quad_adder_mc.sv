// Multi-cycle quad adder.
//
// Adds four W-bit numbers, z = a + b + c + d modulo 2^W, with a single
// adder used in three consecutive short cycles. Mux W feeds the adder's
// first input with the first input register in step 1 and with the
// fed-back partial sum (register Y, which is also the output z) in steps 2
// and 3; mux X feeds its second input with the second, third and fourth
// input registers in steps 1, 2 and 3.
//
// Handshake: the inputs are taken when in_val and in_rdy are both high.
// in_rdy is high when the unit is idle and during step 3, so transactions
// can follow each other with no gap, one every three cycles. The inputs
// are loaded into the input registers at the end of the accepting cycle,
// the three steps follow, and out_val is high for one cycle, four cycles
// after the accepting cycle, while z holds the sum; z keeps its value until the next transaction overwrites
// it. The single shared adder, the two muxes, the feedback path and the
// three steps follow the multi-cycle quad adder; the step counter and the
// handshake are this design's own.
module quad_adder_mc #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_val,
  output logic         in_rdy,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic         out_val,
  output logic [W-1:0] z
);

  typedef enum logic [1:0] {
    IDLE  = 2'd0,
    STEP1 = 2'd1,
    STEP2 = 2'd2,
    STEP3 = 2'd3
  } step_e;

  step_e        step, step_next;
  logic [W-1:0] a_r, b_r, c_r, d_r;
  logic [W-1:0] mux_w, mux_x, sum_y;
  logic         accept;

  assign in_rdy = (step == IDLE) || (step == STEP3);
  assign accept = in_val && in_rdy;

  always_ff @(posedge clk) begin
    if (accept) begin
      a_r <= a;
      b_r <= b;
      c_r <= c;
      d_r <= d;
    end
  end

  always_comb begin
    mux_w = (step == STEP1) ? a_r : z;
    unique case (step)
      STEP1:   mux_x = b_r;
      STEP2:   mux_x = c_r;
      default: mux_x = d_r;
    endcase
  end

  assign sum_y = mux_w + mux_x;

  always_comb begin
    unique case (step)
      STEP1:   step_next = STEP2;
      STEP2:   step_next = STEP3;
      default: step_next = accept ? STEP1 : IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      step    <= IDLE;
      out_val <= 1'b0;
      z       <= '0;
    end else begin
      step    <= step_next;
      out_val <= (step == STEP3);
      if (step != IDLE) z <= sum_y;
    end
  end

endmodule

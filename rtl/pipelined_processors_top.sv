// Pipelined-design collection: two TinyRV1 processors and three quad adders.
//
// The designs are independent and stand side by side, each with its own
// ports and sharing only clock and reset:
//  * p5_*  the five-stage TinyRV1 pipeline (F D X M W) with full bypassing,
//          a load-use stall and squashing of jumps (from D) and taken
//          branches (from X);
//  * p2_*  the two-stage TinyRV1 pipeline (A, B) with bypassing from B and
//          squashing of taken branches;
//  * qsc_*, qmc_*, qpp_*  the single-cycle, multi-cycle and pipelined
//          quad adders (z = a + b + c + d, 4 bits).
// Each processor expects an instruction memory and a data memory that
// answer within the cycle; they are outside this module and connect to the
// imemreq/imemresp and dmemreq/dmemresp ports. Timing of each port group is
// that of the instantiated module.
module pipelined_processors_top
  import tinyrv1_pkg::*;
#(
  parameter int unsigned QW = 4   // quad-adder operand width
) (
  input  logic          clk,
  input  logic          rst,

  // five-stage processor
  output word_t         p5_imemreq_addr,
  input  word_t         p5_imemresp_data,
  output logic          p5_dmemreq_val,
  output logic          p5_dmemreq_wen,
  output word_t         p5_dmemreq_addr,
  output word_t         p5_dmemreq_data,
  input  word_t         p5_dmemresp_data,

  // two-stage processor
  output word_t         p2_imemreq_addr,
  input  word_t         p2_imemresp_data,
  output logic          p2_dmemreq_val,
  output logic          p2_dmemreq_wen,
  output word_t         p2_dmemreq_addr,
  output word_t         p2_dmemreq_data,
  input  word_t         p2_dmemresp_data,

  // single-cycle quad adder
  input  logic          qsc_in_val,
  input  logic [QW-1:0] qsc_a, qsc_b, qsc_c, qsc_d,
  output logic          qsc_out_val,
  output logic [QW-1:0] qsc_z,

  // multi-cycle quad adder
  input  logic          qmc_in_val,
  output logic          qmc_in_rdy,
  input  logic [QW-1:0] qmc_a, qmc_b, qmc_c, qmc_d,
  output logic          qmc_out_val,
  output logic [QW-1:0] qmc_z,

  // pipelined quad adder
  input  logic          qpp_in_val,
  input  logic [QW-1:0] qpp_a, qpp_b, qpp_c, qpp_d,
  output logic          qpp_out_val,
  output logic [QW-1:0] qpp_z
);

  tinyrv1_proc5 u_proc5 (
    .clk           (clk),
    .rst           (rst),
    .imemreq_addr  (p5_imemreq_addr),
    .imemresp_data (p5_imemresp_data),
    .dmemreq_val   (p5_dmemreq_val),
    .dmemreq_wen   (p5_dmemreq_wen),
    .dmemreq_addr  (p5_dmemreq_addr),
    .dmemreq_data  (p5_dmemreq_data),
    .dmemresp_data (p5_dmemresp_data)
  );

  tinyrv1_proc2 u_proc2 (
    .clk           (clk),
    .rst           (rst),
    .imemreq_addr  (p2_imemreq_addr),
    .imemresp_data (p2_imemresp_data),
    .dmemreq_val   (p2_dmemreq_val),
    .dmemreq_wen   (p2_dmemreq_wen),
    .dmemreq_addr  (p2_dmemreq_addr),
    .dmemreq_data  (p2_dmemreq_data),
    .dmemresp_data (p2_dmemresp_data)
  );

  quad_adder_sc #(.W(QW)) u_quad_sc (
    .clk (clk), .rst (rst),
    .in_val (qsc_in_val), .a (qsc_a), .b (qsc_b), .c (qsc_c), .d (qsc_d),
    .out_val (qsc_out_val), .z (qsc_z)
  );

  quad_adder_mc #(.W(QW)) u_quad_mc (
    .clk (clk), .rst (rst),
    .in_val (qmc_in_val), .in_rdy (qmc_in_rdy),
    .a (qmc_a), .b (qmc_b), .c (qmc_c), .d (qmc_d),
    .out_val (qmc_out_val), .z (qmc_z)
  );

  quad_adder_pipe #(.W(QW)) u_quad_pipe (
    .clk (clk), .rst (rst),
    .in_val (qpp_in_val), .a (qpp_a), .b (qpp_b), .c (qpp_c), .d (qpp_d),
    .out_val (qpp_out_val), .z (qpp_z)
  );

endmodule

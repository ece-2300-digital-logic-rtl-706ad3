// Behavioural test memory for the TinyRV1 processors.
//
// One word array with an instruction read port and a data port. Both reads
// are combinational, so a request is answered in the cycle it is made; a
// data write (dmem_val and dmem_wen) takes effect at the rising clock
// edge. Addresses are byte addresses; the two low bits are ignored and the
// rest wrap modulo the memory size. Testbenches load and inspect the array
// m directly.
module tinyrv1_test_mem
  import tinyrv1_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic  clk,
  input  word_t imem_addr,
  output word_t imem_data,
  input  logic  dmem_val,
  input  logic  dmem_wen,
  input  word_t dmem_addr,
  input  word_t dmem_wdata,
  output word_t dmem_rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t m [WORDS];

  assign imem_data  = m[imem_addr[AW+1:2]];
  assign dmem_rdata = m[dmem_addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (dmem_val && dmem_wen) m[dmem_addr[AW+1:2]] <= dmem_wdata;
  end
endmodule

// TinyRV1 register file.
//
// Thirty-two 32-bit registers with two combinational read ports and one
// write port written on the rising clock edge. Register x0 always reads as
// zero and ignores writes. A read in the same cycle as a write to the same
// register returns the old value: the pipelines cover that case with their
// bypass paths, not inside the register file. The register count, width and
// port count follow the TinyRV1 datapaths; there is no reset, so the
// contents are undefined until written, as in an architectural register
// file.
module tinyrv1_regfile
  import tinyrv1_pkg::*;
(
  input  logic  clk,
  // read port 0 (rs1)
  input  rid_t  raddr0,
  output word_t rdata0,
  // read port 1 (rs2)
  input  rid_t  raddr1,
  output word_t rdata1,
  // write port
  input  logic  wen,
  input  rid_t  waddr,
  input  word_t wdata
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (wen && waddr != '0) regs[waddr] <= wdata;
  end

  assign rdata0 = (raddr0 == '0) ? '0 : regs[raddr0];
  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];

endmodule

// regfile: 32 x 32-bit register file of TOT.
//
// Two combinational read ports feed Decode (rs1, rs2 -> rs1Val, rs2Val); one write
// port is driven by Writeback and written on the rising clock edge. Register 0
// always reads zero, as in RV32I, on which the instruction set is based (this is
// the design's choice). There is no write-to-read bypass: the hazard unit stalls
// Decode until a pending write has been committed.
module regfile #(
  parameter int NREGS = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  output logic [31:0] rs1Val,
  output logic [31:0] rs2Val,
  input  logic        wbEnable,
  input  logic [4:0]  rd,
  input  logic [31:0] wbData
);

  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wbEnable && rd != 5'd0) begin
      regs[rd] <= wbData;
    end
  end

  assign rs1Val = (rs1 == 5'd0) ? '0 : regs[rs1];
  assign rs2Val = (rs2 == 5'd0) ? '0 : regs[rs2];

endmodule

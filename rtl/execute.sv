// execute: the Execute stage of TOT.
//
// Registers the decoded instruction from Decode, drives the ALU (first operand
// always rs1Val, second operand the immediate when isImm, else rs2Val) and turns
// the ALU's branch output and the changePC control into 'jump' and 'nextPC':
// JAL and taken branches go to exPC + imm, JALR to rs1Val + imm; JAL/JALR write
// exPC + 4 to rd. The result is potentialMemoryReq for the Memory stage.
//
// Timing: the register loads every rising edge, holds during a memory stall
// (Memory is not listening) and is cleared by a flush or reset. Hazard stalls
// do not affect it: Decode then sends a NOP.
module execute
  import tot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        memStall,
  input  dinst_t      dInst,
  input  logic [31:0] exPC,
  output dinst_t      cur,              // instruction held (for hazard unit)
  output mem_req_t    potentialMemReq
);

  dinst_t      di;
  logic [31:0] aluIn2, aluOut;
  logic        branch;

  always_ff @(posedge clk) begin
    if (rst || flush)   di <= '0;
    else if (!memStall) di <= dInst;
  end

  assign aluIn2 = di.isImm ? di.imm : di.rs2Val;

  alu u_alu (
    .aluIn1 (di.rs1Val),
    .aluIn2 (aluIn2),
    .op     (di.aluOp),
    .aluOut (aluOut),
    .branch (branch)
  );

  always_comb begin
    potentialMemReq           = '0;
    potentialMemReq.valid     = di.valid;
    potentialMemReq.memAccess = di.valid && di.memAccess;
    potentialMemReq.memWrite  = di.valid && di.memWrite;
    potentialMemReq.wbEnable  = di.valid && di.wbEnable;
    potentialMemReq.rd        = di.rd;
    potentialMemReq.rs2Val    = di.rs2Val;
    potentialMemReq.aluOut    = aluOut;
    potentialMemReq.jump      = di.valid && di.changePC && branch;
    potentialMemReq.nextPC    = (di.aluOp == ALU_JALR) ? aluOut : exPC + di.imm;
    if (di.changePC) potentialMemReq.aluOut = exPC + 32'd4;   // link value for JAL/JALR
  end

  assign cur = di;

endmodule

// decode: the Decode stage of TOT.
//
// Holds the instruction handed over by Fetch in its input register and, in the
// same cycle, turns it into the nine control signals Execute needs (aluOp, rd,
// changePC, memAccess, wbEnable, isImm, imm, rs1, rs2), packed with the two
// register values read from the register file into one dinst_t.
//
// Operand fields follow the syntax of the instruction table: val1 is the
// destination (rd), except for ST where it is the data register rs2 and for
// branches where it is rs1; val2 is rs1 (rs2 for branches). For register-register
// instructions rs2 sits in val3[4:0] (this placement is the design's choice).
// 16-bit immediates are sign-extended; LUI moves imm to bits 31:16.
//
// Timing: register loads on the rising edge when there is no stall; a flush or
// reset clears it. During a hazard or memory stall the register holds and a NOP
// (valid = 0) is sent to Execute. An unknown opcode is sent on as a NOP and
// flagged on 'illegal' for the exception pipe.
module decode
  import tot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        hazardStall,
  input  logic        memStall,
  input  logic [31:0] inst,
  input  logic        validInst,
  // register file
  output logic [4:0]  rs1,
  output logic [4:0]  rs2,
  input  logic [31:0] rs1Val,
  input  logic [31:0] rs2Val,
  // hazard unit
  output logic        cur_valid,
  output logic        rs1_used,
  output logic        rs2_used,
  // to Execute
  output dinst_t      dInst,
  output logic        illegal
);

  inst_t ir;
  logic  ir_valid;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      ir       <= '0;
      ir_valid <= 1'b0;
    end else if (!(hazardStall || memStall)) begin
      ir       <= inst_t'(inst);
      ir_valid <= validInst;
    end
  end

  dinst_t d;
  logic   known;
  logic [31:0] simm;
  assign simm = {{16{ir.val3[15]}}, ir.val3};

  always_comb begin
    d        = '0;
    known    = 1'b1;
    rs1_used = 1'b0;
    rs2_used = 1'b0;
    d.aluOp  = ALU_ADD;
    d.imm    = simm;
    unique case (ir.opcode)
      OP_NOP: ;
      OP_ST: begin
        d.memAccess = 1'b1; d.memWrite = 1'b1; d.isImm = 1'b1;
        d.rs2 = ir.val1; d.rs1 = ir.val2; rs1_used = 1'b1; rs2_used = 1'b1;
      end
      OP_LD: begin
        d.memAccess = 1'b1; d.wbEnable = 1'b1; d.isImm = 1'b1;
        d.rd = ir.val1; d.rs1 = ir.val2; rs1_used = 1'b1;
      end
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SRL, OP_SRA, OP_SL: begin
        d.wbEnable = 1'b1;
        d.rd = ir.val1; d.rs1 = ir.val2; d.rs2 = ir.val3[4:0];
        rs1_used = 1'b1; rs2_used = 1'b1;
        unique case (ir.opcode)
          OP_ADD:  d.aluOp = ALU_ADD;
          OP_SUB:  d.aluOp = ALU_SUB;
          OP_AND:  d.aluOp = ALU_AND;
          OP_OR:   d.aluOp = ALU_OR;
          OP_XOR:  d.aluOp = ALU_XOR;
          OP_SRL:  d.aluOp = ALU_SRL;
          OP_SRA:  d.aluOp = ALU_SRA;
          default: d.aluOp = ALU_SL;
        endcase
      end
      OP_LUI: begin
        d.wbEnable = 1'b1; d.isImm = 1'b1; d.aluOp = ALU_PASS;
        d.rd = ir.val1; d.imm = {ir.val3, 16'h0000};
      end
      OP_ADDI, OP_SUBI, OP_SRLI, OP_SRAI, OP_SLI: begin
        d.wbEnable = 1'b1; d.isImm = 1'b1;
        d.rd = ir.val1; d.rs1 = ir.val2; rs1_used = 1'b1;
        unique case (ir.opcode)
          OP_ADDI: d.aluOp = ALU_ADD;
          OP_SUBI: d.aluOp = ALU_SUB;
          OP_SRLI: d.aluOp = ALU_SRL;
          OP_SRAI: d.aluOp = ALU_SRA;
          default: d.aluOp = ALU_SL;
        endcase
      end
      OP_JAL: begin
        d.wbEnable = 1'b1; d.isImm = 1'b1; d.changePC = 1'b1; d.aluOp = ALU_JAL;
        d.rd = ir.val1;
      end
      OP_JALR: begin
        d.wbEnable = 1'b1; d.isImm = 1'b1; d.changePC = 1'b1; d.aluOp = ALU_JALR;
        d.rd = ir.val1; d.rs1 = ir.val2; rs1_used = 1'b1;
      end
      OP_BGE, OP_BLT, OP_SBGE, OP_SBLT, OP_BEQ: begin
        d.changePC = 1'b1;
        d.rs1 = ir.val1; d.rs2 = ir.val2; rs1_used = 1'b1; rs2_used = 1'b1;
        unique case (ir.opcode)
          OP_BGE:  d.aluOp = ALU_BGE;
          OP_BLT:  d.aluOp = ALU_BLT;
          OP_SBGE: d.aluOp = ALU_SBGE;
          OP_SBLT: d.aluOp = ALU_SBLT;
          default: d.aluOp = ALU_BEQ;
        endcase
      end
      default: known = 1'b0;
    endcase
    if (!ir_valid || !known) begin
      rs1_used = 1'b0;
      rs2_used = 1'b0;
    end
  end

  assign rs1       = d.rs1;
  assign rs2       = d.rs2;
  assign cur_valid = ir_valid && known;
  assign illegal   = ir_valid && !known;

  always_comb begin
    dInst        = d;
    dInst.valid  = ir_valid && known && !hazardStall && !memStall;
    dInst.rs1Val = rs1Val;
    dInst.rs2Val = rs2Val;
    if (!dInst.valid) dInst = '0;
  end

endmodule

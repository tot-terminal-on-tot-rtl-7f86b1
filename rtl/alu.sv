// alu: the execute-stage arithmetic unit of TOT.
//
// Combinational. aluIn1 is always a register value; aluIn2 is a register value or
// the decoded immediate. 'op' selects one of the operations of the instruction set
// (add, subtract, and, or, xor, logical/arithmetic right shift, left shift, pass
// of the immediate for LUI). For the control-transfer operations the unit also
// evaluates 'branch': unsigned >= and < (BGE, BLT), signed >= and < (SBGE, SBLT),
// equality (BEQ), and always-true for JAL/JALR. For JALR aluOut is the jump target
// rs1 + offset. Shift amounts use the low five bits of aluIn2 (this design's choice).
module alu
  import tot_pkg::*;
(
  input  logic [31:0] aluIn1,
  input  logic [31:0] aluIn2,
  input  alu_op_e     op,
  output logic [31:0] aluOut,
  output logic        branch
);

  logic [4:0] shamt;
  assign shamt = aluIn2[4:0];

  always_comb begin
    aluOut = '0;
    branch = 1'b0;
    unique case (op)
      ALU_ADD:  aluOut = aluIn1 + aluIn2;
      ALU_SUB:  aluOut = aluIn1 - aluIn2;
      ALU_AND:  aluOut = aluIn1 & aluIn2;
      ALU_OR:   aluOut = aluIn1 | aluIn2;
      ALU_XOR:  aluOut = aluIn1 ^ aluIn2;
      ALU_SRL:  aluOut = aluIn1 >> shamt;
      ALU_SRA:  aluOut = $unsigned($signed(aluIn1) >>> shamt);
      ALU_SL:   aluOut = aluIn1 << shamt;
      ALU_PASS: aluOut = aluIn2;
      ALU_BGE:  branch = (aluIn1 >= aluIn2);
      ALU_BLT:  branch = (aluIn1 <  aluIn2);
      ALU_SBGE: branch = ($signed(aluIn1) >= $signed(aluIn2));
      ALU_SBLT: branch = ($signed(aluIn1) <  $signed(aluIn2));
      ALU_BEQ:  branch = (aluIn1 == aluIn2);
      ALU_JAL:  branch = 1'b1;
      ALU_JALR: begin
        branch = 1'b1;
        aluOut = aluIn1 + aluIn2;
      end
      default:  aluOut = '0;
    endcase
  end

endmodule

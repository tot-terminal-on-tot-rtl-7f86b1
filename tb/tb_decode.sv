// tb_decode: encodes every instruction with random fields and checks the
// decoded control signals against the instruction table; also checks the
// stall (hold + NOP out), flush (clear) and illegal-opcode behaviour.
module tb_decode;
  import tot_pkg::*;
  logic clk = 0, rst = 1, flush = 0, hazardStall = 0, memStall = 0, validInst = 0;
  logic [31:0] inst = 0, rs1Val, rs2Val;
  logic [4:0] rs1, rs2;
  logic cur_valid, rs1_used, rs2_used, illegal;
  dinst_t dInst;
  int checks = 0, failures = 0;

  decode dut (.*);
  always #5 clk = ~clk;
  // register file stand-in: value = 0x100 * index
  assign rs1Val = 32'h100 * rs1;
  assign rs2Val = 32'h100 * rs2;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s inst=%h", what, inst); end
  endtask

  task automatic load(logic [31:0] w);
    inst = w; validInst = 1;
    @(posedge clk); #1;
  endtask

  opcode_e ops [25] = '{OP_ST, OP_LD, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SRL, OP_SRA, OP_SL,
                        OP_LUI, OP_ADDI, OP_SUBI, OP_SRLI, OP_SRAI, OP_SLI, OP_JAL, OP_JALR,
                        OP_BGE, OP_BLT, OP_SBGE, OP_SBLT, OP_BEQ, OP_NOP, OP_HLT};

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic opcode_e op = ops[$urandom_range(0, 22)];
      automatic logic [4:0] v1 = $urandom, v2 = $urandom;
      automatic logic [15:0] v3 = $urandom;
      automatic logic [31:0] sx = {{16{v3[15]}}, v3};
      load(encode(op, v1, v2, v3));
      chk(dInst.valid && !illegal, "valid");
      case (op)
        OP_ST: begin
          chk(dInst.memAccess && dInst.memWrite && !dInst.wbEnable && dInst.isImm, "ST ctl");
          chk(dInst.rs2 == v1 && dInst.rs1 == v2 && dInst.imm == sx, "ST fields");
          chk(dInst.rs1Val == 32'h100 * v2 && dInst.rs2Val == 32'h100 * v1, "ST values");
        end
        OP_LD: chk(dInst.memAccess && !dInst.memWrite && dInst.wbEnable && dInst.rd == v1 && dInst.rs1 == v2 && dInst.imm == sx, "LD");
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SRL, OP_SRA, OP_SL: begin
          alu_op_e e;
          case (op)
            OP_ADD: e = ALU_ADD; OP_SUB: e = ALU_SUB; OP_AND: e = ALU_AND; OP_OR: e = ALU_OR;
            OP_XOR: e = ALU_XOR; OP_SRL: e = ALU_SRL; OP_SRA: e = ALU_SRA; default: e = ALU_SL;
          endcase
          chk(dInst.aluOp == e && !dInst.isImm && dInst.wbEnable && dInst.rd == v1 && dInst.rs1 == v2 && dInst.rs2 == v3[4:0], "3R");
          chk(rs1_used && rs2_used, "3R uses");
        end
        OP_LUI: chk(dInst.aluOp == ALU_PASS && dInst.isImm && dInst.imm == {v3, 16'h0} && dInst.rd == v1, "LUI");
        OP_ADDI, OP_SUBI, OP_SRLI, OP_SRAI, OP_SLI: begin
          alu_op_e e;
          case (op)
            OP_ADDI: e = ALU_ADD; OP_SUBI: e = ALU_SUB; OP_SRLI: e = ALU_SRL; OP_SRAI: e = ALU_SRA; default: e = ALU_SL;
          endcase
          chk(dInst.aluOp == e && dInst.isImm && dInst.imm == sx && dInst.rd == v1 && dInst.rs1 == v2 && rs1_used && !rs2_used, "imm");
        end
        OP_JAL:  chk(dInst.aluOp == ALU_JAL && dInst.changePC && dInst.wbEnable && dInst.rd == v1 && dInst.imm == sx && !rs1_used, "JAL");
        OP_JALR: chk(dInst.aluOp == ALU_JALR && dInst.changePC && dInst.wbEnable && dInst.rd == v1 && dInst.rs1 == v2, "JALR");
        default: begin
          alu_op_e e;
          case (op)
            OP_BGE: e = ALU_BGE; OP_BLT: e = ALU_BLT; OP_SBGE: e = ALU_SBGE; OP_SBLT: e = ALU_SBLT; default: e = ALU_BEQ;
          endcase
          chk(dInst.aluOp == e && dInst.changePC && !dInst.wbEnable && dInst.rs1 == v1 && dInst.rs2 == v2 && dInst.imm == sx, "branch");
        end
      endcase
    end
    // hazard stall: NOP out, instruction held
    load(encode(OP_ADD, 5'd3, 5'd4, 16'd5));
    hazardStall = 1; inst = encode(OP_SUB, 5'd9, 5'd9, 16'd9); #1;
    chk(!dInst.valid, "NOP on hazard stall");
    @(posedge clk); #1 hazardStall = 0; #1;
    chk(dInst.valid && dInst.aluOp == ALU_ADD && dInst.rd == 3, "held over stall");
    memStall = 1; #1; chk(!dInst.valid, "NOP on memory stall");
    @(posedge clk); #1 memStall = 0; #1;
    chk(dInst.valid && dInst.aluOp == ALU_ADD, "held over memory stall");
    // flush clears
    flush = 1; @(posedge clk); #1 flush = 0; validInst = 0; #1;
    chk(!dInst.valid && !cur_valid, "flush clears");
    // illegal opcode
    load(32'h8000_0000 | 32'(5 << 21));
    chk(illegal && !dInst.valid, "illegal opcode");
    // NOP from fetch (validInst = 0)
    inst = encode(OP_ADD, 5'd1, 5'd1, 16'd1); validInst = 0; @(posedge clk); #1;
    chk(!dInst.valid && !illegal, "invalid slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

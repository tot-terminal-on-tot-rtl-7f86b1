// tb_execute: drives decoded instructions into Execute and checks the memory
// request it forms one cycle later: ALU results, link values, branch decisions
// and targets; also hold under memory stall and clearing under flush.
module tb_execute;
  import tot_pkg::*;
  logic clk = 0, rst = 1, flush = 0, memStall = 0;
  dinst_t dInst, cur;
  logic [31:0] exPC;
  mem_req_t potentialMemReq;
  int checks = 0, failures = 0;

  execute dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dinst_t mk(alu_op_e op, logic isImm, logic [31:0] imm, logic [31:0] a, logic [31:0] b,
                                logic chg, logic wb, logic mem, logic wr);
    dinst_t d = '0;
    d.valid = 1; d.aluOp = op; d.isImm = isImm; d.imm = imm; d.rs1Val = a; d.rs2Val = b;
    d.changePC = chg; d.wbEnable = wb; d.memAccess = mem; d.memWrite = wr; d.rd = 5'd7;
    return d;
  endfunction

  task automatic step(dinst_t d, logic [31:0] pc);
    dInst = d;
    @(posedge clk); #1;
    exPC = pc; #1;
  endtask

  initial begin
    dInst = '0; exPC = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 500; n++) begin
      automatic logic [31:0] a = $urandom, b = $urandom, imm = $urandom, pc = {$urandom, 2'b00};
      step(mk(ALU_ADD, 0, imm, a, b, 0, 1, 0, 0), pc);
      chk(potentialMemReq.aluOut == a + b && potentialMemReq.wbEnable && !potentialMemReq.jump && potentialMemReq.rd == 7, "ADD");
      step(mk(ALU_SUB, 1, imm, a, b, 0, 1, 0, 0), pc);
      chk(potentialMemReq.aluOut == a - imm, "SUBI");
      step(mk(ALU_ADD, 1, imm, a, b, 0, 0, 1, 1), pc);
      chk(potentialMemReq.memAccess && potentialMemReq.memWrite && potentialMemReq.aluOut == a + imm && potentialMemReq.rs2Val == b, "ST address");
      step(mk(ALU_JAL, 1, imm, a, b, 1, 1, 0, 0), pc);
      chk(potentialMemReq.jump && potentialMemReq.nextPC == pc + imm && potentialMemReq.aluOut == pc + 4, "JAL");
      step(mk(ALU_JALR, 1, imm, a, b, 1, 1, 0, 0), pc);
      chk(potentialMemReq.jump && potentialMemReq.nextPC == a + imm && potentialMemReq.aluOut == pc + 4, "JALR");
      step(mk(ALU_BLT, 0, imm, a, b, 1, 0, 0, 0), pc);
      chk(potentialMemReq.jump == (a < b) && potentialMemReq.nextPC == pc + imm && !potentialMemReq.wbEnable, "BLT");
      step(mk(ALU_SBGE, 0, imm, a, b, 1, 0, 0, 0), pc);
      chk(potentialMemReq.jump == ($signed(a) >= $signed(b)), "SBGE");
      step(mk(ALU_BEQ, 0, imm, a, a, 1, 0, 0, 0), pc);
      chk(potentialMemReq.jump, "BEQ taken");
    end
    // memory stall holds the instruction
    step(mk(ALU_OR, 0, 0, 32'hF0, 32'h0F, 0, 1, 0, 0), 0);
    memStall = 1; dInst = mk(ALU_AND, 0, 0, 1, 2, 0, 1, 0, 0);
    @(posedge clk); #1;
    chk(potentialMemReq.aluOut == 32'hFF, "hold on memory stall");
    memStall = 0; flush = 1;
    @(posedge clk); #1 flush = 0;
    chk(!potentialMemReq.valid && !potentialMemReq.wbEnable && !potentialMemReq.jump, "flush clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

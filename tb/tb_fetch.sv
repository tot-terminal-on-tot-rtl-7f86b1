// tb_fetch: Fetch with an ideal instruction source (every DRAM word hits and
// holds ADDI with the PC in its immediate, except a HLT at 0x80) and the real
// boot ROM. Checks reset PC, PC + 4 stepping, holds on stalls and misses, jumps,
// HLT, NOP slots, the ROM region, the MMIO-region exception and interrupts.
module tb_fetch;
  import tot_pkg::*;
  logic clk = 0, rst = 1, jump = 0, hazardStall = 0, memStall = 0, ext_irq = 0, irq_taken = 0;
  logic [31:0] initPC = 32'h4, nextPC = 0, pcReg, inst, ic_inst, rom_addr, rom_data;
  logic validInst, halted, ic_lookup, ic_hit;
  exc_e fetchExc;
  int checks = 0, failures = 0;
  logic miss = 0;

  fetch dut (.*);
  boot_rom u_rom (.addr(rom_addr), .data(rom_data));
  assign ic_hit  = !miss;
  assign ic_inst = (pcReg == 32'h80) ? encode(OP_HLT, 0, 0, 0) :
                   (pcReg == 32'h40) ? encode(OP_NOP, 0, 0, 0) :
                   encode(OP_ADDI, 5'd1, 5'd0, pcReg[15:0]);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s pc=%h", what, pcReg); end
  endtask

  initial begin
    @(posedge clk); #1 rst = 0; #1;
    chk(pcReg == 32'h4 && validInst && inst == encode(OP_ADDI, 5'd1, 5'd0, 16'h4), "reset PC");
    for (int i = 0; i < 5; i++) begin
      automatic logic [31:0] p = pcReg;
      @(posedge clk); #1;
      chk(pcReg == p + 4, "PC + 4");
    end
    hazardStall = 1; #1;
    chk(!validInst, "NOP on hazard stall");
    begin automatic logic [31:0] p = pcReg; @(posedge clk); #1; chk(pcReg == p, "hold on hazard stall"); end
    hazardStall = 0; memStall = 1; #1;
    begin automatic logic [31:0] p = pcReg; @(posedge clk); #1; chk(pcReg == p && !validInst, "hold on memory stall"); end
    memStall = 0; miss = 1; #1;
    begin automatic logic [31:0] p = pcReg; @(posedge clk); #1; chk(pcReg == p && !validInst, "hold on miss"); end
    miss = 0;
    // jump
    jump = 1; nextPC = 32'h3C; #1;
    chk(!validInst, "NOP on jump");
    @(posedge clk); #1 jump = 0; #1;
    chk(pcReg == 32'h3C && validInst, "jump taken");
    @(posedge clk); #1;
    chk(pcReg == 32'h40 && !validInst, "NOP word sends no instruction");
    // HLT at 0x80
    jump = 1; nextPC = 32'h7C; @(posedge clk); #1 jump = 0;
    @(posedge clk); #1;
    chk(pcReg == 32'h80 && !validInst, "HLT not sent");
    repeat (3) @(posedge clk); #1;
    chk(pcReg == 32'h80 && halted && !validInst, "halted");
    // boot ROM
    jump = 1; nextPC = ROM_BASE; @(posedge clk); #1 jump = 0; miss = 1; #1;
    chk(!halted && validInst && inst == encode(OP_LUI, 5'd1, 5'd0, 16'h0100), "ROM word 0");
    @(posedge clk); #1;
    chk(pcReg == ROM_BASE + 4 && validInst, "ROM needs no cache");
    miss = 0;
    // MMIO region
    jump = 1; nextPC = 32'h0100_0000; @(posedge clk); #1 jump = 0; #1;
    chk(!validInst && fetchExc == EXC_ILLEGAL_MEM, "fetch from MMIO raises exception");
    // interrupt
    jump = 1; nextPC = 32'h200; @(posedge clk); #1 jump = 0; ext_irq = 1;
    @(posedge clk); #1 ext_irq = 0; #1;
    chk(fetchExc == EXC_INTERRUPT && !validInst, "interrupt slot");
    begin automatic logic [31:0] p = pcReg; @(posedge clk); #1; chk(pcReg == p && fetchExc == EXC_INTERRUPT, "interrupt pending until taken"); end
    irq_taken = 1; jump = 1; nextPC = 32'h0; @(posedge clk); #1 irq_taken = 0; jump = 0; #1;
    chk(fetchExc == EXC_NONE && validInst, "interrupt cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

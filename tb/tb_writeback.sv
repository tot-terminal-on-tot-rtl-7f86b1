// tb_writeback: register-write commit, jump commit, and exception commit
// (no register write, epc/exc loaded, jump to the trap address).
module tb_writeback;
  import tot_pkg::*;
  logic clk = 0, rst = 1;
  wb_cmd_t wbCommands = '0, cur;
  exc_e wbExc = EXC_NONE, exc_cause;
  logic [31:0] wbPC = 0, rf_data, nextPC, epc, exc;
  logic rf_we, jump, exc_taken;
  logic [4:0] rf_rd;
  int checks = 0, failures = 0;

  writeback #(.TRAP_ADDR(32'h0), .HANDLER_BASE(32'h100)) dut (.*);
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
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      automatic wb_cmd_t c = '0;
      c.wbEnable = $urandom; c.rd = $urandom; c.wbData = $urandom; c.jump = $urandom; c.nextPC = $urandom;
      wbCommands = c;
      @(posedge clk); #1 wbCommands = '0;
      chk(rf_we == c.wbEnable && rf_rd == c.rd && rf_data == c.wbData, "register commit");
      chk(jump == c.jump && (!c.jump || nextPC == c.nextPC), "jump commit");
    end
    // exception: registers a write command but must not commit it
    wbCommands.wbEnable = 1; wbCommands.rd = 3; wbCommands.wbData = 99;
    @(posedge clk); #1 wbCommands = '0;
    wbExc = EXC_ILLEGAL_MEM; wbPC = 32'h1234;
    #1 chk(!rf_we && jump && nextPC == 32'h0, "exception: no write, jump to trap");
    @(posedge clk); #1 wbExc = EXC_NONE;
    chk(epc == 32'h1234 && exc == 32'h100 + 32'(2 * 64) && exc_cause == EXC_ILLEGAL_MEM, "epc/exc loaded");
    wbExc = EXC_ILLEGAL_OP; wbPC = 32'h88;
    @(posedge clk); #1 wbExc = EXC_NONE;
    chk(epc == 32'h88 && exc == 32'h140, "second exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

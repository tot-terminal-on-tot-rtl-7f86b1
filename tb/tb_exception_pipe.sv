// tb_exception_pipe: exceptions injected at Fetch, Decode and Memory arrive at
// Writeback after the right number of cycles; stalls delay them, flushes and
// hazard bubbles remove them, and the earliest cause of an instruction wins.
module tb_exception_pipe;
  import tot_pkg::*;
  logic clk = 0, rst = 1, jump = 0, hazardStall = 0, memStall = 0, decodeIllegal = 0, memIllegal = 0;
  exc_e fetchExc = EXC_NONE, deExc, wbExc;
  int checks = 0, failures = 0;

  exception_pipe dut (.*);
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
    if (!cond) begin failures++; $display("FAIL %s (wbExc=%0d)", what, wbExc); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    tick(); rst = 0;
    // fetch exception: D, E, M, W -> visible after 4 edges
    fetchExc = EXC_INTERRUPT; tick(); fetchExc = EXC_NONE;
    chk(deExc == EXC_INTERRUPT, "in decode");
    tick(2); chk(wbExc == EXC_NONE, "not yet");
    tick(); chk(wbExc == EXC_INTERRUPT, "fetch exception reaches writeback");
    tick(); chk(wbExc == EXC_NONE, "one cycle only");
    // decode illegal opcode
    decodeIllegal = 1; tick(); decodeIllegal = 0;
    tick(); chk(wbExc == EXC_NONE, "not yet");
    tick(); chk(wbExc == EXC_ILLEGAL_OP, "illegal opcode reaches writeback");
    // memory stall holds it in memory
    decodeIllegal = 1; tick(); decodeIllegal = 0;
    memStall = 1; tick(3); memStall = 0;
    chk(wbExc == EXC_NONE, "held by memory stall");
    tick(); chk(wbExc == EXC_NONE, "in memory");
    tick(); chk(wbExc == EXC_ILLEGAL_OP, "released after stall");
    // memory illegal access
    memIllegal = 1; tick(); memIllegal = 0;
    chk(wbExc == EXC_ILLEGAL_MEM, "memory exception");
    // earliest cause wins
    fetchExc = EXC_INTERRUPT; tick(); fetchExc = EXC_NONE;
    decodeIllegal = 1; tick(); decodeIllegal = 0;
    tick(); memIllegal = 1; tick(); memIllegal = 0;
    chk(wbExc == EXC_INTERRUPT, "earliest cause kept");
    // flush removes an exception from whichever slot it is in
    for (int slot = 0; slot < 3; slot++) begin
      fetchExc = EXC_INTERRUPT; tick(); fetchExc = EXC_NONE;
      tick(slot); jump = 1; tick(); jump = 0;
      for (int k = 0; k < 4; k++) begin
        chk(wbExc == EXC_NONE, $sformatf("flushed from slot %0d, cycle %0d", slot, k));
        tick();
      end
    end
    // hazard bubble: decode exception held, not duplicated
    fetchExc = EXC_ILLEGAL_MEM; tick(); fetchExc = EXC_NONE;
    hazardStall = 1; tick(); hazardStall = 0;
    chk(deExc == EXC_ILLEGAL_MEM, "held in decode on hazard stall");
    tick(3); chk(wbExc == EXC_ILLEGAL_MEM, "after hazard stall");
    tick(); chk(wbExc == EXC_NONE, "not duplicated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

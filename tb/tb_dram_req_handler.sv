// tb_dram_req_handler: simultaneous and random requests from the data cache,
// instruction cache and programming port. A stand-in for the DRAM side answers
// each sent request after a random delay. Checks data-cache priority, one request
// in flight, that the right requester gets its done pulse with its data, that a
// data-cache write is released in the cycle it is sent (posted) while the next
// request waits for DRAM to take it, and that progMode gives DRAM to the
// programming port only.
module tb_dram_req_handler;
  logic clk = 0, rst = 1;
  logic dataCacheReq = 0, dataCacheWe = 0, instCacheReq = 0, progMode = 0, progReq = 0, progWe = 0;
  logic [31:0] dataCacheAddr = 0, dataCacheWdata = 0, instCacheAddr = 0, progAddr = 0, progWdata = 0;
  logic memReqDone, fetchReqDone, progReqDone, DRAM_Req, isWrite, reqDone = 0;
  logic [31:0] DRAM_Addr, DRAM_writeData, reqData = 0, data_out;
  int checks = 0, failures = 0, inflight = 0, sent = 0;

  dram_req_handler dut (.*);
  always #5 clk = ~clk;

  // DRAM side: answer with data = address + 1
  initial forever begin
    @(posedge clk);
    if (DRAM_Req && !rst) begin
      automatic logic [31:0] a = DRAM_Addr;
      inflight++; sent++;
      repeat ($urandom_range(1, 8)) @(posedge clk);
      #1 reqDone = 1; reqData = a + 1; inflight--;
      @(posedge clk); #1 reqDone = 0;
    end
  end
  logic busy = 0;
  always @(posedge clk) begin
    if (reqDone) busy = 0;
    if (!rst && DRAM_Req) begin
      if (busy) begin failures++; $display("FAIL second request while one in flight"); end
      busy = 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
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
    // both caches ask in the same cycle: data cache first
    dataCacheReq = 1; dataCacheAddr = 32'h100; dataCacheWe = 1; dataCacheWdata = 32'h5;
    instCacheReq = 1; instCacheAddr = 32'h200;
    @(posedge clk); #1;
    chk(DRAM_Req && DRAM_Addr == 32'h100 && isWrite && DRAM_writeData == 32'h5, "data cache wins");
    @(negedge clk);
    chk(memReqDone, "posted write: one-cycle stall");
    @(posedge clk); #1 dataCacheReq = 0;
    chk(!DRAM_Req && !fetchReqDone, "fetch waits until DRAM has taken the write");
    while (!fetchReqDone) @(negedge clk);
    chk(data_out == 32'h201 && !memReqDone, "fetch answered with its data");
    @(posedge clk); #1 instCacheReq = 0;
    // programming mode: caches ignored
    progMode = 1; dataCacheReq = 1; dataCacheWe = 0; dataCacheAddr = 32'h300;
    repeat (5) @(posedge clk); #1;
    chk(sent == 2, "caches blocked in programming mode");
    progReq = 1; progWe = 1; progAddr = 32'h400; progWdata = 32'h9;
    @(posedge clk); #1;
    chk(DRAM_Req && DRAM_Addr == 32'h400 && isWrite, "programming request sent");
    while (!progReqDone) @(negedge clk);
    @(posedge clk); #1 progReq = 0; progMode = 0;
    while (!memReqDone) @(negedge clk);
    chk(data_out == 32'h301, "data cache served after programming mode");
    @(posedge clk); #1 dataCacheReq = 0;
    // random traffic: every request answered once with its own data
    for (int n = 0; n < 300; n++) begin
      automatic int who = $urandom_range(0, 1);
      automatic logic [31:0] a = $urandom;
      if (who == 0) begin
        dataCacheReq = 1; dataCacheAddr = a; dataCacheWe = $urandom;
        @(negedge clk); while (!memReqDone) @(negedge clk);
        if (dataCacheWe) chk(DRAM_Req && DRAM_Addr == a, "posted write released as it is sent");
        else             chk(data_out == a + 1, "data answer");
        @(posedge clk); #1 dataCacheReq = 0;
      end else begin
        instCacheReq = 1; instCacheAddr = a;
        @(negedge clk); while (!fetchReqDone) @(negedge clk);
        chk(data_out == a + 1, "fetch answer");
        @(posedge clk); #1 instCacheReq = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

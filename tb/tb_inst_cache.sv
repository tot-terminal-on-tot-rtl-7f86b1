// tb_inst_cache: walks PCs over a region larger than the cache with a simple
// DRAM responder (random latency). Checks that a miss issues one read of the
// right word, that the word arrives on the next lookup as a hit, that hits read
// correctly, and that a conflicting address evicts the line.
module tb_inst_cache;
  logic clk = 0, rst = 1, lookup = 0, hit, fetchReq, fetchReqDone = 0;
  logic [31:0] pcReg = 0, fetched_inst, fetchAddr, dram_data = 0;
  int checks = 0, failures = 0, misses = 0, hits = 0;

  inst_cache #(.LINES(64)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return a ^ 32'hA5A5_0000;
  endfunction

  // DRAM responder
  initial begin
    forever begin
      @(posedge clk);
      if (fetchReq && !fetchReqDone && !rst) begin
        automatic logic [31:0] a = fetchAddr;
        repeat ($urandom_range(1, 6)) @(posedge clk);
        #1 fetchReqDone = 1; dram_data = mem_word(a);
        @(posedge clk); #1 fetchReqDone = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch_word(logic [31:0] a);
    int wait_cycles = 0;
    pcReg = a; lookup = 1; #1;
    if (!hit) begin
      misses++;
      @(posedge clk); #1;
      checks++;
      if (!(fetchReq && fetchAddr == a)) begin failures++; $display("FAIL request addr %h", fetchAddr); end
      while (!hit && wait_cycles < 100) begin @(posedge clk); #1; wait_cycles++; end
    end else hits++;
    checks++;
    if (!hit || fetched_inst !== mem_word(a)) begin
      failures++; $display("FAIL fetch %h got %h hit=%b", a, fetched_inst, hit);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    // cold: first touch misses, second hits
    for (int i = 0; i < 64; i++) fetch_word(32'h100 + 4 * i);
    checks++; if (misses != 64) begin failures++; $display("FAIL cold misses %0d", misses); end
    misses = 0;
    for (int i = 0; i < 64; i++) fetch_word(32'h100 + 4 * i);
    checks++; if (misses != 0) begin failures++; $display("FAIL warm misses %0d", misses); end
    // a conflicting address (same index, other tag) evicts
    fetch_word(32'h100 + 32'h100);
    checks++; if (misses != 1) failures++;
    misses = 0;
    fetch_word(32'h100);
    checks++; if (misses != 1) begin failures++; $display("FAIL conflict did not evict"); end
    // random stream
    for (int n = 0; n < 2000; n++) fetch_word({$urandom_range(0, 255), 2'b00});
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

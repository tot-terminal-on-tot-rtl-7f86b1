// tb_memory_stage: Memory stage with the real data cache and MMIO, and a DRAM
// stand-in with a fixed 6-cycle answer. Checks pass-through of ALU results,
// loads and stores through the cache (memStall while the cache works, data
// forwarded on done), MMIO loads and stores without stall, illegal accesses,
// and that a flush suppresses both the request and the output.
module tb_memory_stage;
  import tot_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  mem_req_t potentialMemReq = '0, cur;
  logic memStall, illegal, passing;
  wb_cmd_t wbCommands;
  logic dc_memReq, dc_writeEnable, dc_done;
  logic [31:0] dc_addr, dc_dataIn, dc_dataOut;
  logic [1:0] mmio_id;
  logic mmio_write;
  logic [31:0] mmio_data_in, mmio_data_out;
  logic dram_req, dram_we, dram_done = 0;
  logic [31:0] dram_addr, dram_wdata, dram_rdata = 0;
  logic bypass;
  int checks = 0, failures = 0, stall_cycles = 0;

  memory_stage dut (.*);
  data_cache u_dc (.clk, .rst, .memReq(dc_memReq), .writeEnable(dc_writeEnable), .addr(dc_addr),
                   .dataIn(dc_dataIn), .cacheBypass(bypass), .dataOut(dc_dataOut), .done(dc_done),
                   .dram_req, .dram_we, .dram_addr, .dram_wdata, .dram_done, .dram_rdata);
  mmio u_mmio (.clk, .rst, .proc_MMIO_id(mmio_id), .proc_write(mmio_write), .proc_data_in(mmio_data_in),
               .proc_data_out(mmio_data_out), .device_MMIO_id(1'b0), .device_write(1'b0),
               .device_data_in(32'h0), .device_data_out(), .cacheBypass(bypass));
  always #5 clk = ~clk;
  always @(posedge clk) if (memStall) stall_cycles++;

  logic [31:0] dram [logic [31:0]];
  initial forever begin
    @(posedge clk);
    if (dram_req && !dram_done && !rst) begin
      repeat (5) @(posedge clk);
      #1;
      if (dram_we) dram[dram_addr] = dram_wdata;
      else dram_rdata = dram.exists(dram_addr) ? dram[dram_addr] : 0;
      dram_done = 1; @(posedge clk); #1 dram_done = 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic mem_req_t op(logic mem, logic wr, logic [31:0] a, logic [31:0] d, logic wb);
    mem_req_t m = '0;
    m.valid = 1; m.memAccess = mem; m.memWrite = wr; m.aluOut = a; m.rs2Val = d; m.wbEnable = wb; m.rd = 5'd9;
    return m;
  endfunction

  // issue one instruction; return the wbCommands it produced and the cycles it took
  task automatic issue(mem_req_t m, output wb_cmd_t w, output int cycles);
    potentialMemReq = m;
    @(posedge clk); #1 potentialMemReq = '0;
    cycles = 1;
    @(negedge clk);
    while (memStall && cycles < 100) begin @(negedge clk); cycles++; end
    w = wbCommands;
    @(posedge clk); #1;
  endtask

  initial begin
    wb_cmd_t w; int c;
    @(posedge clk); #1 rst = 0;
    issue(op(0, 0, 32'h55, 0, 1), w, c);
    chk(w.wbEnable && w.wbData == 32'h55 && w.rd == 9 && c == 1, "ALU result passes");
    issue(op(1, 1, 32'h40, 32'hCAFE, 0), w, c);
    chk(!w.wbEnable && c == 2, "store miss to clean line, two cycles");
    issue(op(1, 0, 32'h40, 0, 1), w, c);
    chk(w.wbEnable && w.wbData == 32'hCAFE && c == 2, "load hit, two cycles");
    issue(op(1, 0, 32'h840, 0, 1), w, c);
    $display("evict: data=%h c=%0d dram=%h", w.wbData, c, dram[32'h40]);
    chk(w.wbData == 32'h0 && c >= 10 && dram[32'h40] == 32'hCAFE, "dirty eviction then fill");
    // MMIO: write bypass register and read it back, no stall
    issue(op(1, 1, BYPASS_ADDR, 32'h1, 0), w, c);
    $display("mmio: c=%0d bypass=%b", c, bypass);
    chk(c == 1 && bypass, "MMIO store, no stall");
    issue(op(1, 0, BYPASS_ADDR, 0, 1), w, c);
    chk(c == 1 && w.wbData == 1, "MMIO load");
    issue(op(1, 1, 32'h80, 32'h77, 0), w, c);
    chk(dram.exists(32'h80) && dram[32'h80] == 32'h77, "bypassed store reaches DRAM");
    // illegal accesses
    potentialMemReq = op(1, 0, 32'h1000_0000, 0, 1); @(posedge clk); #1 potentialMemReq = '0;
    chk(illegal && !memStall && !wbCommands.wbEnable, "ROM load illegal");
    potentialMemReq = op(1, 1, 32'h0200_0000, 0, 0); @(posedge clk); #1 potentialMemReq = '0;
    chk(illegal && !mmio_write, "unmapped MMIO illegal");
    // flush: no request, empty output
    potentialMemReq = op(1, 0, 32'h44, 0, 1); @(posedge clk); #1 potentialMemReq = '0;
    flush = 1; #1;
    chk(!dc_memReq && !wbCommands.wbEnable, "flush suppresses request");
    @(posedge clk); #1 flush = 0; #1;
    chk(!cur.valid && !memStall, "flush clears");
    chk(stall_cycles > 10, "memory stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

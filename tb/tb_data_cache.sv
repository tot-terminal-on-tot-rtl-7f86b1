// tb_data_cache: random loads and stores (with and without cache bypass) over
// a small address set that collides in the cache, against a reference memory.
// A DRAM stand-in answers after a random delay and records every access, so
// the test also checks that dirty victims are written back before the refill,
// that clean lines are never written back, and that bypassed stores reach DRAM
// at once. Hits must complete in two cycles.
module tb_data_cache;
  logic clk = 0, rst = 1, memReq = 0, writeEnable = 0, cacheBypass = 0, done;
  logic [31:0] addr = 0, dataIn = 0, dataOut;
  logic dram_req, dram_we, dram_done = 0;
  logic [31:0] dram_addr, dram_wdata, dram_rdata = 0;
  int checks = 0, failures = 0;
  int n_wb = 0, n_fill = 0, n_bypass = 0, n_hit = 0;

  data_cache #(.INDEX_BITS(9)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] dram [logic [31:0]];   // what DRAM holds
  logic [31:0] model [logic [31:0]];  // what the program should see

  initial begin
    forever begin
      @(posedge clk);
      if (dram_req && !dram_done && !rst) begin
        automatic logic [31:0] a = dram_addr, d = dram_wdata;
        automatic logic w = dram_we;
        repeat ($urandom_range(0, 5)) @(posedge clk);
        #1;
        if (w) begin dram[a] = d; n_wb++; end
        else dram_rdata = dram.exists(a) ? dram[a] : 32'h0;
        if (!w) n_fill++;
        dram_done = 1;
        @(posedge clk); #1 dram_done = 0;
      end
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic we, logic [31:0] a, logic [31:0] d, logic byp);
    int cyc = 0;
    logic [31:0] got;
    #1 memReq = 1; writeEnable = we; addr = a; dataIn = d; cacheBypass = byp;
    forever begin
      @(negedge clk); cyc++;
      if (done || cyc >= 200) break;
    end
    got = dataOut;
    @(posedge clk); #1 memReq = 0;
    checks++;
    if (!we && got !== (model.exists(a) ? model[a] : 32'h0)) begin
      failures++; $display("FAIL load %h got %h exp %h", a, got, model.exists(a) ? model[a] : 32'h0);
    end
    if (we) model[a] = d;
    if (we && byp) begin
      checks++;
      if (!dram.exists(a) || dram[a] !== d) begin failures++; $display("FAIL bypass store %h not in DRAM", a); end
    end
    if (cyc == 2) n_hit++;
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    // directed: store, load hit
    access(1, 32'h0000_0010, 32'h1111_1111, 0);
    access(0, 32'h0000_0010, 0, 0);
    checks++; if (n_wb != 0 || n_fill != 0) begin failures++; $display("FAIL store miss to clean line touched DRAM %0d %0d", n_wb, n_fill); end
    // conflicting address (same index, other tag): dirty victim written back first
    access(0, 32'h0000_0810, 0, 0);
    checks++; if (n_wb != 1 || dram[32'h10] !== 32'h1111_1111) begin failures++; $display("FAIL no write-back of dirty victim"); end
    access(0, 32'h0000_0010, 0, 0);
    checks++; if (n_wb != 1) begin failures++; $display("FAIL clean line written back"); end
    // bypassed store to a cached address
    access(1, 32'h0000_0010, 32'h2222_2222, 1);
    access(0, 32'h0000_0010, 0, 0);
    // random traffic over 4 indexes x 4 tags
    for (int n = 0; n < 4000; n++) begin
      automatic logic [31:0] a = {$urandom_range(0, 3), 9'd0, 2'b00} | {$urandom_range(0, 3), 2'b00} | 32'h0000_0100;
      automatic logic we = $urandom_range(0, 1);
      automatic logic byp = we && ($urandom_range(0, 7) == 0);
      access(we, {a[31:13], a[12:0]} + 32'(($urandom_range(0,3)) << 11), $urandom, byp);
    end
    $display("write-backs=%0d fills=%0d hits=%0d", n_wb, n_fill, n_hit);
    checks++; if (n_hit < 100 || n_fill < 100 || n_wb < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

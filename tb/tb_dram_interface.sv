// tb_dram_interface: the interface against the behavioural controller model
// (random app_rdy / app_wdf_rdy, 20-cycle reads). Writes random words, reads them
// back, checks the 0xFFF0 mask (neighbouring bytes of a unit untouched), the
// address mapping, and that a read takes at least the controller latency.
module tb_dram_interface;
  logic clk = 0, rst = 1, req = 0, isWrite = 0, done;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [26:0] app_addr;
  logic [2:0] app_cmd;
  logic app_en, app_wdf_end, app_wdf_wren, app_rdy, app_wdf_rdy, app_rd_data_valid;
  logic [127:0] app_wdf_data, app_rd_data;
  logic [15:0] app_wdf_mask;
  int checks = 0, failures = 0;

  dram_interface dut (.*);
  mig_dram_model #(.READ_LATENCY(20)) u_mem (.clk, .app_addr, .app_cmd, .app_en, .app_wdf_data, .app_wdf_end,
                                             .app_wdf_wren, .app_wdf_mask, .app_rdy, .app_wdf_rdy,
                                             .app_rd_data, .app_rd_data_valid);
  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic we, logic [31:0] a, logic [31:0] d, output logic [31:0] r, output int cycles);
    @(posedge clk); #1 req = 1; isWrite = we; addr = a; wdata = d;
    @(posedge clk); #1 req = 0;
    cycles = 0;
    while (!done && cycles < 1000) begin @(posedge clk); #1; cycles++; end
    r = rdata;
  endtask

  logic [31:0] model [logic [31:0]];

  initial begin
    logic [31:0] r; int c;
    repeat (2) @(posedge clk); #1 rst = 0;
    // fill the upper bytes of one unit directly, then write through the interface
    u_mem.mem[27'h8] = {96'hAAAA_BBBB_CCCC_DDDD_EEEE_FFFF, 32'h1111_2222};
    access(1, 32'h4, 32'h1234_5678, r, c);
    checks++;
    if (u_mem.mem[27'h8] !== {96'hAAAA_BBBB_CCCC_DDDD_EEEE_FFFF, 32'h1234_5678}) begin
      failures++; $display("FAIL mask or address mapping: %h", u_mem.mem[27'h8]);
    end
    access(0, 32'h4, 0, r, c);
    checks += 2;
    if (r !== 32'h1234_5678) begin failures++; $display("FAIL read back %h", r); end
    if (c < 20) begin failures++; $display("FAIL read faster than DRAM latency: %0d", c); end
    for (int n = 0; n < 300; n++) begin
      automatic logic [31:0] a = {$urandom_range(0, 63), 2'b00};
      if ($urandom_range(0, 1)) begin
        automatic logic [31:0] d = $urandom;
        access(1, a, d, r, c);
        model[a] = d;
      end else begin
        access(0, a, 0, r, c);
        checks++;
        if (r !== (model.exists(a) ? model[a] : (a == 4 ? 32'h1234_5678 : 32'h0))) begin
          failures++; $display("FAIL read %h got %h", a, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

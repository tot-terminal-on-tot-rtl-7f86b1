// tb_mmio: processor reads and writes of the four registers, device writes that
// set the fresh flag, device priority on a same-cycle clash, and cacheBypass.
module tb_mmio;
  logic clk = 0, rst = 1, proc_write = 0, device_MMIO_id = 0, device_write = 0, cacheBypass;
  logic [1:0] proc_MMIO_id = 0;
  logic [31:0] proc_data_in = 0, proc_data_out, device_data_in = 0, device_data_out;
  int checks = 0, failures = 0;

  mmio dut (.*);
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

  task automatic pwrite(logic [1:0] id, logic [31:0] d);
    proc_MMIO_id = id; proc_data_in = d; proc_write = 1;
    @(posedge clk); #1 proc_write = 0;
  endtask

  function automatic logic [31:0] pread(logic [1:0] id);
    proc_MMIO_id = id;
    return dut.regs[id];
  endfunction

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) begin proc_MMIO_id = 2'(i); #1; chk(proc_data_out == 0, "reset value"); end
    pwrite(2, 32'h1); proc_MMIO_id = 2; #1;
    chk(cacheBypass && proc_data_out == 1, "bypass on");
    pwrite(2, 32'h0); #1; chk(!cacheBypass, "bypass off");
    // device delivers a word
    device_data_in = 32'hDEAD_BEEF; device_write = 1; @(posedge clk); #1 device_write = 0;
    proc_MMIO_id = 0; #1; chk(proc_data_out == 32'hDEAD_BEEF, "UART_data");
    proc_MMIO_id = 1; #1; chk(proc_data_out == 32'd1, "UART_fresh set");
    pwrite(1, 0); proc_MMIO_id = 1; #1; chk(proc_data_out == 0, "UART_fresh cleared");
    // clash: device wins on the fresh flag
    proc_MMIO_id = 1; proc_data_in = 0; proc_write = 1; device_data_in = 32'h1234; device_write = 1;
    @(posedge clk); #1 proc_write = 0; device_write = 0;
    #1 chk(proc_data_out == 1, "device wins clash");
    proc_MMIO_id = 0; #1; chk(proc_data_out == 32'h1234 && device_data_out == 32'h1234, "device word");
    // processor writes other registers
    for (int n = 0; n < 50; n++) begin
      automatic logic [1:0] id = $urandom; automatic logic [31:0] d = $urandom;
      pwrite(id, d); proc_MMIO_id = id; #1; chk(proc_data_out == d, "readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

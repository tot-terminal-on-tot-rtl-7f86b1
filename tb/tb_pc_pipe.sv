// tb_pc_pipe: random stalls against a reference model of the stage advance rules.
module tb_pc_pipe;
  logic clk = 0, rst = 1, hazardStall = 0, memStall = 0;
  logic [31:0] pcReg = 0, dePC, exPC, memPC, wbPC;
  logic [31:0] r_de = 0, r_ex = 0, r_mem = 0, r_wb = 0;
  int checks = 0, failures = 0;

  pc_pipe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 5000; n++) begin
      pcReg = $urandom; hazardStall = ($urandom_range(0, 3) == 0); memStall = ($urandom_range(0, 4) == 0);
      @(posedge clk);
      r_wb = r_mem;
      if (!memStall) begin r_mem = r_ex; r_ex = r_de; end
      if (!(hazardStall || memStall)) r_de = pcReg;
      #1;
      checks++;
      if (dePC !== r_de || exPC !== r_ex || memPC !== r_mem || wbPC !== r_wb) begin
        failures++; $display("FAIL cycle %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

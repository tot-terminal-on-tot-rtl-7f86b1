// tb_regfile: writes random values through the write port and compares both
// read ports with a reference array; register 0 must stay zero.
module tb_regfile;
  logic clk = 0, rst = 1;
  logic [4:0] rs1, rs2, rd;
  logic [31:0] rs1Val, rs2Val, wbData;
  logic wbEnable;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    wbEnable = 0; rd = 0; wbData = 0; rs1 = 0; rs2 = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      wbEnable = $urandom_range(0, 1);
      rd = $urandom; wbData = $urandom;
      rs1 = $urandom; rs2 = $urandom;
      #1;
      checks += 2;
      if (rs1Val !== model[rs1]) begin failures++; $display("FAIL rs1 %0d", rs1); end
      if (rs2Val !== model[rs2]) begin failures++; $display("FAIL rs2 %0d", rs2); end
      @(posedge clk);
      if (wbEnable && rd != 0) model[rd] = wbData;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reg_conflict: random source/destination combinations checked against the
// hazard rule (a used, non-zero source equal to a pending destination stalls).
module tb_reg_conflict;
  logic valid, rs1_used, rs2_used, wbEnable_EX, wbEnable_MEM, wbEnable_WB, hazardStall;
  logic [4:0] rs1, rs2, rd_EX, rd_MEM, rd_WB;
  int checks = 0, failures = 0;

  reg_conflict dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic dep(logic [4:0] r);
    if (r == 0) return 0;
    return (wbEnable_EX && rd_EX == r) || (wbEnable_MEM && rd_MEM == r) || (wbEnable_WB && rd_WB == r);
  endfunction

  initial begin
    automatic int stalls = 0;
    for (int n = 0; n < 20000; n++) begin
      valid = $urandom_range(0, 7) != 0;
      rs1_used = $urandom; rs2_used = $urandom;
      rs1 = $urandom_range(0, 7); rs2 = $urandom_range(0, 7);
      rd_EX = $urandom_range(0, 7); rd_MEM = $urandom_range(0, 7); rd_WB = $urandom_range(0, 7);
      wbEnable_EX = $urandom; wbEnable_MEM = $urandom; wbEnable_WB = $urandom;
      #1;
      checks++;
      if (hazardStall !== (valid && ((rs1_used && dep(rs1)) || (rs2_used && dep(rs2))))) begin
        failures++;
        $display("FAIL rs1=%0d rs2=%0d ex=%0d/%b mem=%0d/%b wb=%0d/%b", rs1, rs2, rd_EX, wbEnable_EX, rd_MEM, wbEnable_MEM, rd_WB, wbEnable_WB);
      end
      if (hazardStall) stalls++;
    end
    checks++;
    if (stalls < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_boot_rom: checks selected loader instructions, decoded by field, and that
// words past the program read as HLT.
module tb_boot_rom;
  import tot_pkg::*;
  logic [31:0] addr, data;
  int checks = 0, failures = 0;

  boot_rom dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(int idx, logic [5:0] op, logic [4:0] v1, logic [4:0] v2, logic [15:0] v3);
    addr = 32'h1000_0000 + 32'(idx * 4);
    #1;
    checks++;
    if (data !== {op, v1, v2, v3}) begin
      failures++;
      $display("FAIL word %0d = %h", idx, data);
    end
  endtask

  initial begin
    expect_word(0,  6'h0B, 5'd1, 5'd0, 16'h0100);   // LUI r1, 0x0100
    expect_word(2,  6'h01, 5'd5, 5'd1, 16'd8);      // ST r5 -> [r1+8] (bypass on)
    expect_word(4,  6'h02, 5'd6, 5'd1, 16'd4);      // LD r6 <- UART_fresh
    expect_word(5,  6'h17, 5'd6, 5'd0, 16'hFFFC);   // BEQ back one word
    expect_word(12, 6'h17, 5'd5, 5'd7, 16'd28);     // end marker test, to word 19
    expect_word(17, 6'h01, 5'd8, 5'd5, 16'd0);      // store instruction word
    expect_word(18, 6'h11, 5'd0, 5'd0, 16'hFFD8);   // JAL back to word 8
    expect_word(20, 6'h01, 5'd6, 5'd1, 16'd4);      // UART_fresh = 2
    expect_word(24, 6'h12, 5'd0, 5'd4, 16'd0);      // JALR r4
    for (int i = 25; i < 40; i++) expect_word(i, 6'h3F, 5'd0, 5'd0, 16'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

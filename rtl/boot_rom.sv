// boot_rom: the boot loader ROM of TOT, read by Fetch from ROM_BASE upward.
//
// Combinational read of one 32-bit instruction per word address. Words past the
// program read as HLT. The program is the UART boot loader, a three-state loop:
//   1. switch the cache bypass on (stores go straight to DRAM) and wait for the
//      first word from the UART: the start address of the user program;
//   2. repeatedly wait for an address word, stop if it is 0xFFFF_FFFF, else wait
//      for an instruction word and store it at that address;
//   3. on the end marker write 2 to UART_fresh, switch the bypass off, set the
//      stack pointer (r2) to the top of DRAM and jump to the start address.
// After each word is read, UART_fresh is written back to 0.
// Register use: r1 MMIO base, r4 start address, r5 target address, r6 scratch,
// r7 end marker, r8 instruction word. The loader's behaviour follows the design
// description; the instruction sequence, the bypass switch-off and the stack
// pointer value are this design's own.
module boot_rom
  import tot_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic [31:0] addr,
  output logic [31:0] data
);

  localparam logic [4:0] R0 = 5'd0, R1 = 5'd1, R2 = 5'd2, R4 = 5'd4, R5 = 5'd5,
                         R6 = 5'd6, R7 = 5'd7, R8 = 5'd8;

  function automatic logic [31:0] rom_word(int i);
    case (i)
      0:  return encode(OP_LUI,  R1, R0, 16'h0100);   // r1 = 0x0100_0000 (MMIO)
      1:  return encode(OP_ADDI, R5, R0, 16'd1);
      2:  return encode(OP_ST,   R5, R1, 16'd8);      // cacheBypass = 1
      3:  return encode(OP_ADDI, R7, R0, 16'hFFFF);   // r7 = -1 (end marker)
      // wait for the start address
      4:  return encode(OP_LD,   R6, R1, 16'd4);      // r6 = UART_fresh
      5:  return encode(OP_BEQ,  R6, R0, 16'hFFFC);   // loop while 0
      6:  return encode(OP_LD,   R4, R1, 16'd0);      // r4 = start address
      7:  return encode(OP_ST,   R0, R1, 16'd4);      // UART_fresh = 0
      // wait for an address
      8:  return encode(OP_LD,   R6, R1, 16'd4);
      9:  return encode(OP_BEQ,  R6, R0, 16'hFFFC);
      10: return encode(OP_LD,   R5, R1, 16'd0);      // r5 = target address
      11: return encode(OP_ST,   R0, R1, 16'd4);
      12: return encode(OP_BEQ,  R5, R7, 16'd28);     // -1 -> done (word 19)
      // wait for an instruction
      13: return encode(OP_LD,   R6, R1, 16'd4);
      14: return encode(OP_BEQ,  R6, R0, 16'hFFFC);
      15: return encode(OP_LD,   R8, R1, 16'd0);      // r8 = instruction
      16: return encode(OP_ST,   R0, R1, 16'd4);
      17: return encode(OP_ST,   R8, R5, 16'd0);      // mem[r5] = r8
      18: return encode(OP_JAL,  R0, R0, 16'hFFD8);   // back to word 8
      // done
      19: return encode(OP_ADDI, R6, R0, 16'd2);
      20: return encode(OP_ST,   R6, R1, 16'd4);      // UART_fresh = 2
      21: return encode(OP_ST,   R0, R1, 16'd8);      // cacheBypass = 0
      22: return encode(OP_LUI,  R2, R0, 16'h0100);
      23: return encode(OP_SUBI, R2, R2, 16'd4);      // sp = 0x00FF_FFFC
      24: return encode(OP_JALR, R0, R4, 16'd0);      // jump to start address
      default: return encode(OP_HLT, R0, R0, 16'd0);
    endcase
  endfunction

  logic [31:0] word_idx;
  assign word_idx = (addr - ROM_BASE) >> 2;
  assign data = (word_idx < 32'(DEPTH)) ? rom_word(int'(word_idx)) : encode(OP_HLT, R0, R0, 16'd0);

endmodule

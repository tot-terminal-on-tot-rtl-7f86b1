// fetch: the Fetch stage of TOT (PC register, instruction source selection).
//
// The PC register selects the instruction source: the boot ROM for addresses at
// or above ROM_BASE (always available, combinational), the instruction cache for
// DRAM addresses (available on a hit), and nothing for the MMIO range (the slot
// then carries an illegal-memory-access exception).
// PC update, in priority order:
//   reset          -> initPC
//   jump           -> nextPC from Writeback (taken branch, jump or exception)
//   stall or miss  -> unchanged (hazard stall, memory stall, cache miss, halted)
//   HLT fetched    -> unchanged, fetching stops until a jump or reset
//   otherwise      -> PC + 4
// The instruction handed to Decode is a NOP (validInst = 0) on a stall, a jump,
// a miss, or when the word fetched is NOP or HLT. A pending interrupt is attached
// as an exception to the next slot handed to Decode (the instruction at that PC
// is not executed and is resumed from epc); it stays pending until Writeback
// commits it. HLT handling and the interrupt entry point are this design's choices.
module fetch
  import tot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] initPC,
  input  logic        jump,
  input  logic [31:0] nextPC,
  input  logic        hazardStall,
  input  logic        memStall,
  input  logic        ext_irq,     // external interrupt request
  input  logic        irq_taken,
  output logic [31:0] pcReg,
  output logic [31:0] inst,
  output logic        validInst,
  output exc_e        fetchExc,
  output logic        halted,
  // instruction cache
  output logic        ic_lookup,
  input  logic        ic_hit,
  input  logic [31:0] ic_inst,
  // boot ROM
  output logic [31:0] rom_addr,
  input  logic [31:0] rom_data
);

  logic        irq_pending;
  logic        in_rom, in_dram, avail, stall;
  logic [31:0] word;
  inst_t       w;

  assign in_rom    = (pcReg >= ROM_BASE);
  assign in_dram   = (pcReg[31:24] == 8'h00);
  assign ic_lookup = in_dram;
  assign rom_addr  = pcReg;
  assign word      = in_rom ? rom_data : ic_inst;
  assign w         = inst_t'(word);
  assign avail     = in_rom || (in_dram && ic_hit);
  assign stall     = hazardStall || memStall;

  always_ff @(posedge clk) begin
    if (rst) begin
      pcReg  <= initPC;
      halted <= 1'b0;
    end else if (jump) begin
      pcReg  <= nextPC;
      halted <= 1'b0;
    end else if (!stall && !halted && avail && !irq_pending) begin
      if (w.opcode == OP_HLT) halted <= 1'b1;
      else                    pcReg  <= pcReg + 32'd4;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || irq_taken) irq_pending <= 1'b0;
    else if (ext_irq)   irq_pending <= 1'b1;
  end

  always_comb begin
    inst      = '0;
    validInst = 1'b0;
    fetchExc  = EXC_NONE;
    if (!stall && !jump) begin
      if (irq_pending)                   fetchExc = EXC_INTERRUPT;
      else if (!in_rom && !in_dram)      fetchExc = EXC_ILLEGAL_MEM;
      else if (avail && !halted &&
               w.opcode != OP_NOP && w.opcode != OP_HLT) begin
        inst      = word;
        validInst = 1'b1;
      end
    end
  end

endmodule

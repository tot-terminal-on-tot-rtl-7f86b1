// memory_stage: the Memory stage of TOT.
//
// Registers potentialMemoryReq from Execute. Instructions without a memory access
// pass straight through to Writeback. Loads and stores are routed by address:
//   0x0000_0000..0x00FF_FFFF  data cache (DRAM)
//   0x0100_0000..0x0100_000F  MMIO registers (single cycle, no stall)
//   anything else             illegal memory access (exception, no access made)
// While the data cache works on a request memStall is high and the stage holds
// its instruction; the wbCommands sent to Writeback are then empty. In the cycle
// the cache pulses 'done' the load data is forwarded.
//
// Under a flush (jump or exception committing in Writeback) or reset the held
// instruction is cleared, and no request or MMIO write is issued in that cycle.
module memory_stage
  import tot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  mem_req_t    potentialMemReq,
  output mem_req_t    cur,          // instruction held (for hazard unit)
  output logic        memStall,
  output logic        illegal,      // illegal memory access of the held instruction
  output logic        passing,      // instruction leaves this cycle
  output wb_cmd_t     wbCommands,
  // data cache
  output logic        dc_memReq,
  output logic        dc_writeEnable,
  output logic [31:0] dc_addr,
  output logic [31:0] dc_dataIn,
  input  logic [31:0] dc_dataOut,
  input  logic        dc_done,
  // MMIO
  output logic [1:0]  mmio_id,
  output logic        mmio_write,
  output logic [31:0] mmio_data_in,
  input  logic [31:0] mmio_data_out
);

  mem_req_t m;

  always_ff @(posedge clk) begin
    if (rst || flush)   m <= '0;
    else if (!memStall) m <= potentialMemReq;
  end

  logic in_dram, in_mmio;
  assign in_dram = (m.aluOut[31:24] == 8'h00);
  assign in_mmio = (m.aluOut[31:4] == MMIO_BASE[31:4]);

  assign illegal        = m.valid && m.memAccess && !in_dram && !in_mmio;
  assign dc_memReq      = m.valid && m.memAccess && in_dram && !flush;
  assign dc_writeEnable = m.memWrite;
  assign dc_addr        = {m.aluOut[31:2], 2'b00};
  assign dc_dataIn      = m.rs2Val;
  assign mmio_id        = m.aluOut[3:2];
  assign mmio_write     = m.valid && m.memWrite && in_mmio && !flush;
  assign mmio_data_in   = m.rs2Val;

  assign memStall = dc_memReq && !dc_done;
  assign passing  = !memStall && !flush;

  always_comb begin
    wbCommands = '0;
    if (m.valid && passing) begin
      wbCommands.wbEnable = m.wbEnable && !illegal;
      wbCommands.rd       = m.rd;
      wbCommands.jump     = m.jump;
      wbCommands.nextPC   = m.nextPC;
      if (!m.memAccess)  wbCommands.wbData = m.aluOut;
      else if (in_dram)  wbCommands.wbData = dc_dataOut;
      else               wbCommands.wbData = mmio_data_out;
    end
  end

  assign cur = m;

endmodule

// writeback: the Writeback stage of TOT.
//
// Registers the wbCommands from Memory every cycle (it is never stalled or
// flushed) together with the exception cause and PC delivered by the exception
// and PC pipes. In the following cycle it commits:
//   - no exception: the register write (wbEnable, rd, wbData) and, for a taken
//     jump or branch, jump = 1 with the target on nextPC;
//   - an exception: no register write; epc <= PC of the instruction,
//     exc <= address of the handler for that cause, and a jump to TRAP_ADDR.
// 'jump' doubles as the pipeline flush. The handler table (HANDLER_BASE plus
// 64 bytes per cause) and TRAP_ADDR are this design's choices; the trap routine
// itself is software and not part of the hardware.
module writeback
  import tot_pkg::*;
#(
  parameter logic [31:0] TRAP_ADDR    = 32'h0000_0000,
  parameter logic [31:0] HANDLER_BASE = 32'h0000_0100
) (
  input  logic        clk,
  input  logic        rst,
  input  wb_cmd_t     wbCommands,
  input  exc_e        wbExc,        // exception of the instruction in this stage
  input  logic [31:0] wbPC,
  output wb_cmd_t     cur,          // held command (for hazard unit)
  // register file
  output logic        rf_we,
  output logic [4:0]  rf_rd,
  output logic [31:0] rf_data,
  // to Fetch / flush
  output logic        jump,
  output logic [31:0] nextPC,
  // kernel registers
  output logic [31:0] epc,
  output logic [31:0] exc,
  output exc_e        exc_cause,
  output logic        exc_taken
);

  wb_cmd_t w;

  always_ff @(posedge clk) begin
    if (rst) w <= '0;
    else     w <= wbCommands;
  end

  assign exc_taken = (wbExc != EXC_NONE);
  assign rf_we     = w.wbEnable && !exc_taken;
  assign rf_rd     = w.rd;
  assign rf_data   = w.wbData;
  assign jump      = w.jump || exc_taken;
  assign nextPC    = exc_taken ? TRAP_ADDR : w.nextPC;
  assign cur       = w;

  always_ff @(posedge clk) begin
    if (rst) begin
      epc       <= '0;
      exc       <= '0;
      exc_cause <= EXC_NONE;
    end else if (exc_taken) begin
      epc       <= wbPC;
      exc       <= HANDLER_BASE + {23'd0, wbExc, 6'd0};
      exc_cause <= wbExc;
    end
  end

endmodule

// exception_pipe: carries the exception cause of each instruction to Writeback.
//
// Exceptions are raised in three places: Fetch (interrupt, fetch outside memory),
// Decode (illegal opcode) and Memory (illegal memory access). The cause travels
// with the instruction through the Decode, Execute, Memory and Writeback slots
// under the same advance rules as the stage registers, and the earliest cause
// raised for an instruction is kept. A flush ('jump') empties the Decode,
// Execute and Memory slots; the Writeback slot takes nothing while the Memory
// stage is stalled or flushed. wbExc is the cause Writeback commits.
module exception_pipe
  import tot_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic jump,
  input  logic hazardStall,
  input  logic memStall,
  input  exc_e fetchExc,
  input  logic decodeIllegal,
  input  logic memIllegal,
  output exc_e deExc,
  output exc_e wbExc
);

  exc_e exExc, memExc;

  always_ff @(posedge clk) begin
    if (rst || jump) begin
      deExc  <= EXC_NONE;
      exExc  <= EXC_NONE;
      memExc <= EXC_NONE;
    end else begin
      if (!(hazardStall || memStall)) deExc <= fetchExc;
      if (!memStall) begin
        if (hazardStall)              exExc <= EXC_NONE;
        else if (deExc != EXC_NONE)   exExc <= deExc;
        else if (decodeIllegal)       exExc <= EXC_ILLEGAL_OP;
        else                          exExc <= EXC_NONE;
        memExc <= exExc;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || jump || memStall)  wbExc <= EXC_NONE;
    else if (memExc != EXC_NONE)  wbExc <= memExc;
    else if (memIllegal)          wbExc <= EXC_ILLEGAL_MEM;
    else                          wbExc <= EXC_NONE;
  end

endmodule

// pc_pipe: carries each instruction's PC alongside the TOT pipeline.
//
// dePC, exPC, memPC and wbPC are the PCs of the instructions held in Decode,
// Execute, Memory and Writeback. They advance under the same rules as the stage
// registers: Decode holds on hazard and memory stalls, Execute and Memory hold on
// memory stalls, Writeback always loads. Execute uses exPC for branch targets and
// link values; Writeback uses wbPC for epc.
module pc_pipe (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pcReg,
  input  logic        hazardStall,
  input  logic        memStall,
  output logic [31:0] dePC,
  output logic [31:0] exPC,
  output logic [31:0] memPC,
  output logic [31:0] wbPC
);

  always_ff @(posedge clk) begin
    if (rst) begin
      dePC  <= '0;
      exPC  <= '0;
      memPC <= '0;
      wbPC  <= '0;
    end else begin
      if (!(hazardStall || memStall)) dePC <= pcReg;
      if (!memStall) begin
        exPC  <= dePC;
        memPC <= exPC;
      end
      wbPC <= memPC;
    end
  end

endmodule

// reg_conflict: data-hazard detection (RegConflict) for the TOT pipeline.
//
// Combinational. The instruction in Decode reads rs1 and/or rs2 (use flags from
// Decode). If either is the destination of an instruction still in Execute,
// Memory or Writeback with its write enable set, hazardStall is raised: Fetch and
// Decode hold while the older instructions drain. There is no forwarding.
// Register 0 never conflicts (it is hard-wired to zero in this design).
module reg_conflict (
  input  logic       valid,      // Decode holds a real instruction
  input  logic [4:0] rs1,
  input  logic       rs1_used,
  input  logic [4:0] rs2,
  input  logic       rs2_used,
  input  logic [4:0] rd_EX,
  input  logic       wbEnable_EX,
  input  logic [4:0] rd_MEM,
  input  logic       wbEnable_MEM,
  input  logic [4:0] rd_WB,
  input  logic       wbEnable_WB,
  output logic       hazardStall
);

  function automatic logic hits(logic [4:0] r);
    return (r != 5'd0) &&
           ((wbEnable_EX  && rd_EX  == r) ||
            (wbEnable_MEM && rd_MEM == r) ||
            (wbEnable_WB  && rd_WB  == r));
  endfunction

  assign hazardStall = valid && ((rs1_used && hits(rs1)) || (rs2_used && hits(rs2)));

endmodule

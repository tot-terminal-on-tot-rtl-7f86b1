// inst_cache: direct-mapped instruction cache of TOT.
//
// One 32-bit word per line, LINES lines (64 by default: 6 index bits and 26 tag
// bits above the 2 offset bits). Tags, data and valid bits live in distributed
// (asynchronously read) RAM, so a hit returns the instruction in the same cycle
// the PC is presented. The cache only ever reads DRAM.
//
// On a miss the address is latched and fetchReq is held high until the DRAM
// request handler answers with a one-cycle fetchReqDone carrying the word; the
// line is filled on that edge, and the next lookup of the same PC hits. A miss
// for a PC that has changed in the meantime still fills the latched line.
// Lines are invalidated only by reset.
module inst_cache #(
  parameter int LINES = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lookup,      // Fetch wants an instruction from DRAM space
  input  logic [31:0] pcReg,
  output logic        hit,
  output logic [31:0] fetched_inst,
  // DRAM request handler side
  output logic        fetchReq,
  output logic [31:0] fetchAddr,
  input  logic        fetchReqDone,
  input  logic [31:0] dram_data
);

  localparam int IDX = $clog2(LINES);
  localparam int TAG = 32 - IDX - 2;

  logic [TAG-1:0] tags  [LINES];
  logic [31:0]    data  [LINES];
  logic [LINES-1:0] valid;

  logic [IDX-1:0] idx;
  logic [TAG-1:0] tag;
  assign idx = pcReg[IDX+1:2];
  assign tag = pcReg[31:IDX+2];

  assign hit          = valid[idx] && tags[idx] == tag;
  assign fetched_inst = data[idx];

  logic        busy;
  logic [31:0] miss_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid     <= '0;
      busy      <= 1'b0;
      miss_addr <= '0;
    end else if (busy) begin
      if (fetchReqDone) begin
        busy <= 1'b0;
        valid[miss_addr[IDX+1:2]] <= 1'b1;
        tags [miss_addr[IDX+1:2]] <= miss_addr[31:IDX+2];
        data [miss_addr[IDX+1:2]] <= dram_data;
      end
    end else if (lookup && !hit) begin
      busy      <= 1'b1;
      miss_addr <= {pcReg[31:2], 2'b00};
    end
  end

  assign fetchReq  = busy;
  assign fetchAddr = miss_addr;

endmodule

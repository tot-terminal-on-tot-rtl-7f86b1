// dram_req_handler: routes the DRAM requests of TOT, one at a time.
//
// Three requesters hold a level request until they are answered: the data cache
// (read or write), the instruction cache (read only) and a programming port that
// owns DRAM while progMode is high. In normal mode the data cache wins over the
// instruction cache when both ask in the same cycle: its misses stall the whole
// processor, while an instruction-cache miss only feeds NOPs into the pipeline.
//
// When idle the handler picks a requester, latches its packet and pulses DRAM_Req
// for one cycle (the reqSent of the clock-crossing bridge). It then waits for
// reqDone, the bridged answer from the DRAM interface, and pulses memReqDone,
// fetchReqDone or progReqDone for one cycle with the read word on data_out. Reads
// take as long as DRAM needs. A data-cache write is posted: memReqDone pulses in
// the cycle DRAM_Req goes out, so the cache stalls one cycle for it, and the
// handler takes no new request until reqDone reports that DRAM has accepted the
// write; this keeps every later access behind it. Programming-port writes are
// answered on reqDone. The data-cache priority and the one-cycle write stall
// follow the design description; the posting mechanism is this design's own.
module dram_req_handler
  import tot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // data cache
  input  logic        dataCacheReq,
  input  logic        dataCacheWe,
  input  logic [31:0] dataCacheAddr,
  input  logic [31:0] dataCacheWdata,
  output logic        memReqDone,
  // instruction cache
  input  logic        instCacheReq,
  input  logic [31:0] instCacheAddr,
  output logic        fetchReqDone,
  // programming port
  input  logic        progMode,
  input  logic        progReq,
  input  logic        progWe,
  input  logic [31:0] progAddr,
  input  logic [31:0] progWdata,
  output logic        progReqDone,
  // to the DRAM side (through the clock-crossing bridges)
  output logic        DRAM_Req,
  output logic        isWrite,
  output logic [31:0] DRAM_Addr,
  output logic [31:0] DRAM_writeData,
  input  logic        reqDone,
  input  logic [31:0] reqData,
  output logic [31:0] data_out
);

  typedef enum logic [1:0] {OWN_NONE, OWN_DATA, OWN_INST, OWN_PROG} owner_e;
  owner_e owner;

  always_ff @(posedge clk) begin
    if (rst) begin
      owner          <= OWN_NONE;
      DRAM_Req       <= 1'b0;
      isWrite        <= 1'b0;
      DRAM_Addr      <= '0;
      DRAM_writeData <= '0;
    end else begin
      DRAM_Req <= 1'b0;
      if (owner == OWN_NONE) begin
        if (progMode) begin
          if (progReq) begin
            owner <= OWN_PROG; DRAM_Req <= 1'b1;
            isWrite <= progWe; DRAM_Addr <= progAddr; DRAM_writeData <= progWdata;
          end
        end else if (dataCacheReq) begin
          owner <= OWN_DATA; DRAM_Req <= 1'b1;
          isWrite <= dataCacheWe; DRAM_Addr <= dataCacheAddr; DRAM_writeData <= dataCacheWdata;
        end else if (instCacheReq) begin
          owner <= OWN_INST; DRAM_Req <= 1'b1;
          isWrite <= 1'b0; DRAM_Addr <= instCacheAddr; DRAM_writeData <= '0;
        end
      end else if (reqDone) begin
        owner <= OWN_NONE;
      end
    end
  end

  // A data-cache write is posted: the cache is released in the cycle the request
  // goes out, while the handler stays busy until DRAM has taken the write.
  assign memReqDone   = owner == OWN_DATA && (isWrite ? DRAM_Req : reqDone);
  assign fetchReqDone = reqDone && owner == OWN_INST;
  assign progReqDone  = reqDone && owner == OWN_PROG;
  assign data_out     = reqData;

endmodule

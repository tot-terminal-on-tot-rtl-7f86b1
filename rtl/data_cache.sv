// data_cache: direct-mapped, write-back data cache of TOT.
//
// Address split: offset [1:0] (always zero), index [INDEX_BITS+1:2] (9 bits,
// 512 lines), tag [31:INDEX_BITS+2] (21 bits); a line is one word, so it stores
// 53 bits (32 data + 21 tag) in block RAM. Validity and dirtiness are kept in two
// bit vectors. Dirty lines are written back to DRAM when evicted.
//
// Protocol: the Memory stage holds memReq (with writeEnable, addr, dataIn) high
// until 'done' pulses for one cycle; on a load dataOut is valid in that cycle.
// The block RAM has a registered read port, so even a hit spends one cycle in
// LOOKUP (a hit completes in the second cycle of the request).
//   load hit        -> done
//   store hit       -> line written, marked dirty, done
//   miss, dirty     -> victim written to DRAM first (separate request)
//   load miss       -> word read from DRAM, line filled clean, done
//   store miss      -> new word installed dirty (no read: a line is one word)
//   cacheBypass set -> a store goes straight to DRAM; a line holding the same
//                      address is invalidated so later loads read the new value
// DRAM requests (dram_req, level) are held until dram_done pulses; at most one is
// outstanding. The victim-then-fill ordering follows the design description; the
// hit latency, store-miss policy and bypass invalidation are this design's choices.
module data_cache #(
  parameter int INDEX_BITS = 9
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        memReq,
  input  logic        writeEnable,
  input  logic [31:0] addr,
  input  logic [31:0] dataIn,
  input  logic        cacheBypass,
  output logic [31:0] dataOut,
  output logic        done,
  // DRAM request handler side
  output logic        dram_req,
  output logic        dram_we,
  output logic [31:0] dram_addr,
  output logic [31:0] dram_wdata,
  input  logic        dram_done,
  input  logic [31:0] dram_rdata
);

  localparam int LINES = 1 << INDEX_BITS;
  localparam int TAG   = 32 - INDEX_BITS - 2;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WBACK, S_FILL, S_BYPASS} state_e;
  state_e state;

  logic [TAG-1:0]   tag_mem  [LINES];
  logic [31:0]      data_mem [LINES];
  logic [LINES-1:0] valid, dirty;

  // latched request
  logic                  r_we, r_bypass;
  logic [31:0]           r_data;
  logic [INDEX_BITS-1:0] r_idx;
  logic [TAG-1:0]        r_tag;

  // block RAM read port (registered)
  logic [TAG-1:0] rd_tag;
  logic [31:0]    rd_data;

  logic line_valid, line_dirty, hit;
  assign line_valid = valid[r_idx];
  assign line_dirty = dirty[r_idx];
  assign hit        = line_valid && rd_tag == r_tag;

  // line write port
  logic           wr_en;
  logic [TAG-1:0] wr_tag;
  logic [31:0]    wr_data;

  always_ff @(posedge clk) begin
    if (state == S_IDLE) begin
      rd_tag  <= tag_mem [addr[INDEX_BITS+1:2]];
      rd_data <= data_mem[addr[INDEX_BITS+1:2]];
    end
    if (wr_en) begin
      tag_mem [r_idx] <= wr_tag;
      data_mem[r_idx] <= wr_data;
    end
  end

  always_comb begin
    done       = 1'b0;
    dataOut    = rd_data;
    wr_en      = 1'b0;
    wr_tag     = r_tag;
    wr_data    = r_data;
    dram_req   = 1'b0;
    dram_we    = 1'b0;
    dram_addr  = {r_tag, r_idx, 2'b00};
    dram_wdata = r_data;
    unique case (state)
      S_IDLE: ;
      S_LOOKUP: begin
        if (!(r_we && r_bypass)) begin
          if (hit) begin
            done  = 1'b1;
            wr_en = r_we;
          end else if (!(line_valid && line_dirty) && r_we) begin
            done  = 1'b1;
            wr_en = 1'b1;
          end
        end
      end
      S_WBACK: begin
        dram_req   = 1'b1;
        dram_we    = 1'b1;
        dram_addr  = {rd_tag, r_idx, 2'b00};
        dram_wdata = rd_data;
        if (dram_done && r_we) begin
          done  = 1'b1;
          wr_en = 1'b1;
        end
      end
      S_FILL: begin
        dram_req = 1'b1;
        if (dram_done) begin
          done    = 1'b1;
          wr_en   = 1'b1;
          wr_data = dram_rdata;
          dataOut = dram_rdata;
        end
      end
      S_BYPASS: begin
        dram_req = 1'b1;
        dram_we  = 1'b1;
        done     = dram_done;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      valid    <= '0;
      dirty    <= '0;
      r_we     <= 1'b0;
      r_bypass <= 1'b0;
      r_data   <= '0;
      r_idx    <= '0;
      r_tag    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (memReq) begin
          r_we     <= writeEnable;
          r_bypass <= cacheBypass;
          r_data   <= dataIn;
          r_idx    <= addr[INDEX_BITS+1:2];
          r_tag    <= addr[31:INDEX_BITS+2];
          state    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (r_we && r_bypass) begin
            if (hit) valid[r_idx] <= 1'b0;
            state <= S_BYPASS;
          end else if (hit) begin
            if (r_we) dirty[r_idx] <= 1'b1;
            state <= S_IDLE;
          end else if (line_valid && line_dirty) begin
            state <= S_WBACK;
          end else if (r_we) begin
            valid[r_idx] <= 1'b1;
            dirty[r_idx] <= 1'b1;
            state        <= S_IDLE;
          end else begin
            state <= S_FILL;
          end
        end
        S_WBACK: if (dram_done) begin
          dirty[r_idx] <= 1'b0;
          if (r_we) begin
            dirty[r_idx] <= 1'b1;
            state        <= S_IDLE;
          end else begin
            valid[r_idx] <= 1'b0;
            state        <= S_FILL;
          end
        end
        S_FILL: if (dram_done) begin
          valid[r_idx] <= 1'b1;
          dirty[r_idx] <= 1'b0;
          state        <= S_IDLE;
        end
        S_BYPASS: if (dram_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

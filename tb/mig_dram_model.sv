// mig_dram_model: behavioural model of a DDR memory controller's user interface
// together with the DRAM behind it, for simulation only.
//
// Accepts a command when app_en and app_rdy are both high (app_rdy is dropped on
// pseudo-random cycles when STALLS is set). Writes take their data beat from
// app_wdf_data when app_wdf_wren and app_wdf_rdy are high and honour the byte mask
// (mask bit 1 = byte kept). Reads return app_rd_data with app_rd_data_valid
// READ_LATENCY cycles after the command. Storage is a sparse array of 16-byte
// units; units never written read as zero. write_word/read_word give a
// testbench direct access to the 32-bit word held in the low bytes of a unit.
module mig_dram_model #(
  parameter int ADDR_W       = 27,
  parameter int READ_LATENCY = 20,
  parameter bit STALLS       = 1'b1
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] app_addr,
  input  logic [2:0]        app_cmd,
  input  logic              app_en,
  input  logic [127:0]      app_wdf_data,
  input  logic              app_wdf_end,
  input  logic              app_wdf_wren,
  input  logic [15:0]       app_wdf_mask,
  output logic              app_rdy,
  output logic              app_wdf_rdy,
  output logic [127:0]      app_rd_data,
  output logic              app_rd_data_valid
);

  logic [127:0] mem [logic [ADDR_W-1:0]];

  int unsigned n_reads = 0, n_writes = 0;

  // pending write: command and data may arrive in different cycles
  logic              have_cmd = 1'b0, have_data = 1'b0;
  logic [ADDR_W-1:0] w_addr;
  logic [127:0]      w_data;
  logic [15:0]       w_mask;

  // read pipeline
  logic [127:0] rq_data [$];
  int           rq_time [$];
  int           cyc = 0;

  initial begin
    app_rdy           = 1'b1;
    app_wdf_rdy       = 1'b1;
    app_rd_data       = '0;
    app_rd_data_valid = 1'b0;
  end

  function automatic void write_word(logic [31:0] byte_addr, logic [31:0] value);
    logic [ADDR_W-1:0] a = ADDR_W'({byte_addr[31:2], 3'b000});
    logic [127:0] old = mem.exists(a) ? mem[a] : '0;
    mem[a] = {old[127:32], value};
  endfunction

  function automatic logic [31:0] read_word(logic [31:0] byte_addr);
    logic [ADDR_W-1:0] a = ADDR_W'({byte_addr[31:2], 3'b000});
    return mem.exists(a) ? mem[a][31:0] : 32'h0;
  endfunction

  function automatic logic [127:0] merge(logic [127:0] old, logic [127:0] nw, logic [15:0] mask);
    logic [127:0] r = old;
    for (int b = 0; b < 16; b++)
      if (!mask[b]) r[8*b +: 8] = nw[8*b +: 8];
    return r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    app_rd_data_valid <= 1'b0;
    if (rq_time.size() > 0 && rq_time[0] <= cyc) begin
      app_rd_data       <= rq_data.pop_front();
      app_rd_data_valid <= 1'b1;
      void'(rq_time.pop_front());
    end
    if (app_en && app_rdy) begin
      if (app_cmd == 3'b001) begin
        rq_data.push_back(mem.exists(app_addr) ? mem[app_addr] : '0);
        rq_time.push_back(cyc + READ_LATENCY);
        n_reads++;
      end else if (app_cmd == 3'b000) begin
        have_cmd = 1'b1;
        w_addr   = app_addr;
      end
    end
    if (app_wdf_wren && app_wdf_rdy) begin
      have_data = 1'b1;
      w_data    = app_wdf_data;
      w_mask    = app_wdf_mask;
    end
    if (have_cmd && have_data) begin
      mem[w_addr] = merge(mem.exists(w_addr) ? mem[w_addr] : '0, w_data, w_mask);
      have_cmd  = 1'b0;
      have_data = 1'b0;
      n_writes++;
    end
    app_rdy     <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
    app_wdf_rdy <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

endmodule

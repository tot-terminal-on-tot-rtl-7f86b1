// dram_interface: drives the user interface of the DDR memory controller IP.
//
// Runs in the DRAM clock domain. A request (req pulse with isWrite, addr, wdata)
// becomes one 16-byte controller access. Each 32-bit word lives in the first four
// bytes of its own 16-byte unit, so the controller address is the word index
// times eight (the controller counts 16-bit columns), writes carry the word in
// bits 31:0 with app_wdf_mask = 0xFFF0 (mask bit 1 = byte not written), and reads
// return app_rd_data[31:0].
// Handshake: app_en/app_cmd are held until app_rdy; for a write the data beat
// (app_wdf_wren, app_wdf_end) is held until app_wdf_rdy. A write is answered
// (done pulse) as soon as command and data are accepted; a read when
// app_rd_data_valid arrives. Reads and writes are never issued together.
// The 16-byte access with a mask follows the design description; the address
// mapping and the 27-bit address width are this design's choices.
module dram_interface #(
  parameter int ADDR_W = 27
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req,
  input  logic              isWrite,
  input  logic [31:0]       addr,
  input  logic [31:0]       wdata,
  output logic              done,
  output logic [31:0]       rdata,
  // memory controller user interface
  output logic [ADDR_W-1:0] app_addr,
  output logic [2:0]        app_cmd,
  output logic              app_en,
  output logic [127:0]      app_wdf_data,
  output logic              app_wdf_end,
  output logic              app_wdf_wren,
  output logic [15:0]       app_wdf_mask,
  input  logic              app_rdy,
  input  logic              app_wdf_rdy,
  input  logic [127:0]      app_rd_data,
  input  logic              app_rd_data_valid
);

  localparam logic [2:0] CMD_WRITE = 3'b000, CMD_READ = 3'b001;

  typedef enum logic [1:0] {S_IDLE, S_CMD, S_RDWAIT} state_e;
  state_e state;

  logic        r_we, cmd_ok, wdf_ok;
  logic [31:0] r_addr, r_wdata;

  assign app_addr     = ADDR_W'({r_addr[31:2], 3'b000});
  assign app_cmd      = r_we ? CMD_WRITE : CMD_READ;
  assign app_en       = (state == S_CMD) && !cmd_ok;
  assign app_wdf_data = {96'd0, r_wdata};
  assign app_wdf_wren = (state == S_CMD) && r_we && !wdf_ok;
  assign app_wdf_end  = app_wdf_wren;
  assign app_wdf_mask = 16'hFFF0;

  logic cmd_now, wdf_now;
  assign cmd_now = cmd_ok || (app_en && app_rdy);
  assign wdf_now = wdf_ok || (app_wdf_wren && app_wdf_rdy);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      r_we    <= 1'b0;
      r_addr  <= '0;
      r_wdata <= '0;
      cmd_ok  <= 1'b0;
      wdf_ok  <= 1'b0;
      done    <= 1'b0;
      rdata   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          r_we    <= isWrite;
          r_addr  <= addr;
          r_wdata <= wdata;
          cmd_ok  <= 1'b0;
          wdf_ok  <= 1'b0;
          state   <= S_CMD;
        end
        S_CMD: begin
          cmd_ok <= cmd_now;
          wdf_ok <= wdf_now;
          if (r_we) begin
            if (cmd_now && wdf_now) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else if (cmd_now) begin
            state <= S_RDWAIT;
          end
        end
        S_RDWAIT: if (app_rd_data_valid) begin
          rdata <= app_rd_data[31:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// mmio: memory-mapped I/O registers of TOT.
//
// Four 32-bit registers in two pairs, each a value and a "fresh" flag:
//   id 0 UART_data    (0x0100_0000)   id 1 UART_fresh        (0x0100_0004)
//   id 2 cacheBypass  (0x0100_0008)   id 3 cacheBypass_fresh (0x0100_000C)
// The processor port (Memory stage) reads combinationally and writes on the
// clock edge. The device port writes the value register of pair device_MMIO_id
// and sets the pair's fresh register to 1 in the same edge; if the processor
// writes the same pair in that cycle the device wins, so no new word is lost.
// Bit 0 of the cacheBypass register drives cacheBypass to the data cache.
// The pairing and the four registers follow the design description; the exact
// addresses and the device-over-processor priority are this design's choices.
module mmio (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  proc_MMIO_id,
  input  logic        proc_write,
  input  logic [31:0] proc_data_in,
  output logic [31:0] proc_data_out,
  input  logic        device_MMIO_id,   // 0: UART pair, 1: cache-bypass pair
  input  logic        device_write,
  input  logic [31:0] device_data_in,
  output logic [31:0] device_data_out,  // value register of the device's pair
  output logic        cacheBypass
);

  logic [31:0] regs [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) regs[i] <= '0;
    end else begin
      if (proc_write) regs[proc_MMIO_id] <= proc_data_in;
      if (device_write) begin
        regs[{device_MMIO_id, 1'b0}] <= device_data_in;
        regs[{device_MMIO_id, 1'b1}] <= 32'd1;
      end
    end
  end

  assign proc_data_out   = regs[proc_MMIO_id];
  assign device_data_out = regs[{device_MMIO_id, 1'b0}];
  assign cacheBypass     = regs[2][0];

endmodule

// cdc_bridge: carries one packet at a time between two clock domains.
//
// Used twice in TOT: processor clock to DRAM clock for requests (PtoD) and DRAM
// clock to processor clock for answers (DtoP). On a 'send' pulse in the source
// domain the packet is stored in a holding register and a toggle flag flips. The
// flag crosses into the destination domain through a two-flop synchronizer;
// when the synchronized flag changes, the destination registers the (long since
// stable) packet and pulses valid_out for one destination cycle.
// Latency: about three destination cycles. The sender must not send again before
// the packet has arrived; in TOT only one DRAM request is ever in flight.
// The design describes a clock-crossing bridge without its insides; this
// toggle-synchronizer structure is this design's choice.
module cdc_bridge #(
  parameter int WIDTH = 65
) (
  input  logic             src_clk,
  input  logic             src_rst,
  input  logic             send,
  input  logic [WIDTH-1:0] data_in,
  input  logic             dst_clk,
  input  logic             dst_rst,
  output logic             valid_out,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] hold;
  logic             src_toggle;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      src_toggle <= 1'b0;
      hold       <= '0;
    end else if (send) begin
      src_toggle <= ~src_toggle;
      hold       <= data_in;
    end
  end

  logic sync1, sync2, sync3;

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      sync1     <= 1'b0;
      sync2     <= 1'b0;
      sync3     <= 1'b0;
      valid_out <= 1'b0;
      data_out  <= '0;
    end else begin
      sync1     <= src_toggle;
      sync2     <= sync1;
      sync3     <= sync2;
      valid_out <= sync2 ^ sync3;
      if (sync2 ^ sync3) data_out <= hold;
    end
  end

endmodule

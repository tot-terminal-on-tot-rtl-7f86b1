// device_handler: turns the UART byte stream into 32-bit words for MMIO.
//
// Contains the UART receiver (uart_byte_collector). Four consecutive bytes form
// one word, the first byte received in bits 7:0 (byte order is this design's
// choice). When the fourth byte arrives, word_valid pulses for one cycle with the
// word on word_out; the top level writes it to the device's MMIO pair, which
// stores the word in UART_data and sets UART_fresh to 1. device_id names that
// pair (0: UART).
module device_handler #(
  parameter int CLKS_PER_BIT = 25
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        uart_txd_in,
  output logic        device_id,
  output logic [31:0] word_out,
  output logic        word_valid
);

  logic [7:0]  byte_out;
  logic        byte_valid;
  logic [1:0]  nbytes;
  logic [23:0] partial;

  uart_byte_collector #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk         (clk),
    .rst         (rst),
    .uart_txd_in (uart_txd_in),
    .byte_out    (byte_out),
    .byte_valid  (byte_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      nbytes     <= '0;
      partial    <= '0;
      word_out   <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (byte_valid) begin
        nbytes <= nbytes + 1'b1;
        if (nbytes == 2'd3) begin
          word_out   <= {byte_out, partial};
          word_valid <= 1'b1;
        end else begin
          partial <= {byte_out, partial[23:8]};
        end
      end
    end
  end

  assign device_id = 1'b0;

endmodule

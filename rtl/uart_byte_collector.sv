// uart_byte_collector: UART receiver (byteCollector) of TOT.
//
// RS-232 framing: idle high, one start bit (0), eight data bits least significant
// first, one stop bit (1), no parity. CLKS_PER_BIT = clock / baud rate: 25 for
// 2,000,000 baud at 50 MHz. The line is synchronized by two flops. A falling
// edge starts a frame; the start bit is checked at its middle, then every data
// bit and the stop bit are sampled at their middles. byte_valid pulses for one
// cycle with byte_out when the stop bit is high; a frame with a low stop bit is
// dropped (this design's choice).
module uart_byte_collector #(
  parameter int CLKS_PER_BIT = 25
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       uart_txd_in,
  output logic [7:0] byte_out,
  output logic       byte_valid
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  state_e state;

  logic       s1, rx;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [2:0] bitn;
  logic [7:0] sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b1;
      rx <= 1'b1;
    end else begin
      s1 <= uart_txd_in;
      rx <= s1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      bitn       <= '0;
      sh         <= '0;
      byte_out   <= '0;
      byte_valid <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (!rx) begin
          state <= S_START;
          cnt   <= '0;
        end
        S_START: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT / 2)) begin
            cnt  <= '0;
            bitn <= '0;
            state <= rx ? S_IDLE : S_DATA;
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            sh  <= {rx, sh[7:1]};
            if (bitn == 3'd7) state <= S_STOP;
            bitn <= bitn + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx) begin
              byte_out   <= sh;
              byte_valid <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// tb_uart_byte_collector: serial frames at 25 clocks per bit (2,000,000 baud at
// 50 MHz), with random idle gaps and a +-3% baud-rate error, must come out as
// the bytes sent; a frame with a bad stop bit must be dropped.
module tb_uart_byte_collector;
  logic clk = 0, rst = 1, uart_txd_in = 1, byte_valid;
  logic [7:0] byte_out;
  int checks = 0, failures = 0, received = 0;
  logic [7:0] sent [$];

  uart_byte_collector #(.CLKS_PER_BIT(25)) dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  always @(posedge clk) if (byte_valid && !rst) begin
    checks++; received++;
    if (sent.size() == 0 || byte_out !== sent[0]) begin
      failures++; $display("FAIL got %h", byte_out);
    end
    if (sent.size() > 0) void'(sent.pop_front());
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(logic [7:0] b, real bit_ns, logic stop = 1'b1);
    uart_txd_in = 0; #(bit_ns);
    for (int i = 0; i < 8; i++) begin uart_txd_in = b[i]; #(bit_ns); end
    uart_txd_in = stop; #(bit_ns);
    uart_txd_in = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    #1000;
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0] b = $urandom;
      automatic int  ppm10 = $urandom_range(0, 60);
      automatic real bit_ns;
      bit_ns = 500.0 * (1.0 + (ppm10 - 30) / 1000.0);
      sent.push_back(b);
      send_frame(b, bit_ns);
      #($urandom_range(0, 2000));
    end
    #2000;
    checks++;
    if (received != 200) begin failures++; $display("FAIL received %0d", received); end
    // framing error: dropped
    send_frame(8'h5A, 500.0, 1'b0);
    #3000;
    checks++;
    if (received != 200) begin failures++; $display("FAIL bad frame accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

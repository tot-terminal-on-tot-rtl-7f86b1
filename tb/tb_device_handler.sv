// tb_device_handler: four UART frames make one word, first byte in bits 7:0;
// checks the assembled words and the cycle spacing of word_valid.
module tb_device_handler;
  logic clk = 0, rst = 1, uart_txd_in = 1, device_id, word_valid;
  logic [31:0] word_out;
  int checks = 0, failures = 0, words = 0;
  logic [31:0] sent [$];

  device_handler #(.CLKS_PER_BIT(25)) dut (.*);
  always #10 clk = ~clk;

  always @(posedge clk) if (word_valid && !rst) begin
    checks++; words++;
    if (sent.size() == 0 || word_out !== sent[0] || device_id !== 1'b0) begin
      failures++; $display("FAIL got %h", word_out);
    end
    if (sent.size() > 0) void'(sent.pop_front());
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(logic [7:0] b);
    uart_txd_in = 0; #500;
    for (int i = 0; i < 8; i++) begin uart_txd_in = b[i]; #500; end
    uart_txd_in = 1; #500;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    #1000;
    for (int n = 0; n < 60; n++) begin
      automatic logic [31:0] w = (n == 0) ? 32'h4433_2211 : $urandom;
      sent.push_back(w);
      for (int k = 0; k < 4; k++) send_byte(w[8*k +: 8]);
      #($urandom_range(0, 3000));
    end
    #2000;
    checks++;
    if (words != 60) begin failures++; $display("FAIL words %0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdc_bridge: packets sent from a 50 MHz domain into a 81 MHz domain and from
// the fast domain back to the slow one; each must arrive exactly once, intact,
// within a few destination cycles.
module tb_cdc_bridge;
  logic sclk = 0, fclk = 0, srst = 1, frst = 1;
  logic s_send = 0, f_send = 0, f_valid, s_valid;
  logic [64:0] s_data = 0, f_data;
  logic [31:0] f_in = 0, s_out;
  int checks = 0, failures = 0, got_f = 0, got_s = 0;

  cdc_bridge #(.WIDTH(65)) u_ptod (.src_clk(sclk), .src_rst(srst), .send(s_send), .data_in(s_data),
                                   .dst_clk(fclk), .dst_rst(frst), .valid_out(f_valid), .data_out(f_data));
  cdc_bridge #(.WIDTH(32)) u_dtop (.src_clk(fclk), .src_rst(frst), .send(f_send), .data_in(f_in),
                                   .dst_clk(sclk), .dst_rst(srst), .valid_out(s_valid), .data_out(s_out));
  always #10 sclk = ~sclk;
  always #6.17 fclk = ~fclk;

  logic [64:0] expect_f;
  logic [31:0] expect_s;
  always @(posedge fclk) if (f_valid && !frst) begin
    got_f++; checks++;
    if (f_data !== expect_f) begin failures++; $display("FAIL PtoD data %h", f_data); end
  end
  always @(posedge sclk) if (s_valid && !srst) begin
    got_s++; checks++;
    if (s_out !== expect_s) begin failures++; $display("FAIL DtoP data %h", s_out); end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge sclk);
    #1 srst = 0; frst = 0;
    for (int n = 0; n < 200; n++) begin
      automatic int prev = got_f, waited = 0;
      @(posedge sclk); #1;
      s_data = {$urandom, $urandom, 1'($urandom)}; expect_f = s_data; s_send = 1;
      @(posedge sclk); #1 s_send = 0;
      while (got_f == prev && waited < 20) begin @(posedge fclk); waited++; end
      checks++;
      if (got_f != prev + 1 || waited > 6) begin failures++; $display("FAIL PtoD arrival %0d", waited); end
      prev = got_s; waited = 0;
      @(posedge fclk); #1;
      f_in = $urandom; expect_s = f_in; f_send = 1;
      @(posedge fclk); #1 f_send = 0;
      while (got_s == prev && waited < 20) begin @(posedge sclk); waited++; end
      checks++;
      if (got_s != prev + 1 || waited > 6) begin failures++; $display("FAIL DtoP arrival %0d", waited); end
    end
    repeat (10) @(posedge sclk);
    checks++;
    if (got_f != 200 || got_s != 200) begin failures++; $display("FAIL counts %0d %0d", got_f, got_s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

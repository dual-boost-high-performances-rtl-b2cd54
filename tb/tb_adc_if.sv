// tb_adc_if - runs the A/D handshake against the converter model: checks the
// latched code for many conversions, the WR pulse width, that RD is only low
// after INT fell, the start-to-valid time (2 us conversion at 50 MHz), and
// the timeout with a converter that never answers.
module tb_adc_if;
  logic clk = 0, rst_n = 0, start = 0;
  logic wr_n, rd_n, int_n, valid, timeout, busy;
  logic [9:0] ad_data, data, code;
  logic wr2_n, rd2_n, int2_n, valid2, timeout2, busy2;
  logic [9:0] ad2_data, data2;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  adc_if dut (.clk(clk), .rst_n(rst_n), .start(start), .ad_wr_n(wr_n), .ad_int_n(int_n),
              .ad_rd_n(rd_n), .ad_data(ad_data), .data(data), .valid(valid), .timeout(timeout), .busy(busy));
  ad1061_model adc (.wr_n(wr_n), .rd_n(rd_n), .int_n(int_n), .data(ad_data), .analog_code(code));

  adc_if dut2 (.clk(clk), .rst_n(rst_n), .start(start), .ad_wr_n(wr2_n), .ad_int_n(int2_n),
               .ad_rd_n(rd2_n), .ad_data(ad2_data), .data(data2), .valid(valid2), .timeout(timeout2), .busy(busy2));
  ad1061_model #(.NEVER_ANSWER(1'b1)) adc2 (.wr_n(wr2_n), .rd_n(rd2_n), .int_n(int2_n), .data(ad2_data), .analog_code(code));

  // RD may only fall while INT is low
  always @(negedge rd_n) begin
    checks++;
    if (int_n !== 1'b0) begin failures++; $display("FAIL RD low before INT"); end
  end

  int wr_low = 0;
  always @(posedge clk) if (rst_n && !wr_n) wr_low++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, to_seen;
    code = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      code = 10'($urandom);
      if (k == 0) code = 10'h3FF;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!valid) begin @(negedge clk); cyc++; end
      checks++;
      if (data !== code) begin failures++; $display("FAIL data %h expected %h", data, code); end
      checks++;
      if (cyc < 105 || cyc > 115) begin failures++; $display("FAIL start-to-valid %0d clocks", cyc); end
      repeat (5) @(negedge clk);
    end
    checks++;
    if (wr_low != 50 * 5) begin failures++; $display("FAIL WR low for %0d clocks", wr_low); end
    checks++;
    if (adc.conversions != 50 || adc.reads != 50) begin failures++; $display("FAIL counts"); end
    // the second converter never answered: exactly one timeout pulse expected
    to_seen = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (300) begin @(negedge clk); if (timeout2) to_seen++; end
    checks++;
    if (to_seen != 1 || busy2) begin failures++; $display("FAIL timeout %0d", to_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

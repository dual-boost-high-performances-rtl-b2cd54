// tb_task_timer - checks that the task tick comes every 125 clocks (2.5 us at
// 50 MHz), is one clock wide, and stops while en is low.
module tb_task_timer;
  logic clk = 0, rst_n = 0, en = 0, tick;
  int checks = 0, failures = 0;
  int last, cyc = 0, n = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  task_timer dut (.clk(clk), .rst_n(rst_n), .en(en), .tick(tick));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    last = cyc;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk);
      while (!tick) @(posedge clk);
      checks++;
      if (cyc - last != 125) begin failures++; $display("FAIL period %0d", cyc - last); end
      last = cyc;
      @(posedge clk);
      checks++;
      if (tick) begin failures++; $display("FAIL tick wider than one clock"); end
      last = last;
    end
    @(negedge clk) en = 0;
    repeat (300) begin
      @(posedge clk);
      if (tick) n++;
    end
    checks++;
    if (n != 0) begin failures++; $display("FAIL tick while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

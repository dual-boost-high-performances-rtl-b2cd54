// tb_sf24_div - checks A / B = A * (1/B): each result is compared with the
// real-arithmetic value of the same two steps, each rounded to sfloat24, and
// the latency (22 clocks in general, 2 for a power-of-two divisor) is checked.
module tb_sf24_div;
  import sf24_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, busy, done;
  logic [23:0] a, b, r, exp_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sf24_div dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .busy(busy), .done(done), .r(r));

  task automatic run(logic [23:0] ta, logic [23:0] tb_, int exp_lat);
    int lat;
    @(negedge clk);
    a = ta; b = tb_; start = 1;
    @(negedge clk);
    start = 0;
    a = $urandom;                 // a is captured at start
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    exp_r = from_real(to_real(ta) * to_real(from_real(1.0 / to_real(tb_))));
    checks++;
    if (r !== exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h = %h, expected %h", ta, tb_, r, exp_r);
    end
    if (exp_lat > 0) begin
      checks++;
      if (lat != exp_lat) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", lat, exp_lat);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(24'h412000, 24'h400000, 2);    // 10 / 2 = 5
    run(24'h412000, 24'h40A000, 22);   // 10 / 5 = 2 (two roundings)
    run(24'hC12000, 24'h404000, 22);   // -10 / 3
    for (int k = 0; k < 2000; k++) run(rnd(80, 170), rnd(80, 170), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sf24_recip - checks the sfloat24 reciprocal: the power-of-two shortcut
// (result after 1 clock), the general division (result after 21 clocks),
// special values, and random operands against 1/x in real arithmetic rounded
// to sfloat24.
module tb_sf24_recip;
  import sf24_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, busy, done;
  logic [23:0] a, r, exp_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sf24_recip dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .busy(busy), .done(done), .r(r));

  task automatic run(logic [23:0] ta, int exp_lat);
    int lat;
    @(negedge clk);
    a = ta; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    if (ta[22:15] == 8'hFF && ta[14:0] != 0) exp_r = 24'h7FC000;
    else if (ta[22:15] == 0) exp_r = {ta[23], 8'hFF, 15'd0};
    else if (ta[22:15] == 8'hFF) exp_r = {ta[23], 23'd0};
    else exp_r = from_real(1.0 / to_real(ta));
    checks++;
    if (r !== exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL 1/%h = %h, expected %h", ta, r, exp_r);
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
    a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(24'h410000, 1);    // 8 -> 0.125, shortcut
    run(24'hC00000, 1);    // -2 -> -0.5
    run(24'h7F0000, 1);    // 2^127 -> 2^-127 flushes to zero
    run(24'h000000, 1);    // 1/0 = inf
    run(24'h7F8000, 1);    // 1/inf = 0
    run(24'h7FC001, 1);    // NaN
    run(24'h40A000, 21);   // 1/5
    run(24'h412000, 21);   // 1/10
    run(24'h3FFFFF, 21);
    for (int k = 0; k < 3000; k++) run(rnd(2, 253), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

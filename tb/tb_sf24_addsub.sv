// tb_sf24_addsub - checks the sfloat24 adder/subtractor against real
// arithmetic rounded to sfloat24: directed cases (the paper's example
// value 10.0, cancellation, signed zeros, infinities, NaN) and random
// operands, both with close exponents (long carries and cancellations) and
// over the whole range (overflow to infinity, flush to zero).
module tb_sf24_addsub;
  import sf24_ref_pkg::*;

  logic [23:0] a, b, r, exp_r;
  logic        sub;
  int checks = 0, failures = 0;

  sf24_addsub dut (.a(a), .b(b), .sub(sub), .r(r));

  task automatic check(logic [23:0] ta, logic [23:0] tb_, logic ts);
    a = ta; b = tb_; sub = ts;
    #1;
    if (is_nan(ta) || is_nan(tb_)) exp_r = 24'h7FC000;
    else if (ta[22:15] == 8'hFF || tb_[22:15] == 8'hFF) begin
      logic sb;
      sb = tb_[23] ^ ts;
      if (ta[22:15] == 8'hFF && tb_[22:15] == 8'hFF) exp_r = (ta[23] == sb) ? ta : 24'h7FC000;
      else if (ta[22:15] == 8'hFF) exp_r = ta;
      else exp_r = {sb, 8'hFF, 15'd0};
    end else begin
      real x;
      x = ts ? (to_real(ta) - to_real(tb_)) : (to_real(ta) + to_real(tb_));
      exp_r = from_real(x);
      if (x == 0.0) exp_r = {ta[23] & (tb_[23] ^ ts) & (ta[22:15] == 0) & (tb_[22:15] == 0), 23'd0};
    end
    checks++;
    if (r !== exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h, expected %h", ta, ts ? "-" : "+", tb_, r, exp_r);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 10.0 = 0 10000010 010..0 ; 8 + 2 = 10 ; 10 - 10 = +0
    check(24'h412000, 24'h412000, 1'b1);
    check(24'h412000, 24'h400000, 1'b0);   // 10 + 2
    check(24'h3F8000, 24'h3F8000, 1'b0);   // 1 + 1 = 2
    check(24'h800000, 24'h800000, 1'b0);   // -0 + -0
    check(24'h800000, 24'h000000, 1'b0);   // -0 + +0
    check(24'h7F8000, 24'h3F8000, 1'b1);   // inf - 1
    check(24'h7F8000, 24'h7F8000, 1'b1);   // inf - inf = NaN
    check(24'h7FC000, 24'h3F8000, 1'b0);   // NaN
    check(24'h7F7FFF, 24'h7F7FFF, 1'b0);   // overflow
    check(24'h008001, 24'h008000, 1'b1);   // underflow to zero
    check(24'h3F8001, 24'h3F8000, 1'b1);   // cancellation
    check(24'h3F8000, 24'h338000, 1'b0);   // 1 + 2^-24, far below ulp
    check(24'h3F8000, 24'h3B8000, 1'b0);   // 1 + 2^-16, exact tie to even
    check(24'h3F8001, 24'h3B8000, 1'b0);   // tie, rounds up to even
    for (int k = 0; k < 20000; k++) check(rnd(120, 135), rnd(120, 135), 1'($urandom));
    for (int k = 0; k < 20000; k++) check(rnd(1, 254), rnd(1, 254), 1'($urandom));
    for (int k = 0; k < 5000; k++) begin
      logic [23:0] t;
      t = rnd(100, 150);
      check(t, {t[23], t[22:15], 15'($urandom)}, 1'($urandom));   // equal exponents
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

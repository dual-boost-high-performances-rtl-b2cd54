// tb_sf24_cmp - checks the sfloat24 comparator flags against comparison of the
// real values, covering differing signs, two positives, two negatives,
// equal values, signed zeros and NaN.
module tb_sf24_cmp;
  import sf24_ref_pkg::*;

  logic [23:0] a, b;
  logic        gt, lt, eq;
  int checks = 0, failures = 0;

  sf24_cmp dut (.a(a), .b(b), .gt(gt), .lt(lt), .eq(eq));

  task automatic check(logic [23:0] ta, logic [23:0] tb_);
    logic egt, elt, eeq;
    real  x, y;
    a = ta; b = tb_;
    #1;
    if (is_nan(ta) || is_nan(tb_)) begin
      egt = 0; elt = 0; eeq = 0;
    end else begin
      // infinities as large reals
      x = (ta[22:15] == 8'hFF) ? (ta[23] ? -1e300 : 1e300) : to_real(ta);
      y = (tb_[22:15] == 8'hFF) ? (tb_[23] ? -1e300 : 1e300) : to_real(tb_);
      egt = x > y; elt = x < y; eeq = x == y;
    end
    checks++;
    if ({gt, lt, eq} !== {egt, elt, eeq}) begin
      failures++;
      if (failures < 10) $display("FAIL cmp %h %h -> %b%b%b expected %b%b%b", ta, tb_, gt, lt, eq, egt, elt, eeq);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(24'h412000, 24'h40A000);   // 10 > 5
    check(24'hC12000, 24'h40A000);   // -10 < 5
    check(24'h412000, 24'hC0A000);   // 10 > -5
    check(24'hC12000, 24'hC0A000);   // -10 < -5 (flags swapped)
    check(24'hC0A000, 24'hC12000);
    check(24'h412000, 24'h412000);   // equal
    check(24'h000000, 24'h800000);   // +0 == -0
    check(24'h7FC000, 24'h000000);   // NaN
    check(24'h7F8000, 24'h7F7FFF);   // inf
    for (int k = 0; k < 20000; k++) check(rnd(1, 254), rnd(1, 254));
    for (int k = 0; k < 20000; k++) begin
      logic [23:0] t;
      t = rnd(100, 110);
      check(t, {$urandom_range(3) == 0 ? ~t[23] : t[23], t[22:15], $urandom_range(3) == 0 ? t[14:0] : 15'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

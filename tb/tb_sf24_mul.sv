// tb_sf24_mul - checks the sfloat24 multiplier against real arithmetic
// rounded to sfloat24: directed cases (2 * 5 = 10, sign rule, zero, infinity,
// NaN, overflow, underflow) and random operands over the full range.
module tb_sf24_mul;
  import sf24_ref_pkg::*;

  logic [23:0] a, b, r, exp_r;
  int checks = 0, failures = 0;

  sf24_mul dut (.a(a), .b(b), .r(r));

  task automatic check(logic [23:0] ta, logic [23:0] tb_);
    logic az, bz, ai, bi;
    a = ta; b = tb_;
    #1;
    az = ta[22:15] == 0; bz = tb_[22:15] == 0;
    ai = ta[22:15] == 8'hFF; bi = tb_[22:15] == 8'hFF;
    if (is_nan(ta) || is_nan(tb_) || (ai && bz) || (az && bi)) exp_r = 24'h7FC000;
    else if (ai || bi) exp_r = {ta[23] ^ tb_[23], 8'hFF, 15'd0};
    else if (az || bz) exp_r = {ta[23] ^ tb_[23], 23'd0};
    else exp_r = from_real(to_real(ta) * to_real(tb_));
    checks++;
    if (r !== exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ta, tb_, r, exp_r);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(24'h400000, 24'h40A000);           // 2 * 5 = 10 -> 0x412000
    if (r !== 24'h412000) failures++;
    checks++;
    check(24'hC00000, 24'h40A000);           // -2 * 5
    check(24'h000000, 24'h40A000);
    check(24'h7F8000, 24'h000000);
    check(24'h7F8000, 24'hC00000);
    check(24'h7F0000, 24'h7F0000);
    check(24'h010000, 24'h010000);
    check(24'h3FFFFF, 24'h3FFFFF);           // rounding carry
    for (int k = 0; k < 30000; k++) check(rnd(64, 190), rnd(64, 190));
    for (int k = 0; k < 10000; k++) check(rnd(1, 254), rnd(1, 254));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

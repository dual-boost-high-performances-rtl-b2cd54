// tb_sf24_to_int - checks the sfloat24-to-integer cast (truncation toward
// zero, saturation with ovf) against the real value of the operand.
module tb_sf24_to_int;
  import sf24_ref_pkg::*;

  logic [23:0] a;
  logic [15:0] i;
  logic        ovf;
  int checks = 0, failures = 0;

  sf24_to_int dut (.a(a), .i(i), .ovf(ovf));

  task automatic check(logic [23:0] ta);
    real         x;
    logic [15:0] e;
    logic        eo;
    a = ta;
    #1;
    x = to_real(ta);
    eo = 0;
    if (is_nan(ta))            begin e = 16'h7FFF; eo = 1; end
    else if (x >= 32768.0)     begin e = 16'h7FFF; eo = 1; end
    else if (x < -32768.0)     begin e = 16'h8000; eo = 1; end
    else if (ta[22:15] == 8'hFF) begin e = ta[23] ? 16'h8000 : 16'h7FFF; eo = 1; end
    else e = 16'($rtoi(x));    // $rtoi truncates toward zero
    checks++;
    if ({i, ovf} !== {e, eo}) begin
      failures++;
      if (failures < 10) $display("FAIL %h (%f) -> %0d/%b expected %0d/%b", ta, x, $signed(i), ovf, $signed(e), eo);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(24'h412000);   // 10
    check(24'hC12000);   // -10
    check(24'h3F4000);   // 0.75 -> 0
    check(24'hC70000);   // -32768 exactly
    check(24'h470000);   // 32768 saturates
    check(24'h7F8000);
    check(24'h7FC000);
    for (int k = 0; k < 20000; k++) check(rnd(120, 145));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

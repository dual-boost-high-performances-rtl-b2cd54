// tb_adc_scale - checks float(code) * gain - offset for every 10-bit code with
// the signal-chain values 5/1024 V per code and a 2.5 V offset, and for
// random gains and offsets, against real arithmetic rounded after each step.
module tb_adc_scale;
  import sf24_ref_pkg::*;

  logic [9:0]  code;
  logic [23:0] gain, offset, r, e;
  int checks = 0, failures = 0;

  adc_scale dut (.code(code), .gain(gain), .offset(offset), .r(r));

  task automatic check(logic [9:0] c, logic [23:0] g, logic [23:0] o);
    real p;
    code = c; gain = g; offset = o;
    #1;
    p = to_real(from_real(real'(c) * to_real(g)));
    if (c == 0) p = 0.0;
    e = from_real(p - to_real(o));
    if (p - to_real(o) == 0.0) e = 24'h000000;
    checks++;
    if (r !== e) begin
      failures++;
      if (failures < 10) $display("FAIL code %0d gain %h off %h -> %h expected %h", c, g, o, r, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] lsb;
    lsb = from_real(5.0 / 1024.0);
    for (int k = 0; k < 1024; k++) check(10'(k), lsb, from_real(2.5));
    // code 512 is exactly the 2.5 V offset
    code = 10'd512; gain = lsb; offset = from_real(2.5);
    #1;
    checks++;
    if (r !== 24'h000000) begin failures++; $display("FAIL mid-scale not zero: %h", r); end
    for (int k = 0; k < 5000; k++) check(10'($urandom), {1'b0, 8'(110 + $urandom_range(20)), 15'($urandom)},
                                         {1'($urandom), 8'(120 + $urandom_range(12)), 15'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

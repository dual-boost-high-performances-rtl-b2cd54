// tb_protection - checks that overcurrent on either boost and overvoltage set
// their sticky flags only on en, that shutdown follows them, and that clr
// clears them.
module tb_protection;
  import sf24_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clr = 0, oc, ov, shutdown;
  logic [23:0] i_b1, i_b2, v_dc, i_max, v_max;
  int checks = 0, failures = 0;
  logic m_oc = 0, m_ov = 0;

  always #5 clk = ~clk;

  protection dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .i_b1(i_b1), .i_b2(i_b2), .v_dc(v_dc),
                  .i_max(i_max), .v_max(v_max), .oc(oc), .ov(ov), .shutdown(shutdown));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, b, v;
    logic e, c;
    i_max = from_real(10.0); v_max = from_real(420.0);
    i_b1 = '0; i_b2 = '0; v_dc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      a = real'($urandom_range(1100)) / 100.0;
      b = real'($urandom_range(1100)) / 100.0;
      v = 380.0 + real'($urandom_range(450)) / 10.0;
      e = $urandom_range(3) == 0;
      c = $urandom_range(15) == 0;
      @(negedge clk);
      i_b1 = from_real(a); i_b2 = from_real(b); v_dc = from_real(v); en = e; clr = c;
      if (c) begin m_oc = 0; m_ov = 0; end
      else if (e) begin
        if (to_real(i_b1) > 10.0 || to_real(i_b2) > 10.0) m_oc = 1;
        if (to_real(v_dc) > 420.0) m_ov = 1;
      end
      @(negedge clk);
      en = 0; clr = 0;
      checks++;
      if ({oc, ov, shutdown} !== {m_oc, m_ov, m_oc | m_ov}) begin
        failures++;
        if (failures < 10) $display("FAIL %f %f %f: %b%b%b expected %b%b", a, b, v, oc, ov, shutdown, m_oc, m_ov);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

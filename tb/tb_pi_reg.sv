// tb_pi_reg - runs the PI regulator on random errors and compares every output
// with a real-arithmetic model of y = kp*e + I, I += ki*e (each operation
// rounded to sfloat24, I and y limited to [0, lim]); checks the 3-clock step
// latency and that both limits are reached.
module tb_pi_reg;
  import sf24_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, valid;
  logic [23:0] err, kp, ki, lim, y;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  real m_i = 0.0;

  always #5 clk = ~clk;

  pi_reg dut (.clk(clk), .rst_n(rst_n), .en(en), .err(err), .kp(kp), .ki(ki), .lim(lim), .y(y), .valid(valid));

  function automatic real clampr(real v, real l);
    if (v < 0.0) return 0.0;
    if (v > l) return l;
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, p, q, m_y, l;
    int  lat;
    kp = from_real(0.05); ki = from_real(0.002); lim = from_real(8.0); err = '0;
    l = to_real(lim);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      // slowly varying error so the integral sweeps both limits
      e = 200.0 * $sin(real'(k) / 150.0) + (real'($urandom_range(200)) - 100.0) / 10.0;
      @(negedge clk);
      err = from_real(e); en = 1;
      p = to_real(from_real(to_real(kp) * to_real(err)));
      q = to_real(from_real(to_real(ki) * to_real(err)));
      m_i = clampr(to_real(from_real(m_i + q)), l);
      m_y = clampr(to_real(from_real(p + m_i)), l);
      if (m_y == l) n_hi++;
      if (m_y == 0.0) n_lo++;
      @(negedge clk);
      en = 0;
      lat = 1;
      while (!valid) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      if (to_real(y) != m_y) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d e=%f y=%f expected %f", k, e, to_real(y), m_y);
      end
    end
    checks++;
    if (n_hi < 10 || n_lo < 10) begin failures++; $display("FAIL limits not reached %0d %0d", n_hi, n_lo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

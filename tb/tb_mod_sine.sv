// tb_mod_sine - drives the zero-crossing square wave of a mains voltage and
// steps the generator once per task; checks each output against
// |sin(pi * phase / 2^16)| (phase counted independently, within 5e-4), the
// ITER + 2 clock latency, the restart of the phase at each edge, and the
// saturation at the end of a long half period.
module tb_mod_sine;
  import sf24_ref_pkg::*;

  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, step = 0, zc = 0, valid;
  logic [15:0] phase_inc;
  logic [23:0] y;
  int checks = 0, failures = 0;
  int ph = 0;

  always #10 clk = ~clk;

  mod_sine dut (.clk(clk), .rst_n(rst_n), .step(step), .zc(zc), .phase_inc(phase_inc), .y(y), .valid(valid));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ex, err, maxerr;
    int lat, nsat;
    maxerr = 0.0; nsat = 0;
    phase_inc = 16'd160;      // 410 steps per half period, shortened mains
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int h = 0; h < 4; h++) begin
      @(negedge clk) zc = ~zc;
      repeat (4) @(negedge clk);
      ph = 0;
      // the last half period is long: the phase must stop at its end
      for (int k = 0; k < ((h == 3) ? 480 : 409); k++) begin
        @(negedge clk) step = 1;
        ph = ph + 160;
        if (ph > 65535) begin ph = 65535; nsat++; end
        @(negedge clk) step = 0;
        lat = 1;
        while (!valid) begin @(negedge clk); lat++; end
        ex = $sin(PI * real'(ph) / 65536.0);
        if (ex < 0.0) ex = -ex;
        err = to_real(y) - ex;
        if (err < 0.0) err = -err;
        if (err > maxerr) maxerr = err;
        checks += 2;
        if (err > 5e-4) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d: %f expected %f", ph, to_real(y), ex);
        end
        if (lat != 20) begin failures++; if (failures < 10) $display("FAIL latency %0d", lat); end
        repeat (2) @(negedge clk);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("max error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hyst_ctrl - drives random currents around a reference and checks the
// switch command against the rule: open above i* + b_hi, closed below
// i* - b_lo, unchanged inside the band, only on en, and open on force_off.
// Runs both a symmetric band and the main-boost band (upper side zero).
module tb_hyst_ctrl;
  import sf24_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, force_off = 0, x;
  logic [23:0] i_act, i_ref, b_hi, b_lo;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, n_hold = 0;
  logic model = 0;

  always #5 clk = ~clk;

  hyst_ctrl dut (.clk(clk), .rst_n(rst_n), .en(en), .force_off(force_off), .i_act(i_act),
                 .i_ref(i_ref), .b_hi(b_hi), .b_lo(b_lo), .x(x));

  task automatic step(real i, real ir, real bh, real bl, logic e, logic f);
    real th_hi, th_lo, ia;
    @(negedge clk);
    i_act = from_real(i); i_ref = from_real(ir); b_hi = from_real(bh); b_lo = from_real(bl);
    en = e; force_off = f;
    ia = to_real(i_act);
    th_hi = to_real(from_real(to_real(i_ref) + to_real(b_hi)));
    th_lo = to_real(from_real(to_real(i_ref) - to_real(b_lo)));
    if (f) model = 0;
    else if (e) begin
      if (ia > th_hi) begin model = 0; n_off++; end
      else if (ia < th_lo) begin model = 1; n_on++; end
      else n_hold++;
    end
    @(negedge clk);
    en = 0; force_off = 0;
    checks++;
    if (x !== model) begin
      failures++;
      if (failures < 10) $display("FAIL i=%f ref=%f band +%f/-%f en=%b: x=%b expected %b", i, ir, bh, bl, e, x, model);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ir;
    i_act = '0; i_ref = '0; b_hi = '0; b_lo = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      ir = real'($urandom_range(1000)) / 100.0;
      step(ir + (real'($urandom_range(400)) - 200.0) / 100.0, ir, 0.15, 0.15, $urandom_range(7) != 0, $urandom_range(50) == 0);
    end
    for (int k = 0; k < 4000; k++) begin
      ir = real'($urandom_range(1000)) / 100.0;
      step(ir + (real'($urandom_range(200)) - 150.0) / 100.0, ir, 0.0, 0.5, 1'b1, 1'b0);
    end
    checks++;
    if (n_on < 100 || n_off < 100 || n_hold < 100) begin failures++; $display("FAIL coverage %0d %0d %0d", n_on, n_off, n_hold); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

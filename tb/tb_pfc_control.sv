// tb_pfc_control - runs control tasks on random A/D codes and compares every
// internal quantity of the task (scaled samples, current amplitude, i*, e_b)
// with a real-arithmetic model that rounds to sfloat24 after each operation,
// and both gate commands with the hysteresis rule. Covers PI and fixed
// amplitude, CORDIC and |v_ac| shape, single and dual boost mode, and a
// fault that opens both switches until cleared. Checks the 9-clock latency.
module tb_pfc_control;
  import sf24_pkg::*;
  import pfc_pkg::*;
  import sf24_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, clr = 0, t1, t2, done;
  logic [NCH-1:0][AD_W-1:0] code;
  logic [23:0] sine;
  pfc_cfg_t    cfg;
  pfc_status_t st;
  int checks = 0, failures = 0;
  int n_t1_on = 0, n_t1_off = 0, n_t2_on = 0, n_t2_off = 0, n_fault = 0;
  real m_i = 0.0;
  logic m_x1 = 0, m_x2 = 0, m_oc = 0, m_ov = 0;

  always #10 clk = ~clk;

  pfc_control dut (.clk(clk), .rst_n(rst_n), .start(start), .code(code), .sine(sine), .cfg(cfg),
                   .clr(clr), .t1(t1), .t2(t2), .status(st), .done(done));

  function automatic real rr(real x);   // round to sfloat24
    return to_real(from_real(x));
  endfunction

  function automatic real clampr(real v, real l);
    if (v < 0.0) return 0.0;
    if (v > l) return l;
    return v;
  endfunction

  task automatic expect_eq(string what, logic [23:0] got, real want);
    checks++;
    if (to_real(got) != want) begin
      failures++;
      if (failures < 15) $display("FAIL %s = %f expected %f", what, to_real(got), want);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v[NCH], err, p, q, y, amp, shape, iref, eb, th;
    int lat;
    cfg = '0;
    cfg.v_ref  = from_real(200.0);
    cfg.kp     = from_real(0.05);
    cfg.ki     = from_real(0.001);
    cfg.pi_lim = from_real(6.0);
    cfg.i_amp  = from_real(2.5);
    cfg.k_vac  = from_real(1.0 / 155.0);
    cfg.b_m    = from_real(0.5);
    cfg.b_f    = from_real(0.15);
    cfg.i_max  = from_real(8.0);
    cfg.v_max  = from_real(240.0);
    cfg.gain[CH_VAC] = from_real(0.4);   cfg.offset[CH_VAC] = from_real(204.8);
    cfg.gain[CH_VDC] = from_real(0.5);   cfg.offset[CH_VDC] = from_real(0.0);
    cfg.gain[CH_IB1] = from_real(0.025); cfg.offset[CH_IB1] = from_real(12.8);
    cfg.gain[CH_IB2] = from_real(0.025); cfg.offset[CH_IB2] = from_real(12.8);
    cfg.phase_inc = 16'd16;
    code = '0; sine = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      cfg.use_pi     = (k / 500) % 2 == 0;
      cfg.use_cordic = (k / 1000) % 2 == 0;
      cfg.filt_en    = (k % 700) > 60;
      // currents near a 0..4 A reference; rare excursions beyond the limits
      code[CH_VAC] = 10'($urandom_range(1023));
      code[CH_VDC] = 10'(380 + $urandom_range(60));
      if ($urandom_range(300) == 0) code[CH_VDC] = 10'(500);
      code[CH_IB1] = 10'(512 + $urandom_range(180));
      code[CH_IB2] = 10'(512 + $urandom_range(60));
      if ($urandom_range(300) == 0) code[CH_IB2] = 10'(900);
      sine = from_real(real'($urandom_range(1000)) / 1000.0);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      // model of one task
      for (int c = 0; c < NCH; c++)
        v[c] = rr(rr(real'(code[c]) * to_real(cfg.gain[c])) - to_real(cfg.offset[c]));
      err = rr(to_real(cfg.v_ref) - v[CH_VDC]);
      p = rr(to_real(cfg.kp) * err);
      q = rr(to_real(cfg.ki) * err);
      m_i = clampr(rr(m_i + q), to_real(cfg.pi_lim));
      y = clampr(rr(p + m_i), to_real(cfg.pi_lim));
      amp = cfg.use_pi ? y : to_real(cfg.i_amp);
      shape = cfg.use_cordic ? to_real(sine) : rr((v[CH_VAC] < 0 ? -v[CH_VAC] : v[CH_VAC]) * to_real(cfg.k_vac));
      iref = rr(amp * shape);
      eb = rr(iref - v[CH_IB1]);
      if (v[CH_IB1] > 8.0 || v[CH_IB2] > 8.0) m_oc = 1;
      if (v[CH_VDC] > 240.0) m_ov = 1;
      if (v[CH_IB1] > iref) m_x1 = 0;
      else if (v[CH_IB1] < rr(iref - 0.5)) m_x1 = 1;
      if (v[CH_IB2] > rr(eb + 0.15)) m_x2 = 0;
      else if (v[CH_IB2] < rr(eb - 0.15)) m_x2 = 1;
      if (m_oc || m_ov) begin m_x1 = 0; m_x2 = 0; end
      if (!cfg.filt_en) m_x2 = 0;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 9) begin failures++; $display("FAIL latency %0d", lat); end
      expect_eq("v_ac", st.v_ac, v[CH_VAC]);
      expect_eq("v_dc", st.v_dc, v[CH_VDC]);
      expect_eq("i_b1", st.i_b1, v[CH_IB1]);
      expect_eq("i_b2", st.i_b2, v[CH_IB2]);
      expect_eq("amp", st.amp, amp);
      expect_eq("i_ref", st.i_ref, iref);
      expect_eq("e_b", st.e_b, eb);
      checks++;
      if ({t1, t2, st.oc, st.ov} !== {m_x1, m_x2, m_oc, m_ov}) begin
        failures++;
        if (failures < 15) $display("FAIL task %0d gates %b%b faults %b%b expected %b%b %b%b", k, t1, t2, st.oc, st.ov, m_x1, m_x2, m_oc, m_ov);
      end
      if (t1) n_t1_on++; else n_t1_off++;
      if (t2) n_t2_on++; else n_t2_off++;
      if (m_oc || m_ov) begin
        n_fault++;
        @(negedge clk) clr = 1;
        @(negedge clk) clr = 0;
        m_oc = 0; m_ov = 0;
        checks++;
        if (st.oc || st.ov) begin failures++; $display("FAIL clear"); end
      end
    end
    checks++;
    if (n_t1_on < 100 || n_t1_off < 100 || n_t2_on < 100 || n_t2_off < 100 || n_fault < 3) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d %0d", n_t1_on, n_t1_off, n_t2_on, n_t2_off, n_fault);
    end
    $display("t1 on/off %0d/%0d  t2 on/off %0d/%0d  faults %0d", n_t1_on, n_t1_off, n_t2_on, n_t2_off, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

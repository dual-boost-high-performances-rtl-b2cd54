// tb_pfc_workloads - runs the controller (default parameters) in closed loop
// on the operating points the dual boost PFC was evaluated at:
//   W1  simulation study: 3.6 mH / 0.6 mH chokes, 1100 uF, 200 ohm load,
//       main band 5 A, filtering band 1 A (325 V mains crest, 400 V output)
//   W2  200 W prototype: main band 0.5 A, filtering band 0.15 A
//       (155 V crest, 200 V output)
//   W3  200 W prototype with a 0.25 A main band
// Each case runs one full mains period after a settling interval, with the
// PI regulator and the CORDIC reference. Checks: every task's gate commands
// against the hysteresis rule; the main current never rises above i* by
// more than two tasks' current steps (one task of sampling period plus the
// sample-to-gate delay of almost another); the filtering switch switches faster
// than the main one; the output voltage stays within 3 % of its set point;
// in W1 the filtering current peaks at about the main band (plus the
// filtering band and two tasks' current steps of the small choke) and the total
// current tracks i* better than the main current alone. Prints the switching
// frequencies and tracking errors of each case.
module tb_pfc_workloads;
  import sf24_pkg::*;
  import pfc_pkg::*;
  import sf24_ref_pkg::*;

  localparam real DT  = 20e-9;
  localparam real FM  = 50.0;
  localparam real PI2 = 6.28318530717959;

  real VP, L1, L2, CAP, RL, VAC_LSB;

  logic clk = 0, rst_n = 0, en = 0;
  pfc_cfg_t cfg;
  logic [NCH-1:0] ad_wr_n, ad_rd_n, ad_int_n;
  logic [NCH-1:0][AD_W-1:0] ad_data, acode;
  logic zc, t_b1, t_b2, task_done, adc_timeout;
  pfc_status_t st;
  logic fpu_busy, fpu_done;
  logic [23:0] fpu_r;
  logic [2:0] fpu_flags;

  int checks = 0, failures = 0;
  real t = 0.0, vac = 0.0, i1 = 0.0, i2 = 0.0, vd = 0.0;

  always #10 clk = ~clk;

  dual_boost_pfc_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .cfg(cfg), .fault_clr(1'b0),
    .ad_wr_n(ad_wr_n), .ad_rd_n(ad_rd_n), .ad_int_n(ad_int_n), .ad_data(ad_data),
    .zc(zc), .t_b1(t_b1), .t_b2(t_b2), .status(st), .task_done(task_done), .adc_timeout(adc_timeout),
    .fpu_start(1'b0), .fpu_op(OP_ADD), .fpu_a('0), .fpu_b('0),
    .fpu_busy(fpu_busy), .fpu_done(fpu_done), .fpu_r(fpu_r), .fpu_flags(fpu_flags)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_adc
    ad1061_model adc (.wr_n(ad_wr_n[c]), .rd_n(ad_rd_n[c]), .int_n(ad_int_n[c]),
                      .data(ad_data[c]), .analog_code(acode[c]));
  end

  function automatic logic [9:0] q10(real x);
    int k;
    k = $rtoi(x + 0.5);
    if (k < 0) k = 0;
    if (k > 1023) k = 1023;
    return 10'(k);
  endfunction

  // power circuit, one Euler step per clock
  always @(posedge clk) begin
    real vb;
    t   = t + DT;
    vac = VP * $sin(PI2 * FM * t);
    vb  = vac < 0.0 ? -vac : vac;
    i1  = i1 + (vb - (t_b1 ? 0.0 : vd)) / L1 * DT;  if (i1 < 0.0) i1 = 0.0;
    i2  = i2 + (vb - (t_b2 ? 0.0 : vd)) / L2 * DT;  if (i2 < 0.0) i2 = 0.0;
    vd  = vd + ((t_b1 ? 0.0 : i1) + (t_b2 ? 0.0 : i2) - vd / RL) / CAP * DT;
    acode[CH_VAC] = q10(512.0 + vac / VAC_LSB);
    acode[CH_VDC] = q10(vd / 0.5);
    acode[CH_IB1] = q10(512.0 + i1 * 40.0);
    acode[CH_IB2] = q10(512.0 + i2 * 40.0);
  end
  assign zc = vac >= 0.0;

  // per-task rule check and statistics
  logic m1 = 0, m2 = 0, p1 = 0, p2 = 0, meas = 0;
  int   n_tasks = 0, n_sw1 = 0, n_sw2 = 0, n_clk = 0;
  real  se_tot = 0.0, se_main = 0.0, over_max = 0.0, i2_max = 0.0, vd_dev = 0.0;
  always @(posedge clk) begin
    if (task_done && rst_n) begin
      real ir, ib1, ib2, eb;
      ir = to_real(st.i_ref); ib1 = to_real(st.i_b1); ib2 = to_real(st.i_b2); eb = to_real(st.e_b);
      if (ib1 > ir) m1 = 0;
      else if (ib1 < to_real(from_real(ir - to_real(cfg.b_m)))) m1 = 1;
      if (ib2 > to_real(from_real(eb + to_real(cfg.b_f)))) m2 = 0;
      else if (ib2 < to_real(from_real(eb - to_real(cfg.b_f)))) m2 = 1;
      n_tasks++;
      checks++;
      if ({t_b1, t_b2} !== {m1, m2}) begin
        failures++;
        if (failures < 10) $display("FAIL task %0d: gates %b%b expected %b%b (i_ref %f i_b1 %f e_b %f i_b2 %f oc %b ov %b)", n_tasks, t_b1, t_b2, m1, m2, ir, ib1, eb, ib2, st.oc, st.ov);
      end
      if (meas) begin
        if (t_b1 != p1) n_sw1++;
        if (t_b2 != p2) n_sw2++;
      end
      p1 = t_b1; p2 = t_b2;
    end
    if (meas) begin
      real ir, d;
      ir = to_real(st.i_ref);
      se_tot  = se_tot + (i1 + i2 - ir) * (i1 + i2 - ir);
      se_main = se_main + (i1 - ir) * (i1 - ir);
      if (i1 - ir > over_max) over_max = i1 - ir;
      if (i2 > i2_max) i2_max = i2;
      d = (vd - to_real(cfg.v_ref)) / to_real(cfg.v_ref);
      if (d < 0.0) d = -d;
      if (d > vd_dev) vd_dev = d;
      n_clk++;
    end
  end

  task automatic run_tasks(int n);
    int k0;
    k0 = n_tasks;
    while (n_tasks < k0 + n) @(posedge clk);
  endtask

  task automatic run_case(string name, real vp, real vref, real bm, real bf, real amp_guess, bit w1);
    real f1, f2, rms_t, rms_m, step;
    VP = vp; VAC_LSB = (vp > 200.0) ? 0.8 : 0.4;
    cfg.v_ref = from_real(vref);
    cfg.b_m = from_real(bm);
    cfg.b_f = from_real(bf);
    cfg.k_vac = from_real(1.0 / vp);
    cfg.gain[CH_VAC] = from_real(VAC_LSB); cfg.offset[CH_VAC] = from_real(512.0 * VAC_LSB);
    // start close to the operating point: output charged, integral preset by
    // a short run with a large integral gain
    @(negedge clk);
    en = 0; rst_n = 0;
    t = 0.0; i1 = 0.0; i2 = 0.0; vd = vref - 2.0;
    m1 = 0; m2 = 0; p1 = 0; p2 = 0;
    @(negedge clk) rst_n = 1;
    @(negedge clk) en = 1;
    cfg.ki = from_real(0.002);
    run_tasks(4000);
    cfg.ki = from_real(0.0002);
    run_tasks(4000);
    meas = 1;
    n_sw1 = 0; n_sw2 = 0; n_clk = 0; se_tot = 0.0; se_main = 0.0; over_max = 0.0; i2_max = 0.0; vd_dev = 0.0;
    run_tasks(8000);                     // one mains period
    meas = 0;
    f1 = real'(n_sw1) / 2.0 / 0.02;      // two transitions per switching period
    f2 = real'(n_sw2) / 2.0 / 0.02;
    rms_t = $sqrt(se_tot / n_clk);
    rms_m = $sqrt(se_main / n_clk);
    step = vp * 2.5e-6 / L1;
    $display("%s: f(T_b1) %0.1f kHz, f(T_b2) %0.1f kHz, rms(i_b1+i_b2-i*) %0.3f A, rms(i_b1-i*) %0.3f A, max i_b2 %0.2f A, max i_b1-i* %0.3f A, v_d deviation %0.2f %%, amplitude %0.2f A",
             name, f1 / 1000.0, f2 / 1000.0, rms_t, rms_m, i2_max, over_max, vd_dev * 100.0, to_real(st.amp));
    checks++;
    if (!(f2 > f1 && f1 > 0.0)) begin failures++; $display("FAIL %s switching frequencies", name); end
    checks++;
    if (over_max > 2.0 * step + 0.1) begin failures++; $display("FAIL %s main current above reference", name); end
    checks++;
    if (vd_dev > 0.03) begin failures++; $display("FAIL %s output voltage not held", name); end
    checks++;
    if (adc_timeout) begin failures++; $display("FAIL %s converter timeout", name); end
    if (w1) begin
      checks += 2;
      if (i2_max < 0.6 * bm || i2_max > bm + bf + 2.0 * vp * 2.5e-6 / L2 + 0.1) begin failures++; $display("FAIL %s filtering current peak", name); end
      if (!(rms_t < rms_m)) begin failures++; $display("FAIL %s filtering did not help", name); end
    end
  endtask

  initial begin
    #2s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    L1 = 3.6e-3; L2 = 0.6e-3; CAP = 1100e-6; RL = 200.0; VP = 155.0; VAC_LSB = 0.4;
    cfg = '0;
    cfg.kp     = from_real(0.2);
    cfg.ki     = from_real(0.0002);
    cfg.pi_lim = from_real(8.0);
    cfg.i_amp  = from_real(0.0);
    cfg.i_max  = from_real(12.0);
    cfg.v_max  = from_real(480.0);
    cfg.gain[CH_VDC] = from_real(0.5);   cfg.offset[CH_VDC] = from_real(0.0);
    cfg.gain[CH_IB1] = from_real(0.025); cfg.offset[CH_IB1] = from_real(12.8);
    cfg.gain[CH_IB2] = from_real(0.025); cfg.offset[CH_IB2] = from_real(12.8);
    cfg.phase_inc  = 16'd16;
    cfg.use_pi     = 1'b1;
    cfg.use_cordic = 1'b1;
    cfg.filt_en    = 1'b1;
    run_case("W1 simulation study, b_m 5 A, b_f 1 A", 325.0, 400.0, 5.0, 1.0, 4.9, 1'b1);
    run_case("W2 prototype, b_m 0.5 A, b_f 0.15 A", 155.0, 200.0, 0.5, 0.15, 2.6, 1'b0);
    run_case("W3 prototype, b_m 0.25 A, b_f 0.15 A", 155.0, 200.0, 0.25, 0.15, 2.6, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

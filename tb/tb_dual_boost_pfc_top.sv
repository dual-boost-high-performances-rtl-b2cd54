// tb_dual_boost_pfc_top - closed-loop test of the whole controller with its
// default parameters, against a behavioural model of the power circuit.
//
// The plant: a 50 Hz, 155 V peak mains through a diode bridge feeds two boost
// converters (3.6 mH main choke, 0.6 mH filtering choke) charging a 1100 uF
// capacitor loaded by 200 ohm; it is integrated every clock (20 ns). Four
// converter models digitise v_ac, v_dc, i_b1, i_b2 for the controller, and
// zc is the sign of v_ac. The test runs, in order:
//   A  dual boost, CORDIC |sin| shape, PI amplitude
//   B  single boost (filtering switch disabled), same operating point
//   C  |v_ac| shape with a fixed amplitude
//   D  overvoltage shutdown and clear
//   E  an A/D converter that does not answer (timeout)
//   F  the stand-alone sfloat24 unit (one division, one multiply)
// Checks: every task's gate commands against the hysteresis rule applied to
// the task's own status values; the total current tracks the reference more
// closely in A than in B; the filtering switch switches faster than the main
// one; the PI amplitude moves; a fault opens both switches; the timeout is
// reported. Each mechanism is counted and must happen at least once.
module tb_dual_boost_pfc_top;
  import sf24_pkg::*;
  import pfc_pkg::*;
  import sf24_ref_pkg::*;

  localparam int  TASKS_AB = 4000;       // tasks per segment A, B (10 ms)
  localparam real DT  = 20e-9;
  localparam real VP  = 155.0, FM = 50.0;
  localparam real L1  = 3.6e-3, L2 = 0.6e-3, CAP = 1100e-6, RL = 200.0;
  localparam real PI2 = 6.28318530717959;

  logic clk = 0, rst_n = 0, en = 0, fault_clr = 0;
  pfc_cfg_t cfg;
  logic [NCH-1:0] ad_wr_n, ad_rd_n, ad_int_n, int_raw;
  logic [NCH-1:0][AD_W-1:0] ad_data;
  logic [NCH-1:0][AD_W-1:0] acode;
  logic zc, t_b1, t_b2, task_done, adc_timeout;
  pfc_status_t st;
  logic fpu_start = 0, fpu_busy, fpu_done;
  sf24_op_e fpu_op;
  logic [23:0] fpu_a, fpu_b, fpu_r;
  logic [2:0] fpu_flags;
  logic mute = 0;

  int checks = 0, failures = 0;
  real t = 0.0, vac = 0.0, i1 = 0.0, i2 = 0.0, vd = 195.0;

  always #10 clk = ~clk;

  dual_boost_pfc_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .cfg(cfg), .fault_clr(fault_clr),
    .ad_wr_n(ad_wr_n), .ad_rd_n(ad_rd_n), .ad_int_n(ad_int_n), .ad_data(ad_data),
    .zc(zc), .t_b1(t_b1), .t_b2(t_b2), .status(st), .task_done(task_done), .adc_timeout(adc_timeout),
    .fpu_start(fpu_start), .fpu_op(fpu_op), .fpu_a(fpu_a), .fpu_b(fpu_b),
    .fpu_busy(fpu_busy), .fpu_done(fpu_done), .fpu_r(fpu_r), .fpu_flags(fpu_flags)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_adc
    ad1061_model adc (.wr_n(ad_wr_n[c]), .rd_n(ad_rd_n[c]), .int_n(int_raw[c]),
                      .data(ad_data[c]), .analog_code(acode[c]));
  end
  // converter 3 can be muted to provoke a timeout
  assign ad_int_n = int_raw | {mute, 3'b000};

  function automatic logic [9:0] q10(real x);
    int k;
    k = $rtoi(x + 0.5);
    if (k < 0) k = 0;
    if (k > 1023) k = 1023;
    return 10'(k);
  endfunction

  // power circuit, one Euler step per clock
  always @(posedge clk) begin
    real vb, d1, d2;
    t   = t + DT;
    vac = VP * $sin(PI2 * FM * t);
    vb  = vac < 0.0 ? -vac : vac;
    d1  = (vb - (t_b1 ? 0.0 : vd)) / L1;
    d2  = (vb - (t_b2 ? 0.0 : vd)) / L2;
    i1  = i1 + d1 * DT;  if (i1 < 0.0) i1 = 0.0;
    i2  = i2 + d2 * DT;  if (i2 < 0.0) i2 = 0.0;
    vd  = vd + ((t_b1 ? 0.0 : i1) + (t_b2 ? 0.0 : i2) - vd / RL) / CAP * DT;
    acode[CH_VAC] = q10(512.0 + vac / 0.4);
    acode[CH_VDC] = q10(vd / 0.5);
    acode[CH_IB1] = q10(512.0 + i1 * 40.0);
    acode[CH_IB2] = q10(512.0 + i2 * 40.0);
  end
  assign zc = vac >= 0.0;

  // every task: gate commands against the hysteresis rule on the status values
  logic m1 = 0, m2 = 0;
  int n_tasks = 0, n_sw1 = 0, n_sw2 = 0, n_shut = 0;
  logic p1 = 0, p2 = 0;
  real se = 0.0; int ne = 0;
  always @(posedge clk) begin
    if (task_done && rst_n) begin
      real ir, ib1, ib2, eb;
      ir = to_real(st.i_ref); ib1 = to_real(st.i_b1); ib2 = to_real(st.i_b2); eb = to_real(st.e_b);
      if (ib1 > ir) m1 = 0;
      else if (ib1 < to_real(from_real(ir - to_real(cfg.b_m)))) m1 = 1;
      if (ib2 > to_real(from_real(eb + to_real(cfg.b_f)))) m2 = 0;
      else if (ib2 < to_real(from_real(eb - to_real(cfg.b_f)))) m2 = 1;
      if (st.oc || st.ov) begin m1 = 0; m2 = 0; n_shut++; end
      if (!cfg.filt_en) m2 = 0;
      n_tasks++;
      checks++;
      if ({t_b1, t_b2} !== {m1, m2}) begin
        failures++;
        if (failures < 10) $display("FAIL task %0d: gates %b%b expected %b%b", n_tasks, t_b1, t_b2, m1, m2);
      end
      if (t_b1 != p1) n_sw1++;
      if (t_b2 != p2) n_sw2++;
      p1 = t_b1; p2 = t_b2;
    end
  end

  // tracking error of the total current against the reference, every clock
  always @(posedge clk) begin
    real ir;
    ir = to_real(st.i_ref);
    se = se + (i1 + i2 - ir) * (i1 + i2 - ir);
    ne++;
  end

  task automatic run_tasks(int n);
    int k0;
    k0 = n_tasks;
    while (n_tasks < k0 + n) @(posedge clk);
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rms_a, rms_b, amp0, amp1;
    int  sw1_a, sw2_a, zc_edges, to_seen, tasks_before;
    cfg = '0;
    cfg.v_ref  = from_real(200.0);
    cfg.kp     = from_real(0.2);
    cfg.ki     = from_real(0.0005);
    cfg.pi_lim = from_real(4.0);
    cfg.i_amp  = from_real(2.6);
    cfg.k_vac  = from_real(1.0 / VP);
    cfg.b_m    = from_real(1.0);
    cfg.b_f    = from_real(0.15);
    cfg.i_max  = from_real(8.0);
    cfg.v_max  = from_real(240.0);
    cfg.gain[CH_VAC] = from_real(0.4);   cfg.offset[CH_VAC] = from_real(204.8);
    cfg.gain[CH_VDC] = from_real(0.5);   cfg.offset[CH_VDC] = from_real(0.0);
    cfg.gain[CH_IB1] = from_real(0.025); cfg.offset[CH_IB1] = from_real(12.8);
    cfg.gain[CH_IB2] = from_real(0.025); cfg.offset[CH_IB2] = from_real(12.8);
    cfg.phase_inc  = 16'd16;             // 65536 / (10 ms / 2.5 us) = 16.4
    cfg.use_pi     = 1'b1;
    cfg.use_cordic = 1'b1;
    cfg.filt_en    = 1'b1;
    fpu_op = OP_ADD; fpu_a = '0; fpu_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;

    // A: dual boost
    run_tasks(20);
    amp0 = to_real(st.amp);
    se = 0.0; ne = 0; n_sw1 = 0; n_sw2 = 0;
    zc_edges = 0;
    fork
      run_tasks(TASKS_AB);
      forever @(zc) zc_edges++;
    join_any
    disable fork;
    rms_a = $sqrt(se / ne); sw1_a = n_sw1; sw2_a = n_sw2;
    amp1 = to_real(st.amp);
    $display("A dual boost:   rms error %f A, T_b1 %0d and T_b2 %0d switchings, amplitude %f -> %f A, v_d %f V",
             rms_a, sw1_a, sw2_a, amp0, amp1, vd);

    // B: single boost, same operating point (fixed amplitude, as A ended)
    cfg.filt_en = 1'b0;
    run_tasks(20);
    se = 0.0; ne = 0; n_sw1 = 0; n_sw2 = 0;
    run_tasks(TASKS_AB);
    rms_b = $sqrt(se / ne);
    $display("B single boost: rms error %f A, T_b1 %0d and T_b2 %0d switchings", rms_b, n_sw1, n_sw2);
    checks++;
    if (!(rms_a < rms_b)) begin failures++; $display("FAIL active filtering did not reduce the ripple"); end
    checks++;
    if (!(sw2_a > sw1_a && sw1_a > 0)) begin failures++; $display("FAIL switching counts %0d %0d", sw1_a, sw2_a); end
    checks++;
    if (n_sw2 != 0) begin failures++; $display("FAIL filtering switch moved in single boost mode"); end
    checks++;
    if (amp1 == amp0) begin failures++; $display("FAIL PI amplitude never moved"); end
    checks++;
    if (zc_edges == 0) begin failures++; $display("FAIL no zero crossing"); end

    // C: |v_ac| shape, fixed amplitude
    cfg.filt_en = 1'b1; cfg.use_cordic = 1'b0; cfg.use_pi = 1'b0;
    run_tasks(20);
    se = 0.0; ne = 0; n_sw1 = 0; n_sw2 = 0;
    run_tasks(1000);
    $display("C |v_ac| shape: rms error %f A, T_b1 %0d and T_b2 %0d switchings", $sqrt(se / ne), n_sw1, n_sw2);
    checks++;
    if (st.amp !== cfg.i_amp || n_sw1 == 0 || $sqrt(se / ne) > 1.0) begin failures++; $display("FAIL fixed-amplitude mode"); end

    // D: overvoltage shutdown
    cfg.v_max = from_real(100.0);
    run_tasks(3);
    checks++;
    if (!st.ov || t_b1 || t_b2 || n_shut == 0) begin failures++; $display("FAIL overvoltage shutdown"); end
    cfg.v_max = from_real(240.0);
    @(negedge clk) fault_clr = 1;
    @(negedge clk) fault_clr = 0;
    run_tasks(50);
    checks++;
    if (st.ov || st.oc) begin failures++; $display("FAIL fault not cleared"); end

    // E: a converter does not answer
    tasks_before = n_tasks;
    @(negedge clk) mute = 1;
    to_seen = 0;
    repeat (125 * 4) begin @(negedge clk); if (adc_timeout) to_seen++; end
    mute = 0;
    checks++;
    if (to_seen == 0 || n_tasks > tasks_before + 1) begin failures++; $display("FAIL timeout %0d, tasks %0d", to_seen, n_tasks - tasks_before); end
    @(negedge clk) fault_clr = 1;
    @(negedge clk) fault_clr = 0;
    run_tasks(5);

    // F: stand-alone arithmetic unit
    @(negedge clk) begin fpu_op = OP_DIV; fpu_a = 24'h412000; fpu_b = 24'h40A000; fpu_start = 1; end
    @(negedge clk) fpu_start = 0;
    while (!fpu_done) @(negedge clk);
    checks++;
    if (fpu_r !== 24'h400000) begin failures++; $display("FAIL 10/5 = %h", fpu_r); end
    @(negedge clk) begin fpu_op = OP_MUL; fpu_a = 24'h400000; fpu_b = 24'h40A000; fpu_start = 1; end
    @(negedge clk) fpu_start = 0;
    while (!fpu_done) @(negedge clk);
    checks++;
    if (fpu_r !== 24'h412000) begin failures++; $display("FAIL 2*5 = %h", fpu_r); end

    $display("mechanisms: tasks %0d, shutdown tasks %0d, zero crossings %0d, timeouts %0d", n_tasks, n_shut, zc_edges, to_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

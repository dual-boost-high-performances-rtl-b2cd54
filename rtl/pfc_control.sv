// pfc_control - one control task of the dual boost PFC.
//
// Started once per set of A/D samples, the task
//   1. scales the four codes into v_ac, v_dc, i_b1, i_b2 (gain, offset),
//   2. runs the PI regulator on V*_DC - v_DC for the current amplitude (or
//      uses the fixed amplitude cfg.i_amp when cfg.use_pi = 0), and checks
//      the overcurrent / overvoltage limits,
//   3. forms the total current reference i* = amplitude * shape, the shape
//      being the CORDIC |sin| (cfg.use_cordic) or |v_ac| * cfg.k_vac,
//   4. forms e_b = i* - i_b1,
//   5. updates both hysteresis controllers: the main switch T_b1 keeps i_b1
//      in [i* - b_m, i*] (the upper side of its band is zero so that e_b
//      stays non-negative), the filtering switch T_b2 keeps i_b2 within
//      e_b +/- b_f. cfg.filt_en = 0 holds T_b2 open (single boost mode).
// This is the paper's control scheme; the step order, the run-time
// selection of the reference source and the task latency are this design's.
//
// Timing: start for one clock with code valid; done pulses 9 clocks later,
// when t1 / t2 take their new values. A start during a task is ignored. A
// latched fault (status.oc / status.ov) opens both switches at once and
// until clr.
module pfc_control
  import sf24_pkg::*;
  import pfc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [NCH-1:0][AD_W-1:0]   code,
  input  sf24_t                      sine,
  input  pfc_cfg_t                   cfg,
  input  logic                       clr,
  output logic                       t1,
  output logic                       t2,
  output pfc_status_t                status,
  output logic                       done
);

  typedef enum logic [2:0] {S_IDLE, S_SCALE, S_PI, S_WAIT, S_REF, S_ERR, S_HYST} state_e;
  state_e state;

  logic [NCH-1:0][AD_W-1:0] code_q;
  sf24_t [NCH-1:0]          val;
  sf24_t                    v_ac, v_dc, i_b1, i_b2, amp, i_ref, e_b;
  sf24_t                    err, vac_abs, shape_v, shape, iref_n, eb_n;
  sf24_t                    pi_y;
  logic                     pi_valid, shutdown, x1, x2;
  logic                     oc, ov;

  // 1. A/D codes to physical values
  for (genvar c = 0; c < NCH; c++) begin : g_scale
    adc_scale #(.DW(AD_W)) u_scale (
      .code(code_q[c]), .gain(cfg.gain[c]), .offset(cfg.offset[c]), .r(val[c])
    );
  end

  // 2. voltage regulator
  sf24_addsub u_verr (.a(cfg.v_ref), .b(v_dc), .sub(1'b1), .r(err));
  pi_reg u_pi (
    .clk(clk), .rst_n(rst_n), .en(state == S_PI), .err(err),
    .kp(cfg.kp), .ki(cfg.ki), .lim(cfg.pi_lim), .y(pi_y), .valid(pi_valid)
  );
  protection u_prot (
    .clk(clk), .rst_n(rst_n), .en(state == S_PI), .clr(clr),
    .i_b1(i_b1), .i_b2(i_b2), .v_dc(v_dc), .i_max(cfg.i_max), .v_max(cfg.v_max),
    .oc(oc), .ov(ov), .shutdown(shutdown)
  );

  // 3. reference shape and total current reference
  assign vac_abs = '{sign: 1'b0, exp: v_ac.exp, frac: v_ac.frac};
  sf24_mul u_shape (.a(vac_abs), .b(cfg.k_vac), .r(shape_v));
  assign shape = cfg.use_cordic ? sine : shape_v;
  sf24_mul u_iref (.a(amp), .b(shape), .r(iref_n));

  // 4. filtering reference
  sf24_addsub u_eb (.a(i_ref), .b(i_b1), .sub(1'b1), .r(eb_n));

  // 5. hysteresis controllers
  hyst_ctrl u_main (
    .clk(clk), .rst_n(rst_n), .en(state == S_HYST), .force_off(shutdown),
    .i_act(i_b1), .i_ref(i_ref), .b_hi(SF24_ZERO), .b_lo(cfg.b_m), .x(x1)
  );
  hyst_ctrl u_filt (
    .clk(clk), .rst_n(rst_n), .en(state == S_HYST), .force_off(shutdown || !cfg.filt_en),
    .i_act(i_b2), .i_ref(e_b), .b_hi(cfg.b_f), .b_lo(cfg.b_f), .x(x2)
  );

  assign t1 = x1 && !shutdown;
  assign t2 = x2 && !shutdown && cfg.filt_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      code_q <= '0;
      v_ac   <= SF24_ZERO;
      v_dc   <= SF24_ZERO;
      i_b1   <= SF24_ZERO;
      i_b2   <= SF24_ZERO;
      amp    <= SF24_ZERO;
      i_ref  <= SF24_ZERO;
      e_b    <= SF24_ZERO;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) begin
          code_q <= code;
          state  <= S_SCALE;
        end
        S_SCALE: begin
          v_ac  <= val[CH_VAC];
          v_dc  <= val[CH_VDC];
          i_b1  <= val[CH_IB1];
          i_b2  <= val[CH_IB2];
          state <= S_PI;
        end
        S_PI:    state <= S_WAIT;
        S_WAIT:  if (pi_valid) begin
          amp   <= cfg.use_pi ? pi_y : cfg.i_amp;
          state <= S_REF;
        end
        S_REF: begin
          i_ref <= iref_n;
          state <= S_ERR;
        end
        S_ERR: begin
          e_b   <= eb_n;
          state <= S_HYST;
        end
        S_HYST: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    status.v_ac  = v_ac;
    status.v_dc  = v_dc;
    status.i_b1  = i_b1;
    status.i_b2  = i_b2;
    status.amp   = amp;
    status.i_ref = i_ref;
    status.e_b   = e_b;
    status.oc    = oc;
    status.ov    = ov;
  end

endmodule

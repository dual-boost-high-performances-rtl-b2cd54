// dual_boost_pfc_top - FPGA controller of a dual boost power factor corrector,
// with the stand-alone sfloat24 arithmetic unit beside it.
//
// Controller: every 2.5 us (task_timer, PERIOD clocks) the four A/D
// converters (v_ac, v_dc, i_b1, i_b2) are started together through their
// adc_if handshakes, and the modulo-sine generator advances one step. When
// all four conversions have returned, pfc_control runs one control task and
// updates the gate commands t_b1 (main boost) and t_b2 (filtering boost).
// A converter that does not answer (timeout) aborts that task and is
// reported on adc_timeout. zc is the square wave of the external mains
// zero-crossing comparator.
//
// Arithmetic unit: sf24_fpu, with its own ports, runs single sfloat24
// operations for a host (it is not used by the controller).
//
// All ports are plain signals or packed structs; converter signals are
// active low. The clock is assumed to be 50 MHz.
module dual_boost_pfc_top
  import sf24_pkg::*;
  import pfc_pkg::*;
#(
  parameter int unsigned PERIOD = 125
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  pfc_cfg_t                 cfg,
  input  logic                     fault_clr,
  // A/D converters
  output logic [NCH-1:0]           ad_wr_n,
  output logic [NCH-1:0]           ad_rd_n,
  input  logic [NCH-1:0]           ad_int_n,
  input  logic [NCH-1:0][AD_W-1:0] ad_data,
  // mains zero-crossing comparator
  input  logic                     zc,
  // power switches
  output logic                     t_b1,
  output logic                     t_b2,
  output pfc_status_t              status,
  output logic                     task_done,
  output logic                     adc_timeout,
  // stand-alone sfloat24 unit
  input  logic                     fpu_start,
  input  sf24_op_e                 fpu_op,
  input  sf24_t                    fpu_a,
  input  sf24_t                    fpu_b,
  output logic                     fpu_busy,
  output logic                     fpu_done,
  output sf24_t                    fpu_r,
  output logic [2:0]               fpu_flags
);

  logic                     tick;
  logic [NCH-1:0]           ad_valid, ad_to, ad_busy, got;
  logic [NCH-1:0][AD_W-1:0] codes;
  sf24_t                    sine;
  logic                     sine_valid;
  logic                     ctl_start;

  task_timer #(.PERIOD(PERIOD)) u_timer (.clk(clk), .rst_n(rst_n), .en(en), .tick(tick));

  for (genvar c = 0; c < NCH; c++) begin : g_adc
    adc_if #(.DW(AD_W)) u_adc (
      .clk(clk), .rst_n(rst_n), .start(tick),
      .ad_wr_n(ad_wr_n[c]), .ad_int_n(ad_int_n[c]), .ad_rd_n(ad_rd_n[c]), .ad_data(ad_data[c]),
      .data(codes[c]), .valid(ad_valid[c]), .timeout(ad_to[c]), .busy(ad_busy[c])
    );
  end

  mod_sine u_sine (
    .clk(clk), .rst_n(rst_n), .step(tick), .zc(zc), .phase_inc(cfg.phase_inc),
    .y(sine), .valid(sine_valid)
  );

  // collect the four conversions of a task
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got         <= '0;
      ctl_start   <= 1'b0;
      adc_timeout <= 1'b0;
    end else begin
      ctl_start <= 1'b0;
      if (tick) begin
        got <= '0;
      end else if (|ad_to) begin
        got         <= '0;
        adc_timeout <= 1'b1;
      end else if ((got | ad_valid) == '1 && got != '1) begin
        got       <= '1;
        ctl_start <= 1'b1;
      end else begin
        got <= got | ad_valid;
      end
      if (fault_clr) adc_timeout <= 1'b0;
    end
  end

  pfc_control u_ctl (
    .clk(clk), .rst_n(rst_n), .start(ctl_start), .code(codes), .sine(sine), .cfg(cfg),
    .clr(fault_clr), .t1(t_b1), .t2(t_b2), .status(status), .done(task_done)
  );

  sf24_fpu u_fpu (
    .clk(clk), .rst_n(rst_n), .start(fpu_start), .op(fpu_op), .a(fpu_a), .b(fpu_b),
    .busy(fpu_busy), .done(fpu_done), .r(fpu_r), .flags(fpu_flags)
  );

endmodule

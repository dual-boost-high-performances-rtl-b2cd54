// mod_sine - "modulo sine" |sin(wt)| of the mains voltage, in sfloat24.
//
// The mains phase comes from the square wave of an external zero-crossing
// comparator (zc): each edge of zc starts a half period, where the phase is
// cleared. Every control task (step) the phase advances by phase_inc, with
// 2^16 phase units = half a mains period, and saturates at the end of the
// half period. The phase is folded to an angle in [0, pi/2] and an iterative
// CORDIC in rotation mode (ITER iterations, one per clock, 20-bit fixed
// point, angle unit pi/2 = 2^17) gives sin of it; the result, 0..2^16, is
// cast to sfloat24 and scaled by 2^-16.
// The paper generates this function with CORDIC from the comparator
// signal; the phase accumulator, its resynchronisation at each edge and all
// widths are this design's choices.
//
// Timing: zc passes a two-flop synchroniser. valid pulses with a new y
// ITER + 4 clocks after step (the clock after step updates the phase, the
// CORDIC starts on the next). y resets to zero.
module mod_sine
  import sf24_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  input  logic        zc,
  input  logic [15:0] phase_inc,
  output sf24_t       y,
  output logic        valid
);

  // atan(2^-i) in units of pi/2 = 2^17, i.e. round(atan(2^-i) * 2^18 / pi)
  localparam logic signed [19:0] ATAN [16] = '{
    20'sd65536, 20'sd38688, 20'sd20442, 20'sd10377, 20'sd5208, 20'sd2607,
    20'sd1304,  20'sd652,   20'sd326,   20'sd163,   20'sd81,   20'sd41,
    20'sd20,    20'sd10,    20'sd5,     20'sd3
  };
  // CORDIC gain compensation: round(0.6072529 * 2^16)
  localparam logic signed [19:0] X0 = 20'sd39797;
  // 2^-16 in sfloat24: exponent field 127 - 16
  localparam sf24_t SCALE = '{sign: 1'b0, exp: 8'd111, frac: '0};

  logic [2:0]  zc_s;
  logic [15:0] phase;
  logic        run, fin, fin_q, go;
  logic [4:0]  it;
  logic signed [19:0] cx, cy, cz;
  logic [16:0] s_int;
  sf24_t       s_f, s_sc;

  // fold the phase (half period = 2^16) to [0, pi/2] = [0, 2^15] phase units
  logic [16:0] fold;
  assign fold = phase[15] ? (17'h10000 - {1'b0, phase}) : {1'b0, phase};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zc_s  <= '0;
      go    <= 1'b0;
      phase <= '0;
      run   <= 1'b0;
      fin   <= 1'b0;
      it    <= '0;
      cx    <= '0;
      cy    <= '0;
      cz    <= '0;
      s_int <= '0;
      y     <= SF24_ZERO;
      valid <= 1'b0;
    end else begin
      zc_s  <= {zc_s[1:0], zc};
      go    <= step;
      valid <= 1'b0;
      fin   <= 1'b0;
      if (zc_s[2] != zc_s[1]) begin
        phase <= '0;
      end else if (step) begin
        phase <= (17'(phase) + 17'(phase_inc) > 17'hFFFF) ? 16'hFFFF : phase + phase_inc;
      end
      if (go && !run) begin
        run <= 1'b1;
        it  <= '0;
        cx  <= X0;
        cy  <= '0;
        cz  <= $signed(20'(fold) << 2);          // 2^15 per pi/2 -> 2^17 per pi/2
      end else if (run) begin
        if (cz >= 0) begin
          cx <= cx - (cy >>> it);
          cy <= cy + (cx >>> it);
          cz <= cz - ATAN[it[3:0]];
        end else begin
          cx <= cx + (cy >>> it);
          cy <= cy - (cx >>> it);
          cz <= cz + ATAN[it[3:0]];
        end
        if (it == 5'(ITER - 1)) begin
          run <= 1'b0;
          fin <= 1'b1;
        end
        it <= it + 5'd1;
      end
      if (fin) begin
        if (cy < 0)                 s_int <= '0;
        else if (cy > 20'sh10000)   s_int <= 17'h10000;
        else                        s_int <= cy[16:0];
      end
      if (fin_q) begin
        y     <= s_sc;
        valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fin_q <= 1'b0;
    else        fin_q <= fin;
  end

  sf24_from_int #(.IW(17)) u_cast (.i(s_int), .r(s_f));
  sf24_mul                 u_scl  (.a(s_f), .b(SCALE), .r(s_sc));

endmodule

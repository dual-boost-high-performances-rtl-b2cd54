// pi_reg - PI regulator in sfloat24 arithmetic.
//
// Gives the amplitude of the PFC current reference from the output-voltage
// error, as the paper's control scheme does. Its exact form is this
// design's choice: y = kp*err + I with I <- I + ki*err (ki already holds the
// sample period), and both I and y limited to [0, lim] so that the integral
// cannot wind up and the current amplitude is never negative.
//
// Timing: en (one clock) samples err; the step takes three clocks
//   1: p = kp*err, q = ki*err   2: I = clamp(I + q)   3: y = clamp(p + I)
// and valid pulses with the new y on the third clock edge after en.
// en during a step is ignored. I and y reset to zero.
module pi_reg
  import sf24_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  sf24_t err,
  input  sf24_t kp,
  input  sf24_t ki,
  input  sf24_t lim,
  output sf24_t y,
  output logic  valid
);

  typedef enum logic [1:0] {S_IDLE, S_INT, S_OUT} state_e;
  state_e state;

  sf24_t p_q, q_q, integ;
  sf24_t p_n, q_n, sum_a, sum_b, sum, sum_cl;
  logic  over, c_lt, c_eq;

  sf24_mul u_mp (.a(kp), .b(err), .r(p_n));
  sf24_mul u_mi (.a(ki), .b(err), .r(q_n));

  // one adder, shared by the integral and the output step
  assign sum_a = integ;
  assign sum_b = (state == S_INT) ? q_q : p_q;
  sf24_addsub u_add (.a(sum_a), .b(sum_b), .sub(1'b0), .r(sum));
  sf24_cmp    u_cmp (.a(sum), .b(lim), .gt(over), .lt(c_lt), .eq(c_eq));

  // limit to [0, lim]
  always_comb begin
    if (sum.sign && !is_zero(sum)) sum_cl = SF24_ZERO;
    else if (over)                 sum_cl = lim;
    else                           sum_cl = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p_q   <= SF24_ZERO;
      q_q   <= SF24_ZERO;
      integ <= SF24_ZERO;
      y     <= SF24_ZERO;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (en) begin
          p_q   <= p_n;
          q_q   <= q_n;
          state <= S_INT;
        end
        S_INT: begin
          integ <= sum_cl;
          state <= S_OUT;
        end
        S_OUT: begin
          y     <= sum_cl;
          valid <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

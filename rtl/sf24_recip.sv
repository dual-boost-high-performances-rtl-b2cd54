// sf24_recip - sfloat24 reciprocal, R = 1 / A.
//
// When the fraction of A is zero, A = (-1)^S 2^e and the result is formed at
// once as (-1)^S 2^-e, i.e. exponent field 254 - EXP (the paper's rule,
// EXP_R = -e + BIAS). Otherwise 1/1.f lies in (0.5, 1): a restoring radix-2
// divider computes floor(2^34 / M), M = {1, f}, one quotient bit per clock
// (19 clocks); the remainder is the sticky bit and the 19-bit quotient goes
// to round-to-nearest-even with exponent field 253 - EXP. The general-case
// divider is this design's choice; the paper gives only the shortcut.
// Special values: 1/0 = inf, 1/inf = 0 (signs kept), NaN stays NaN.
//
// Interface: pulse start with a valid for one clock; done pulses for one
// clock with r valid (r holds until the next start). Latency: 1 clock after
// start for the shortcut and special values, 21 clocks for the divider.
// start while busy is ignored.
module sf24_recip
  import sf24_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  sf24_t a,
  output logic  busy,
  output logic  done,
  output sf24_t r
);

  logic [15:0]        div_m;      // divisor 1.f
  logic [16:0]        rem;
  logic [18:0]        quo;
  logic [4:0]         cnt;
  logic               sgn;
  logic signed [11:0] er;

  // one step of the restoring division
  logic [16:0] rem_sh;
  logic        q_bit;
  assign rem_sh = {rem[15:0], 1'b0};
  assign q_bit  = rem_sh >= {1'b0, div_m};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      r     <= SF24_ZERO;
      div_m <= '0;
      rem   <= '0;
      quo   <= '0;
      cnt   <= '0;
      sgn   <= 1'b0;
      er    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        if (is_nan(a)) begin
          r <= SF24_QNAN;  done <= 1'b1;
        end else if (is_zero(a)) begin
          r <= make_inf(a.sign);  done <= 1'b1;
        end else if (is_inf(a)) begin
          r <= make_zero(a.sign);  done <= 1'b1;
        end else if (a.frac == '0) begin
          r    <= round_pack(a.sign, 12'sd254 - $signed({4'd0, a.exp}), 19'h40000);
          done <= 1'b1;
        end else begin
          busy  <= 1'b1;
          div_m <= {1'b1, a.frac};
          rem   <= 17'h08000;         // 2^15 < M
          quo   <= '0;
          cnt   <= 5'd19;
          sgn   <= a.sign;
          er    <= 12'sd253 - $signed({4'd0, a.exp});
        end
      end else if (busy) begin
        if (cnt != 5'd0) begin
          rem <= q_bit ? (rem_sh - {1'b0, div_m}) : rem_sh;
          quo <= {quo[17:0], q_bit};
          cnt <= cnt - 5'd1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          r    <= round_pack(sgn, er, {quo[18:1], quo[0] | (rem != '0)});
        end
      end
    end
  end

endmodule

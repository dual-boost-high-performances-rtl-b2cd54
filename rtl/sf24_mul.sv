// sf24_mul - sfloat24 multiplier.
//
// Follows the paper's product rule: the sign is SA xor SB, the exponent is
// eA + eB (biased: EXPA + EXPB - BIAS) and the mantissa is 1.fA * 1.fB.  The
// 32-bit mantissa product lies in [1, 4); it is normalised by at most one
// place, the bits below the 15 kept fraction bits become guard, round and
// sticky, and the result is rounded to nearest even (this design's choice).
// Results beyond the range give infinity, below it zero (no subnormals).
// Special values: NaN in, or inf * 0, gives NaN; inf * x gives inf.
// Purely combinational.
module sf24_mul
  import sf24_pkg::*;
(
  input  sf24_t a,
  input  sf24_t b,
  output sf24_t r
);

  always_comb begin
    logic               s;
    logic [31:0]        p;
    logic [18:0]        m;
    logic signed [11:0] e;

    s = a.sign ^ b.sign;
    p = {1'b1, a.frac} * {1'b1, b.frac};
    e = $signed({4'd0, a.exp}) + $signed({4'd0, b.exp}) - 12'sd127;
    if (p[31]) begin
      m = {p[31:14], |p[13:0]};
      e = e + 12'sd1;
    end else begin
      m = {p[30:13], |p[12:0]};
    end

    if (is_nan(a) || is_nan(b))                       r = SF24_QNAN;
    else if ((is_inf(a) && is_zero(b)) ||
             (is_zero(a) && is_inf(b)))               r = SF24_QNAN;
    else if (is_inf(a) || is_inf(b))                  r = make_inf(s);
    else if (is_zero(a) || is_zero(b))                r = make_zero(s);
    else                                              r = round_pack(s, e, m);
  end

endmodule

// sf24_addsub - sfloat24 adder / subtractor, R = A + B or R = A - B.
//
// The operand of larger magnitude is taken as the reference; the other
// mantissa (1.f, 16 bits) is shifted right by the exponent difference with
// guard, round and sticky bits kept, the two are added or subtracted, and the
// result is renormalised (one place right after a carry, or left by the count
// of leading zeros after a cancellation) before round-to-nearest-even packing.
// The paper states only R = A +/- B; this alignment datapath is the
// ordinary way to build it and is this design's choice.
//
// Special values: NaN in gives NaN; inf - inf gives NaN; inf +/- finite gives
// inf; an exact zero sum is +0 unless both addends are -0.
// Purely combinational: the result follows a, b and sub in the same cycle.
module sf24_addsub
  import sf24_pkg::*;
(
  input  sf24_t a,
  input  sf24_t b,
  input  logic  sub,   // 1: a - b, 0: a + b
  output sf24_t r
);

  always_comb begin
    sf24_t              x, y;          // |x| >= |y|
    logic               sy;            // effective sign of b
    logic [15:0]        mx, my;
    logic [4:0]         d;             // shift, capped at 31
    logic [8:0]         dfull;
    logic [50:0]        ywide;
    logic [18:0]        mxe, mye;
    logic [19:0]        s;
    logic [18:0]        m;
    logic signed [11:0] e;
    logic [4:0]         lz;
    logic               eff_sub;

    sy = b.sign ^ sub;
    r  = SF24_ZERO;
    // defaults so every path assigns every variable
    x = a; y = b; mx = '0; my = '0; d = '0; dfull = '0; ywide = '0;
    mxe = '0; mye = '0; s = '0; m = '0; e = '0; lz = '0; eff_sub = 1'b0;

    if (is_nan(a) || is_nan(b)) begin
      r = SF24_QNAN;
    end else if (is_inf(a) && is_inf(b)) begin
      r = (a.sign == sy) ? a : SF24_QNAN;
    end else if (is_inf(a)) begin
      r = a;
    end else if (is_inf(b)) begin
      r = make_inf(sy);
    end else begin
      // order by magnitude ({exp, frac} compares like an unsigned integer)
      if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
        x = a;
        y = '{sign: sy, exp: b.exp, frac: b.frac};
      end else begin
        x = '{sign: sy, exp: b.exp, frac: b.frac};
        y = a;
      end
      eff_sub = x.sign ^ y.sign;
      mx = is_zero(x) ? 16'd0 : {1'b1, x.frac};
      my = is_zero(y) ? 16'd0 : {1'b1, y.frac};
      dfull = {1'b0, x.exp} - {1'b0, y.exp};
      d     = (dfull > 9'd31) ? 5'd31 : dfull[4:0];
      mxe   = {mx, 3'b000};
      ywide = {my, 35'd0} >> d;
      mye   = {ywide[50:33], |ywide[32:0]};
      s     = eff_sub ? ({1'b0, mxe} - {1'b0, mye}) : ({1'b0, mxe} + {1'b0, mye});
      e     = $signed({4'd0, x.exp});

      if (s == 20'd0) begin
        // exact zero: -0 only for (-0) + (-0)
        r = make_zero(x.sign & y.sign & ~eff_sub);
      end else if (s[19]) begin
        m = {s[19:2], s[1] | s[0]};
        r = round_pack(x.sign, e + 12'sd1, m);
      end else begin
        lz = '0;
        for (int k = 18; k >= 0; k--) begin
          if (s[k]) begin
            lz = 5'(18 - k);
            break;
          end
        end
        m = s[18:0] << lz;
        r = round_pack(x.sign, e - $signed({7'd0, lz}), m);
      end
    end
  end

endmodule

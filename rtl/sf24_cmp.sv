// sf24_cmp - sfloat24 comparator giving "greater than" and "less than" flags.
//
// As the paper describes: the XOR of the two sign bits tells whether the
// signs differ; if they do, the positive number is the greater. If they are
// equal, the magnitudes (exponent and fraction fields taken together as one
// unsigned number) are compared, and for two negative numbers the flags are
// swapped. Choices of this design: +0 and -0 compare equal, and a NaN
// operand gives gt = lt = 0 (unordered), eq = 0.
// Purely combinational.
module sf24_cmp
  import sf24_pkg::*;
(
  input  sf24_t a,
  input  sf24_t b,
  output logic  gt,   // a > b
  output logic  lt,   // a < b
  output logic  eq    // a == b
);

  always_comb begin
    logic [22:0] ma, mb;
    logic        sx;
    logic        mag_gt, mag_lt;
    ma = is_zero(a) ? 23'd0 : {a.exp, a.frac};
    mb = is_zero(b) ? 23'd0 : {b.exp, b.frac};
    sx = a.sign ^ b.sign;
    mag_gt = ma > mb;
    mag_lt = ma < mb;
    gt = 1'b0;
    lt = 1'b0;
    if (is_nan(a) || is_nan(b)) begin
      gt = 1'b0;
      lt = 1'b0;
    end else if (ma == 23'd0 && mb == 23'd0) begin
      gt = 1'b0;                    // +0 == -0
      lt = 1'b0;
    end else if (sx) begin
      gt = ~a.sign;                 // signs differ: the positive one is greater
      lt =  a.sign;
    end else if (!a.sign) begin
      gt = mag_gt;                  // both positive
      lt = mag_lt;
    end else begin
      gt = mag_lt;                  // both negative: flags swapped
      lt = mag_gt;
    end
    eq = !gt && !lt && !is_nan(a) && !is_nan(b);
  end

endmodule

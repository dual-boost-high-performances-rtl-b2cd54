// sf24_to_int - casts sfloat24 to a signed OW-bit integer.
//
// The mantissa 1.f is shifted left by the unbiased exponent and the bits
// below the binary point are dropped, i.e. rounding is toward zero; the
// result is negated for a negative sign. Magnitudes that do not fit saturate
// to the most positive or negative value and raise ovf (NaN saturates
// positive). Rounding and saturation are this design's choices: the paper
// only says the casts run both ways.
// Purely combinational.
module sf24_to_int
  import sf24_pkg::*;
#(
  parameter int unsigned OW = 16
) (
  input  sf24_t         a,
  output logic [OW-1:0] i,
  output logic          ovf
);

  localparam logic [OW-1:0] MAXV = {1'b0, {(OW-1){1'b1}}};
  localparam logic [OW-1:0] MINV = {1'b1, {(OW-1){1'b0}}};

  always_comb begin
    int                 e;          // unbiased exponent
    logic [OW+15:0]     sh;
    logic [OW-1:0]      mag;
    e   = int'(a.exp) - BIAS;
    sh  = '0;
    mag = '0;
    ovf = 1'b0;
    i   = '0;
    if (is_nan(a)) begin
      i   = MAXV;
      ovf = 1'b1;
    end else if (is_zero(a) || e < 0) begin
      i = '0;
    end else if (e >= int'(OW) - 1) begin
      i   = a.sign ? MINV : MAXV;
      ovf = !(a.sign && e == int'(OW) - 1 && a.frac == '0);
    end else begin
      sh  = {{OW{1'b0}}, 1'b1, a.frac} << e;
      mag = sh[OW+14:15];
      i   = a.sign ? (~mag + 1'b1) : mag;
    end
  end

endmodule

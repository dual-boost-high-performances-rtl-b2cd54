// sf24_from_int - casts an integer to sfloat24.
//
// The position p of the leading one of |i| is the unbiased exponent (biased
// field p + 127); the bits below it, left-aligned, are the fraction. With the
// default IW = 10 (the 10-bit A/D code) every value is exact: the code
// 0000001010 has its leading one at bit 3, so it becomes 2^3 * 1.010b = 10.0,
// fields 0 | 10000010 | 010000000000000. Wider integers are rounded to
// nearest even. SIGNED = 1 reads i as two's complement (this design's
// addition; the paper's example is unsigned).
// Purely combinational.
module sf24_from_int
  import sf24_pkg::*;
#(
  parameter int unsigned IW     = 10,
  parameter bit          SIGNED = 1'b0
) (
  input  logic [IW-1:0] i,
  output sf24_t         r
);

  always_comb begin
    logic               neg;
    logic [IW-1:0]      mag;
    logic [IW-1:0]      norm;
    logic [IW+18:0]     ext;
    int unsigned        lz;
    logic signed [11:0] e;

    neg = SIGNED && i[IW-1];
    mag = neg ? (~i + 1'b1) : i;
    lz  = 0;
    for (int k = 0; k < int'(IW); k++) begin
      if (mag[k]) lz = IW - 1 - k;
    end
    norm = mag << lz;
    ext  = {norm, 19'd0};
    e    = 12'(BIAS + int'(IW) - 1 - int'(lz));
    if (mag == '0) r = SF24_ZERO;
    else           r = round_pack(neg, e, {ext[IW+18 -: 18], |ext[IW:0]});
  end

endmodule

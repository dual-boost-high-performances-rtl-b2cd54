// sf24_ref_pkg - reference model of the sfloat24 format for the testbenches.
//
// Converts between sfloat24 and the simulator's double-precision real, so
// that expected results are computed with real arithmetic and only rounded to
// sfloat24 at the end: round to nearest even on the double's mantissa bits,
// infinity when the biased exponent reaches 255, zero when it is 0 or less.
// Also provides random operand generation.
package sf24_ref_pkg;

  function automatic real to_real(logic [23:0] x);
    real m;
    int  e;
    if (x[22:15] == 8'd0) return 0.0;
    m = 1.0 + real'(x[14:0]) / 32768.0;
    e = int'(x[22:15]) - 127;
    m = m * (2.0 ** e);
    return x[23] ? -m : m;
  endfunction

  function automatic logic [23:0] from_real(real r);
    logic [63:0] b;
    int          de;
    logic [15:0] m;
    logic        g, st, inc;
    logic [16:0] mr;
    if (r == 0.0) return {($realtobits(r) >> 63) != 0 ? 1'b1 : 1'b0, 23'd0};
    b   = $realtobits(r);
    de  = int'(b[62:52]) - 1023 + 127;
    m   = {1'b1, b[51:37]};
    g   = b[36];
    st  = |b[35:0];
    inc = g & (st | m[0]);
    mr  = {1'b0, m} + {16'd0, inc};
    if (mr[16]) begin
      de = de + 1;
      mr = mr >> 1;
    end
    if (de >= 255) return {b[63], 8'hFF, 15'd0};
    if (de <= 0)   return {b[63], 23'd0};
    return {b[63], 8'(de), mr[14:0]};
  endfunction

  // random finite non-zero number with exponent field in [elo, ehi]
  function automatic logic [23:0] rnd(int elo, int ehi);
    logic [7:0] e;
    e = 8'(elo + int'($urandom_range(ehi - elo)));
    return {1'($urandom), e, 15'($urandom)};
  endfunction

  function automatic logic is_nan(logic [23:0] x);
    return x[22:15] == 8'hFF && x[14:0] != 0;
  endfunction

endpackage

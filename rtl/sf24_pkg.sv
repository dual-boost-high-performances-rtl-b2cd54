// sf24_pkg - the 24-bit "sfloat24" number format and the helpers shared by
// every arithmetic unit of the library.
//
// Layout (IEEE 754 style, cut down to 24 bits):
//   [23]    sign
//   [22:15] biased exponent, BIAS = 2^(8-1)-1 = 127
//   [14:0]  fraction f of the mantissa M = 1.f
// Example: the integer 10 = 2^3 * 1.25 is 0 | 10000010 | 010000000000000.
// The field widths and the bias follow the paper; its worked example is
// used in the tests. Rounding is round-to-nearest-even. The handling of the
// exponent field values 0 and 255 is this design's choice: exponent field 0 is
// read as (signed) zero whatever the fraction, i.e. subnormals are flushed,
// and 255 holds infinity (fraction 0) or NaN (fraction non-zero).
package sf24_pkg;

  localparam int EXP_W  = 8;
  localparam int FRAC_W = 15;
  localparam int BIAS   = 127;
  localparam int EXP_MAX = (1 << EXP_W) - 1;   // 255: infinity / NaN

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } sf24_t;

  localparam sf24_t SF24_ZERO = '{sign: 1'b0, exp: '0, frac: '0};
  localparam sf24_t SF24_ONE  = '{sign: 1'b0, exp: 8'd127, frac: '0};
  localparam sf24_t SF24_QNAN = '{sign: 1'b0, exp: 8'hFF, frac: 15'h4000};

  // Operations of the stand-alone unit sf24_fpu.
  typedef enum logic [2:0] {
    OP_ADD   = 3'd0,
    OP_SUB   = 3'd1,
    OP_MUL   = 3'd2,
    OP_DIV   = 3'd3,
    OP_RECIP = 3'd4,
    OP_CMP   = 3'd5,
    OP_ITOF  = 3'd6,   // signed 16-bit integer in a[15:0] to sfloat24
    OP_FTOI  = 3'd7    // sfloat24 to signed 16-bit integer in r[15:0]
  } sf24_op_e;

  function automatic logic is_zero(sf24_t x);
    return x.exp == '0;
  endfunction

  function automatic logic is_inf(sf24_t x);
    return (x.exp == EXP_MAX[EXP_W-1:0]) && (x.frac == '0);
  endfunction

  function automatic logic is_nan(sf24_t x);
    return (x.exp == EXP_MAX[EXP_W-1:0]) && (x.frac != '0);
  endfunction

  function automatic sf24_t make_inf(logic s);
    return '{sign: s, exp: EXP_MAX[EXP_W-1:0], frac: '0};
  endfunction

  function automatic sf24_t make_zero(logic s);
    return '{sign: s, exp: '0, frac: '0};
  endfunction

  // Rounds and packs a normalised result.
  //   e : biased exponent of the leading one, any signed value
  //   m : {1, 15 fraction bits, guard, round, sticky}; m[18] must be 1
  // Round-to-nearest-even; a result whose exponent (after the rounding carry)
  // is 255 or more becomes infinity, one that is 0 or less becomes zero.
  function automatic sf24_t round_pack(logic s, logic signed [11:0] e, logic [18:0] m);
    logic [16:0]        mr;
    logic               inc;
    logic signed [11:0] er;
    inc = m[2] & (m[1] | m[0] | m[3]);
    mr  = {1'b0, m[18:3]} + {16'd0, inc};
    er  = e;
    if (mr[16]) begin
      er = e + 12'sd1;
      mr = mr >> 1;
    end
    if (er >= 12'sd255)    return make_inf(s);
    else if (er <= 12'sd0) return make_zero(s);
    else                   return '{sign: s, exp: er[EXP_W-1:0], frac: mr[FRAC_W-1:0]};
  endfunction

endpackage

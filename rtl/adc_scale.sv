// adc_scale - turns an A/D code into a physical quantity in sfloat24.
//
// As in the paper's signal chain: the integer code is cast to sfloat24,
// multiplied by the digital conversion gain and the digital offset is
// subtracted, r = float(code) * gain - offset. Gain and offset are inputs
// so that each channel's sensor scale can be set at run time.
// Purely combinational (cast, multiply, subtract in one path).
module adc_scale
  import sf24_pkg::*;
#(
  parameter int unsigned DW = 10
) (
  input  logic [DW-1:0] code,
  input  sf24_t         gain,
  input  sf24_t         offset,
  output sf24_t         r
);

  sf24_t fcode, scaled;

  sf24_from_int #(.IW(DW)) u_cast (.i(code), .r(fcode));
  sf24_mul                 u_mul  (.a(fcode), .b(gain), .r(scaled));
  sf24_addsub              u_sub  (.a(scaled), .b(offset), .sub(1'b1), .r(r));

endmodule

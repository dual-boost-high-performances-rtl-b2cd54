// sf24_fpu - the sfloat24 library gathered into one operation unit.
//
// One operation per start: add, subtract, multiply, divide (A * 1/B),
// reciprocal, compare, and the two casts between sfloat24 and a signed 16-bit
// integer (carried in the low bits of a / r). All units are the library's
// own; the opcode set and the handshake around them are this design's choice.
//
// Interface: pulse start with op, a, b valid (ignored while busy). done pulses
// for one clock with r (and flags for OP_CMP: {gt, lt, eq}) valid; both hold
// until the next result. Latency: 1 clock for the combinational operations,
// 3 (power-of-two divisor) or 23 clocks for OP_DIV, 2 or 22 clocks for OP_RECIP.
module sf24_fpu
  import sf24_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  sf24_op_e op,
  input  sf24_t    a,
  input  sf24_t    b,
  output logic     busy,
  output logic     done,
  output sf24_t    r,
  output logic [2:0] flags
);

  sf24_t r_add, r_mul, r_div, r_rec, r_itof;
  logic [15:0] r_ftoi;
  logic ftoi_ovf;
  logic c_gt, c_lt, c_eq;
  logic div_busy, div_done, rec_busy, rec_done;
  logic go;

  assign go = start && !busy;

  sf24_addsub   u_add  (.a(a), .b(b), .sub(op == OP_SUB), .r(r_add));
  sf24_mul      u_mul  (.a(a), .b(b), .r(r_mul));
  sf24_cmp      u_cmp  (.a(a), .b(b), .gt(c_gt), .lt(c_lt), .eq(c_eq));
  sf24_from_int #(.IW(16), .SIGNED(1'b1)) u_itof (.i(a[15:0]), .r(r_itof));
  sf24_to_int   #(.OW(16)) u_ftoi (.a(a), .i(r_ftoi), .ovf(ftoi_ovf));
  sf24_div      u_div  (.clk(clk), .rst_n(rst_n), .start(go && op == OP_DIV), .a(a), .b(b),
                        .busy(div_busy), .done(div_done), .r(r_div));
  sf24_recip    u_rec  (.clk(clk), .rst_n(rst_n), .start(go && op == OP_RECIP), .a(a),
                        .busy(rec_busy), .done(rec_done), .r(r_rec));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      r     <= SF24_ZERO;
      flags <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        unique case (op)
          OP_ADD, OP_SUB: begin r <= r_add; done <= 1'b1; end
          OP_MUL:         begin r <= r_mul; done <= 1'b1; end
          OP_CMP:         begin flags <= {c_gt, c_lt, c_eq}; r <= SF24_ZERO; done <= 1'b1; end
          OP_ITOF:        begin r <= r_itof; done <= 1'b1; end
          OP_FTOI:        begin r <= {7'd0, ftoi_ovf, r_ftoi}; done <= 1'b1; end
          OP_DIV, OP_RECIP: busy <= 1'b1;
          default: ;
        endcase
      end else if (busy && (div_done || rec_done)) begin
        r    <= div_done ? r_div : r_rec;
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

endmodule

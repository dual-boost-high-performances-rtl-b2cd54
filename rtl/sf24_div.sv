// sf24_div - sfloat24 divider, R = A / B, computed as A * (1/B) as the
// paper defines division: sf24_recip forms 1/B, then sf24_mul multiplies
// it by the A captured at start. Each step rounds to nearest even, so the
// quotient may differ from a correctly rounded one by one unit in the last
// place.
//
// Interface: pulse start with a, b valid; done pulses one clock with r valid,
// r holds afterwards. Latency: reciprocal latency (1 or 21 clocks) + 1.
module sf24_div
  import sf24_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  sf24_t a,
  input  sf24_t b,
  output logic  busy,
  output logic  done,
  output sf24_t r
);

  sf24_t a_q, rb, prod;
  logic  rc_busy, rc_done, rc_start;

  assign rc_start = start && !busy;

  sf24_recip u_recip (
    .clk(clk), .rst_n(rst_n), .start(rc_start), .a(b),
    .busy(rc_busy), .done(rc_done), .r(rb)
  );

  sf24_mul u_mul (.a(a_q), .b(rb), .r(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= SF24_ZERO;
      busy <= 1'b0;
      done <= 1'b0;
      r    <= SF24_ZERO;
    end else begin
      done <= 1'b0;
      if (rc_start) begin
        a_q  <= a;
        busy <= 1'b1;
      end else if (busy && rc_done) begin
        r    <= prod;
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

  // the reciprocal unit is never started while it works
  assert property (@(posedge clk) disable iff (!rst_n) rc_start |-> !rc_busy);

endmodule

// hyst_ctrl - hysteresis current controller for one boost switch.
//
// Evaluated once per A/D sample (en): the switch command x goes to 0 (open)
// when the current is above the upper threshold, i > i* + b_hi, goes to 1
// (closed, current rises) when it is below the lower threshold,
// i < i* - b_lo, and otherwise keeps its previous value. This is the
// paper's switching rule; the upper and lower bands are separate inputs
// because the main boost uses a band whose upper side is zero. force_off
// opens the switch at once (protection). Both thresholds are computed with
// the sfloat24 adder and the decisions with the sfloat24 comparator.
// Timing: x changes on the clock edge on which en is high; x resets to 0.
module hyst_ctrl
  import sf24_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  force_off,
  input  sf24_t i_act,
  input  sf24_t i_ref,
  input  sf24_t b_hi,
  input  sf24_t b_lo,
  output logic  x
);

  sf24_t th_hi, th_lo;
  logic  above, below, u_lt, u_eq, l_gt, l_eq;

  sf24_addsub u_hi (.a(i_ref), .b(b_hi), .sub(1'b0), .r(th_hi));
  sf24_addsub u_lo (.a(i_ref), .b(b_lo), .sub(1'b1), .r(th_lo));
  sf24_cmp    c_hi (.a(i_act), .b(th_hi), .gt(above), .lt(u_lt), .eq(u_eq));
  sf24_cmp    c_lo (.a(i_act), .b(th_lo), .gt(l_gt), .lt(below), .eq(l_eq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         x <= 1'b0;
    else if (force_off) x <= 1'b0;
    else if (en) begin
      if (above)      x <= 1'b0;
      else if (below) x <= 1'b1;
    end
  end

endmodule

// protection - overcurrent / overvoltage shutdown.
//
// On every sample (en) the two boost currents are compared with i_max and the
// output voltage with v_max using the sfloat24 comparator. A value above its
// limit sets a sticky fault flag (oc or ov); while either is set, shutdown is
// high and the controller holds both switches open. clr clears the flags.
// The paper names the function (shut the PFC down on overcurrent or
// overvoltage); limits, latching and clearing are this design's choices.
// Timing: flags change on the clock edge on which en is high.
module protection
  import sf24_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  clr,
  input  sf24_t i_b1,
  input  sf24_t i_b2,
  input  sf24_t v_dc,
  input  sf24_t i_max,
  input  sf24_t v_max,
  output logic  oc,
  output logic  ov,
  output logic  shutdown
);

  logic oc1, oc2, ovv;
  logic n1l, n1e, n2l, n2e, nvl, nve;

  sf24_cmp c_i1 (.a(i_b1), .b(i_max), .gt(oc1), .lt(n1l), .eq(n1e));
  sf24_cmp c_i2 (.a(i_b2), .b(i_max), .gt(oc2), .lt(n2l), .eq(n2e));
  sf24_cmp c_v  (.a(v_dc), .b(v_max), .gt(ovv), .lt(nvl), .eq(nve));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oc <= 1'b0;
      ov <= 1'b0;
    end else if (clr) begin
      oc <= 1'b0;
      ov <= 1'b0;
    end else if (en) begin
      if (oc1 || oc2) oc <= 1'b1;
      if (ovv)        ov <= 1'b1;
    end
  end

  assign shutdown = oc || ov;

endmodule

// task_timer - start pulse for each control task.
//
// A free-running counter gives a one-clock tick every PERIOD clocks while en
// is high. The paper sets the control task period to 2.5 us; at the
// 50 MHz clock assumed by this design that is PERIOD = 125. The first tick
// comes PERIOD clocks after en rises (the counter is cleared while en is low).
module task_timer #(
  parameter int unsigned PERIOD = 125
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);

  logic [$clog2(PERIOD+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!en) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == $bits(cnt)'(PERIOD - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule

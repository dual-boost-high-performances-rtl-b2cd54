// ad1061_model - behavioural model of a 10-bit AD1061-type A/D converter for
// the testbenches (not synthesizable logic of the design).
//
// A falling edge of wr_n samples the analog input (given here directly as the
// code it converts to) and starts a conversion; CONV_NS later int_n goes low.
// While rd_n is low the data bus drives the code, valid DATA_NS after rd_n
// falls (the bus shows a wrong value before); rising rd_n releases int_n.
// Also counts conversions and reads.
module ad1061_model #(
  parameter int CONV_NS = 2000,
  parameter int DATA_NS = 40,
  parameter bit NEVER_ANSWER = 1'b0
) (
  input  logic       wr_n,
  input  logic       rd_n,
  output logic       int_n,
  output logic [9:0] data,
  input  logic [9:0] analog_code
);
  logic [9:0] held = '0;
  int conversions = 0;
  int reads = 0;

  initial begin
    int_n = 1'b1;
    data  = 10'h155;
  end

  always @(negedge wr_n) begin
    held = analog_code;
    conversions++;
    int_n = 1'b1;
    if (!NEVER_ANSWER) begin
      #(CONV_NS * 1ns);
      int_n = 1'b0;
    end
  end

  always @(negedge rd_n) begin
    data = ~held;
    #(DATA_NS * 1ns);
    data = held;
    reads++;
  end

  always @(posedge rd_n) begin
    int_n = 1'b1;
    data  = 10'h155;
  end
endmodule

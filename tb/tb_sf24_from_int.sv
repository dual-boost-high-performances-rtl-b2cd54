// tb_sf24_from_int - checks the integer-to-sfloat24 cast: the worked example
// 10 -> 0 10000010 010000000000000, every 10-bit code exhaustively (default
// unsigned instance), and random 24-bit signed integers (rounded).
module tb_sf24_from_int;
  import sf24_ref_pkg::*;

  logic [9:0]  i10;
  logic [23:0] i24;
  logic [23:0] r10, r24, e;
  int checks = 0, failures = 0;

  sf24_from_int dut (.i(i10), .r(r10));
  sf24_from_int #(.IW(24), .SIGNED(1'b1)) dut_s (.i(i24), .r(r24));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i10 = 10'b0000001010; i24 = '0;
    #1;
    checks++;
    if (r10 !== {1'b0, 8'b10000010, 15'b010000000000000}) begin
      failures++;
      $display("FAIL example: %b", r10);
    end
    for (int k = 0; k < 1024; k++) begin
      i10 = 10'(k);
      #1;
      e = from_real(real'(k));
      checks++;
      if (r10 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %h expected %h", k, r10, e);
      end
    end
    for (int k = 0; k < 20000; k++) begin
      i24 = 24'($urandom);
      if (k == 0) i24 = 24'h800000;
      if (k == 1) i24 = 24'hFFFFFF;
      #1;
      e = from_real(real'($signed(i24)));
      checks++;
      if (r24 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %h expected %h", $signed(i24), r24, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

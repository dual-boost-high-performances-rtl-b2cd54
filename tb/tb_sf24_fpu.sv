// tb_sf24_fpu - issues every opcode of the sfloat24 unit with random operands
// and checks each result (real-arithmetic reference rounded to sfloat24) and
// its latency; starts issued while a division is busy must be ignored.
module tb_sf24_fpu;
  import sf24_pkg::*;
  import sf24_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  sf24_op_e op;
  logic [23:0] a, b, r;
  logic [2:0] flags;
  int checks = 0, failures = 0;
  int n_op [8];

  always #5 clk = ~clk;

  sf24_fpu dut (.clk(clk), .rst_n(rst_n), .start(start), .op(op), .a(a), .b(b),
                .busy(busy), .done(done), .r(r), .flags(flags));

  task automatic run(sf24_op_e o, logic [23:0] ta, logic [23:0] tb_);
    int lat, elat;
    logic [23:0] e;
    logic [2:0]  ef;
    real x, y;
    @(negedge clk);
    op = o; a = ta; b = tb_; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat == 5) begin start = 1; op = OP_ADD; end    // ignored while busy
      if (lat == 6) start = 0;
    end
    x = to_real(ta); y = to_real(tb_);
    ef = '0; elat = 1;
    case (o)
      OP_ADD:   e = from_real(x + y);
      OP_SUB:   e = from_real(x - y);
      OP_MUL:   e = from_real(x * y);
      OP_DIV:   begin e = from_real(x * to_real(from_real(1.0 / y))); elat = (tb_[14:0] == 0) ? 3 : 23; end
      OP_RECIP: begin e = from_real(1.0 / x); elat = (ta[14:0] == 0) ? 2 : 22; end
      OP_CMP:   begin e = '0; ef = {x > y, x < y, x == y}; end
      OP_ITOF:  e = from_real(real'($signed(ta[15:0])));
      default:  e = {8'd0, 16'($rtoi(x))};
    endcase
    n_op[o]++;
    checks += 2;
    if (r !== e || (o == OP_CMP && flags !== ef)) begin
      failures++;
      if (failures < 10) $display("FAIL op %s %h %h -> %h/%b expected %h/%b", o.name(), ta, tb_, r, flags, e, ef);
    end
    if (lat != elat) begin failures++; if (failures < 10) $display("FAIL op %s latency %0d", o.name(), lat); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_ADD; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(OP_ITOF, 24'h00000A, 24'h0);      // 10 -> 0x412000
    checks++;
    if (r !== 24'h412000) failures++;
    run(OP_DIV, 24'h412000, 24'h400000);  // 10 / 2
    for (int k = 0; k < 4000; k++) begin
      sf24_op_e o;
      o = sf24_op_e'($urandom_range(7));
      if (o == OP_FTOI) run(o, rnd(120, 140), rnd(120, 140));
      else run(o, rnd(110, 150), rnd(110, 150));
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (n_op[k] < 100) begin failures++; $display("FAIL op %0d run %0d times", k, n_op[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

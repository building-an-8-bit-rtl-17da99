// alu_tb: exhaustive check of the 8-bit adder/subtractor. For every A, B
// and SU the sum and carry are compared with 9-bit integer arithmetic
// (A + B, or A + 256 - B whose bit 8 is the no-borrow carry). Includes the
// values shown in the build photographs: 25 + 71 = 96.
module alu_tb;
  logic [7:0] a, b, sum, bus_drv;
  logic su, eo, cy, bus_en;
  int checks = 0, failures = 0;

  alu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          int r;
          a = 8'(x); b = 8'(y); su = 1'(s); eo = 1'(x & 1);
          r = (s != 0) ? x + 256 - y : x + y;
          #1;
          check(sum == 8'(r) && cy == r[8], $sformatf("%0d %s %0d = %0d cy %b", x, (s != 0) ? "-" : "+", y, sum, cy));
          if (x == y) check(bus_drv == sum && bus_en == eo, "bus output");
        end
    a = 25; b = 71; su = 0; #1;
    check(sum == 96, "25 + 71 = 96");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

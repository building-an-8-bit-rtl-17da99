// display_rom_tb: checks all 2048 words of the display EEPROM. The expected
// digits come from repeated subtraction of 100 and 10, the expected
// segment patterns from the lit-segment letters of each numeral (a = D0 ..
// g = D6). Also checks the worked example 123 -> 0x4F 0x5B 0x06 0x00.
module display_rom_tb;
  logic [10:0] addr;
  logic [7:0]  data;
  int checks = 0, failures = 0;

  display_rom dut (.*);

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] segs(input int d);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < lit[d].len(); i++) p[3'(lit[d][i] - "a")] = 1'b1;
    return p;
  endfunction

  initial begin
    for (int mode = 0; mode < 2; mode++)
      for (int v = 0; v < 256; v++) begin
        int n, h, t;
        bit neg;
        neg = mode == 1 && v >= 128;
        n = neg ? 256 - v : v;
        h = 0; while (n >= 100) begin n -= 100; h++; end
        t = 0; while (n >= 10)  begin n -= 10;  t++; end
        for (int dg = 0; dg < 4; dg++) begin
          logic [7:0] exp;
          case (dg)
            0: exp = segs(n);
            1: exp = segs(t);
            2: exp = segs(h);
            default: exp = neg ? 8'b0100_0000 : 8'h00;
          endcase
          addr = {1'(mode), 2'(dg), 8'(v)};
          #1 check(data == exp, $sformatf("mode %0d value %0d digit %0d: %h expected %h", mode, v, dg, data, exp));
        end
      end
    addr = {1'b0, 2'd0, 8'd123}; #1 check(data == 8'b0100_1111, "123 digit 3");
    addr = {1'b0, 2'd1, 8'd123}; #1 check(data == 8'b0101_1011, "123 digit 2");
    addr = {1'b0, 2'd2, 8'd123}; #1 check(data == 8'b0000_0110, "123 digit 1");
    addr = {1'b0, 2'd3, 8'd123}; #1 check(data == 8'b0000_0000, "123 sign blank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

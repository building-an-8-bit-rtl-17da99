// output_module_tb: latches random values with OI and reads the four
// multiplexed digits back off the segment lines, decoding each pattern to a
// numeral; the decoded number must equal the latched value in unsigned and
// in signed mode (with the minus sign for negative values).
module output_module_tb;
  logic clk = 0, disp_clk = 0, rst = 1, oi = 0, signed_mode = 0;
  logic [7:0] bus_in = 0, value, seg;
  logic [3:0] dig_n;
  int checks = 0, failures = 0;

  output_module dut (.*);

  always #5 clk = ~clk;
  always #2 disp_clk = ~disp_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int numeral(input logic [7:0] p);
    logic [7:0] pat [10] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66, 8'h6D, 8'h7D, 8'h07, 8'h7F, 8'h6F};
    for (int d = 0; d < 10; d++) if (pat[d] == p) return d;
    return -1;
  endfunction

  initial begin
    #12 rst = 0;
    for (int i = 0; i < 100; i++) begin
      logic [7:0] v, shown [4];
      int n, exp;
      v = 8'($urandom);
      signed_mode = 1'($urandom);
      @(negedge clk);
      oi = 1; bus_in = v;
      @(negedge clk);
      oi = 0; bus_in = 8'($urandom);
      check(value == v, "output register latched");
      repeat (8) begin
        @(negedge disp_clk);
        for (int k = 0; k < 4; k++) if (dig_n == ~(4'b1 << k)) shown[k] = seg;
      end
      n = numeral(shown[2]) * 100 + numeral(shown[1]) * 10 + numeral(shown[0]);
      if (shown[3] == 8'h40) n = -n;
      else check(shown[3] == 8'h00, "sign digit blank or minus");
      exp = signed_mode ? int'($signed(v)) : int'(v);
      check(n == exp, $sformatf("displayed %0d expected %0d (signed %b)", n, exp, signed_mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

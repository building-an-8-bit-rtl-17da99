// display_scan_tb: the digit counter must cycle 0,1,2,3 on the display
// clock with exactly one active-low cathode selected, the one matching the
// count.
module display_scan_tb;
  logic disp_clk = 0, rst = 1;
  logic [1:0] digit;
  logic [3:0] dig_n;
  int checks = 0, failures = 0;

  display_scan dut (.*);

  always #5 disp_clk = ~disp_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 check(digit == 0, "reset");
    @(negedge disp_clk) rst = 0;
    for (int i = 0; i < 40; i++) begin
      int zeros;
      check(int'(digit) == i % 4, $sformatf("cycle %0d digit %0d", i, digit));
      zeros = 0;
      for (int k = 0; k < 4; k++) if (!dig_n[k]) zeros++;
      check(zeros == 1 && !dig_n[i % 4], $sformatf("cathodes %b", dig_n));
      @(negedge disp_clk);
    end
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

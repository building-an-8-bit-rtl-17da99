// program_counter_tb: random count-enable, jump and output-enable sequence
// against a tracked count; checks the wrap from 15 to 0 and jump priority.
module program_counter_tb;
  logic clk = 0, rst = 1, ce = 0, j = 0, co = 0, bus_en;
  logic [3:0] d = 0, q, exp;
  logic [7:0] bus_drv;
  int checks = 0, failures = 0, wraps = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 check(q == 0, "reset clears");
    @(negedge clk) rst = 0;
    exp = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ce = ($urandom % 4) != 0;
      j  = ($urandom % 6) == 0;
      co = 1'($urandom);
      d  = 4'($urandom);
      #1 check(bus_drv == {4'h0, q} && bus_en == co, "bus output");
      @(posedge clk);
      if (j) exp = d;
      else if (ce) begin
        if (exp == 15) wraps++;
        exp = exp + 1;
      end
      #1 check(q == exp, $sformatf("pc=%0d expected %0d", q, exp));
    end
    check(wraps > 0, "wrap never exercised");
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

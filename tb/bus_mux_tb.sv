// bus_mux_tb: with at most one enable set, the bus must carry the enabled
// driver's value, or 0 with none; random values on every driver.
module bus_mux_tb;
  logic clk = 0;
  logic [5:0][7:0] drv;
  logic [5:0] en = 6'b0;
  logic [7:0] bus;
  int checks = 0, failures = 0;

  bus_mux #(.N(6)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      int k;
      @(negedge clk);
      for (int j = 0; j < 6; j++) drv[j] = 8'($urandom);
      k = $urandom % 7;
      en = (k == 6) ? 6'b0 : 6'(1 << k);
      #1 check(bus == ((k == 6) ? 8'h00 : drv[k]), $sformatf("driver %0d: bus %h", k, bus));
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

// gp_register_tb: random load / hold / output-enable sequence on an 8-bit
// register, compared with a value tracked by the testbench; checks reset.
module gp_register_tb;
  logic clk = 0, rst = 1, load = 0, oe = 0, bus_en;
  logic [7:0] d = 0, q, bus_drv;
  logic [7:0] exp;
  int checks = 0, failures = 0;

  gp_register #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 check(q == 8'h00, "reset clears");
    @(negedge clk) rst = 0;
    exp = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      oe   = 1'($urandom);
      d    = 8'($urandom);
      #1 check(bus_en == oe && bus_drv == q, "output enable follows oe");
      @(posedge clk);
      if (load) exp = d;
      #1 check(q == exp, $sformatf("step %0d: q=%h expected %h", i, q, exp));
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

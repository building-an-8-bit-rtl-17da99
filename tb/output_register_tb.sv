// output_register_tb: random OI / bus sequence against a tracked value.
module output_register_tb;
  logic clk = 0, rst = 1, oi = 0;
  logic [7:0] d = 0, q, exp;
  int checks = 0, failures = 0;

  output_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 check(q == 0, "reset clears");
    @(negedge clk) rst = 0;
    exp = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      oi = ($urandom % 4) == 0;
      d  = 8'($urandom);
      @(posedge clk);
      if (oi) exp = d;
      #1 check(q == exp, $sformatf("q=%h expected %h", q, exp));
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

// memory_address_register_tb: random MI / data sequence against a tracked
// expected address; checks reset.
module memory_address_register_tb;
  logic clk = 0, rst = 1, mi = 0;
  logic [3:0] d = 0, q, exp;
  int checks = 0, failures = 0;

  memory_address_register dut (.*);

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
      mi = 1'($urandom);
      d  = 4'($urandom);
      @(posedge clk);
      if (mi) exp = d;
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

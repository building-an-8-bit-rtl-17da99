// step_counter_tb: checks that the step counter runs 0,1,2,3,4,0,... (five
// steps per instruction), that the decoded output is one-hot on the count,
// and that reset returns it to step 0 mid-instruction.
module step_counter_tb;
  logic clk = 0, rst = 1;
  logic [2:0] step;
  logic [7:0] step_onehot;
  int checks = 0, failures = 0;

  step_counter #(.STEPS(5)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 check(step == 0, "reset");
    @(negedge clk) rst = 0;
    for (int i = 0; i < 60; i++) begin
      check(int'(step) == i % 5, $sformatf("cycle %0d step %0d", i, step));
      check(step_onehot == 8'(1 << (i % 5)), "one-hot decode");
      @(negedge clk);
    end
    @(negedge clk);
    @(negedge clk);
    rst = 1;
    #1 check(step == 0, "asynchronous reset");
    @(negedge clk) rst = 0;
    @(negedge clk) check(step == 1, "counts after reset");
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

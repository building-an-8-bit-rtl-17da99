// instruction_register_tb: loads random instructions and checks the opcode
// and operand fields and the zero-filled low nibble offered to the bus.
module instruction_register_tb;
  logic clk = 0, rst = 1, ii = 0, io = 0, bus_en;
  logic [7:0] d = 0, bus_drv, exp;
  logic [3:0] opcode, operand;
  int checks = 0, failures = 0;

  instruction_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 check(opcode == 0 && operand == 0, "reset clears");
    @(negedge clk) rst = 0;
    exp = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ii = 1'($urandom);
      io = 1'($urandom);
      d  = 8'($urandom);
      @(posedge clk);
      if (ii) exp = d;
      #1;
      check(opcode == exp[7:4] && operand == exp[3:0], $sformatf("ir=%h%h expected %h", opcode, operand, exp));
      check(bus_drv == {4'h0, exp[3:0]} && bus_en == io, "bus output is the low nibble");
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

// flags_register_tb: random FI / carry / result sequence; the expected zero
// flag is computed by comparing the result with 0. A third of the results
// are 0 and a third have a single bit set, so every result bit is tested.
module flags_register_tb;
  logic clk = 0, rst = 1, fi = 0, cy = 0, cf, zf, ecf, ezf;
  logic [7:0] result = 1;
  int checks = 0, failures = 0, zeros = 0;

  flags_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 check(!cf && !zf, "reset clears");
    @(negedge clk) rst = 0;
    ecf = 0; ezf = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      fi = 1'($urandom);
      cy = 1'($urandom);
      case ($urandom % 3)
        0: result = 8'd0;
        1: result = 8'(1 << ($urandom % 8));   // one bit set: must not read as zero
        default: result = 8'($urandom);
      endcase
      @(posedge clk);
      if (fi) begin
        ecf = cy;
        ezf = (result == 8'd0);
        if (ezf) zeros++;
      end
      #1 check(cf == ecf && zf == ezf, $sformatf("flags c=%b z=%b expected %b %b", cf, zf, ecf, ezf));
    end
    check(zeros > 0, "zero result never stored");
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

// prog_run_select_tb: exhaustive check of the 4-bit selector (OUT = A when
// SELECT is high, B when low) and a random check of an 8-bit instance.
module prog_run_select_tb;
  logic       sel_a;
  logic [3:0] a, b, y;
  logic [7:0] a8, b8, y8;
  int checks = 0, failures = 0;

  prog_run_select #(.WIDTH(4)) dut (.*);
  prog_run_select #(.WIDTH(8)) dut8 (.sel_a (sel_a), .a (a8), .b (b8), .y (y8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel_a, a, b} = 9'(v);
      #1 check(y == (sel_a ? a : b), $sformatf("sel=%b a=%h b=%h y=%h", sel_a, a, b, y));
    end
    for (int i = 0; i < 100; i++) begin
      sel_a = 1'($urandom); a8 = 8'($urandom); b8 = 8'($urandom);
      #1 check(y8 == (sel_a ? a8 : b8), "8-bit selector");
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

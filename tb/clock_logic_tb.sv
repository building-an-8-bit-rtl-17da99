// clock_logic_tb: exhaustive check of the clock selection and halt gating
// against the expected truth table, plus a short waveform check that a
// halt holds the output low while the automatic clock keeps toggling.
module clock_logic_tb;
  logic clk_auto, clk_manual, sel_auto, hlt, clk_out;
  int checks = 0, failures = 0;

  clock_logic dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp;
      {clk_auto, clk_manual, sel_auto, hlt} = 4'(v);
      #1;
      if (hlt)           exp = 1'b0;
      else if (sel_auto) exp = clk_auto;
      else               exp = clk_manual;
      check(clk_out == exp, $sformatf("auto=%b man=%b sel=%b hlt=%b -> %b", clk_auto, clk_manual, sel_auto, hlt, clk_out));
    end
    sel_auto = 1; hlt = 0; clk_manual = 1;
    for (int t = 0; t < 8; t++) begin
      clk_auto = t[0];
      hlt = (t >= 4);
      #1 check(clk_out == (t[0] & (t < 4)), $sformatf("waveform t=%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

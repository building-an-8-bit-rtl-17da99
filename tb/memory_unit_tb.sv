// memory_unit_tb: writes all 16 bytes in program mode (switches and write
// button), reads them back through both address paths, then in run mode
// loads the address register from the bus, writes with RI on the clock and
// reads with RO, against a testbench copy of the memory. Also checks that
// the write button does nothing in run mode and that RI does nothing in
// program mode.
module memory_unit_tb;
  logic       clk = 0, rst = 1, prog_mode = 1, prog_write = 0, mi = 0, ri = 0, ro = 0, bus_en;
  logic [3:0] prog_addr = 0, mar_q, addr;
  logic [7:0] prog_data = 0, bus_in = 0, rdata, bus_drv;
  logic [7:0] shadow [16];
  int checks = 0, failures = 0;

  memory_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12 rst = 0;
    // program mode: switch entry
    for (int i = 0; i < 16; i++) begin
      prog_addr = 4'(i); prog_data = 8'($urandom); shadow[i] = prog_data;
      ri = 1;                       // must be ignored in program mode
      bus_in = ~prog_data;
      #3 prog_write = 1;
      #3 prog_write = 0;
      #3;
    end
    ri = 0;
    for (int i = 0; i < 16; i++) begin
      prog_addr = 4'(i);
      #1 check(addr == 4'(i) && rdata == shadow[i], $sformatf("program mode read %0d", i));
    end
    // run mode
    @(negedge clk) prog_mode = 0;
    for (int i = 0; i < 300; i++) begin
      logic [3:0] a;
      a = 4'($urandom);
      @(negedge clk);
      mi = 1; ri = 0; ro = 0; bus_in = {4'($urandom), a};
      @(negedge clk);
      mi = 0;
      check(mar_q == a && addr == a, "MAR loaded from bus LSBs");
      if ($urandom % 2 == 1) begin
        ri = 1; bus_in = 8'($urandom);
        prog_write = 1;             // must be ignored in run mode
        @(posedge clk);
        shadow[a] = bus_in;
        #1 prog_write = 0;
      end
      @(negedge clk);
      ri = 0; ro = 1;
      #1 check(rdata == shadow[a] && bus_drv == shadow[a] && bus_en, $sformatf("run mode read %0d = %h expected %h", a, rdata, shadow[a]));
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

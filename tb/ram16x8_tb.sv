// ram16x8_tb: fills all 16 words, reads them back, then runs random writes
// and reads against a testbench copy of the memory. Checks that a write
// with we low changes nothing.
module ram16x8_tb;
  logic       wclk = 0, we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] shadow [16];
  int checks = 0, failures = 0;

  ram16x8 dut (.*);

  always #5 wclk = ~wclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge wclk);
      we = 1; addr = 4'(i); wdata = 8'(i * 17 + 3);
      shadow[i] = wdata;
    end
    @(negedge wclk) we = 0;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1 check(rdata == shadow[i], $sformatf("word %0d = %h expected %h", i, rdata, shadow[i]));
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge wclk);
      we = 1'($urandom); addr = 4'($urandom); wdata = 8'($urandom);
      #1 check(rdata == shadow[addr], "read before the edge");
      @(posedge wclk);
      if (we) shadow[addr] = wdata;
      #1 check(rdata == shadow[addr], $sformatf("addr %0d = %h expected %h", addr, rdata, shadow[addr]));
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

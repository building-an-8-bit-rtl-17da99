// microcode_rom_tb: reads both control EEPROMs at every address and compares
// the 16-bit control word with the instruction table written here as lists
// of signal names (the LED order HLT MI RI RO IO II AI AO EO SU BI OI CE CO
// J FI gives the bit positions, HLT = bit 15). Conditional jumps are checked
// with each flag combination; the unused address bits A9-A10 must not
// matter.
module microcode_rom_tb;
  logic [10:0] addr;
  logic [7:0]  hi, lo;
  int checks = 0, failures = 0;

  microcode_rom #(.HALF(1'b0)) dut    (.addr (addr), .data (hi));
  microcode_rom #(.HALF(1'b1)) dut_lo (.addr (addr), .data (lo));

  string names [16] = '{"HLT","MI","RI","RO","IO","II","AI","AO","EO","SU","BI","OI","CE","CO","J","FI"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] bits(input string s);
    logic [15:0] w;
    string tok;
    w = 0;
    tok = "";
    for (int i = 0; i <= s.len(); i++) begin
      if (i == s.len() || s[i] == " ") begin
        if (tok != "") begin
          bit found;
          found = 0;
          for (int k = 0; k < 16; k++) if (names[k] == tok) begin w[15-k] = 1; found = 1; end
          if (!found) $display("unknown signal %s", tok);
        end
        tok = "";
      end else tok = {tok, s.substr(i, i)};
    end
    return w;
  endfunction

  // execute steps 3..5 of each opcode for carry flag c and zero flag z
  function automatic string exec_step(input int op, input int st, input bit c, input bit z);
    string t [16][3];
    t[0]  = '{"", "", ""};
    t[1]  = '{"IO MI", "RO AI", ""};
    t[2]  = '{"IO MI", "RO BI", "EO AI FI"};
    t[3]  = '{"IO MI", "RO BI", "EO AI SU FI"};
    t[4]  = '{"IO MI", "AO RI", ""};
    t[5]  = '{"IO AI", "", ""};
    t[6]  = '{"IO J", "", ""};
    t[7]  = '{c ? "IO J" : "", "", ""};
    t[8]  = '{z ? "IO J" : "", "", ""};
    t[9]  = '{"IO BI", "EO AI FI", ""};
    t[10] = '{"IO BI", "EO AI SU FI", ""};
    t[11] = '{"IO MI", "RO OI", "HLT"};
    t[12] = '{"", "", ""};
    t[13] = '{"", "", ""};
    t[14] = '{"AO OI", "", ""};
    t[15] = '{"HLT", "", ""};
    return t[op][st];
  endfunction

  initial begin
    for (int a = 0; a < 2048; a++) begin
      int st, op;
      bit c, z;
      string s;
      st = a % 8; op = (a / 8) % 16; c = a[7]; z = a[8];
      if (st == 0)      s = "MI CO";
      else if (st == 1) s = "RO II CE";
      else if (st <= 4) s = exec_step(op, st - 2, c, z);
      else              s = "";
      addr = 11'(a);
      #1 check({hi, lo} == bits(s), $sformatf("op %0d step %0d c%0b z%0b: %h expected %h (%s)", op, st + 1, c, z, {hi, lo}, bits(s), s));
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

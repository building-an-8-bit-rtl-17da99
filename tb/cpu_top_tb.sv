// cpu_top_tb: end-to-end test of the CPU at its default configuration.
//
// Programs are entered through program mode (address and data switches and
// the write button), then run in automatic mode. An instruction-level model
// in this testbench executes the same program; the testbench compares every
// value written to the output register, the halt, and the number of CPU
// clock cycles (five per instruction, two or four into a halting one).
// Programs: multiplication by repeated addition (six factor pairs), the
// Fibonacci sequence, powers of two, and a mixed program that covers
// immediates, the zero flag, free opcodes, OAH and a negative number on the
// signed display. A part of
// one run uses the single-step clock. Mechanisms that must occur at least
// once are counted: program-mode writes, halts, jump on carry taken and not
// taken, jump on zero taken and not taken, subtraction, manual clocking,
// the clock stopped by HLT, every bus driver and every opcode.
module cpu_top_tb;
  import cpu_pkg::*;

  logic       clk_auto = 0, clk_manual = 0, sel_auto = 1, rst = 1, prog_mode = 1;
  logic [3:0] prog_addr = 0;
  logic [7:0] prog_data = 0;
  logic       prog_write = 0, disp_clk = 0, signed_mode = 0;
  logic [7:0] seg, out_value, bus, a_q, b_q, alu_sum, ir, step_onehot, ram_data;
  logic [3:0] dig_n, pc, mar, ram_addr;
  logic [2:0] step;
  logic [1:0] flags;
  ctrl_t      ctrl;
  logic       cpu_clk, halted;

  cpu_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk_auto = ~clk_auto;
  always #3 disp_clk = ~disp_clk;

  // ---------------- instruction-level reference model ----------------
  logic [7:0] mm [16];
  logic [7:0] model_outs [$];
  bit         model_halted;
  int         model_cycles;

  task automatic run_model(input logic [7:0] prog [16], input int max_instr);
    logic [7:0] a, b;
    logic [3:0] p;
    bit c, z;
    logic [8:0] r;
    a = 0; b = 0; p = 0; c = 0; z = 0;
    for (int i = 0; i < 16; i++) mm[i] = prog[i];
    model_outs.delete();
    model_halted = 0;
    model_cycles = 0;
    for (int n = 0; n < max_instr; n++) begin
      logic [3:0] op, arg;
      op = mm[p][7:4]; arg = mm[p][3:0];
      p = p + 1;
      case (op)
        4'h1: a = mm[arg];
        4'h2, 4'h3, 4'h9, 4'hA: begin
          b = (op == 4'h2 || op == 4'h3) ? mm[arg] : {4'h0, arg};
          if (op == 4'h3 || op == 4'hA) r = {1'b0, a} + {1'b0, ~b} + 9'd1;
          else                          r = {1'b0, a} + {1'b0, b};
          a = r[7:0]; c = r[8]; z = (r[7:0] == 0);
        end
        4'h4: mm[arg] = a;
        4'h5: a = {4'h0, arg};
        4'h6: p = arg;
        4'h7: if (c) p = arg;
        4'h8: if (z) p = arg;
        4'hB: begin
          model_outs.push_back(mm[arg]);
          model_halted = 1; model_cycles += 4; return;
        end
        4'hE: model_outs.push_back(a);
        4'hF: begin model_halted = 1; model_cycles += 2; return; end
        default: ;
      endcase
      model_cycles += 5;
    end
  endtask

  // ---------------- observation of the design ----------------
  logic [7:0] dut_outs [$];
  int cyc;
  int n_prog_wr = 0, n_halt = 0, n_jc_t = 0, n_jc_n = 0, n_jz_t = 0, n_jz_n = 0;
  int n_sub = 0, n_manual = 0, n_stopped = 0, n_neg_disp = 0;
  int n_drv [6];
  int n_op [16];

  always @(posedge cpu_clk) begin
    cyc++;
    if (ctrl.oi) dut_outs.push_back(bus);
    if (ctrl.su && ctrl.eo) n_sub++;
    if (!sel_auto) n_manual++;
    if (ctrl.ao) n_drv[0]++;
    if (ctrl.eo) n_drv[2]++;
    if (ctrl.ro) n_drv[3]++;
    if (ctrl.io) n_drv[4]++;
    if (ctrl.co) n_drv[5]++;
  end

  // The first execute step is sampled on the falling clock edge, which also
  // occurs when HLT stops the clock in that step.
  always @(negedge cpu_clk) begin
    if (step == 3'd2 && !prog_mode) begin
      n_op[ir[7:4]]++;
      if (ir[7:4] == 4'h7) begin if (ctrl.j) n_jc_t++; else n_jc_n++; end
      if (ir[7:4] == 4'h8) begin if (ctrl.j) n_jz_t++; else n_jz_n++; end
    end
  end

  always @(posedge prog_write) if (prog_mode) n_prog_wr++;

  task automatic load_program(input logic [7:0] prog [16]);
    prog_mode = 1;
    rst = 1;
    #20 rst = 0;
    for (int i = 0; i < 16; i++) begin
      prog_addr = 4'(i);
      prog_data = prog[i];
      #4 prog_write = 1;
      #4 prog_write = 0;
      #2;
    end
    // read the RAM back through the program-mode address path
    for (int i = 0; i < 16; i++) begin
      prog_addr = 4'(i);
      #1 check(ram_data == prog[i], $sformatf("program byte %0d read back %h", i, ram_data));
    end
  endtask

  // Run from address 0 for at most max_cycles CPU clock cycles or until halt.
  task automatic run(input int max_cycles);
    dut_outs.delete();
    @(negedge clk_auto);
    cyc = 0;
    prog_mode = 0;
    while (cyc < max_cycles && !halted) begin
      @(posedge clk_auto or posedge clk_manual);
      #1;
    end
  endtask

  task automatic compare_outs(input string name);
    check(dut_outs.size() == model_outs.size(),
          $sformatf("%s: %0d outputs, expected %0d", name, dut_outs.size(), model_outs.size()));
    for (int i = 0; i < dut_outs.size() && i < model_outs.size(); i++)
      check(dut_outs[i] == model_outs[i],
            $sformatf("%s: output %0d is %0d, expected %0d", name, i, dut_outs[i], model_outs[i]));
  endtask

  function automatic logic [7:0] enc(input logic [3:0] op, input logic [3:0] arg);
    return {op, arg};
  endfunction

  logic [7:0] prog [16];

  initial begin
    // ---- 1. multiply X by Y by repeated addition ----
    prog = '{enc(4'h1,14), enc(4'h3,12), enc(4'h7,6), enc(4'h1,13), enc(4'hE,0), enc(4'hF,0),
             enc(4'h4,14), enc(4'h1,13), enc(4'h2,15), enc(4'h4,13), enc(4'h6,0), 8'h00,
             8'd1, 8'd0, 8'd5, 8'd7};
    load_program(prog);
    run_model(prog, 1000);
    run(2000);
    check(halted && model_halted, "multiply: halted");
    check(cyc == model_cycles, $sformatf("multiply: %0d cycles, expected %0d", cyc, model_cycles));
    compare_outs("multiply");
    check(out_value == 8'd35, $sformatf("multiply: 5*7 shows %0d", out_value));
    if (halted) n_halt++;
    // the clock must stay stopped while halted
    begin
      int c0, s0;
      c0 = cyc; s0 = int'(step);
      repeat (10) @(posedge clk_auto);
      check(cyc == c0 && int'(step) == s0 && cpu_clk == 1'b0, "multiply: clock stopped by HLT");
      if (cyc == c0) n_stopped++;
    end

    // more factor pairs with a product below 256, including a zero factor
    begin
      static int xs [5] = '{0, 1, 3, 12, 15};
      static int ys [5] = '{9, 1, 12, 21, 17};
      for (int k = 0; k < 5; k++) begin
        prog[14] = 8'(xs[k]);
        prog[15] = 8'(ys[k]);
        load_program(prog);
        run_model(prog, 1000);
        run(3000);
        check(halted && cyc == model_cycles, $sformatf("multiply %0d*%0d: halt after %0d cycles, expected %0d", xs[k], ys[k], cyc, model_cycles));
        compare_outs("multiply sweep");
        check(out_value == 8'(xs[k] * ys[k]), $sformatf("multiply %0d*%0d shows %0d", xs[k], ys[k], out_value));
        if (halted) n_halt++;
      end
    end

    // ---- 2. Fibonacci sequence, 40 instructions, then the first 60 ----
    prog = '{enc(4'h5,1), enc(4'h4,14), enc(4'h5,0), enc(4'h4,15), enc(4'hE,0), enc(4'h1,14),
             enc(4'h2,15), enc(4'h4,14), enc(4'hE,0), enc(4'h1,15), enc(4'h2,14), enc(4'h7,0),
             enc(4'h6,3), enc(4'hF,0), 8'h00, 8'h00};
    load_program(prog);
    run_model(prog, 200);
    run(5 * 200);
    check(!halted, "fibonacci: runs without halting");
    check(cyc == 1000, $sformatf("fibonacci: ran %0d cycles", cyc));
    compare_outs("fibonacci");
    begin
      static int fib [14] = '{0, 1, 1, 2, 3, 5, 8, 13, 21, 34, 55, 89, 144, 233};
      for (int i = 0; i < 14; i++)
        check(dut_outs.size() > i && dut_outs[i] == 8'(fib[i]), $sformatf("fibonacci term %0d", i));
      // after 233 the next sum overflows, JC restarts the program at 0
      check(dut_outs.size() > 14 && dut_outs[14] == 8'd0, "fibonacci restarts after overflow");
    end

    // ---- 3. powers of two ----
    prog = '{enc(4'h5,1), enc(4'h4,15), enc(4'h1,15), enc(4'hE,0), enc(4'h2,15), enc(4'h7,0),
             enc(4'h6,1), 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    load_program(prog);
    run_model(prog, 60);
    run(5 * 60);
    compare_outs("powers of two");
    for (int i = 0; i < 10; i++)
      check(dut_outs.size() > i && dut_outs[i] == 8'(1 << (i % 8)), $sformatf("power of two %0d", i));

    // ---- 4. mixed program, first part single-stepped ----
    prog = '{enc(4'h5,3), enc(4'hA,1), enc(4'h8,5), enc(4'hE,0), enc(4'h6,1), enc(4'h0,0),
             enc(4'hC,0), enc(4'hA,1), enc(4'hE,0), enc(4'h4,15), enc(4'h5,0), enc(4'h2,15),
             enc(4'hB,14), enc(4'hF,0), 8'd42, 8'h00};
    load_program(prog);
    run_model(prog, 100);
    signed_mode = 1;
    sel_auto = 0;
    dut_outs.delete();
    @(negedge clk_auto);
    cyc = 0;
    prog_mode = 0;
    repeat (12) begin
      #7 clk_manual = 1;
      #7 clk_manual = 0;
    end
    check(cyc == 12, $sformatf("mixed: %0d manual steps, expected 12", cyc));
    @(negedge clk_auto);
    sel_auto = 1;
    while (cyc < 1000 && !halted) begin
      @(posedge clk_auto);
      #1;
    end
    check(halted && model_halted, "mixed: halted by OAH");
    check(cyc == model_cycles, $sformatf("mixed: %0d cycles, expected %0d", cyc, model_cycles));
    compare_outs("mixed");
    check(out_value == 8'd42, "mixed: OAH output");
    if (halted) n_halt++;
    // -1 on the signed display: 0 + 2 - 3
    prog = '{enc(4'h5,0), enc(4'h9,2), enc(4'hA,3), enc(4'hE,0), enc(4'hF,0), 8'h00, 8'h00, 8'h00,
             8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    load_program(prog);
    run_model(prog, 100);
    run(100);
    compare_outs("signed");
    check(cyc == model_cycles, $sformatf("signed: %0d cycles, expected %0d", cyc, model_cycles));
    check(out_value == 8'hFF, "signed: output register holds -1");
    begin
      logic [7:0] shown [4];
      repeat (8) begin
        @(negedge disp_clk);
        for (int k = 0; k < 4; k++) if (dig_n == ~(4'b1 << k)) shown[k] = seg;
      end
      check(shown[0] == 8'h06 && shown[1] == 8'h3F && shown[2] == 8'h3F && shown[3] == 8'h40,
            $sformatf("signed display of -1: %h %h %h %h", shown[3], shown[2], shown[1], shown[0]));
      if (shown[3] == 8'h40) n_neg_disp++;
      signed_mode = 0;
      repeat (8) begin
        @(negedge disp_clk);
        for (int k = 0; k < 4; k++) if (dig_n == ~(4'b1 << k)) shown[k] = seg;
      end
      check(shown[0] == 8'h6D && shown[1] == 8'h6D && shown[2] == 8'h5B && shown[3] == 8'h00,
            $sformatf("unsigned display of 255: %h %h %h %h", shown[3], shown[2], shown[1], shown[0]));
    end

    // ---- mechanisms seen ----
    check(n_prog_wr > 0, "program-mode write never happened");
    check(n_halt >= 2, "halt not seen twice");
    check(n_stopped > 0, "clock never stopped by HLT");
    check(n_jc_t > 0, "jump on carry never taken");
    check(n_jc_n > 0, "jump on carry never skipped");
    check(n_jz_t > 0, "jump on zero never taken");
    check(n_jz_n > 0, "jump on zero never skipped");
    check(n_sub > 0, "subtraction never happened");
    check(n_manual > 0, "manual clock never used");
    check(n_neg_disp > 0, "negative number never displayed");
    foreach (n_drv[i]) if (i != 1) check(n_drv[i] > 0, $sformatf("bus driver %0d never used", i));
    foreach (n_op[i]) if (i != 13) check(n_op[i] > 0, $sformatf("opcode %h never executed", i));
    $display("mechanisms: prog_wr=%0d halt=%0d stopped=%0d jc=%0d/%0d jz=%0d/%0d sub=%0d manual=%0d neg_disp=%0d",
             n_prog_wr, n_halt, n_stopped, n_jc_t, n_jc_n, n_jz_t, n_jz_n, n_sub, n_manual, n_neg_disp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

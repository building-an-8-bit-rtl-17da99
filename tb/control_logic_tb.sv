// control_logic_tb: drives the opcode input as an instruction register
// would and checks the control word over whole instructions: the fetch
// steps, the execute steps of ADD and SUB, that FI stores the carry and
// zero flags computed from the ALU inputs, and that JC and JZ assert J only
// when their flag is set. Each instruction must take exactly five cycles.
module control_logic_tb;
  import cpu_pkg::*;
  logic       clk = 0, rst = 1, cy = 0, cf, zf;
  logic [3:0] opcode = 0;
  logic [7:0] alu_sum = 0, step_onehot;
  logic [2:0] step;
  ctrl_t      ctrl;
  int checks = 0, failures = 0, jumps = 0, skips = 0;

  control_logic dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Run one instruction (5 cycles) with opcode op; the ALU result presented
  // during the instruction is (res, c). Returns the J seen in step 3.
  task automatic run_instr(input logic [3:0] op, input logic [7:0] res, input logic c, output bit jumped);
    check(step == 0, "instruction starts at step 1");
    check(ctrl.mi && ctrl.co && !ctrl.ii, "fetch step 1 is MI CO");
    @(negedge clk);
    opcode = op;    // the instruction register loads at the end of step 2
    check(ctrl.ro && ctrl.ii && ctrl.ce, "fetch step 2 is RO II CE");
    @(negedge clk);
    alu_sum = res; cy = c;
    jumped = ctrl.j;
    repeat (3) begin
      if (ctrl.fi) check(ctrl.eo && ctrl.ai, "FI with EO AI");
      @(negedge clk);
    end
  endtask

  initial begin
    bit jumped, ec, ez;
    #12 @(negedge clk) rst = 0;
    ec = 0; ez = 0;
    for (int i = 0; i < 200; i++) begin
      logic [3:0] op;
      logic [7:0] r;
      logic c;
      case ($urandom % 4)
        0: op = OP_ADD;
        1: op = OP_SUB;
        2: op = OP_JC;
        default: op = OP_JZ;
      endcase
      r = ($urandom % 3 == 0) ? 8'd0 : 8'($urandom);
      c = 1'($urandom);
      run_instr(op, r, c, jumped);
      if (op == OP_JC) begin
        check(jumped == ec, $sformatf("JC with carry %b jumped %b", ec, jumped));
        if (jumped) jumps++; else skips++;
      end
      if (op == OP_JZ) begin
        check(jumped == ez, $sformatf("JZ with zero %b jumped %b", ez, jumped));
        if (jumped) jumps++; else skips++;
      end
      if (op == OP_ADD || op == OP_SUB) begin
        ec = c; ez = (r == 0);
      end
      check(cf == ec && zf == ez, "flags stored by FI");
    end
    check(jumps > 0 && skips > 0, "conditional jumps both taken and skipped");
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

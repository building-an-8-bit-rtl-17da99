// cpu_top: an 8-bit, bus-based, microcoded CPU with 16 bytes of RAM.
//
// All modules talk over one 8-bit bus. Per clock step exactly one module
// drives it (A, ALU, RAM, instruction-register low nibble, or program
// counter) and any number latch it (MAR, RAM, instruction register, A, B,
// output register, program counter, flags). Each instruction takes five
// clock cycles: two fetch steps (MI CO; RO II CE) and three execute steps
// decoded from the opcode and flags by the control EEPROMs.
//
// Clocking: the CPU clock is produced by the clock logic from an external
// automatic clock or single-step pulse, and is cut off while HLT is active,
// so the machine stops after HLT until rst. Every register updates on the
// rising edge of that clock. The display runs on its own disp_clk.
//
// Program mode (prog_mode = 1) holds the sequencer, program counter and
// registers in reset and lets the DIP-switch inputs write the RAM with the
// prog_write button; clearing prog_mode starts execution at address 0.
// Holding the CPU in reset during program mode is this implementation's
// choice. The B register's output enable is tied off because no control
// signal drives it. The timers, switches, LEDs and displays of the original
// are outside this module; their signals are its ports.
module cpu_top
  import cpu_pkg::*;
(
  input  logic       clk_auto,     // automatic clock
  input  logic       clk_manual,   // debounced single-step pulse
  input  logic       sel_auto,     // 1 = automatic clock
  input  logic       rst,          // reset
  input  logic       prog_mode,    // 1 = program mode, 0 = run mode
  input  logic [3:0] prog_addr,    // address DIP switch
  input  logic [7:0] prog_data,    // data DIP switch
  input  logic       prog_write,   // RAM write button (program mode)
  input  logic       disp_clk,     // display multiplex clock
  input  logic       signed_mode,  // display mode
  output logic [7:0] seg,          // segments of the selected digit
  output logic [3:0] dig_n,        // active-low digit select
  output logic [7:0] out_value,    // output register
  output logic [7:0] bus,          // bus (indicator LEDs)
  output logic [7:0] a_q,          // A register
  output logic [7:0] b_q,          // B register
  output logic [7:0] alu_sum,      // ALU result
  output logic [3:0] pc,           // program counter
  output logic [3:0] mar,          // memory address register
  output logic [3:0] ram_addr,     // address applied to the RAM
  output logic [7:0] ram_data,     // RAM word at that address
  output logic [7:0] ir,           // instruction register
  output logic [2:0] step,         // microinstruction step
  output logic [7:0] step_onehot,  // step LEDs
  output logic [1:0] flags,        // {zero, carry}
  output ctrl_t      ctrl,         // control word (control LEDs)
  output logic       cpu_clk,      // gated CPU clock
  output logic       halted        // HLT active
);

  logic             core_rst;
  logic [3:0]       opcode, operand;
  logic             cy, cf, zf;
  logic [N_DRV-1:0][7:0] drv;
  logic [N_DRV-1:0] en;

  assign core_rst = rst | prog_mode;

  clock_logic u_clock (
    .clk_auto (clk_auto), .clk_manual (clk_manual), .sel_auto (sel_auto),
    .hlt (ctrl.hlt), .clk_out (cpu_clk)
  );

  control_logic u_ctrl (
    .clk (cpu_clk), .rst (core_rst), .opcode (opcode), .cy (cy), .alu_sum (alu_sum),
    .ctrl (ctrl), .step (step), .step_onehot (step_onehot), .cf (cf), .zf (zf)
  );

  program_counter u_pc (
    .clk (cpu_clk), .rst (core_rst), .ce (ctrl.ce), .j (ctrl.j), .co (ctrl.co),
    .d (bus[3:0]), .q (pc), .bus_drv (drv[DRV_PC]), .bus_en (en[DRV_PC])
  );

  memory_unit u_mem (
    .clk (cpu_clk), .rst (core_rst), .prog_mode (prog_mode), .prog_addr (prog_addr),
    .prog_data (prog_data), .prog_write (prog_write), .mi (ctrl.mi), .ri (ctrl.ri),
    .ro (ctrl.ro), .bus_in (bus), .mar_q (mar), .addr (ram_addr), .rdata (ram_data),
    .bus_drv (drv[DRV_RAM]), .bus_en (en[DRV_RAM])
  );

  instruction_register u_ir (
    .clk (cpu_clk), .rst (core_rst), .ii (ctrl.ii), .io (ctrl.io), .d (bus),
    .opcode (opcode), .operand (operand), .bus_drv (drv[DRV_IR]), .bus_en (en[DRV_IR])
  );

  gp_register #(.WIDTH(8)) u_areg (
    .clk (cpu_clk), .rst (core_rst), .load (ctrl.ai), .oe (ctrl.ao), .d (bus),
    .q (a_q), .bus_drv (drv[DRV_A]), .bus_en (en[DRV_A])
  );

  gp_register #(.WIDTH(8)) u_breg (
    .clk (cpu_clk), .rst (core_rst), .load (ctrl.bi), .oe (1'b0), .d (bus),
    .q (b_q), .bus_drv (drv[DRV_B]), .bus_en (en[DRV_B])
  );

  alu u_alu (
    .a (a_q), .b (b_q), .su (ctrl.su), .eo (ctrl.eo), .sum (alu_sum), .cy (cy),
    .bus_drv (drv[DRV_ALU]), .bus_en (en[DRV_ALU])
  );

  bus_mux #(.N(N_DRV)) u_bus (.clk (cpu_clk), .drv (drv), .en (en), .bus (bus));

  output_module u_out (
    .clk (cpu_clk), .disp_clk (disp_clk), .rst (rst), .oi (ctrl.oi),
    .signed_mode (signed_mode), .bus_in (bus), .value (out_value), .seg (seg), .dig_n (dig_n)
  );

  assign ir     = {opcode, operand};
  assign flags  = {zf, cf};
  assign halted = ctrl.hlt;

endmodule

// control_logic: the sequencer that drives all control signals.
//
// A step counter walks through the five microinstruction steps of every
// instruction. Its count, the opcode from the instruction register and the
// two stored flags form the address of two control EEPROMs, whose 16 outputs
// are the control word for the current step. The flags register stores the
// ALU carry and zero-result on FI. All control signals are active high here;
// the original's inverters for active-low chip inputs have no counterpart.
//
// Timing: the control word is combinational from the registered step,
// opcode and flags, so it is valid through a clock period and acts at the
// rising edge that ends the step, the same edge that advances the step.
module control_logic
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] opcode,
  input  logic       cy,           // ALU carry out
  input  logic [7:0] alu_sum,      // ALU result, for the zero flag
  output ctrl_t      ctrl,
  output logic [2:0] step,
  output logic [7:0] step_onehot,
  output logic       cf,
  output logic       zf
);

  logic [10:0] rom_addr;

  step_counter #(.STEPS(STEPS)) u_step (
    .clk (clk), .rst (rst), .step (step), .step_onehot (step_onehot)
  );

  flags_register u_flags (
    .clk (clk), .rst (rst), .fi (ctrl.fi), .cy (cy), .result (alu_sum), .cf (cf), .zf (zf)
  );

  assign rom_addr = {2'b00, zf, cf, opcode, step};

  microcode_rom #(.HALF(1'b0)) u_rom_hi (.addr (rom_addr), .data (ctrl[15:8]));
  microcode_rom #(.HALF(1'b1)) u_rom_lo (.addr (rom_addr), .data (ctrl[7:0]));

endmodule

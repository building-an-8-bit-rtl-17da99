// instruction_register: holds the instruction being executed.
//
// On a rising edge with `ii` set it latches the whole 8-bit instruction from
// the bus. The upper nibble (opcode) goes only to the control logic; the
// lower nibble (address or immediate) can be put back on the bus with `io`.
// When it drives the bus, the upper four bus bits read as zero, so an
// immediate reaches the A or B register as a small positive number; this
// zero fill is this implementation's choice. Asynchronous clear on rst.
module instruction_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       ii,        // instruction register in
  input  logic       io,        // instruction register out (low nibble)
  input  logic [7:0] d,         // from the bus
  output logic [3:0] opcode,    // to the control logic
  output logic [3:0] operand,   // low nibble
  output logic [7:0] bus_drv,
  output logic       bus_en
);

  logic [7:0] ir;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     ir <= '0;
    else if (ii) ir <= d;
  end

  assign opcode  = ir[7:4];
  assign operand = ir[3:0];
  assign bus_drv = {4'b0000, ir[3:0]};
  assign bus_en  = io;

endmodule

// cpu_pkg: types and constants shared by the 8-bit bus CPU.
//
// The instruction format is a 4-bit opcode in the upper nibble and a 4-bit
// address or immediate in the lower nibble. The control word holds the 16
// control signals in the order they are labelled on the control-signal LED
// row (HLT first, FI last); every signal is active high. The bit order and
// the opcode numbers follow the original design; the enum and struct
// packaging is this implementation's own.
package cpu_pkg;

  localparam int unsigned STEPS = 5;   // microinstruction steps per instruction

  typedef enum logic [3:0] {
    OP_NOP = 4'b0000,
    OP_LDA = 4'b0001,
    OP_ADD = 4'b0010,
    OP_SUB = 4'b0011,
    OP_STA = 4'b0100,
    OP_LDI = 4'b0101,
    OP_JMP = 4'b0110,
    OP_JC  = 4'b0111,
    OP_JZ  = 4'b1000,
    OP_ADI = 4'b1001,
    OP_SUI = 4'b1010,
    OP_OAH = 4'b1011,   // output the byte at an address, then halt
    OP_U12 = 4'b1100,   // unused, behaves as NOP
    OP_U13 = 4'b1101,   // unused, behaves as NOP
    OP_OUT = 4'b1110,
    OP_HLT = 4'b1111
  } opcode_e;

  // Control word. Packed MSB first: {HLT..AO} is the first control EEPROM,
  // {EO..FI} the second.
  typedef struct packed {
    logic hlt;  // halt the clock
    logic mi;   // memory address register in
    logic ri;   // RAM in (write)
    logic ro;   // RAM out
    logic io;   // instruction register out (low nibble)
    logic ii;   // instruction register in
    logic ai;   // A register in
    logic ao;   // A register out
    logic eo;   // ALU sum out
    logic su;   // ALU subtract
    logic bi;   // B register in
    logic oi;   // output register in
    logic ce;   // program counter enable (increment)
    logic co;   // program counter out
    logic j;    // program counter in (jump)
    logic fi;   // flags register in
  } ctrl_t;

  // Bus driver slots, used to index the bus multiplexer.
  typedef enum int unsigned {
    DRV_A   = 0,
    DRV_B   = 1,
    DRV_ALU = 2,
    DRV_RAM = 3,
    DRV_IR  = 4,
    DRV_PC  = 5
  } bus_drv_e;
  localparam int unsigned N_DRV = 6;

endpackage

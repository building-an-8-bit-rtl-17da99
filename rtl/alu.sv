// alu: 8-bit adder/subtractor between the A and B registers.
//
// B passes through eight XOR gates controlled by SU: with SU low B is
// unchanged, with SU high it is inverted. SU also enters the carry input of
// the low 4-bit adder, so SU = 1 adds the two's complement of B and the
// result is A - B. The low adder's carry out feeds the high adder's carry
// in; the high adder's carry out is CY. For a subtraction CY = 1 means no
// borrow (A >= B unsigned). The result is offered to the bus when EO is set.
// All of this follows the original design; the block is combinational.
module alu (
  input  logic [7:0] a,        // A register
  input  logic [7:0] b,        // B register
  input  logic       su,       // subtract
  input  logic       eo,       // sum out
  output logic [7:0] sum,      // result (shown on LEDs)
  output logic       cy,       // carry out
  output logic [7:0] bus_drv,
  output logic       bus_en
);

  logic [7:0] b_x;
  logic       c_mid;

  assign b_x = b ^ {8{su}};

  adder4 u_lo (.a(a[3:0]), .b(b_x[3:0]), .cin(su),    .s(sum[3:0]), .cout(c_mid));
  adder4 u_hi (.a(a[7:4]), .b(b_x[7:4]), .cin(c_mid), .s(sum[7:4]), .cout(cy));

  assign bus_drv = sum;
  assign bus_en  = eo;

endmodule

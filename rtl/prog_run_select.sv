// prog_run_select: WIDTH-bit 2-to-1 selector choosing between the
// program-mode source (DIP switches, input a) and the run-mode source (CPU,
// input b). Each bit is OUT = (A & SELECT) | (B & ~SELECT), the gate form of
// one section of a 74LS157. Combinational.
module prog_run_select #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             sel_a,  // 1 selects a (program mode)
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  assign y = (a & {WIDTH{sel_a}}) | (b & {WIDTH{~sel_a}});

endmodule

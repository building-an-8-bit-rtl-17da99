// output_module: decimal output of an 8-bit number on four seven-segment
// displays.
//
// The output register latches the bus on OI (CPU clock). On the independent
// display clock a 2-bit counter cycles through the four digits; one display
// EEPROM turns {signed_mode, digit, value} into the segment pattern, and the
// decoded counter enables the matching display. The segments therefore show
// the ones, tens, hundreds and sign digit in turn, one display clock each.
module output_module (
  input  logic       clk,          // CPU clock
  input  logic       disp_clk,     // display multiplex clock
  input  logic       rst,
  input  logic       oi,
  input  logic       signed_mode,  // 1 = show as two's complement
  input  logic [7:0] bus_in,
  output logic [7:0] value,        // output register contents
  output logic [7:0] seg,          // segments D7..D0 (D0 = a)
  output logic [3:0] dig_n         // active-low cathodes
);

  logic [1:0] digit;

  output_register u_oreg (.clk (clk), .rst (rst), .oi (oi), .d (bus_in), .q (value));

  display_scan u_scan (.disp_clk (disp_clk), .rst (rst), .digit (digit), .dig_n (dig_n));

  display_rom u_rom (.addr ({signed_mode, digit, value}), .data (seg));

endmodule

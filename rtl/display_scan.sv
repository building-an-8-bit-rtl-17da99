// display_scan: digit multiplexing for the four seven-segment displays.
//
// A 2-bit counter, clocked by the display clock (a few kHz, independent of
// the CPU clock), selects one digit at a time. The count addresses the
// display EEPROM (A9-A8) and is decoded 2-to-4, active low, to pull the
// cathode of the selected display low, so exactly one display is lit.
// Persistence of vision shows all four. Counter and decoder follow the
// original design; the asynchronous reset is this implementation's
// addition.
module display_scan (
  input  logic       disp_clk,
  input  logic       rst,
  output logic [1:0] digit,    // to the display EEPROM
  output logic [3:0] dig_n     // active-low digit cathodes
);

  always_ff @(posedge disp_clk or posedge rst) begin
    if (rst) digit <= '0;
    else     digit <= digit + 2'd1;
  end

  assign dig_n = ~(4'b0001 << digit);

endmodule

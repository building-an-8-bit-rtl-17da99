// display_rom: the decimal display decoder EEPROM (2048 x 8).
//
// Address: A7-A0 the number to show, A9-A8 which digit (0 = ones, 1 = tens,
// 2 = hundreds, 3 = sign), A10 the mode (0 = unsigned 0..255, 1 = signed
// two's complement -128..127). Data: the seven-segment pattern of that
// digit, D0 = segment a up to D6 = segment g, D7 unused (0). Leading zeros
// are shown; the sign digit is blank except for a minus sign (segment g)
// on a negative number in signed mode.
//
// Example: 123 (0x7B) gives 0x4F, 0x5B, 0x06, 0x00 for digits 0..3.
// The address layout follows the original design; the segment order is
// inferred from its example and the leading-zero and minus-sign choices are
// this implementation's. The contents are computed when the memory is
// initialised. Read is combinational.
module display_rom #(
  parameter int unsigned ADDR_W = 11
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        data
);

  // gfedcba patterns of the decimal digits 0..9
  function automatic logic [7:0] seg7(input int unsigned d);
    case (d)
      0: return 8'h3F;
      1: return 8'h06;
      2: return 8'h5B;
      3: return 8'h4F;
      4: return 8'h66;
      5: return 8'h6D;
      6: return 8'h7D;
      7: return 8'h07;
      8: return 8'h7F;
      9: return 8'h6F;
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] pattern(input logic [10:0] a);
    int unsigned mag;
    logic        neg;
    neg = a[10] & a[7];
    mag = neg ? 256 - int'(a[7:0]) : int'(a[7:0]);
    case (a[9:8])
      2'd0: return seg7(mag % 10);
      2'd1: return seg7((mag / 10) % 10);
      2'd2: return seg7((mag / 100) % 10);
      default: return neg ? 8'h40 : 8'h00;
    endcase
  endfunction

  logic [7:0] rom [2**ADDR_W];

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) rom[a] = pattern(11'(a));
  end

  assign data = rom[addr];

endmodule

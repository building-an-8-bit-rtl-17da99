// microcode_rom: one of the two control EEPROMs (2048 x 8 each).
//
// The control logic translates {flags, opcode, step} into a 16-bit control
// word. Two identical 2048x8 parts share the address; HALF = 0 supplies the
// upper byte (HLT MI RI RO IO II AI AO) and HALF = 1 the lower byte
// (EO SU BI OI CE CO J FI). Address bits: A2-A0 step, A6-A3 opcode,
// A7 carry flag, A8 zero flag; A9 and A10 are unused and ignored.
//
// Microcode (steps numbered from 1; steps 1-2 are the common fetch):
//   fetch  1: MI CO          2: RO II CE
//   LDA    3: IO MI          4: RO AI
//   ADD    3: IO MI          4: RO BI      5: EO AI FI
//   SUB    3: IO MI          4: RO BI      5: EO AI SU FI
//   STA    3: IO MI          4: AO RI
//   LDI    3: IO AI
//   JMP    3: IO J
//   JC     3: IO J if carry flag set
//   JZ     3: IO J if zero flag set
//   ADI    3: IO BI          4: EO AI FI
//   SUI    3: IO BI          4: EO AI SU FI
//   OAH    3: IO MI          4: RO OI      5: HLT
//   OUT    3: AO OI
//   HLT    3: HLT
//   NOP and the two free opcodes: fetch only.
// The instruction table follows the original design; the conditional-jump
// steps, the address layout and the byte split by HALF are this
// implementation's reading. The contents are computed when the memory is
// initialised instead of being loaded from an image file. Read is
// combinational, like an EEPROM with its enables tied active.
module microcode_rom
  import cpu_pkg::*;
#(
  parameter bit          HALF   = 1'b0,
  parameter int unsigned ADDR_W = 11
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        data
);

  function automatic ctrl_t microcode(input logic [3:0] op, input logic [2:0] st,
                                      input logic c_flag, input logic z_flag);
    ctrl_t c;
    c = '0;
    case (st)
      3'd0: begin c.mi = 1'b1; c.co = 1'b1; end
      3'd1: begin c.ro = 1'b1; c.ii = 1'b1; c.ce = 1'b1; end
      3'd2: begin
        case (op)
          OP_LDA, OP_ADD, OP_SUB, OP_STA, OP_OAH: begin c.io = 1'b1; c.mi = 1'b1; end
          OP_LDI:         begin c.io = 1'b1; c.ai = 1'b1; end
          OP_JMP:         begin c.io = 1'b1; c.j  = 1'b1; end
          OP_JC:          begin c.io = c_flag; c.j = c_flag; end
          OP_JZ:          begin c.io = z_flag; c.j = z_flag; end
          OP_ADI, OP_SUI: begin c.io = 1'b1; c.bi = 1'b1; end
          OP_OUT:         begin c.ao = 1'b1; c.oi = 1'b1; end
          OP_HLT:         c.hlt = 1'b1;
          default: ;
        endcase
      end
      3'd3: begin
        case (op)
          OP_LDA:         begin c.ro = 1'b1; c.ai = 1'b1; end
          OP_ADD, OP_SUB: begin c.ro = 1'b1; c.bi = 1'b1; end
          OP_STA:         begin c.ao = 1'b1; c.ri = 1'b1; end
          OP_ADI:         begin c.eo = 1'b1; c.ai = 1'b1; c.fi = 1'b1; end
          OP_SUI:         begin c.eo = 1'b1; c.ai = 1'b1; c.su = 1'b1; c.fi = 1'b1; end
          OP_OAH:         begin c.ro = 1'b1; c.oi = 1'b1; end
          default: ;
        endcase
      end
      3'd4: begin
        case (op)
          OP_ADD: begin c.eo = 1'b1; c.ai = 1'b1; c.fi = 1'b1; end
          OP_SUB: begin c.eo = 1'b1; c.ai = 1'b1; c.su = 1'b1; c.fi = 1'b1; end
          OP_OAH: c.hlt = 1'b1;
          default: ;
        endcase
      end
      default: ;
    endcase
    return c;
  endfunction

  logic [7:0] rom [2**ADDR_W];

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) begin
      logic [15:0] word;
      word = microcode(4'(a >> 3), 3'(a), a[7], a[8]);
      rom[a] = HALF ? word[7:0] : word[15:8];
    end
  end

  assign data = rom[addr];

endmodule

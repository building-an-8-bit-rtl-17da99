// clock_logic: CPU clock selection and halt gating.
//
// Two clock sources arrive from outside: a free-running astable clock for
// automatic mode and a debounced push-button pulse for single stepping. A
// mode select passes one of them; the halt signal from the control logic
// then disconnects the clock, so the machine stops once a HLT
// microinstruction is reached and stays stopped until it is reset.
//
//   clk_out = ((clk_auto & sel_auto) | (clk_manual & ~sel_auto)) & ~hlt
//
// The gate network (two ANDs into an OR, then an AND with inverted HLT)
// follows the original design. Modelling the two throws of the selector
// switch as one select line is this implementation's choice. The block is
// purely combinational; clk_out is used as the clock of the whole CPU.
module clock_logic (
  input  logic clk_auto,    // automatic clock (astable timer)
  input  logic clk_manual,  // single-step pulse (debounced button)
  input  logic sel_auto,    // 1 = automatic mode, 0 = manual mode
  input  logic hlt,         // halt: 1 disconnects the clock
  output logic clk_out      // CPU clock
);

  logic auto_path, manual_path, selected;

  always_comb begin
    auto_path   = clk_auto & sel_auto;
    manual_path = clk_manual & ~sel_auto;
    selected    = auto_path | manual_path;
    clk_out     = selected & ~hlt;
  end

endmodule

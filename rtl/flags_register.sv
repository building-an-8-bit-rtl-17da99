// flags_register: carry and zero flags for the conditional jumps.
//
// The zero detect is an 8-input NOR of the ALU result (the original builds
// it from NOR and AND gates); the carry comes from the ALU. Both are stored
// on a rising edge with FI set, which the microcode asserts in the same step
// that writes the ALU result into A. The stored flags address the control
// EEPROMs. Testing the ALU result rather than A's previous contents is this
// implementation's reading, so that the zero flag describes the value A
// receives. Asynchronous clear on rst.
module flags_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       fi,       // flags in
  input  logic       cy,       // ALU carry out
  input  logic [7:0] result,   // ALU result tested for zero
  output logic       cf,       // carry flag
  output logic       zf        // zero flag
);

  logic zero;

  assign zero = ~|result;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cf <= 1'b0;
      zf <= 1'b0;
    end else if (fi) begin
      cf <= cy;
      zf <= zero;
    end
  end

endmodule

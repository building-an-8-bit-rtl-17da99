// output_register: 8-bit register holding the number on the display.
//
// Latches the bus on a rising CPU clock edge with OI set and keeps showing
// it until the next OI. It only listens to the bus and never drives it.
// Asynchronous clear on rst (this implementation's addition).
module output_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       oi,      // output register in
  input  logic [7:0] d,       // from the bus
  output logic [7:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (oi) q <= d;
  end

endmodule

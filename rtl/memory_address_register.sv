// memory_address_register: 4-bit register holding the RAM address in run
// mode. Latches the four least significant bus bits on a rising edge with
// `mi` set; its output goes to the run-mode input of the address selector.
// Asynchronous clear on rst (this implementation's addition).
module memory_address_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       mi,     // memory address register in
  input  logic [3:0] d,      // bus bits 3..0
  output logic [3:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (mi) q <= d;
  end

endmodule

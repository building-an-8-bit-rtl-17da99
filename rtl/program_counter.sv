// program_counter: 4-bit program counter (instruction pointer).
//
// Synchronous counter in the manner of a 74LS161: on a rising edge it loads
// the bus LSBs when J is set (jump), otherwise increments when CE is set,
// wrapping from 15 to 0. CO puts the count on the bus LSBs (upper bits 0).
// The count is always visible on q. Asynchronous clear on rst, so execution
// starts at address 0.
module program_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,       // counter enable
  input  logic       j,        // jump: load from bus
  input  logic       co,       // counter out
  input  logic [3:0] d,        // bus bits 3..0
  output logic [3:0] q,
  output logic [7:0] bus_drv,
  output logic       bus_en
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (j)  q <= d;
    else if (ce) q <= q + 4'd1;
  end

  assign bus_drv = {4'b0000, q};
  assign bus_en  = co;

endmodule

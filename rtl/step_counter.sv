// step_counter: microinstruction step counter.
//
// Counts the steps of one instruction: 0 .. STEPS-1, then back to 0 (five
// steps per instruction; the 3-bit counter has room for eight). Steps 0 and 1
// are the fetch, the rest the execute phase. The count is also decoded
// 3-to-8, one-hot, for the step indicator LEDs. It advances on every rising
// CPU clock edge; the control signals of a step are decoded from the count
// during that step and take effect at the edge that ends it. Asynchronous
// clear on rst.
module step_counter #(
  parameter int unsigned STEPS = 5
) (
  input  logic       clk,
  input  logic       rst,
  output logic [2:0] step,
  output logic [7:0] step_onehot
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                      step <= '0;
    else if (step == 3'(STEPS-1)) step <= '0;
    else                          step <= step + 3'd1;
  end

  assign step_onehot = 8'b1 << step;

endmodule

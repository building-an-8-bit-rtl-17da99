// bus_mux: the shared 8-bit bus.
//
// In the original every module reaches the bus through a tri-state
// transceiver and the control logic must enable at most one of them. Here
// each driver offers its value with an enable and the bus is the OR of the
// enabled values; with no driver enabled the bus reads 0. An assertion,
// checked at each rising clock edge, flags two drivers enabled at once.
module bus_mux #(
  parameter int unsigned N = 6
) (
  input  logic             clk,         // used only by the assertion
  input  logic [N-1:0][7:0] drv,
  input  logic [N-1:0]      en,
  output logic [7:0]        bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++) begin
      if (en[i]) bus |= drv[i];
    end
  end

  a_one_driver: assert property (@(posedge clk) $onehot0(en))
    else $error("bus contention: drivers %b enabled together", en);

endmodule

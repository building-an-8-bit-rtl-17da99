// gp_register: general-purpose bus register (the A and B registers).
//
// Stores a WIDTH-bit word. On a rising clock edge with `load` set it takes
// the value on the bus. The stored value is always visible on `q` (it feeds
// the ALU and the indicator LEDs); a separate output enable `oe` offers it to
// the bus, standing in for the tri-state transceiver of the original design.
// `rst` clears the register asynchronously (the original ties its clear
// input low; the reset is this implementation's addition).
//
// Timing: q changes one clock edge after load is sampled high.
module gp_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,     // AI / BI
  input  logic             oe,       // AO / BO
  input  logic [WIDTH-1:0] d,        // from the bus
  output logic [WIDTH-1:0] q,        // stored value
  output logic [WIDTH-1:0] bus_drv,  // value offered to the bus
  output logic             bus_en    // 1 when this register drives the bus
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

  assign bus_drv = q;
  assign bus_en  = oe;

endmodule

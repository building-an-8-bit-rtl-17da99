// ram16x8: 16-word by 8-bit static RAM.
//
// The original uses two 16x4 RAM chips side by side (low and high nibble,
// common address) whose outputs are inverted by the chip and inverted back
// by hex inverters; the net behaviour is a plain 16x8 memory, which is what
// this array models. A write happens on the rising edge of `wclk` when `we`
// is set; the read port is asynchronous, as in the original chips. The
// contents are not cleared by reset.
module ram16x8 #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     wclk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule

// memory_unit: the RAM module with its program/run selection logic.
//
// Run mode (prog_mode = 0): the memory address register (MAR) latches the
// bus LSBs on MI, the RAM is addressed by the MAR, written from the bus on
// the rising CPU clock edge when RI is set, and put on the bus with RO.
// Program mode (prog_mode = 1): the RAM is addressed by a 4-way DIP switch,
// written with the byte on an 8-way DIP switch, and the write happens on the
// rising edge of the write button. Three sets of 2-to-1 selectors pick the
// address, the data and the write strobe.
//
// The MAR, the selectors for address and data, the clock-gated run-mode
// write and the button write follow the original design. Routing the
// write strobe through a selector (button in program mode, clock with RI in
// run mode) is this implementation's reading of how the two are combined.
// The write strobe is a selected clock: in run mode it is the CPU clock
// itself, so run-mode writes land on the same edge as every other register.
module memory_unit (
  input  logic       clk,         // CPU clock
  input  logic       rst,
  input  logic       prog_mode,   // 1 = program mode
  input  logic [3:0] prog_addr,   // DIP switch address
  input  logic [7:0] prog_data,   // DIP switch data
  input  logic       prog_write,  // write button (debounced)
  input  logic       mi,
  input  logic       ri,
  input  logic       ro,
  input  logic [7:0] bus_in,
  output logic [3:0] mar_q,
  output logic [3:0] addr,        // address applied to the RAM
  output logic [7:0] rdata,
  output logic [7:0] bus_drv,
  output logic       bus_en
);

  logic [7:0] wdata;
  logic [1:0] wr_sel;   // {write clock, write enable}

  memory_address_register u_mar (
    .clk (clk), .rst (rst), .mi (mi), .d (bus_in[3:0]), .q (mar_q)
  );

  prog_run_select #(.WIDTH(4)) u_sel_addr (
    .sel_a (prog_mode), .a (prog_addr), .b (mar_q), .y (addr)
  );

  prog_run_select #(.WIDTH(8)) u_sel_data (
    .sel_a (prog_mode), .a (prog_data), .b (bus_in), .y (wdata)
  );

  prog_run_select #(.WIDTH(2)) u_sel_wr (
    .sel_a (prog_mode), .a ({prog_write, 1'b1}), .b ({clk, ri}), .y (wr_sel)
  );

  ram16x8 u_ram (
    .wclk (wr_sel[1]), .we (wr_sel[0]), .addr (addr), .wdata (wdata), .rdata (rdata)
  );

  assign bus_drv = rdata;
  assign bus_en  = ro;

endmodule

// sram_model: behavioural model of the frame store, two 128K x 8
// asynchronous SRAM chips sharing address, write, output-enable and data pins,
// each with its own active-low chip enable (cs0 for the chip holding addresses
// with bit 17 = 1, cs1 for the other). Not synthesizable; for testbenches.
//
// Reads are combinational: while a chip is enabled, oe_n is low and wr_n is
// high, it drives data_o with the addressed byte. A write stores data_i at the
// falling edge of wr_n (address and data are already stable then; the design
// holds them through the whole strobe). The model counts writes and reports
// on drive when a chip drives the bus, so that a testbench can check for
// contention with the controller (data_t low).
module sram_model (
  input  logic [16:0] addr,
  input  logic        cs0_n,
  input  logic        cs1_n,
  input  logic        wr_n,
  input  logic        oe_n,
  input  logic [7:0]  data_i,     // from the controller
  output logic [7:0]  data_o,     // to the controller
  output logic        drive,      // a chip is driving data_o
  output int          writes
);

  logic [7:0] chip_hi [1 << 17];  // enabled by cs0_n (bit 17 = 1)
  logic [7:0] chip_lo [1 << 17];  // enabled by cs1_n (bit 17 = 0)

  initial begin
    writes = 0;
    for (int i = 0; i < (1 << 17); i++) begin
      chip_hi[i] = 8'h00;
      chip_lo[i] = 8'h00;
    end
  end

  assign drive  = (!cs0_n || !cs1_n) && !oe_n && wr_n;
  assign data_o = !cs0_n ? chip_hi[addr] : chip_lo[addr];

  always @(negedge wr_n) begin
    writes = writes + 1;
    if (!cs0_n) chip_hi[addr] = data_i;
    if (!cs1_n) chip_lo[addr] = data_i;
  end

  // Direct access for checks: full 18-bit frame-store address.
  function automatic logic [7:0] peek(input logic [17:0] a);
    return a[17] ? chip_hi[a[16:0]] : chip_lo[a[16:0]];
  endfunction

endmodule

// dpmem128: 128 x 8 dual-port RAM (one write port, two read ports).
//
// A write of di to address a happens on the rising clock edge when we is high.
// Both read ports are asynchronous: spo shows the word at a, dpo the word at
// dpra, with no clock in the path (a distributed, LUT-style RAM). A read of the
// address being written returns the old word until the clock edge. The port
// names follow the RAM macro used inside the FIFO; the depth and word width are
// parameters with the macro's 128 x 8 as defaults. Contents are not reset.
module dpmem128 #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    a,      // write address and first read address
  input  logic [WIDTH-1:0] di,
  input  logic [AW-1:0]    dpra,   // second read address
  output logic [WIDTH-1:0] spo,    // word at a
  output logic [WIDTH-1:0] dpo     // word at dpra
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= di;
  end

  assign spo = mem[a];
  assign dpo = mem[dpra];

endmodule

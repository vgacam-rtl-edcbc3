// counter: modulo counter with clock enable, synchronous clear and terminal count.
//
// Used for the FIFO read and write pointers (a 7-bit counter that wraps at 127)
// and for the VGA horizontal and vertical counters (0..759 and 0..527). On each
// rising clock edge the count clears to zero when sclr is high; otherwise, when
// en is high, it advances by one and returns to zero after COUNT_TO. term_cnt is
// high, combinationally, while the count equals COUNT_TO. sclr wins over en.
// The count wrapping at COUNT_TO and the terminal-count output follow the
// counter macros of the design; the synchronous clear and its priority over
// the enable are this implementation's reading of the FIFO's SYNC_CTRL pin.
module counter #(
  parameter int unsigned WIDTH    = 7,
  parameter int unsigned COUNT_TO = 127
) (
  input  logic             clk,
  input  logic             sclr,      // synchronous clear
  input  logic             en,        // count enable
  output logic [WIDTH-1:0] q,
  output logic             term_cnt   // q == COUNT_TO
);

  localparam logic [WIDTH-1:0] LAST = WIDTH'(COUNT_TO);

  assign term_cnt = (q == LAST);

  always_ff @(posedge clk) begin
    if (sclr)          q <= '0;
    else if (en)       q <= term_cnt ? '0 : q + 1'b1;
  end

endmodule

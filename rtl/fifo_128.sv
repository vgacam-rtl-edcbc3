// fifo_128: 128-entry byte FIFO between the camera capture logic and the
// frame-store writer (both in the system clock domain).
//
// Two 7-bit counters hold the write and read pointers. A write stores datain at
// the write pointer and advances it; a read advances the read pointer. The word
// at the read pointer is always shown on dataout through the RAM's asynchronous
// read port, so the head of the queue is visible before it is popped (a
// "show-ahead" FIFO). empty is the equality of the two pointers. A synchronous
// reset clears both pointers and so empties the queue.
//
// As in the design this follows, there is no full flag: the producer must never
// run more than 127 entries ahead of the consumer, or the queue wraps and looks
// empty. The assertion below reports such an overflow in simulation. The
// structure (two counters, dual-port RAM, equality compare, reset OR-ed into
// the counter enables) is the design's; the assertion is an addition.
module fifo_128 #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             reset,    // synchronous, empties the FIFO
  input  logic             write,
  input  logic             read,
  input  logic [WIDTH-1:0] datain,
  output logic [WIDTH-1:0] dataout,  // word at the head of the queue
  output logic             empty
);

  logic [AW-1:0]    wr_cnt, re_cnt;
  logic [WIDTH-1:0] spo_unused;
  logic             wr_wrap_unused, re_wrap_unused;

  counter #(.WIDTH(AW), .COUNT_TO(DEPTH - 1)) u_wr_cnt (
    .clk, .sclr(reset), .en(write | reset), .q(wr_cnt), .term_cnt(wr_wrap_unused)
  );

  counter #(.WIDTH(AW), .COUNT_TO(DEPTH - 1)) u_re_cnt (
    .clk, .sclr(reset), .en(read | reset), .q(re_cnt), .term_cnt(re_wrap_unused)
  );

  dpmem128 #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
    .clk, .we(write), .a(wr_cnt), .di(datain), .dpra(re_cnt),
    .spo(spo_unused), .dpo(dataout)
  );

  assign empty = (wr_cnt == re_cnt);

  // Occupancy, for the overflow check only.
  logic [AW-1:0] level;
  assign level = wr_cnt - re_cnt;

  always_ff @(posedge clk) begin
    if (!reset) begin
      assert (!(write && !read && level == AW'(DEPTH - 1)))
        else $error("fifo_128: write into a full FIFO");
      assert (!(read && empty))
        else $error("fifo_128: read from an empty FIFO");
    end
  end

endmodule

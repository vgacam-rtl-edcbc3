// camera_test: frame-store writer for the camera path.
//
// Takes pixels from the head of the FIFO and writes the top-left 256 x 256 of
// each camera frame into the frame store, discarding the rest of every line and
// every line past the 256th. A column counter (hcnt) and a row counter (vcnt),
// both 9 bits, track the position of the pixel at the FIFO head; a camera line
// is LINESIZE+1 pixels long, so hcnt returns to 0 after LINESIZE and vcnt steps.
//
// Each cycle, when the FIFO is not empty:
//   * inside the window (hcnt < 256 and vcnt < 256) write is raised with the
//     address {vcnt[7:0], hcnt[7:0]}; the pixel is popped (re) only if the
//     memory did not answer busy in the same cycle, otherwise the same write is
//     offered again next cycle;
//   * outside the window the pixel is popped at once and not written.
// frame_end is high while vcnt == 256, i.e. once the whole window has been
// written and until the next frame start. fst (frame start) clears both
// counters synchronously and suppresses write and re.
//
// Behaviour, signal names and LINESIZE follow the design description; the
// separate row/column address outputs of 8 bits each are as described.
module camera_test
  import vgacam_pkg::*;
#(
  parameter int unsigned LINESIZE = CAM_LINESIZE
) (
  input  logic       clk,
  input  logic       empty,       // FIFO empty
  input  logic       fst,         // frame start (synchronous clear)
  input  logic       busy,        // memory refused this cycle's write
  output logic [7:0] addr_low,    // column
  output logic [7:0] addr_high,   // row
  output logic       write,       // write request to memory
  output logic       re,          // pop the FIFO
  output logic       frame_end
);

  logic [8:0] hcnt, vcnt;
  logic [8:0] hcnt_d, vcnt_d;
  logic       in_image;

  assign in_image  = (hcnt < 9'(IMG_SIZE)) && (vcnt < 9'(IMG_SIZE));
  assign addr_low  = hcnt[7:0];
  assign addr_high = vcnt[7:0];
  assign frame_end = (vcnt == 9'(IMG_SIZE));

  always_comb begin
    write  = 1'b0;
    re     = 1'b0;
    hcnt_d = hcnt;
    vcnt_d = vcnt;
    if (!fst && !empty) begin
      write = in_image;
      if (!busy || !in_image) begin
        re = 1'b1;
        if (hcnt >= 9'(LINESIZE)) begin
          hcnt_d = '0;
          vcnt_d = vcnt + 1'b1;
        end else begin
          hcnt_d = hcnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fst) begin
      hcnt <= '0;
      vcnt <= '0;
    end else begin
      hcnt <= hcnt_d;
      vcnt <= vcnt_d;
    end
  end

endmodule

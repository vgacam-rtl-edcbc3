// blankpixel: blanking gate for the pixel stream.
//
// Passes the 8-bit pixel from memory to the output register, or forces it to
// zero (black) while blank is high, i.e. outside the 256 x 256 picture window
// and during the sync intervals. Combinational; as in the design description.
module blankpixel
  import vgacam_pkg::*;
(
  input  pixel_t datain,
  input  logic   blank,
  output pixel_t dataout
);

  assign dataout = blank ? '0 : datain;

endmodule

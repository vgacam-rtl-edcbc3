// syncgen: VGA sync decoder.
//
// With a line of 760 pixel clocks (hcnt 0..759) and a frame of 528 lines
// (vcnt 0..527), the syncs are placed in the middle of the blanking intervals,
// which centres the picture on the screen:
//   hsync is low (active) for hcnt 582..674 inclusive,
//   vsync is low (active) for lines 490 and 491.
// Only vcnt[9:1] is needed, since the vertical pulse covers one even/odd line
// pair (vcnt[9:1] == 245). Both outputs are combinational. The windows are the
// design's numbers; the module only decodes them.
module syncgen
  import vgacam_pkg::*;
(
  input  logic [9:0] hcnt,
  input  logic [9:1] vcnt,
  output logic       hsync,   // active low
  output logic       vsync    // active low
);

  assign hsync = !((hcnt >= 10'(HSYNC_FIRST)) && (hcnt <= 10'(HSYNC_LAST)));
  assign vsync = !(vcnt == 9'(VSYNC_PAIR));

endmodule

// vgacontrol8: VGA timing generator and 8-bit pixel output.
//
// A horizontal counter runs 0..759 on every clock; its terminal count enables
// the vertical counter, which runs 0..527. Both counts are outputs, and the top
// level builds the frame-store read address from their low eight bits. syncgen
// decodes hsync and vsync from the counts (combinational, straight to the
// pads). endframe is the inverse of vsync: high during the two vertical-sync
// lines, and used as the monitor's "frame finished" flag. The pixel read from
// memory is gated to zero by blank (blankpixel) and registered once on its way
// to the 8-bit RGB pad (pad_rgb), which drives an external video DAC.
//
// Timing: the counts of cycle n address memory; the pixel arrives in cycle n+1
// (with blank aligned to it by the top level) and appears on pad_rgb from edge
// n+2. The syncs are not delayed, so the picture lies two clocks to the right
// of the sync timing. Counter limits, sync decoding and the output register
// follow the design; rst (power-up clearing of the counters) is an addition.
module vgacontrol8
  import vgacam_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       blank,
  input  pixel_t     pixel,
  output logic [9:0] hcnt,
  output logic [9:0] vcnt,
  output logic       endframe,
  output logic       pad_hsync,
  output logic       pad_vsync,
  output pixel_t     pad_rgb
);

  logic   h_term, v_term_unused;
  pixel_t blanked;

  counter #(.WIDTH(10), .COUNT_TO(H_COUNT_TO)) u_hcounter (
    .clk, .sclr(rst), .en(1'b1), .q(hcnt), .term_cnt(h_term)
  );

  counter #(.WIDTH(10), .COUNT_TO(V_COUNT_TO)) u_vcounter (
    .clk, .sclr(rst), .en(h_term), .q(vcnt), .term_cnt(v_term_unused)
  );

  syncgen u_syncgen (
    .hcnt, .vcnt(vcnt[9:1]), .hsync(pad_hsync), .vsync(pad_vsync)
  );

  assign endframe = ~pad_vsync;

  blankpixel u_blank (.datain(pixel), .blank, .dataout(blanked));

  always_ff @(posedge clk) pad_rgb <= blanked;

endmodule

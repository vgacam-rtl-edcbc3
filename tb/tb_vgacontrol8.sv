// tb_vgacontrol8: VGA timing and pixel output register.
// Runs a little over two frames. The pixel input is a function of the counts
// of the previous cycle (as the memory would return it) and blank is driven
// at random. Checked every cycle: the horizontal count steps 0..759 and wraps,
// the vertical count steps once per line and wraps after 527, hsync and vsync
// are low exactly in their windows, endframe is the inverse of vsync, and
// pad_rgb equals the previous cycle's pixel, or zero if blank was high. The
// frame length (760 x 528 clocks between vsync starts) is measured.
`timescale 1ns/1ps
module tb_vgacontrol8;
  import vgacam_pkg::*;
  logic clk = 0, rst = 1, blank;
  pixel_t pixel, pad_rgb;
  logic [9:0] hcnt, vcnt;
  logic endframe, pad_hsync, pad_vsync;
  int checks = 0, failures = 0;

  vgacontrol8 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s h=%0d v=%0d", $time, what, hcnt, vcnt); end
  endtask

  initial begin
    int eh, ev, cyc, last_vs, frames;
    pixel_t exp_rgb;
    logic vs_q;
    blank = 1; pixel = 0;
    @(posedge clk); #1; rst = 0;
    eh = 0; ev = 0; cyc = 0; last_vs = -1; frames = 0; vs_q = 1;
    for (int i = 0; i < 2 * 760 * 528 + 5000; i++) begin
      check(hcnt == 10'(eh) && vcnt == 10'(ev), "counts");
      check(pad_hsync == !(eh >= 582 && eh <= 674), "hsync window");
      check(pad_vsync == !(ev == 490 || ev == 491), "vsync window");
      check(endframe == !pad_vsync, "endframe");
      if (vs_q && !pad_vsync) begin
        if (last_vs >= 0) begin
          check(cyc - last_vs == 760 * 528, "frame length");
          frames++;
        end
        last_vs = cyc;
      end
      vs_q = pad_vsync;
      exp_rgb = blank ? 8'h00 : pixel;
      @(posedge clk); #1;
      check(pad_rgb == exp_rgb, "registered, blanked pixel");
      // next inputs: pixel from the previous counts, random blank
      pixel = pixel_t'(eh * 3 + ev * 11);
      blank = ($urandom % 3) == 0;
      #1;
      check(pad_rgb == exp_rgb, "output held until the next edge");
      cyc++;
      if (eh == 759) begin eh = 0; ev = (ev == 527) ? 0 : ev + 1; end else eh++;
    end
    check(frames == 1, "a whole frame measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

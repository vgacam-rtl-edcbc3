// tb_syncgen: exhaustive check of the sync decoder. hsync must be low exactly
// for horizontal counts 582..674 (93 clocks) and vsync low exactly for lines
// 490 and 491, over every count the 10-bit counters can hold.
`timescale 1ns/1ps
module tb_syncgen;
  logic [9:0] hcnt, vcnt;
  logic hsync, vsync;
  int checks = 0, failures = 0, hs_low = 0, vs_low = 0;

  syncgen dut (.hcnt, .vcnt(vcnt[9:1]), .hsync, .vsync);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s h=%0d v=%0d", what, hcnt, vcnt); end
  endtask

  initial begin
    vcnt = 0;
    for (int h = 0; h < 1024; h++) begin
      hcnt = 10'(h); #1;
      check(hsync == !(h >= 582 && h <= 674), "hsync");
      if (!hsync) hs_low++;
    end
    hcnt = 0;
    for (int v = 0; v < 1024; v++) begin
      vcnt = 10'(v); #1;
      check(vsync == !(v == 490 || v == 491), "vsync");
      if (!vsync) vs_low++;
    end
    check(hs_low == 93, "hsync 93 counts wide");
    check(vs_low == 2, "vsync two lines wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_camerain: capture path from camera pins to frame-store writes.
// A camera model sends frames of 352-pixel lines, each pixel as a high nibble
// (taken at the rising edge of qck) and a low nibble (falling edge), after a
// frame-start pulse; qck is not related to the system clock. The memory side
// answers busy at random, in bursts like the monitor's reads. Every accepted
// write (write high, busy low) is recorded by address. Checked: every pixel of
// the 256 x 256 window is written exactly once per frame with the byte the
// camera sent for that row and column, no other write occurs, endframe rises
// once per frame (while the row after the window arrives), and a new frame start restarts
// the frame at row 0 with the next frame's data.
`timescale 1ns/1ps
module tb_camerain;
  import vgacam_pkg::*;

  localparam int CAM_LINES = 262;
  localparam real QCK_HALF = 41.3;

  logic clk = 0, rst = 1, pad_qck = 0, pad_fst = 1, busy = 0;
  logic [3:0] pad_cam = 0;
  logic write, endframe, fifo_empty;
  logic [7:0] rowaddr, coladdr;
  pixel_t camdataout;
  int checks = 0, failures = 0;

  camerain dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic pixel_t pix(input int f, input int r, input int c);
    return pixel_t'(r * 7 + c * 3 + f * 101 + (r ^ c));
  endfunction

  int frame = -1;
  bit done = 0;
  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      pad_fst = 1; #(QCK_HALF * 4); pad_fst = 0; #(QCK_HALF * 4);
      frame = f;
      for (int r = 0; r < CAM_LINES; r++)
        for (int c = 0; c < 352; c++) begin
          automatic pixel_t p = pix(f, r, c);
          pad_cam = p[7:4]; #(QCK_HALF / 2); pad_qck = 1; #(QCK_HALF / 2);
          pad_cam = p[3:0]; #(QCK_HALF / 2); pad_qck = 0; #(QCK_HALF / 2);
        end
      // let the FIFO drain before checking this frame
      #(QCK_HALF * 200);
      check_frame(f);
    end
    done = 1;
  end

  // memory-side model: record accepted writes
  int wcount [256*256];
  pixel_t wdata [256*256];
  int stray = 0, endframe_rises = 0;
  logic ef_q = 0;
  int burst = 0;
  always @(posedge clk) begin
    if (burst > 0) burst--; else if ($urandom % 40 == 0) burst = 20 + $urandom % 200;
    if (!rst && write && !busy) begin
      wcount[{rowaddr, coladdr}]++;
      wdata[{rowaddr, coladdr}] = camdataout;
      if (endframe) stray++;
    end
    if (endframe && !ef_q) endframe_rises++;
    ef_q <= endframe;
    busy <= (burst > 0);
  end

  task automatic check_frame(input int f);
    int bad = 0, badcnt = 0;
    for (int i = 0; i < 256 * 256; i++) begin
      if (wcount[i] != 1) badcnt++;
      if (wdata[i] != pix(f, i / 256, i % 256)) bad++;
      wcount[i] = 0;
    end
    check(badcnt == 0, $sformatf("frame %0d: %0d window pixels not written exactly once", f, badcnt));
    check(bad == 0, $sformatf("frame %0d: %0d window pixels with wrong data", f, bad));
    check(endframe_rises == f + 1, "one endframe per frame");
    check(stray == 0, "no writes after the window");
    for (int r = 0; r < 256; r += 51)
      for (int c = 0; c < 256; c += 37)
        check(wdata[{8'(r), 8'(c)}] == pix(f, r, c), "sampled pixel");
  endtask

  initial begin
    foreach (wcount[i]) wcount[i] = 0;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

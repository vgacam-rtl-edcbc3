// tb_vgacam_top: end-to-end test of the frame grabber at full size.
//
// A camera model sends frames of CAM_LINES lines of 352 pixels (the last frame
// stops just after the window and the camera pauses), each pixel as two nibbles (high nibble at the rising edge of qck, low nibble at the falling
// edge), after a frame-start pulse. The qck period is not a multiple of the
// system clock. The frame store is the two-chip SRAM model. Pixel values are
// a function of frame, row and column, so each displayed frame can be
// identified by its first pixel and then checked pixel by pixel.
//
// Checks:
//   * VGA timing: line length 760, hsync low for 93 clocks starting at count
//     582, vsync low for exactly two lines, frame length 760 x 528 clocks;
//   * the RGB output is zero outside the 256 x 256 window, and inside it equals
//     the pixel of one completed camera frame, two clocks after the count that
//     addressed it;
//   * the displayed frame number never goes backwards, and frames 0 and 1 are
//     each displayed in full;
//   * no bus contention between the SRAM and the controller;
//   * the stored banks hold the expected 256 x 256 windows after capture.
// It also counts how often each mechanism occurred (memory-busy stalls of the
// camera writer, discarded out-of-window pixels, FIFO holding more than one
// pixel, camera and monitor bank switches, a monitor switch while the camera's
// frame-end flag is still high, blanked cycles, frame-end flags)
// and counts a failure for any that never happened. The parallel-port
// inversion and the DAC clock are checked as well.
`timescale 1ns/1ps
module tb_vgacam_top;
  import vgacam_pkg::*;

  localparam int CAM_LINES  = 288;   // camera lines per frame (CIF height)
  localparam int CAM_PIXELS = 352;   // pixels per camera line
  localparam int N_FRAMES   = 3;     // camera frames sent
  localparam real CLK_HALF  = 5.0;   // 100 MHz-scale system clock (scaled time)
  localparam real QCK_HALF  = 41.3;  // camera clock, about 8.3 system clocks per pixel

  logic clk = 1'b0, rst = 1'b1;
  logic pad_qck = 1'b0, pad_fst = 1'b1;
  logic [3:0] pad_cam = '0;
  logic pc_d0 = 1'b0, pc_d1 = 1'b1;
  logic par0, par1, pad_hsync, pad_vsync, pad_dacclk;
  pixel_t pad_rgb, pad_data_o, pad_data_i;
  logic [16:0] pad_addr;
  logic pad_cs0, pad_cs1, pad_wr, pad_oe, pad_data_t;
  logic [9:0] hcnt, vcnt;
  logic camera_frame, monitor_frame;
  bank_t camera_bank, monitor_bank;
  logic sram_drive;
  int   sram_writes;

  vgacam_top dut (.*);

  sram_model u_sram (
    .addr(pad_addr), .cs0_n(pad_cs0), .cs1_n(pad_cs1), .wr_n(pad_wr), .oe_n(pad_oe),
    .data_i(pad_data_o), .data_o(pad_data_i), .drive(sram_drive), .writes(sram_writes)
  );

  always #(CLK_HALF) clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic pixel_t pix(input int f, input int r, input int c);
    return pixel_t'(r * 3 + c * 5 + f * 71 + (r * c) / 7);
  endfunction

  // ---------------- camera model ----------------
  int frames_sent = 0;     // frames whose row 256 has been sent completely
  bit camera_done = 0;
  initial begin
    repeat (20) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < N_FRAMES; f++) begin
      pad_fst = 1'b1;
      #(QCK_HALF * 6);
      pad_fst = 1'b0;
      #(QCK_HALF * 6);
      for (int r = 0; r < CAM_LINES; r++) begin
        for (int c = 0; c < CAM_PIXELS; c++) begin
          automatic pixel_t p = pix(f, r, c);
          // the last frame stops ten pixels into row 256 and the camera then
          // pauses, so its frame-end flag stays high across a monitor vsync
          if (f == N_FRAMES - 1 && r == IMG_SIZE && c == 10) break;
          pad_cam = p[7:4];
          #(QCK_HALF / 2);
          pad_qck = 1'b1;
          #(QCK_HALF / 2);
          pad_cam = p[3:0];
          #(QCK_HALF / 2);
          pad_qck = 1'b0;
          #(QCK_HALF / 2);
        end
        if (r == IMG_SIZE) frames_sent = f + 1;
        if (f == N_FRAMES - 1 && r == IMG_SIZE) break;
      end
    end
    camera_done = 1;
  end

  // ---------------- VGA timing checks ----------------
  int cyc = 0, last_hs_fall = -1, last_vs_fall = -1, hs_low = 0, vs_low = 0;
  logic hs_q = 1'b1, vs_q = 1'b1;
  int blank_cycles = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (hs_q && !pad_hsync) begin
      check(hcnt == 10'(HSYNC_FIRST), "hsync starts at count 582");
      if (last_hs_fall >= 0) check(cyc - last_hs_fall == H_COUNT_TO + 1, "line length 760");
      last_hs_fall = cyc;
    end
    if (!hs_q && pad_hsync) begin
      check(hs_low == HSYNC_LAST - HSYNC_FIRST + 1, "hsync width 93");
    end
    hs_low = pad_hsync ? 0 : hs_low + 1;
    if (vs_q && !pad_vsync) begin
      check(vcnt == 10'(2 * VSYNC_PAIR), "vsync starts at line 490");
      if (last_vs_fall >= 0)
        check(cyc - last_vs_fall == (H_COUNT_TO + 1) * (V_COUNT_TO + 1), "frame length 760x528");
      last_vs_fall = cyc;
    end
    if (!vs_q && pad_vsync) check(vs_low == 2 * (H_COUNT_TO + 1), "vsync two lines long");
    vs_low = pad_vsync ? 0 : vs_low + 1;
    hs_q <= pad_hsync;
    vs_q <= pad_vsync;
  end

  // ---------------- pixel checks ----------------
  logic [9:0] h_d1, h_d2, v_d1, v_d2;
  int   shown_frame = -1;        // frame being displayed this VGA frame
  int   max_shown = -1;
  int   good_pixels = 0;         // matching in-window pixels this VGA frame
  int   full_frames_seen[N_FRAMES];
  initial foreach (full_frames_seen[i]) full_frames_seen[i] = 0;

  always @(posedge clk) begin
    h_d1 <= hcnt; h_d2 <= h_d1;
    v_d1 <= vcnt; v_d2 <= v_d1;
  end

  always @(negedge clk) if (!rst && cyc > 4) begin
    check(!(sram_drive && !pad_data_t), "no data bus contention");
    check(pad_dacclk == ~clk && par1 == ~pc_d0 && par0 == ~pc_d1, "DAC clock and parallel-port lines");
    if (h_d2 < 10'(IMG_SIZE) && v_d2 < 10'(IMG_SIZE)) begin
      if (h_d2 == 0 && v_d2 == 0) begin
        // identify the frame on screen from its first pixel
        shown_frame = -1;
        for (int f = 0; f < N_FRAMES; f++)
          if (f < frames_sent && pad_rgb == pix(f, 0, 0)) shown_frame = f;
        good_pixels = 0;
        if (shown_frame >= 0) begin
          check(shown_frame >= max_shown, "displayed frame never goes backwards");
          if (shown_frame > max_shown) max_shown = shown_frame;
        end
      end
      if (shown_frame >= 0) begin
        check(pad_rgb == pix(shown_frame, int'(v_d2), int'(h_d2)), $sformatf("displayed pixel f=%0d r=%0d c=%0d got %h exp %h bank %0d", shown_frame, v_d2, h_d2, pad_rgb, pix(shown_frame, int'(v_d2), int'(h_d2)), monitor_bank));
        if (pad_rgb == pix(shown_frame, int'(v_d2), int'(h_d2))) good_pixels++;
        if (h_d2 == IMG_SIZE - 1 && v_d2 == IMG_SIZE - 1 && good_pixels == IMG_SIZE * IMG_SIZE)
          full_frames_seen[shown_frame]++;
      end
    end else if (cyc > 10) begin
      check(pad_rgb == '0, "blanked outside the window");
      blank_cycles++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_discard = 0, n_fifo_deep = 0, n_cam_switch = 0, n_mon_switch = 0;
  int n_frame_end = 0, n_fst = 0, n_mon_during = 0;
  bank_t cb_q = 0, mb_q = 0;
  logic cf_q, fst_q;
  always @(posedge clk) if (!rst) begin
    if (dut.cam_write && dut.busyb) n_stall++;
    if (dut.u_bankselect.state != MONITOR_DONE && dut.u_bankselect.state_d == MONITOR_DONE) n_mon_during++;
    if (dut.u_camerain.u_writer.re && !dut.u_camerain.u_writer.write) n_discard++;
    if (dut.u_camerain.u_fifo.level > 1) n_fifo_deep++;
    if (n_mon_switch > 0) check(camera_bank != monitor_bank, "monitor never shows the bank being written");
    if (camera_bank != cb_q) n_cam_switch++;
    if (monitor_bank != mb_q) n_mon_switch++;
    if (camera_frame && !cf_q) n_frame_end++;
    if (dut.u_camerain.fst && !fst_q) n_fst++;
    cb_q <= camera_bank; mb_q <= monitor_bank; cf_q <= camera_frame;
    fst_q <= dut.u_camerain.fst;
  end

  // ---------------- end of test ----------------
  initial begin
    wait (camera_done);
    // let the monitor pick up the last frame and show it once in full
    repeat (3 * (H_COUNT_TO + 1) * (V_COUNT_TO + 1)) @(posedge clk);
    for (int f = 0; f < N_FRAMES; f++)
      check(full_frames_seen[f] > 0, $sformatf("frame %0d displayed in full", f));
    // stored window of the last frame, bank N_FRAMES-1
    for (int r = 0; r < IMG_SIZE; r += 17)
      for (int c = 0; c < IMG_SIZE; c += 13)
        check(u_sram.peek({2'(N_FRAMES - 1), 8'(r), 8'(c)}) == pix(N_FRAMES - 1, r, c),
              "stored pixel of the last frame");
    check(sram_writes >= N_FRAMES * IMG_SIZE * IMG_SIZE, "at least one write per window pixel");
    $display("mechanisms: stalls=%0d discarded=%0d fifo_deep=%0d cam_switch=%0d mon_switch=%0d mon_switch_in_frame_end=%0d frame_end=%0d fst=%0d blank=%0d",
             n_stall, n_discard, n_fifo_deep, n_cam_switch, n_mon_switch, n_mon_during, n_frame_end, n_fst, blank_cycles);
    $display("frames shown in full: %0d %0d %0d, sram writes %0d",
             full_frames_seen[0], full_frames_seen[1], full_frames_seen[2], sram_writes);
    check(n_stall > 0, "memory-busy stall happened");
    check(n_discard > 0, "out-of-window pixels discarded");
    check(n_fifo_deep > 0, "FIFO buffered more than one pixel");
    check(n_cam_switch == N_FRAMES, "camera bank advanced once per frame");
    check(n_mon_switch >= N_FRAMES - 1, "monitor bank switched");
    check(n_frame_end == N_FRAMES, "one frame end per frame");
    check(n_mon_during > 0, "monitor switched while the camera frame-end flag was still high");
    check(n_fst >= N_FRAMES, "frame starts seen");
    check(blank_cycles > 0, "blanking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

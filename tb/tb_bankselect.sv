// tb_bankselect: drives camera and monitor frame flags and compares the bank
// outputs with a reference model of the bank rule.
// The camera frame flag is a level lasting some cycles, once per camera frame;
// the monitor flag a shorter level at a higher rate. Both orders occur: the
// monitor flag arriving while the camera flag is still high (monitor switches
// at once), and after it has dropped (monitor switches on its next flag).
// Checked: the camera bank steps by one (mod 4) once per camera frame, the
// monitor always switches to the bank last completed by the camera, only at
// the start of a monitor flag, and never shows the bank being written.
`timescale 1ns/1ps
module tb_bankselect;
  import vgacam_pkg::*;
  logic clk = 0, rst, camera_frame, monitor_frame;
  bank_t camera_bank, monitor_bank;
  int checks = 0, failures = 0;

  bankselect dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s cam=%0d mon=%0d", $time, what, camera_bank, monitor_bank); end
  endtask

  // reference
  int exp_cam, exp_mon, last_done, cam_pending;   // cam_pending: a completed frame not yet shown
  logic cf_q, mf_q;
  int switch_during = 0, switch_after = 0;

  initial begin
    rst = 1; camera_frame = 0; monitor_frame = 0;
    @(posedge clk); #1; rst = 0;
    exp_cam = 0; exp_mon = 0; last_done = 0; cam_pending = 0; cf_q = 0; mf_q = 0;
    check(camera_bank == 0 && monitor_bank == 0, "reset banks");
    for (int cyc = 0; cyc < 60000; cyc++) begin
      // camera: flag high for cycles 0..(len-1) of every 1000-cycle frame
      camera_frame  = (cyc % 1000) < ((cyc / 1000) % 2 ? 40 : 300);
      // monitor: flag high for 20 of every 170 cycles
      monitor_frame = ((cyc + 7) % 170) < 20;
      @(posedge clk);
      // reference update. A completed camera frame is taken by the monitor
      // at the first following edge where the monitor flag is high, except on
      // the edge where the camera flag has just dropped (the selector first
      // notes that the camera has restarted, then waits for the monitor).
      if (cam_pending && monitor_frame && (camera_frame || !cf_q)) begin
        exp_mon = last_done; cam_pending = 0;
        if (camera_frame) switch_during++; else switch_after++;
      end
      if (camera_frame && !cf_q) begin
        last_done = exp_cam; exp_cam = (exp_cam + 1) % 4; cam_pending = 1;
      end
      cf_q = camera_frame; mf_q = monitor_frame;
      #1;
      check(camera_bank == bank_t'(exp_cam), "camera bank");
      check(monitor_bank == bank_t'(exp_mon), "monitor bank");
      check(camera_bank != monitor_bank, "monitor never shows the bank being written");
    end
    check(switch_during > 0 && switch_after > 0, "both switch orders exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_camera_test: checks the frame-store writer against a position model.
// The FIFO's empty flag and the memory's busy answer are driven at random.
// The testbench keeps its own column/row of the pixel at the FIFO head and
// checks, every cycle: write only for an in-window pixel (column and row below
// 256), the address {row, column}, a pop whenever a pixel is present and the
// write was accepted or the pixel is outside the window, no pop otherwise,
// and frame_end exactly on row 256. A full frame of 352-pixel lines is run to
// past row 256, then a frame start clears the position. It also checks that
// every window pixel is written exactly once with busy low.
`timescale 1ns/1ps
module tb_camera_test;
  logic clk = 0, empty, fst, busy;
  logic [7:0] addr_low, addr_high;
  logic write, re, frame_end;
  int checks = 0, failures = 0;
  int col, row, accepted, retried, discarded, frame_ends;

  camera_test dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s (r=%0d c=%0d)", $time, what, row, col); end
  endtask

  task automatic run_cycle();
    bit in_win, exp_re;
    #1;
    in_win = (col < 256) && (row < 256);
    exp_re = !fst && !empty && (!busy || !in_win);
    check(write == (!fst && !empty && in_win), "write");
    check(re == exp_re, "re");
    check(frame_end == (row == 256), "frame_end");
    if (write) check(addr_low == 8'(col) && addr_high == 8'(row), $sformatf("address %0d %0d", addr_high, addr_low));
    if (write && !busy) accepted++;
    if (write && busy) retried++;
    if (exp_re && !in_win) discarded++;
    @(posedge clk);
    if (fst) begin col = 0; row = 0; end
    else if (exp_re) begin
      if (col >= 351) begin col = 0; row++; end else col++;
    end
    #1;
  endtask

  initial begin
    accepted = 0; retried = 0; discarded = 0; frame_ends = 0;
    fst = 1; empty = 1; busy = 0; col = 0; row = 0;
    run_cycle();
    fst = 0;
    while (row < 260) begin
      empty = ($urandom % 4) == 0;
      busy  = ($urandom % 3) == 0;
      if (frame_end && row == 256 && col == 0) frame_ends++;
      run_cycle();
    end
    check(accepted == 256 * 256, $sformatf("each window pixel written once (%0d)", accepted));
    check(retried > 0 && discarded > 0, "busy retries and discards happened");
    fst = 1; run_cycle(); fst = 0; empty = 1; #1;
    check(!frame_end && addr_low == 0 && addr_high == 0, "frame start clears position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

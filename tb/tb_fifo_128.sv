// tb_fifo_128: random pushes and pops against a reference queue.
// The producer never pushes when 127 entries are held (the FIFO has no full
// flag) and the consumer pops only when not empty. Checked every cycle: empty,
// and the head word on dataout. Phases with a fast producer fill the FIFO to
// 127 entries; a synchronous reset in the middle must empty it. A push into
// an empty FIFO must be visible on dataout on the next cycle.
`timescale 1ns/1ps
module tb_fifo_128;
  logic clk = 0, reset, write, read;
  logic [7:0] datain, dataout;
  logic empty;
  logic [7:0] q[$];
  int checks = 0, failures = 0, max_level = 0;

  fifo_128 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    reset = 1; write = 0; read = 0; datain = 0;
    @(posedge clk); #1;
    reset = 0;
    check(empty, "empty after reset");
    for (int i = 0; i < 20000; i++) begin
      int pw;
      pw = ((i / 1500) % 2 == 0) ? 90 : 30;   // alternate fill and drain phases
      write  = (q.size() < 127) && (($urandom % 100) < pw);
      read   = !empty && (($urandom % 100) < 60);
      datain = 8'($urandom);
      reset  = (i == 9000);
      #1;
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) check(dataout == q[0], "head word");
      @(posedge clk);
      if (reset) q.delete();
      else begin
        if (read) void'(q.pop_front());
        if (write) q.push_back(datain);
      end
      if (q.size() > max_level) max_level = q.size();
      #1;
    end
    check(max_level == 127, $sformatf("filled to 127 entries (max %0d)", max_level));
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

// tb_counter: checks the modulo counter against a reference count.
// Two instances: the FIFO pointer size (7 bits, wraps after 127) and the VGA
// horizontal size (10 bits, wraps after 759). Enable and synchronous clear are
// driven at random; after every edge the count and terminal-count output are
// compared with a model kept in the testbench, and the wrap is checked to take
// exactly COUNT_TO+1 enabled cycles.
`timescale 1ns/1ps
module tb_counter;
  logic clk = 0, sclr, en;
  logic [6:0] q7;  logic t7;
  logic [9:0] q10; logic t10;
  int checks = 0, failures = 0;

  counter dut7 (.clk, .sclr, .en, .q(q7), .term_cnt(t7));
  counter #(.WIDTH(10), .COUNT_TO(759)) dut10 (.clk, .sclr, .en, .q(q10), .term_cnt(t10));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  int m7, m10, wraps10, en_since_wrap, wrap_period_ok;
  initial begin
    sclr = 1; en = 0;
    @(posedge clk); #1;
    m7 = 0; m10 = 0; wraps10 = 0; en_since_wrap = 0; wrap_period_ok = 0;
    sclr = 0;
    check(q7 == 0 && q10 == 0, "cleared");
    for (int i = 0; i < 6000; i++) begin
      en   = ($urandom % 8) != 0;
      sclr = ($urandom % 1500) == 0;
      #1;
      check(t7 == (m7 == 127), "term_cnt 7-bit");
      check(t10 == (m10 == 759), "term_cnt 10-bit");
      @(posedge clk);
      if (sclr) begin m7 = 0; m10 = 0; en_since_wrap = -1; end
      else if (en) begin
        m7  = (m7 == 127) ? 0 : m7 + 1;
        if (m10 == 759) begin
          m10 = 0; wraps10++;
          if (en_since_wrap == 759) wrap_period_ok++;
          en_since_wrap = 0;
        end else begin
          m10 = m10 + 1;
          if (en_since_wrap >= 0) en_since_wrap++;
        end
      end
      #1;
      check(q7 == 7'(m7), $sformatf("q7 %0d exp %0d", q7, m7));
      check(q10 == 10'(m10), $sformatf("q10 %0d exp %0d", q10, m10));
    end
    check(wraps10 > 2 && wrap_period_ok > 0, "10-bit counter wrapped after 760 counts");
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

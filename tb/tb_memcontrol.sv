// tb_memcontrol: exhaustive check of the port arbiter over all eight input
// combinations: port A is never refused, port B is busy exactly when A reads,
// B's address is selected when B is not busy, and the active-low write command
// is issued only for a B write that is not busy.
`timescale 1ns/1ps
module tb_memcontrol;
  logic read_a, read_b, write_b, busy_b, port_select, write_l;
  int checks = 0, failures = 0;

  memcontrol dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (a=%b rb=%b wb=%b)", what, read_a, read_b, write_b); end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      {read_a, read_b, write_b} = 3'(i);
      #1;
      check(busy_b == read_a, "busy_b");
      check(port_select == !read_a, "port_select");
      check(write_l == !(write_b && !read_a), "write_l");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

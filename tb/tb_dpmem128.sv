// tb_dpmem128: random writes and reads of the 128 x 8 dual-port RAM against a
// reference array. Both asynchronous read ports are checked every cycle,
// including a read of the address being written (old word until the edge).
`timescale 1ns/1ps
module tb_dpmem128;
  logic clk = 0, we;
  logic [6:0] a, dpra;
  logic [7:0] di, spo, dpo;
  logic [7:0] ref_mem [128];
  int checks = 0, failures = 0;

  dpmem128 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    we = 1; di = 0;
    for (int i = 0; i < 128; i++) begin
      a = 7'(i); di = 8'($urandom); ref_mem[i] = di;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 4000; i++) begin
      we = $urandom % 2; a = 7'($urandom); dpra = ($urandom % 4 == 0) ? a : 7'($urandom);
      di = 8'($urandom);
      #1;
      check(spo == ref_mem[a], "spo");
      check(dpo == ref_mem[dpra], "dpo (old word before the write edge)");
      @(posedge clk);
      if (we) ref_mem[a] = di;
      #1;
      check(dpo == ref_mem[dpra], "dpo after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

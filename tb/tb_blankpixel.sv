// tb_blankpixel: exhaustive check of the blanking gate: every pixel value is
// passed unchanged while blank is low and forced to zero while it is high.
`timescale 1ns/1ps
module tb_blankpixel;
  logic [7:0] datain, dataout;
  logic blank;
  int checks = 0, failures = 0;

  blankpixel dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s d=%h b=%b", what, datain, blank); end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      {blank, datain} = 9'(i); #1;
      check(dataout == (blank ? 8'h00 : datain), "dataout");
    end
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

// tb_mem2port: the two-port SRAM interface with the SRAM model attached.
// Each cycle port A reads at random, and port B presents a write (or its
// default read) at random, on a small address set spread over both chips so
// that reads hit written data. A reference memory is updated for every write
// that is not busy. Checked:
//   * busyb equals reada in the same cycle;
//   * one cycle later the pins carry the selected address (A if it read, else
//     B), chip selects from bit 17, and for a write: pad_wr low only in the
//     second half of the cycle, output enable high, data driven;
//   * one cycle after a request, readdata is the reference byte at the
//     selected address (a read "returns data on the next cycle");
//   * no cycle has the controller and a chip driving the data pins together.
`timescale 1ns/1ps
module tb_mem2port;
  import vgacam_pkg::*;
  logic clk = 0;
  mem_addr_t addra, addrb;
  logic reada, writeb, busyb;
  pixel_t writedatab, readdata;
  logic [16:0] pad_addr;
  logic pad_cs0, pad_cs1, pad_wr, pad_oe, pad_data_t, sram_drive;
  pixel_t pad_data_o, pad_data_i;
  int sram_writes;
  int checks = 0, failures = 0;

  mem2port dut (.*);
  sram_model u_sram (
    .addr(pad_addr), .cs0_n(pad_cs0), .cs1_n(pad_cs1), .wr_n(pad_wr), .oe_n(pad_oe),
    .data_i(pad_data_o), .data_o(pad_data_i), .drive(sram_drive), .writes(sram_writes)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  pixel_t ref_mem [mem_addr_t];
  function automatic mem_addr_t pick();
    return mem_addr_t'({$urandom % 4, 8'($urandom % 3), 8'($urandom % 5)});
  endfunction

  int n_writes = 0, n_busy_writes = 0, n_reads_a = 0;
  initial begin
    mem_addr_t sel;
    bit        wr_acc;
    // fill the address set
    reada = 0;
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 5; c++) begin
          addrb = {2'(b), 8'(r), 8'(c)}; writeb = 1; writedatab = 8'($urandom); addra = '0;
          ref_mem[addrb] = writedatab;
          @(posedge clk); #1;
        end
    for (int i = 0; i < 5000; i++) begin
      reada = ($urandom % 3) == 0;
      writeb = ($urandom % 2) == 0;
      addra = pick(); addrb = pick(); writedatab = 8'($urandom);
      #1;
      check(busyb == reada, "busy in the same cycle");
      sel    = reada ? addra : addrb;
      wr_acc = writeb && !reada;
      if (reada) n_reads_a++;
      if (writeb && reada) n_busy_writes++;
      @(posedge clk); #1;
      // first half of cycle n+1
      check(pad_addr == sel[16:0] && pad_cs1 == sel[17] && pad_cs0 == !sel[17], "pins carry the selected address");
      check(pad_wr == 1'b1, "no write strobe in the first half");
      check(pad_oe == wr_acc && pad_data_t == !wr_acc, "output enable and data drive");
      check(!(sram_drive && !pad_data_t), "no bus contention");
      if (!wr_acc) check(readdata == ref_mem[sel], "read data on the next cycle");
      if (wr_acc) check(pad_data_o == writedatab, "write data on the pins");
      @(negedge clk); #1;
      check(pad_wr == !wr_acc, "write strobe in the second half");
      if (wr_acc) begin ref_mem[sel] = writedatab; n_writes++; end
      // inputs for the next request are applied before the next edge
      {reada, writeb} = '0;
      @(posedge clk); #1;
    end
    foreach (ref_mem[a]) check(u_sram.peek(a) == ref_mem[a], "final memory contents");
    check(n_writes > 100 && n_busy_writes > 100 && n_reads_a > 100, "writes, refused writes and A reads exercised");
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

// mem2port: two-port interface to the external frame-store SRAM.
//
// The frame store is two 128K x 8 asynchronous SRAM chips, together 256 KB,
// addressed by an 18-bit address {bank[1:0], row[7:0], column[7:0]}. Bit 17
// chooses the chip, bits 16:0 go to both chips' address pins.
//
// Port A (read only) and port B (read/write) each present an address every
// cycle; memcontrol decides which one the memory serves. Port B has no read
// strobe: reading B's address is what the memory does whenever it is not
// writing and port A is not reading. Port A has priority:
// busy_b is high in the same cycle whenever read_a is. Timing, for a request
// presented in cycle n:
//   * edge n+1: the selected address, the two chip selects, the registered
//     write command and the write data are loaded into the pad registers;
//   * cycle n+1: pad_wr (active low) pulses low in the second half of the
//     cycle, pad_wr = write_l_q OR clk, so address and data are settled before
//     the strobe and held after it; pad_oe (active low) is the inverse of the
//     registered write command, so the SRAM drives the bus on every cycle that
//     is not a write; the data pins are driven (pad_data_t = 0) only during a
//     write;
//   * cycle n+1: read data comes straight from the pins on readdata, to be
//     registered by the reader at edge n+2 - "data on the next cycle".
// pad_cs1 is the registered address bit 17 and pad_cs0 its inverse; the chip
// enables are taken to be active low, so pad_cs0 enables the chip holding the
// upper half (bit 17 = 1). The bidirectional data pad is split into an output,
// a tristate control (1 = released) and an input.
//
// Registers, strobe gating and pin names follow the memory-interface schematic
// of the design; the chip-select polarity and the split data pad are this
// implementation's choices.
module mem2port
  import vgacam_pkg::*;
(
  input  logic        clk,
  input  mem_addr_t   addra,
  input  mem_addr_t   addrb,
  input  logic        reada,
  input  logic        writeb,
  input  pixel_t      writedatab,
  output logic        busyb,
  output pixel_t      readdata,
  // SRAM pins
  output logic [16:0] pad_addr,
  output logic        pad_cs0,
  output logic        pad_cs1,
  output logic        pad_wr,     // write strobe, active low
  output logic        pad_oe,     // output enable, active low
  output pixel_t      pad_data_o,
  output logic        pad_data_t, // 1: data pins released
  input  pixel_t      pad_data_i
);

  logic      port_select;
  logic      write_l;
  mem_addr_t o;            // selected address
  logic      write_l_q;

  memcontrol u_ctl (
    .read_a(reada), .read_b(1'b0), .write_b(writeb),
    .busy_b(busyb), .port_select, .write_l
  );

  assign o = port_select ? addrb : addra;

  always_ff @(posedge clk) begin
    pad_addr   <= o[16:0];
    pad_cs1    <= o[17];
    pad_cs0    <= ~o[17];
    write_l_q  <= write_l;
    pad_data_o <= writedatab;
  end

  assign pad_wr     = write_l_q | clk;
  assign pad_oe     = ~write_l_q;
  assign pad_data_t = write_l_q;
  assign readdata   = pad_data_i;

endmodule

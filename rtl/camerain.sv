// camerain: camera capture front end.
//
// The camera delivers each 8-bit pixel as two 4-bit nibbles on pad_cam, with
// its own clock pad_qck: the high nibble is valid at the rising edge of qck and
// the low nibble at the falling edge. The capture works like this:
//   * qck domain: the nibble is registered on the rising edge of qck; on the
//     falling edge the held high nibble and the present low nibble are
//     registered together as one byte.
//   * crossing: the byte passes two system-clock registers; qck itself passes
//     three (a synchroniser) and a fourth register, and a one-cycle write pulse
//     (wrfifo) is made where the synchronised qck is seen to fall. The pulse
//     comes one register after the data, so the FIFO stores a byte that has
//     been stable for at least one system clock. qck must therefore be slower than clk (at least about four
//     clk periods per qck period) and the byte stays stable for a whole qck
//     period.
//   * the frame-start pad is synchronised by two registers; the result (fst)
//     empties the FIFO and restarts the writer's counters.
//   * fifo_128 buffers the bytes; camera_test pops them and writes the top-left
//     256 x 256 pixels to memory, honouring busy.
// Outputs to the frame store: write, rowaddr, coladdr, camdataout (the FIFO
// head) and endframe. write/addresses/data are combinational from registers,
// and busy is answered in the same cycle.
//
// The registers, synchroniser depths, edge detector and wiring follow the
// capture schematic of the design. rst is this implementation's model of the
// FPGA's power-up clearing: it acts as a frame start and clears the
// synchronisers.
module camerain
  import vgacam_pkg::*;
#(
  parameter int unsigned LINESIZE = CAM_LINESIZE
) (
  input  logic       clk,
  input  logic       rst,          // power-up clear (synchronous)
  input  logic       pad_qck,      // camera nibble clock
  input  logic       pad_fst,      // camera frame start
  input  logic [3:0] pad_cam,      // camera nibble data
  input  logic       busy,         // memory refused the write this cycle
  output logic       write,
  output logic [7:0] rowaddr,
  output logic [7:0] coladdr,
  output pixel_t     camdataout,
  output logic       endframe,
  output logic       fifo_empty    // FIFO state, for observation
);

  // ---- camera clock domain -------------------------------------------------
  logic [3:0] hi_nib_rise;   // nibble taken on the rising edge of qck
  logic [3:0] hi_nib;        // high nibble, re-registered on the falling edge
  logic [3:0] lo_nib;        // low nibble, taken on the falling edge

  always_ff @(posedge pad_qck) hi_nib_rise <= pad_cam;

  always_ff @(negedge pad_qck) begin
    hi_nib <= hi_nib_rise;
    lo_nib <= pad_cam;
  end

  // ---- into the system clock domain -----------------------------------------
  pixel_t     byte_s1, camdatain;   // two data stages
  logic [2:0] qckb_sync;            // inverted qck through three stages
  logic       old_qck;              // fourth stage, for the edge detector
  logic       new_qck;
  logic       wrfifo;
  logic [1:0] fst_sync;
  logic       fst;

  always_ff @(posedge clk) begin
    byte_s1   <= {hi_nib, lo_nib};
    camdatain <= byte_s1;
    if (rst) begin
      qckb_sync <= '1;      // as if qck had been low: no write pulse on leaving reset
      old_qck   <= 1'b1;
      fst_sync  <= '0;
    end else begin
      qckb_sync <= {qckb_sync[1:0], ~pad_qck};
      old_qck   <= new_qck;
      fst_sync  <= {fst_sync[0], pad_fst};
    end
  end

  assign new_qck = qckb_sync[2];
  assign wrfifo  = new_qck & ~old_qck;     // one pulse per falling edge of qck
  assign fst     = fst_sync[1] | rst;

  // ---- buffering and frame-store writer --------------------------------------
  logic readfifo;

  fifo_128 u_fifo (
    .clk, .reset(fst), .write(wrfifo), .read(readfifo),
    .datain(camdatain), .dataout(camdataout), .empty(fifo_empty)
  );

  camera_test #(.LINESIZE(LINESIZE)) u_writer (
    .clk, .empty(fifo_empty), .fst, .busy,
    .addr_low(coladdr), .addr_high(rowaddr),
    .write, .re(readfifo), .frame_end(endframe)
  );

endmodule

// vgacam_top: camera-to-VGA frame grabber.
//
// A digital camera streams nibble-serial pixels; a VGA monitor is refreshed
// from an external SRAM frame store much faster than the camera produces
// frames. The top-left 256 x 256 pixels of each camera frame are written into
// one of four 64 KB banks of the store while the monitor shows the most recent
// complete frame from another bank, in a 256 x 256 window at the top left of
// its screen.
//
//   camerain    capture, clock-domain crossing, FIFO, frame-store writer (port B)
//   vgacontrol8 VGA counters, syncs, blanking, RGB output register
//   mem2port    SRAM interface; port A (monitor reads) has priority over
//               port B (camera writes), which waits (busy) and retries
//   bankselect  which bank each side uses
//
// The monitor reads port A whenever both counts are below 256: reada is the
// AND of the inverted bits 9 and 8 of hcnt and vcnt. Its address is
// {monitor_bank, vcnt[7:0], hcnt[7:0]}. The read data arrives one cycle later,
// so blank is the inverse of reada delayed by one register. The camera's
// address is {camera_bank, row, column}.
//
// Pads beside the video path: pad_dacclk is the inverted clock for the video
// DAC, and two parallel-port control lines are passed inverted from the PC
// (pc_d0 -> par1, pc_d1 -> par0). The clock input buffering of the FPGA is
// not modelled: clk is the board clock. rst models the FPGA's power-up
// clearing of its registers (synchronous, active high). hcnt, vcnt and the
// frame flags and banks are brought out for observation.
//
// Wiring, address construction, the read decode and the blank register follow
// the top-level schematic; the split data pad and rst are this
// implementation's choices.
module vgacam_top
  import vgacam_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // camera
  input  logic        pad_qck,
  input  logic        pad_fst,
  input  logic [3:0]  pad_cam,
  input  logic        pc_d0,
  input  logic        pc_d1,
  output logic        par0,
  output logic        par1,
  // monitor
  output logic        pad_hsync,
  output logic        pad_vsync,
  output pixel_t      pad_rgb,
  output logic        pad_dacclk,
  // frame-store SRAM
  output logic [16:0] pad_addr,
  output logic        pad_cs0,
  output logic        pad_cs1,
  output logic        pad_wr,
  output logic        pad_oe,
  output pixel_t      pad_data_o,
  output logic        pad_data_t,
  input  pixel_t      pad_data_i,
  // observation
  output logic [9:0]  hcnt,
  output logic [9:0]  vcnt,
  output logic        camera_frame,
  output logic        monitor_frame,
  output bank_t       camera_bank,
  output bank_t       monitor_bank
);

  logic       cam_write, busyb;
  logic [7:0] rowaddr, coladdr;
  pixel_t     camdata, readdata;
  logic       reada, blank;
  logic       fifo_empty_unused;
  fs_addr_t   addra, addrb;

  camerain u_camerain (
    .clk, .rst, .pad_qck, .pad_fst, .pad_cam, .busy(busyb),
    .write(cam_write), .rowaddr, .coladdr, .camdataout(camdata),
    .endframe(camera_frame), .fifo_empty(fifo_empty_unused)
  );

  bankselect u_bankselect (
    .clk, .rst, .camera_frame, .monitor_frame, .camera_bank, .monitor_bank
  );

  assign addrb = '{bank: camera_bank,  row: rowaddr,   col: coladdr};
  assign addra = '{bank: monitor_bank, row: vcnt[7:0], col: hcnt[7:0]};

  assign reada = ~vcnt[9] & ~vcnt[8] & ~hcnt[9] & ~hcnt[8];

  always_ff @(posedge clk) blank <= ~reada;

  mem2port u_mem (
    .clk, .addra(addra), .addrb(addrb), .reada, .writeb(cam_write),
    .writedatab(camdata), .busyb, .readdata,
    .pad_addr, .pad_cs0, .pad_cs1, .pad_wr, .pad_oe,
    .pad_data_o, .pad_data_t, .pad_data_i
  );

  vgacontrol8 u_vga (
    .clk, .rst, .blank, .pixel(readdata), .hcnt, .vcnt,
    .endframe(monitor_frame), .pad_hsync, .pad_vsync, .pad_rgb
  );

  assign pad_dacclk = ~clk;
  assign par1       = ~pc_d0;
  assign par0       = ~pc_d1;

endmodule

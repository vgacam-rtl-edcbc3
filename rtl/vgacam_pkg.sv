// vgacam_pkg: constants and types shared by the camera-to-VGA frame grabber.
//
// The numbers here are the design's own: the VGA line and frame lengths,
// the sync windows, the camera line length and the 256 x 256 capture window
// all come from the design description. The frame-store address layout
// {bank[1:0], row[7:0], column[7:0]} follows the way the top level builds
// the two memory addresses.
package vgacam_pkg;

  // VGA timing (pixel clocks per line, lines per frame, counters are 0-based)
  localparam int unsigned H_COUNT_TO  = 759;  // horizontal counter runs 0..759
  localparam int unsigned V_COUNT_TO  = 527;  // vertical counter runs 0..527
  localparam int unsigned HSYNC_FIRST = 582;  // hsync low from this count ...
  localparam int unsigned HSYNC_LAST  = 674;  // ... through this count
  localparam int unsigned VSYNC_PAIR  = 245;  // vsync low while vcnt[9:1] == 245 (lines 490, 491)

  // Camera
  localparam int unsigned CAM_LINESIZE = 351; // last column index of a camera line (352 pixels)
  localparam int unsigned IMG_SIZE     = 256; // captured/displayed window is IMG_SIZE x IMG_SIZE

  // Frame store
  localparam int unsigned BANK_W  = 2;                      // four banks
  localparam int unsigned COORD_W = 8;                      // row and column bits
  localparam int unsigned ADDR_W  = BANK_W + 2 * COORD_W;   // 18-bit frame-store address
  localparam int unsigned PIXEL_W = 8;

  typedef logic [BANK_W-1:0]  bank_t;
  typedef logic [ADDR_W-1:0]  mem_addr_t;
  typedef logic [PIXEL_W-1:0] pixel_t;

  // Frame-store address: bank, row (line), column (pixel)
  typedef struct packed {
    bank_t              bank;
    logic [COORD_W-1:0] row;
    logic [COORD_W-1:0] col;
  } fs_addr_t;

  // States of the bank selector
  typedef enum logic [1:0] {
    CAMERA_WAIT  = 2'd0,  // waiting for the camera to finish a frame
    CAMERA_DONE  = 2'd1,  // camera finished; waiting for it to start again or for the monitor
    MONITOR_WAIT = 2'd2,  // camera running again; monitor not yet moved to the new frame
    MONITOR_DONE = 2'd3   // both moved; waiting for the camera's frame-end flag to drop
  } bank_state_e;

endpackage

// bankselect: hands frame-store banks to the camera and to the monitor.
//
// The store holds four frame banks. The camera writes into camera_bank; the
// monitor reads monitor_bank. When the camera finishes a frame (camera_frame
// rises) it moves on to the next bank (modulo 4) and the bank it just filled is
// remembered as the latest complete frame. The next time the monitor finishes
// a frame (monitor_frame, high during its vertical sync) it switches to that
// remembered bank. The monitor's frame rate is higher than the camera's, so it
// shows the same bank for several frames, and it never reads a bank the camera
// is writing.
//
// Four states sequence the two events so each is counted once although both
// flags are levels that stay high for many cycles:
//   CAMERA_WAIT : camera_frame -> CAMERA_DONE, camera advances
//   CAMERA_DONE : !camera_frame -> MONITOR_WAIT;
//                 else monitor_frame -> MONITOR_DONE, monitor advances
//   MONITOR_WAIT: monitor_frame -> CAMERA_WAIT, monitor advances
//   MONITOR_DONE: !camera_frame -> CAMERA_WAIT
// If the camera and the monitor advanced in the same cycle the monitor would
// take the bank just completed. The state machine is self-starting (every
// encoding is a state); rst, an addition modelling the FPGA's power-up
// clearing, puts it and both banks at zero. The states, transitions and bank
// rule follow the design description.
module bankselect
  import vgacam_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  camera_frame,   // high while the camera is at the end of a frame
  input  logic  monitor_frame,  // high while the monitor is at the end of a frame
  output bank_t camera_bank,
  output bank_t monitor_bank
);

  bank_state_e state, state_d;
  logic        next_camera_bank, next_monitor_bank;
  bank_t       previous_camera_bank, prev_d;

  always_comb begin
    state_d           = state;
    next_camera_bank  = 1'b0;
    next_monitor_bank = 1'b0;
    unique case (state)
      CAMERA_WAIT:
        if (camera_frame) begin
          state_d          = CAMERA_DONE;
          next_camera_bank = 1'b1;
        end
      CAMERA_DONE:
        if (!camera_frame) state_d = MONITOR_WAIT;
        else if (monitor_frame) begin
          state_d           = MONITOR_DONE;
          next_monitor_bank = 1'b1;
        end
      MONITOR_WAIT:
        if (monitor_frame) begin
          state_d           = CAMERA_WAIT;
          next_monitor_bank = 1'b1;
        end
      MONITOR_DONE:
        if (!camera_frame) state_d = CAMERA_WAIT;
      default: state_d = CAMERA_WAIT;
    endcase
  end

  assign prev_d = next_camera_bank ? camera_bank : previous_camera_bank;

  always_ff @(posedge clk) begin
    if (rst) begin
      state                <= CAMERA_WAIT;
      camera_bank          <= '0;
      monitor_bank         <= '0;
      previous_camera_bank <= '0;
    end else begin
      state                <= state_d;
      previous_camera_bank <= prev_d;
      if (next_camera_bank)  camera_bank  <= camera_bank + 1'b1;
      if (next_monitor_bank) monitor_bank <= prev_d;
    end
  end

endmodule

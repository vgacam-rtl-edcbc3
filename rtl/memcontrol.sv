// memcontrol: arbiter for the two-port frame-store interface.
//
// Port A only reads (the monitor); port B reads and writes (the camera). A
// request is a read or write strobe held with its address (and data) for one
// cycle. Port A always wins: busy_b is raised, in the same cycle, whenever A
// reads, and a busy B request is simply not performed (the requester repeats
// it). port_select picks B's address whenever B is not busy; reading B is the
// idle default, so read_b is not needed for the decision. write_l is the
// active-low write command to the memory, low for a B write that is not busy.
// Purely combinational. The rules are those of the design description.
module memcontrol (
  input  logic read_a,
  input  logic read_b,       // accepted for completeness; B reads are the default
  input  logic write_b,
  output logic busy_b,
  output logic port_select,  // 1: port B address, 0: port A address
  output logic write_l       // active-low write command
);

  assign busy_b      = read_a;
  assign port_select = ~busy_b;
  assign write_l     = ~(write_b & ~busy_b);

  logic unused_ok;
  assign unused_ok = read_b;

endmodule

// distraction_detector: the comparator of the distraction detection method.
//
// Under XY routing every switch a packet legally visits lies either in the
// source's row (same Y as the source) or in the destination's column (same
// X as the destination). The detector compares the switch address with the
// packet's source and destination addresses and raises `distracted` when
// neither holds: the packet has been sent somewhere it never should be, so
// the switch it came from has a control fault. This is exactly the rule the
// document states; it does not check that the switch lies between source
// and destination, so a packet bouncing inside its own row stays unseen
// (that case is left to the switch count method).
//
// Combinational. `check` qualifies the inputs (a header flit is present).
module distraction_detector
  import noc_pkg::*;
(
  input  logic   check,
  input  coord_t sw,    // switch address
  input  coord_t src,   // packet source address
  input  coord_t dst,   // packet destination address
  output logic   distracted
);
  logic on_path;

  assign on_path    = (sw.y == src.y) || (sw.x == dst.x);
  assign distracted = check && !on_path;

endmodule

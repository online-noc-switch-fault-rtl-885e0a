// xy_route: XY route computation with the stuck-at-port fault model.
//
// The control part of the switch decides which output port a packet takes.
// Under XY routing a packet first travels along X until its column equals
// the destination's, then along Y; at the destination it goes to the local
// processor port. East is +X and North is +Y (switch 1 of a mesh sits at the
// south-west corner, numbers rising eastwards, then northwards).
//
// The fault input models the document's high-level control fault: a switch
// that is stuck at a port (SaE, SaS, SaW, SaN, SaP) sends every packet to
// that port, whatever its destination. FAULT_NONE gives fault-free routing.
//
// Purely combinational: cur, dst and fault in, port out.
module xy_route
  import noc_pkg::*;
(
  input  coord_t cur,    // location of this switch
  input  coord_t dst,    // destination in the packet header
  input  fault_e fault,  // injected stuck-at-port fault
  output port_e  port
);
  port_e xy_port;

  always_comb begin
    if (dst.x > cur.x)      xy_port = PORT_E;
    else if (dst.x < cur.x) xy_port = PORT_W;
    else if (dst.y > cur.y) xy_port = PORT_N;
    else if (dst.y < cur.y) xy_port = PORT_S;
    else                    xy_port = PORT_P;
  end

  assign port = (fault == FAULT_NONE) ? xy_port : fault_port(fault);

endmodule

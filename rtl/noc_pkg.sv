// noc_pkg: shared types and constants of the self-testing 2-D mesh NoC.
//
// A packet is a worm of flits. Every flit carries a head and a tail marker
// and a 32-bit data word. The head flit's data word is the packet header:
// packet type, destination and source XY coordinates, the switch count field
// and a free info field. A single-flit packet has both markers set.
//
// Port numbering follows the fault list of the fault model: East is port 1,
// then South, West and North; the local processor port is port 0. Only
// "East = port 1" is fixed by the fault model; the rest continues the
// order in which the stuck-at faults are listed.
//
// Field widths are this design's own choice: 3-bit coordinates cover meshes
// up to 8x8 (the largest evaluated mesh is 7x7), and a 4-bit switch count
// holds the longest XY path of a 7x7 mesh (13 switches) without overflowing.
package noc_pkg;

  localparam int unsigned NPORTS  = 5;   // local + four mesh directions
  localparam int unsigned COORD_W = 3;   // bits per X or Y coordinate
  localparam int unsigned SC_W    = 4;   // switch count field
  localparam int unsigned DATA_W  = 32;  // flit data word
  localparam int unsigned INFO_W  = DATA_W - 2 - 4*COORD_W - SC_W;

  typedef enum logic [2:0] {
    PORT_P = 3'd0,  // local processor
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_N = 3'd4
  } port_e;

  // Stuck-at-port control faults (high-level fault model).
  typedef enum logic [2:0] {
    FAULT_NONE = 3'd0,
    FAULT_SAE  = 3'd1,
    FAULT_SAS  = 3'd2,
    FAULT_SAW  = 3'd3,
    FAULT_SAN  = 3'd4,
    FAULT_SAP  = 3'd5
  } fault_e;

  typedef enum logic [1:0] {
    PKT_DATA = 2'd0,   // ordinary traffic
    PKT_DIAG = 2'd1    // fault diagnosis report
  } pkt_type_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } coord_t;

  typedef struct packed {
    pkt_type_e          ptype;
    coord_t             dst;
    coord_t             src;
    logic [SC_W-1:0]    sc;
    logic [INFO_W-1:0]  info;  // diagnosis report: faulty switch coord in low bits
  } header_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Port a stuck-at fault forces every packet to.
  function automatic port_e fault_port(fault_e f);
    case (f)
      FAULT_SAE: return PORT_E;
      FAULT_SAS: return PORT_S;
      FAULT_SAW: return PORT_W;
      FAULT_SAN: return PORT_N;
      default:   return PORT_P;
    endcase
  endfunction

endpackage

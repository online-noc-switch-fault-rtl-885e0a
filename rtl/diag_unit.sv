// diag_unit: fault diagnosis report generator of a switch.
//
// When the distraction detector of a switch finds a packet off its XY path,
// the switch it came from routed it wrongly. The switch therefore names
// that neighbour as faulty and sends a report packet to the primary output
// switch, whose processor learns the exact location of the fault.
//
// `detect` has one bit per input port and is set for the cycle a distracted
// head flit leaves that port. The neighbour on that side is recorded as a
// pending report. Reports leave one at a time as single-flit packets of type
// PKT_DIAG: source = this switch, destination = the primary output switch,
// switch count 0, and the faulty neighbour's coordinates in the low bits of
// the info field. Each neighbour is reported once until reset, so a steady
// fault does not flood the network with copies of the same report; this
// limit, the packet layout and the use of a single primary output are this
// design's choices (the document leaves them open).
//
// Interface: the report leaves through valid/ready (flit held until taken).
// A detection is visible at the output on the next cycle.
module diag_unit
  import noc_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0,
  parameter int unsigned PO_X = 0,  // primary output switch
  parameter int unsigned PO_Y = 0,
  parameter bit          PO2_EN = 1'b0,  // also report to a second primary output
  parameter int unsigned PO2_X = 0,
  parameter int unsigned PO2_Y = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] detect,      // indexed by port_e
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic              out_ready,
  output logic              report_evt   // a report packet left this cycle
);
  logic [NPORTS-1:0] pending, reported, new_det;
  logic [NPORTS-1:0] pick;
  logic              copy2;   // current report goes to the second output
  coord_t            faulty;
  header_t           hdr;

  // neighbour in the direction of input port p
  function automatic coord_t neighbour(port_e p);
    coord_t c;
    c.x = COORD_W'(MY_X);
    c.y = COORD_W'(MY_Y);
    case (p)
      PORT_E:  c.x = COORD_W'(MY_X + 1);
      PORT_W:  c.x = COORD_W'(MY_X - 1);
      PORT_N:  c.y = COORD_W'(MY_Y + 1);
      PORT_S:  c.y = COORD_W'(MY_Y - 1);
      default: ;
    endcase
    return c;
  endfunction

  // a packet from the own processor cannot be distracted: ignore port 0
  assign new_det = detect & ~reported & {{(NPORTS-1){1'b1}}, 1'b0};

  always_comb begin
    pick   = '0;
    faulty = '0;
    for (int i = NPORTS-1; i >= 1; i--) begin
      if (pending[i]) begin
        pick   = '0;
        pick[i] = 1'b1;
        faulty = neighbour(port_e'(i));
      end
    end
  end

  always_comb begin
    hdr       = '0;
    hdr.ptype = PKT_DIAG;
    hdr.dst.x = copy2 ? COORD_W'(PO2_X) : COORD_W'(PO_X);
    hdr.dst.y = copy2 ? COORD_W'(PO2_Y) : COORD_W'(PO_Y);
    hdr.src.x = COORD_W'(MY_X);
    hdr.src.y = COORD_W'(MY_Y);
    hdr.sc    = '0;
    hdr.info  = INFO_W'(faulty);
  end

  assign out_valid     = (pending != '0);
  assign out_flit.head = 1'b1;
  assign out_flit.tail = 1'b1;
  assign out_flit.data = hdr;
  assign report_evt    = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      reported <= '0;
      copy2    <= 1'b0;
    end else begin
      // a report is done after its last copy has left
      if (report_evt && PO2_EN && !copy2) begin
        copy2   <= 1'b1;
        pending <= pending | new_det;
      end else if (report_evt) begin
        copy2   <= 1'b0;
        pending <= (pending & ~pick) | new_det;
      end else begin
        pending <= pending | new_det;
      end
      reported <= reported | new_det;
    end
  end

endmodule

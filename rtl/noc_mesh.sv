// noc_mesh: self-testing 2-D mesh network on chip (top level).
//
// MESH_W x MESH_H self-testable switches (noc_switch) are joined into a
// regular mesh with XY wormhole routing. Switch (x, y) has number
// y*MESH_W + x + 1: switch 1 is the south-west corner, numbers rise
// eastwards and then northwards, and East/North are +X/+Y. Each switch's
// East output feeds its east neighbour's West input and so on. Every switch
// has a local port for its processor; the processors themselves are not
// part of this design, so the local injection and ejection links are ports
// of this module (index = switch number - 1).
//
// Online testing:
//  * each switch detects distracted packets and switch count overflows;
//    their error outputs are chained (switch 1 -> 2 -> ... -> N) into the
//    single `error` output;
//  * a distraction detection makes the switch report its faulty neighbour
//    in PKT_DIAG packets to the primary output switches (PO_X, PO_Y) and,
//    with PO2_EN, (PO2_X, PO2_Y), whose processors receive them on their
//    ejection ports;
//  * a trapped packet detector sits on every ejection link, on the
//    processor side, and flags packets whose destination is not that
//    switch (stuck-at-processor faults); these flags are per processor and
//    are not part of `error`, since a trapped fault cannot be reported.
// `fault` injects a stuck-at-port fault into any switch's router.
//
// Mesh edges: an output pointing out of the mesh has nothing attached; it
// is held ready, so flits a faulty router steers off the edge are lost. Edge
// inputs are idle.
//
// The mesh size defaults to 3x3, the sample network the online test is
// explained on, with switches 1 and 9 as primary input/output; reports
// go to both, switch 9 first (PO2_EN = 0 keeps only switch 9). 5x5 and 7x7 are set through MESH_W and
// MESH_H. Enable bits select the four method combinations:
//   method 1: EN_DD            method 2: EN_DD + EN_SC
//   method 3: EN_DD + EN_TP    method 4: EN_DD + EN_SC + EN_TP (default)
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_W     = 3,
  parameter int unsigned MESH_H     = 3,
  parameter int unsigned PO_X       = MESH_W - 1,
  parameter int unsigned PO_Y       = MESH_H - 1,
  parameter bit          PO2_EN     = 1'b1,
  parameter int unsigned PO2_X      = 0,
  parameter int unsigned PO2_Y      = 0,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          EN_DD      = 1'b1,
  parameter bit          EN_SC      = 1'b1,
  parameter bit          EN_TP      = 1'b1,
  localparam int unsigned N         = MESH_W * MESH_H
) (
  input  logic         clk,
  input  logic         rst_n,
  input  fault_e       fault      [N],

  // processor -> switch
  input  logic         lin_valid  [N],
  input  flit_t        lin_flit   [N],
  output logic         lin_ready  [N],
  // switch -> processor
  output logic         lout_valid [N],
  output flit_t        lout_flit  [N],
  input  logic         lout_ready [N],

  output logic         error,        // chained switch error line
  output logic [N-1:0] dd_err,       // sticky, per switch
  output logic [N-1:0] sc_err,
  output logic [N-1:0] trap_err,     // sticky, per processor
  output logic [N-1:0] dd_evt,       // one-cycle events
  output logic [N-1:0] sc_evt,
  output logic [N-1:0] trap_evt,
  output logic [N-1:0] diag_evt
);
  logic  s_in_valid  [N][NPORTS];
  flit_t s_in_flit   [N][NPORTS];
  logic  s_in_ready  [N][NPORTS];
  logic  s_out_valid [N][NPORTS];
  flit_t s_out_flit  [N][NPORTS];
  logic  s_out_ready [N][NPORTS];
  logic  err_chain   [N+1];

  assign err_chain[0] = 1'b0;
  assign error        = err_chain[N];

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int unsigned ID = y*MESH_W + x;

      // local port
      assign s_in_valid[ID][PORT_P]  = lin_valid[ID];
      assign s_in_flit[ID][PORT_P]   = lin_flit[ID];
      assign lin_ready[ID]           = s_in_ready[ID][PORT_P];
      assign lout_valid[ID]          = s_out_valid[ID][PORT_P];
      assign lout_flit[ID]           = s_out_flit[ID][PORT_P];
      assign s_out_ready[ID][PORT_P] = lout_ready[ID];

      // east link
      if (x < MESH_W-1) begin : g_e
        assign s_in_valid[ID][PORT_E]  = s_out_valid[ID+1][PORT_W];
        assign s_in_flit[ID][PORT_E]   = s_out_flit[ID+1][PORT_W];
        assign s_out_ready[ID][PORT_E] = s_in_ready[ID+1][PORT_W];
      end else begin : g_e_edge
        assign s_in_valid[ID][PORT_E]  = 1'b0;
        assign s_in_flit[ID][PORT_E]   = '0;
        assign s_out_ready[ID][PORT_E] = 1'b1;
      end
      // west link
      if (x > 0) begin : g_w
        assign s_in_valid[ID][PORT_W]  = s_out_valid[ID-1][PORT_E];
        assign s_in_flit[ID][PORT_W]   = s_out_flit[ID-1][PORT_E];
        assign s_out_ready[ID][PORT_W] = s_in_ready[ID-1][PORT_E];
      end else begin : g_w_edge
        assign s_in_valid[ID][PORT_W]  = 1'b0;
        assign s_in_flit[ID][PORT_W]   = '0;
        assign s_out_ready[ID][PORT_W] = 1'b1;
      end
      // north link
      if (y < MESH_H-1) begin : g_n
        assign s_in_valid[ID][PORT_N]  = s_out_valid[ID+MESH_W][PORT_S];
        assign s_in_flit[ID][PORT_N]   = s_out_flit[ID+MESH_W][PORT_S];
        assign s_out_ready[ID][PORT_N] = s_in_ready[ID+MESH_W][PORT_S];
      end else begin : g_n_edge
        assign s_in_valid[ID][PORT_N]  = 1'b0;
        assign s_in_flit[ID][PORT_N]   = '0;
        assign s_out_ready[ID][PORT_N] = 1'b1;
      end
      // south link
      if (y > 0) begin : g_s
        assign s_in_valid[ID][PORT_S]  = s_out_valid[ID-MESH_W][PORT_N];
        assign s_in_flit[ID][PORT_S]   = s_out_flit[ID-MESH_W][PORT_N];
        assign s_out_ready[ID][PORT_S] = s_in_ready[ID-MESH_W][PORT_N];
      end else begin : g_s_edge
        assign s_in_valid[ID][PORT_S]  = 1'b0;
        assign s_in_flit[ID][PORT_S]   = '0;
        assign s_out_ready[ID][PORT_S] = 1'b1;
      end

      noc_switch #(
        .MY_X(x), .MY_Y(y), .PO_X(PO_X), .PO_Y(PO_Y),
        .PO2_EN(PO2_EN), .PO2_X(PO2_X), .PO2_Y(PO2_Y),
        .FIFO_DEPTH(FIFO_DEPTH), .EN_DD(EN_DD), .EN_SC(EN_SC)
      ) u_sw (
        .clk, .rst_n,
        .fault     (fault[ID]),
        .in_valid  (s_in_valid[ID]),
        .in_flit   (s_in_flit[ID]),
        .in_ready  (s_in_ready[ID]),
        .out_valid (s_out_valid[ID]),
        .out_flit  (s_out_flit[ID]),
        .out_ready (s_out_ready[ID]),
        .err_i     (err_chain[ID]),
        .err_o     (err_chain[ID+1]),
        .dd_evt    (dd_evt[ID]),
        .sc_evt    (sc_evt[ID]),
        .diag_evt  (diag_evt[ID]),
        .dd_err    (dd_err[ID]),
        .sc_err    (sc_err[ID])
      );

      trapped_packet_detector u_tp (
        .clk, .rst_n,
        .enable  (EN_TP),
        .sw      ('{x: COORD_W'(x), y: COORD_W'(y)}),
        .valid   (lout_valid[ID]),
        .ready   (lout_ready[ID]),
        .flit    (lout_flit[ID]),
        .trap_evt(trap_evt[ID]),
        .trap_err(trap_err[ID])
      );
    end
  end

endmodule

// noc_switch: self-testable five-port wormhole switch for a 2-D mesh.
//
// The switch has a local processor port and East, South, West and North
// ports, each with an input buffer. Packets are worms of flits: the head
// flit at the front of an input buffer is routed by the XY router, its
// input then requests that output port, and a round-robin arbiter per
// output grants one requester. The granted input owns the output until its
// tail flit has passed, so the flits of a packet are never interleaved.
// Flits leave an input buffer straight through the crossbar into the next
// switch's input buffer.
//
// Online test hardware added to the switch:
//  * distraction detection: as a head flit leaves, its source and
//    destination are compared with the switch address (distraction_detector).
//    A packet off its XY path raises dd_evt and the sticky dd_err, and the
//    diagnosis unit sends a report naming the neighbour it came from to the
//    primary output switch (PO_X, PO_Y), and with PO2_EN also to a second
//    one (PO2_X, PO2_Y). The report enters the switch as a
//    sixth input, competing for the outputs like any other packet.
//  * switch count: every head flit that passes has its switch count field
//    incremented (switch_counter); an overflow raises sc_evt and the sticky
//    sc_err.
//  * err_o is err_i OR this switch's sticky errors, so the error outputs of
//    all switches can be chained into one error line.
// EN_DD and EN_SC turn the two methods on or off, giving the document's
// four method combinations together with the processor-side trapped packet
// detector.
//
// Fault injection: `fault` makes the router stuck at one port (the
// document's high-level control fault model); FAULT_NONE is normal.
//
// Timing: a head flit at the front of a buffer is allocated an output in
// one cycle and crosses to the next switch's buffer in the following cycle;
// body flits then cross one per cycle. Ready signals come from buffer
// occupancy only.
//
// Structure, port count, XY routing, wormhole switching and the test
// methods follow the document. Buffer depth, round-robin arbitration,
// valid/ready flow control and the allocation cycle are this design's own.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter int unsigned PO_X       = 2,
  parameter int unsigned PO_Y       = 2,
  parameter bit          PO2_EN     = 1'b0,  // second primary output
  parameter int unsigned PO2_X      = 0,
  parameter int unsigned PO2_Y      = 0,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          EN_DD      = 1'b1,  // distraction detection + diagnosis
  parameter bit          EN_SC      = 1'b1   // switch count
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fault_e fault,

  input  logic  in_valid  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  in_ready  [NPORTS],
  output logic  out_valid [NPORTS],
  output flit_t out_flit  [NPORTS],
  input  logic  out_ready [NPORTS],

  input  logic  err_i,       // error from other switches
  output logic  err_o,
  output logic  dd_evt,      // distracted packet seen this cycle
  output logic  sc_evt,      // switch count overflow this cycle
  output logic  diag_evt,    // diagnosis report sent this cycle
  output logic  dd_err,
  output logic  sc_err
);
  localparam int unsigned NIN = NPORTS + 1;  // five buffers + diagnosis unit
  localparam int unsigned DIAG = NPORTS;
  localparam int unsigned OW = $clog2(NIN);

  localparam coord_t ME = '{x: COORD_W'(MY_X), y: COORD_W'(MY_Y)};

  // front of each input
  logic    hv     [NIN];
  flit_t   hf     [NIN];
  logic    pop    [NIN];
  header_t hdr_in [NIN];
  header_t hdr_out[NIN];
  port_e   rport  [NIN];
  logic    distr  [NIN];
  logic    ovf    [NIN];

  // input state: holds an output
  logic    routed [NIN];
  port_e   sel    [NIN];

  // output state
  logic          locked [NPORTS];
  logic [OW-1:0] owner  [NPORTS];
  logic [NIN-1:0] req   [NPORTS];
  logic [NIN-1:0] gnt   [NPORTS];

  logic [NPORTS-1:0] det_mask;

  for (genvar i = 0; i < NPORTS; i++) begin : g_buf
    input_buffer #(.DEPTH(FIFO_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_flit  (in_flit[i]),
      .in_ready (in_ready[i]),
      .out_valid(hv[i]),
      .out_flit (hf[i]),
      .out_ready(pop[i])
    );
  end

  diag_unit #(
    .MY_X(MY_X), .MY_Y(MY_Y), .PO_X(PO_X), .PO_Y(PO_Y),
    .PO2_EN(PO2_EN), .PO2_X(PO2_X), .PO2_Y(PO2_Y)
  ) u_diag (
    .clk, .rst_n,
    .detect    (det_mask),
    .out_valid (hv[DIAG]),
    .out_flit  (hf[DIAG]),
    .out_ready (pop[DIAG]),
    .report_evt(diag_evt)
  );

  for (genvar i = 0; i < NIN; i++) begin : g_in
    assign hdr_in[i] = header_t'(hf[i].data);

    xy_route u_route (
      .cur  (ME),
      .dst  (hdr_in[i].dst),
      .fault(fault),
      .port (rport[i])
    );

    distraction_detector u_dd (
      .check     (EN_DD && hv[i] && hf[i].head),
      .sw        (ME),
      .src       (hdr_in[i].src),
      .dst       (hdr_in[i].dst),
      .distracted(distr[i])
    );

    switch_counter u_sc (
      .enable  (EN_SC && hf[i].head),
      .hdr_in  (hdr_in[i]),
      .hdr_out (hdr_out[i]),
      .overflow(ovf[i])
    );

    assign pop[i] = routed[i] && hv[i] && out_ready[sel[i]];
  end

  // requests and arbitration per output
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb begin
      req[o] = '0;
      for (int i = 0; i < NIN; i++)
        req[o][i] = hv[i] && hf[i].head && !routed[i] && !locked[o]
                    && (rport[i] == port_e'(o));
    end

    rr_arbiter #(.N(NIN)) u_arb (
      .clk, .rst_n,
      .req    (req[o]),
      .advance(req[o] != '0),
      .grant  (gnt[o])
    );

    always_comb begin
      out_valid[o] = 1'b0;
      out_flit[o]  = '0;
      if (locked[o]) begin
        out_valid[o]     = hv[owner[o]];
        out_flit[o]      = hf[owner[o]];
        out_flit[o].data = hdr_out[owner[o]];
      end
    end
  end

  // allocation and release
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NIN; i++) begin
        routed[i] <= 1'b0;
        sel[i]    <= PORT_P;
      end
      for (int o = 0; o < NPORTS; o++) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
      end
    end else begin
      for (int i = 0; i < NIN; i++) begin
        if (pop[i] && hf[i].tail) begin
          routed[i]      <= 1'b0;
          locked[sel[i]] <= 1'b0;
        end
      end
      for (int o = 0; o < NPORTS; o++) begin
        for (int i = 0; i < NIN; i++) begin
          if (gnt[o][i]) begin
            routed[i] <= 1'b1;
            sel[i]    <= port_e'(o);
            locked[o] <= 1'b1;
            owner[o]  <= OW'(i);
          end
        end
      end
    end
  end

  // online test events
  always_comb begin
    det_mask = '0;
    dd_evt   = 1'b0;
    sc_evt   = 1'b0;
    for (int i = 0; i < NIN; i++) begin
      if (pop[i] && hf[i].head) begin
        if (distr[i]) begin
          dd_evt = 1'b1;
          if (i < NPORTS) det_mask[i] = 1'b1;
        end
        if (ovf[i]) sc_evt = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dd_err <= 1'b0;
      sc_err <= 1'b0;
    end else begin
      if (dd_evt) dd_err <= 1'b1;
      if (sc_evt) sc_err <= 1'b1;
    end
  end

  assign err_o = err_i || dd_err || sc_err;

endmodule

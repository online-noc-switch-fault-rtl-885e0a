// tb_noc_switch: self-checking test of one self-testable switch at (1,1)
// of a 3x3 mesh, primary output switch at (2,2).
//
// Phase 1 (fault free): random worms of 1..4 flits enter every input port,
// with sources and destinations whose XY route passes the switch through
// that port. Outputs are drained with random ready. Each flit is tagged
// with its packet number and index; the checker follows every output port
// and checks the XY output port, that worms are not interleaved, that the
// switch count field is incremented by one and that no error is raised.
// Phase 2: a distracted packet raises dd_evt/dd_err/err_o and a diagnosis
// report naming the sending neighbour leaves towards the primary output.
// Phase 3: a header with a full switch count raises sc_evt.
// Phase 4: a stuck-at-West fault sends an eastbound packet west.
// Phase 5: err_i reaches err_o.
module tb_noc_switch;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  fault_e fault;
  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  logic err_i, err_o, dd_evt, sc_evt, diag_evt, dd_err, sc_err;

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_dd = 0, n_sc = 0, n_diag = 0, n_stall = 0;

  noc_switch #(.MY_X(1), .MY_Y(1), .PO_X(2), .PO_Y(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int port; int len; int sc; } pinfo_t;
  pinfo_t pk [int];
  flit_t  txq [NPORTS][$];
  int     cur_id [NPORTS], cur_seq [NPORTS];
  flit_t  rx_last [NPORTS];
  logic   rx_new  [NPORTS];

  function automatic port_e ref_route(coord_t c, coord_t d);
    if (d.x > c.x) return PORT_E;
    if (d.x < c.x) return PORT_W;
    if (d.y > c.y) return PORT_N;
    if (d.y < c.y) return PORT_S;
    return PORT_P;
  endfunction

  // queue one packet into input port p
  task automatic send(int p, coord_t s, coord_t d, int len, int sc, int exp_port);
    header_t h;
    int id;
    id = n_sent++;
    h = '0;
    h.ptype = PKT_DATA; h.src = s; h.dst = d; h.sc = SC_W'(sc); h.info = INFO_W'(id);
    pk[id] = '{port: exp_port, len: len, sc: sc};
    txq[p].push_back('{head: 1'b1, tail: (len == 1), data: h});
    for (int k = 1; k < len; k++)
      txq[p].push_back('{head: 1'b0, tail: (k == len-1), data: {16'(id), 16'(k)}});
  endtask

  // drivers
  always @(negedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready_q[p]) void'(txq[p].pop_front());
    end
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = (txq[p].size() > 0) && ($urandom_range(0, 3) != 0);
      in_flit[p]  = (txq[p].size() > 0) ? txq[p][0] : '0;
      out_ready[p] = ($urandom_range(0, 2) != 0);
    end
  end
  logic in_ready_q [NPORTS];
  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      in_ready_q[p] <= in_ready[p];
      if (out_valid[p] && !out_ready[p]) n_stall++;
    end
  end

  // checker of data packets (diagnosis packets checked in phase 2)
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      rx_new[p] <= 1'b0;
      if (out_valid[p] && out_ready[p]) begin
        header_t h;
        rx_new[p]  <= 1'b1;
        rx_last[p] <= out_flit[p];
        h = header_t'(out_flit[p].data);
        if (out_flit[p].head && h.ptype == PKT_DATA) begin
          int id;
          id = int'(h.info);
          checks++;
          if (cur_id[p] != -1) begin failures++; $display("port %0d: head inside worm", p); end
          if (!pk.exists(id)) begin failures++; $display("unknown packet %0d", id); end
          else begin
            checks++;
            if (pk[id].port != p) begin failures++; $display("pkt %0d on port %0d exp %0d", id, p, pk[id].port); end
            checks++;
            if (int'(h.sc) != ((pk[id].sc + 1) % 16)) begin failures++; $display("pkt %0d sc %0d", id, h.sc); end
          end
          cur_id[p] = id; cur_seq[p] = 1;
          if (out_flit[p].tail) begin cur_id[p] = -1; n_recv++; end
        end else if (!out_flit[p].head) begin
          checks++;
          if (out_flit[p].data != {16'(cur_id[p]), 16'(cur_seq[p])}) begin
            failures++; $display("port %0d body mismatch %h id %0d seq %0d", p, out_flit[p].data, cur_id[p], cur_seq[p]);
          end
          cur_seq[p]++;
          if (out_flit[p].tail) begin
            checks++;
            if (pk.exists(cur_id[p]) && cur_seq[p] != pk[cur_id[p]].len) begin failures++; $display("length"); end
            cur_id[p] = -1; n_recv++;
          end
        end
      end
    end
    if (dd_evt) n_dd++;
    if (sc_evt) n_sc++;
    if (diag_evt) n_diag++;
  end

  task automatic wait_drain();
    int t;
    t = 0;
    while ((txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size() + txq[4].size()) > 0 && t < 5000) begin
      @(posedge clk); t++;
    end
    repeat (30) @(posedge clk);
  endtask

  localparam coord_t ME = '{x: 3'd1, y: 3'd1};

  initial begin
    fault = FAULT_NONE; err_i = 0;
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 0; cur_id[p] = -1; in_ready_q[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- phase 1: legal traffic through (1,1)
    for (int n = 0; n < 600; n++) begin
      coord_t s, d, prev;
      int sx, sy, dx, dy, inp, len;
      bit on;
      // pick src/dst whose XY path contains (1,1)
      do begin
        sx = $urandom_range(0, 2); sy = $urandom_range(0, 2);
        dx = $urandom_range(0, 2); dy = $urandom_range(0, 2);
        on = (sy == 1 && ((sx <= 1 && dx >= 1) || (sx >= 1 && dx <= 1))) ||
             (dx == 1 && ((sy <= 1 && dy >= 1) || (sy >= 1 && dy <= 1)));
      end while (!on);
      s = '{x: 3'(sx), y: 3'(sy)}; d = '{x: 3'(dx), y: 3'(dy)};
      // input port: where the previous hop lies
      if (sx == 1 && sy == 1) inp = PORT_P;
      else if (sy == 1) inp = (sx < 1) ? PORT_W : PORT_E;
      else inp = (sy < 1) ? PORT_S : PORT_N;
      len = $urandom_range(1, 4);
      send(inp, s, d, len, $urandom_range(0, 12), int'(ref_route(ME, d)));
    end
    wait_drain();
    checks++;
    if (n_recv != n_sent) begin failures++; $display("delivered %0d of %0d", n_recv, n_sent); end
    checks++;
    if (err_o || dd_err || sc_err || n_diag != 0) begin failures++; $display("error in fault-free traffic"); end
    checks++;
    if (n_stall == 0) begin failures++; $display("no back-pressure seen"); end

    // ---- phase 2: distracted packet from the East neighbour
    send(PORT_E, '{x: 3'd0, y: 3'd0}, '{x: 3'd0, y: 3'd2}, 2, 1, PORT_W);
    wait_drain();
    checks++;
    if (!(dd_err && err_o && n_dd == 1)) begin failures++; $display("distraction not detected"); end
    checks++;
    if (n_diag != 1) begin failures++; $display("no diagnosis report (%0d)", n_diag); end
    begin
      header_t h;
      h = header_t'(rx_last[PORT_E].data);
      checks++;
      if (!(h.ptype == PKT_DIAG && h.dst == '{x: 3'd2, y: 3'd2} && h.src == ME &&
            h.info[5:0] == 6'({3'd2, 3'd1}) && h.sc == 1)) begin
        failures++; $display("bad report %h", rx_last[PORT_E]);
      end
    end

    // ---- phase 3: switch count overflow
    send(PORT_W, '{x: 3'd0, y: 3'd1}, '{x: 3'd2, y: 3'd1}, 1, 15, PORT_E);
    wait_drain();
    checks++;
    if (!(sc_err && n_sc == 1)) begin failures++; $display("overflow not detected"); end

    // ---- phase 4: stuck-at-West
    fault = FAULT_SAW;
    send(PORT_W, '{x: 3'd0, y: 3'd1}, '{x: 3'd2, y: 3'd1}, 3, 0, PORT_W);
    send(PORT_P, ME, '{x: 3'd1, y: 3'd2}, 2, 0, PORT_W);
    wait_drain();
    fault = FAULT_NONE;

    // ---- phase 5: error chain input (after reset of the sticky flags)
    rst_n = 0; @(posedge clk); rst_n = 1; @(posedge clk);
    #1 checks++;
    if (err_o) begin failures++; $display("err_o after reset"); end
    err_i = 1; #1 checks++;
    if (!err_o) begin failures++; $display("err_i not passed"); end
    err_i = 0;

    checks++;
    if (n_recv != n_sent) begin failures++; $display("delivered %0d of %0d", n_recv, n_sent); end
    $display("sent %0d delivered %0d stalls %0d dd %0d sc %0d diag %0d", n_sent, n_recv, n_stall, n_dd, n_sc, n_diag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

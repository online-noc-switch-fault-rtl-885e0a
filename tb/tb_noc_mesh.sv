// tb_noc_mesh: end-to-end test of the self-testing mesh at its default
// size (3x3, switches numbered 1..9 from the south-west corner, primary
// output switch 9), with all three test methods on.
//
// A. Fault-free random traffic: every processor sends worms of 1..4 flits
//    to random destinations while every processor drains with random
//    ready. Each packet must reach the processor it is addressed to, intact
//    and in order, and no error, report or trap may appear.
// B. Switch 3 stuck at West, packet 1 -> 9: the packet bounces between
//    switches 2 and 3; distraction detection stays silent and the switch
//    count overflows.
// C. Switch 7 stuck at East, packet 9 -> 1: same, between 8 and 7.
// D. Switch 2 stuck at North, packet 1 -> 3: switch 5 sees a distracted
//    packet and reports switch 2 to processors 9 and 1 in diagnosis packets; the
//    packet itself still reaches processor 3.
// E. Switch 5 stuck at processor, packet 4 -> 6: trapped at processor 5,
//    flagged by its trapped packet detector, not on the error line.
// F. Both the faults of B and E at once: both are detected.
// Each mechanism (delivery, back-pressure, multi-flit worm, distraction,
// overflow, diagnosis report, trapped packet) is counted and must occur.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int W = 3, H = 3, N = W*H;

  logic clk = 0, rst_n = 0;
  fault_e fault [N];
  logic  lin_valid [N], lin_ready [N], lout_valid [N], lout_ready [N];
  flit_t lin_flit [N], lout_flit [N];
  logic  error;
  logic [N-1:0] dd_err, sc_err, trap_err, dd_evt, sc_evt, trap_evt, diag_evt;

  noc_mesh dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_stall = 0, n_multi = 0;
  int n_diag_po1 = 0;
  int n_dd = 0, n_sc = 0, n_diag_sent = 0, n_diag_recv = 0, n_trap = 0;
  coord_t last_report;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int dst; int len; } pinfo_t;
  pinfo_t pk [int];
  flit_t  txq [N][$];
  logic   lin_ready_q [N];
  int     cur_id [N], cur_seq [N];

  function automatic coord_t xy(int id);
    return '{x: COORD_W'(id % W), y: COORD_W'(id / W)};
  endfunction

  task automatic send(int s, int d, int len);
    header_t h;
    int id;
    id = n_sent++;
    h = '0;
    h.ptype = PKT_DATA; h.src = xy(s); h.dst = xy(d); h.info = INFO_W'(id);
    pk[id] = '{dst: d, len: len};
    txq[s].push_back('{head: 1'b1, tail: (len == 1), data: h});
    for (int k = 1; k < len; k++)
      txq[s].push_back('{head: 1'b0, tail: (k == len-1), data: {16'(id), 16'(k)}});
  endtask

  always @(negedge clk) begin
    for (int p = 0; p < N; p++)
      if (lin_valid[p] && lin_ready_q[p]) void'(txq[p].pop_front());
    for (int p = 0; p < N; p++) begin
      lin_valid[p]  = (txq[p].size() > 0) && ($urandom_range(0, 3) != 0);
      lin_flit[p]   = (txq[p].size() > 0) ? txq[p][0] : '0;
      lout_ready[p] = ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      lin_ready_q[p] <= lin_ready[p];
      if (rst_n && lout_valid[p] && !lout_ready[p]) n_stall++;
    end
  end

  // receive side of every processor
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N; p++) begin
      if (lout_valid[p] && lout_ready[p]) begin
        header_t h;
        h = header_t'(lout_flit[p].data);
        if (lout_flit[p].head && h.ptype == PKT_DIAG) begin
          n_diag_recv++;
          last_report = coord_t'(h.info[2*COORD_W-1:0]);
          checks++;
          if (p != N-1 && p != 0) begin failures++; $display("report at processor %0d", p+1); end
          if (p == 0) n_diag_po1++;
        end else if (lout_flit[p].head) begin
          int id;
          id = int'(h.info);
          checks++;
          if (!pk.exists(id) || (pk[id].dst != p && !trap_evt_exp(p))) begin
            failures++; $display("packet %0d at wrong processor %0d", id, p+1);
          end
          cur_id[p] = id; cur_seq[p] = 1;
          if (lout_flit[p].tail) n_recv++;
        end else begin
          checks++;
          if (lout_flit[p].data != {16'(cur_id[p]), 16'(cur_seq[p])}) begin
            failures++; $display("processor %0d body mismatch", p+1);
          end
          cur_seq[p]++;
          if (lout_flit[p].tail) begin
            n_recv++; n_multi++;
            checks++;
            if (cur_seq[p] != pk[cur_id[p]].len) begin failures++; $display("length"); end
          end
        end
      end
    end
    n_dd        += $countones(dd_evt);
    n_sc        += $countones(sc_evt);
    n_diag_sent += $countones(diag_evt);
    n_trap      += $countones(trap_evt);
  end

  int sap_node = -1;
  function automatic bit trap_evt_exp(int p);
    return p == sap_node;
  endfunction

  task automatic run(int cycles);
    repeat (cycles) @(posedge clk);
  endtask

  task automatic restart();
    @(negedge clk);
    rst_n = 0;
    for (int p = 0; p < N; p++) begin
      txq[p].delete(); fault[p] = FAULT_NONE; cur_id[p] = -1;
    end
    sap_node = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin
      fault[p] = FAULT_NONE; lin_valid[p] = 0; lin_flit[p] = '0; lout_ready[p] = 0;
      lin_ready_q[p] = 0; cur_id[p] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- A: fault-free traffic
    for (int n = 0; n < 1500; n++)
      send($urandom_range(0, N-1), $urandom_range(0, N-1), $urandom_range(1, 4));
    begin
      int t = 0;
      while (n_recv < n_sent && t < 50000) begin @(posedge clk); t++; end
      $display("A: %0d packets delivered in %0d cycles", n_recv, t);
    end
    checks++; if (n_recv != n_sent) begin failures++; $display("A: delivered %0d of %0d", n_recv, n_sent); end
    checks++; if (error || dd_err != 0 || sc_err != 0 || trap_err != 0 || n_diag_sent != 0) begin
      failures++; $display("A: false alarm");
    end

    // ---- B: switch 3 SaW, 1 -> 9
    restart();
    fault[2] = FAULT_SAW;
    send(0, 8, 1);
    run(400);
    checks++; if (!(error && sc_err != 0)) begin failures++; $display("B: overflow not seen"); end
    checks++; if (dd_err != 0) begin failures++; $display("B: unexpected distraction"); end

    // ---- C: switch 7 SaE, 9 -> 1
    restart();
    fault[6] = FAULT_SAE;
    send(8, 0, 1);
    run(400);
    checks++; if (!(error && sc_err != 0)) begin failures++; $display("C: overflow not seen"); end
    checks++; if (dd_err != 0) begin failures++; $display("C: unexpected distraction"); end

    // ---- D: switch 2 SaN, 1 -> 3
    restart();
    fault[1] = FAULT_SAN;
    begin
      int recv0, diag0;
      recv0 = n_recv; diag0 = n_diag_recv;
      send(0, 2, 3);
      run(300);
      checks++; if (!(error && dd_err == 9'(1 << 4))) begin failures++; $display("D: dd_err=%b", dd_err); end
      checks++; if (n_diag_recv != diag0 + 2 || n_diag_po1 != 1) begin failures++; $display("D: reports at processors 1 and 9: %0d", n_diag_recv - diag0); end
      checks++; if (last_report != xy(1)) begin failures++; $display("D: report names %0d,%0d", last_report.x, last_report.y); end
      checks++; if (n_recv != recv0 + 1) begin failures++; $display("D: packet lost"); end
    end

    // ---- E: switch 5 SaP, 4 -> 6
    restart();
    fault[4] = FAULT_SAP;
    sap_node = 4;
    send(3, 5, 2);
    run(200);
    checks++; if (trap_err != 9'(1 << 4)) begin failures++; $display("E: trap_err=%b", trap_err); end
    checks++; if (error) begin failures++; $display("E: error line set"); end

    // ---- F: two faults at once (switch 3 SaW and switch 5 SaP)
    restart();
    fault[2] = FAULT_SAW;
    fault[4] = FAULT_SAP;
    sap_node = 4;
    send(0, 8, 1);
    send(3, 5, 1);
    run(400);
    checks++; if (!(error && sc_err != 0)) begin failures++; $display("F: overflow not seen"); end
    checks++; if (trap_err != 9'(1 << 4)) begin failures++; $display("F: trap_err=%b", trap_err); end

    // ---- mechanisms
    $display("stalls %0d multi-flit %0d distracted %0d overflows %0d reports sent %0d received %0d trapped %0d",
             n_stall, n_multi, n_dd, n_sc, n_diag_sent, n_diag_recv, n_trap);
    checks++; if (n_stall == 0)     begin failures++; $display("no back-pressure"); end
    checks++; if (n_multi == 0)     begin failures++; $display("no multi-flit worm"); end
    checks++; if (n_dd == 0)        begin failures++; $display("no distraction"); end
    checks++; if (n_sc == 0)        begin failures++; $display("no overflow"); end
    checks++; if (n_diag_recv == 0) begin failures++; $display("no report"); end
    checks++; if (n_trap == 0)      begin failures++; $display("no trapped packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

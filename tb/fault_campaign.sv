// fault_campaign: fault-injection campaign on one MESH_W x MESH_H mesh
// (testbench helper).
//
// For each "addressed switch" share (25, 50, 75, 100 % of the switches are
// possible destinations) it first runs the traffic fault-free, then injects
// every stuck-at-port fault (SaE, SaS, SaW, SaN, SaP) into every switch,
// one at a time. Each run resets the mesh, sends PKTS two-flit packets from
// random processors to random addressed switches (source != destination,
// every addressed switch is the destination of at least one packet), runs
// RUN_CYCLES cycles, and reads the sticky detection flags. A fault counts
// as detected by
//   method 1 (distraction detection)         if any dd_err is set,
//   method 2 (+ switch count)                if any dd_err or sc_err is set,
//   method 3 (+ trapped packet detection)    if any dd_err or trap_err is set,
//   method 4 (all three)                     if any of them is set.
// The mesh is built with all methods on; the methods only add flags, so a
// single run gives all four results. Packet sources and destinations come
// from $urandom.
module fault_campaign
  import noc_pkg::*;
#(
  parameter int MESH_W     = 3,
  parameter int MESH_H     = 3,
  parameter int PKTS       = 12,
  parameter int RUN_CYCLES = 300
) (
  input  logic clk,
  output logic done,
  output int   detected [4][4],   // [share][method]
  output int   injected,          // faults per share
  output int   ff_ok [4],         // fault-free run clean and delivered
  output int   sc_only_seen       // faults found by method 2 but not method 1
);
  localparam int N = MESH_W * MESH_H;

  logic rst_n = 1'b0;
  fault_e fault [N];
  logic  lin_valid [N], lin_ready [N], lout_valid [N], lout_ready [N];
  flit_t lin_flit [N], lout_flit [N];
  logic  error;
  logic [N-1:0] dd_err, sc_err, trap_err, dd_evt, sc_evt, trap_evt, diag_evt;

  noc_mesh #(.MESH_W(MESH_W), .MESH_H(MESH_H)) u_mesh (.*);

  flit_t txq [N][$];
  int    delivered;

  function automatic coord_t xy(int id);
    return '{x: COORD_W'(id % MESH_W), y: COORD_W'(id / MESH_W)};
  endfunction

  logic lin_ready_q [N];

  // sources: a flit offered at a falling edge is taken at the next rising
  // edge if the switch is ready
  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      if (lin_valid[p] && lin_ready_q[p]) void'(txq[p].pop_front());
      lin_valid[p]  = rst_n && (txq[p].size() > 0);
      lin_flit[p]   = (txq[p].size() > 0) ? txq[p][0] : '0;
      lout_ready[p] = 1'b1;
    end
  end
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      lin_ready_q[p] <= rst_n && lin_ready[p];
      if (rst_n && lout_valid[p] && lout_ready[p] && lout_flit[p].tail) delivered++;
    end
  end

  int addr [N];   // random order of switches; the first K are addressed
  int srcs [PKTS], dsts [PKTS];

  task automatic load_traffic(int k);
    for (int i = 0; i < PKTS; i++) begin
      int s, d;
      d = addr[(i < k) ? i : $urandom_range(0, k-1)];
      do s = $urandom_range(0, N-1); while (s == d);
      srcs[i] = s; dsts[i] = d;
    end
  endtask

  task automatic run_once(int sw, fault_e f);
    @(negedge clk);
    rst_n = 1'b0;
    for (int p = 0; p < N; p++) begin txq[p].delete(); fault[p] = FAULT_NONE; end
    if (sw >= 0) fault[sw] = f;
    @(negedge clk);
    for (int i = 0; i < PKTS; i++) begin
      header_t h;
      h = '0;
      h.ptype = PKT_DATA; h.src = xy(srcs[i]); h.dst = xy(dsts[i]); h.info = INFO_W'(i);
      txq[srcs[i]].push_back('{head: 1'b1, tail: 1'b0, data: h});
      txq[srcs[i]].push_back('{head: 1'b0, tail: 1'b1, data: 32'(i)});
    end
    delivered = 0;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (RUN_CYCLES) @(posedge clk);
  endtask

  initial begin
    done = 1'b0;
    injected = 0;
    sc_only_seen = 0;
    for (int s = 0; s < 4; s++) begin
      ff_ok[s] = 0;
      for (int m = 0; m < 4; m++) detected[s][m] = 0;
    end
    for (int p = 0; p < N; p++) begin
      fault[p] = FAULT_NONE; addr[p] = p; lin_valid[p] = 1'b0; lin_ready_q[p] = 1'b0;
      lin_flit[p] = '0; lout_ready[p] = 1'b1;
    end
    addr.shuffle();
    repeat (2) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      int k;
      k = (N * (s + 1) + 3) / 4;
      load_traffic(k);
      run_once(-1, FAULT_NONE);
      ff_ok[s] = (!error && trap_err == '0 && delivered == PKTS) ? 1 : 0;
      if (s == 0) injected = 0;
      for (int sw = 0; sw < N; sw++) begin
        for (int f = 1; f <= 5; f++) begin
          bit m1, m2, m3, m4;
          run_once(sw, fault_e'(f));
          m1 = (dd_err != '0);
          m2 = m1 || (sc_err != '0);
          m3 = m1 || (trap_err != '0);
          m4 = m2 || m3;
          detected[s][0] += int'(m1);
          detected[s][1] += int'(m2);
          detected[s][2] += int'(m3);
          detected[s][3] += int'(m4);
          if (m2 && !m1) sc_only_seen++;
          if (s == 0) injected++;
        end
      end
    end
    done = 1'b1;
  end
endmodule

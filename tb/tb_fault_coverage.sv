// tb_fault_coverage: fault coverage of the four method combinations on
// 3x3, 5x5 and 7x7 meshes for 25/50/75/100 % addressed switches.
//
// Runs three fault_campaign instances side by side and prints, per mesh
// and share, the percentage of injected stuck-at-port faults each method
// detects. Checks: every fault-free run delivers all packets with no flag
// raised; method 2 and method 3 never detect less than method 1 and
// method 4 never less than either; trapped packet detection adds
// coverage at 100 % addressed; the switch count method finds faults that
// distraction detection alone misses.
module tb_fault_coverage;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done3, done5, done7;
  int det3 [4][4], det5 [4][4], det7 [4][4];
  int inj3, inj5, inj7;
  int ff3 [4], ff5 [4], ff7 [4];
  int sc3, sc5, sc7;
  int checks = 0, failures = 0;

  fault_campaign #(.MESH_W(3), .MESH_H(3), .PKTS(27), .RUN_CYCLES(200))
    u_c3 (.clk, .done(done3), .detected(det3), .injected(inj3), .ff_ok(ff3), .sc_only_seen(sc3));
  fault_campaign #(.MESH_W(5), .MESH_H(5), .PKTS(75), .RUN_CYCLES(300))
    u_c5 (.clk, .done(done5), .detected(det5), .injected(inj5), .ff_ok(ff5), .sc_only_seen(sc5));
  fault_campaign #(.MESH_W(7), .MESH_H(7), .PKTS(98), .RUN_CYCLES(300))
    u_c7 (.clk, .done(done7), .detected(det7), .injected(inj7), .ff_ok(ff7), .sc_only_seen(sc7));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(string name, int det [4][4], int inj, int ff [4], int scx);
    $display("%s mesh, %0d faults per share (fault coverage %%, methods 1..4)", name, inj);
    for (int s = 0; s < 4; s++) begin
      $display("  %3d%% addressed: %3d %3d %3d %3d", 25*(s+1),
               100*det[s][0]/inj, 100*det[s][1]/inj, 100*det[s][2]/inj, 100*det[s][3]/inj);
      checks++;
      if (ff[s] != 1) begin failures++; $display("  fault-free run failed"); end
      checks++;
      if (!(det[s][0] <= det[s][1] && det[s][0] <= det[s][2] &&
            det[s][1] <= det[s][3] && det[s][2] <= det[s][3])) begin
        failures++; $display("  method ordering violated");
      end
    end
    checks++;
    if (det[3][2] <= det[3][0]) begin failures++; $display("  trapped packet detection added nothing"); end
    checks++;
    if (scx == 0) begin failures++; $display("  switch count added nothing"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    wait (done3 && done5 && done7);
    report("3x3", det3, inj3, ff3, sc3);
    report("5x5", det5, inj5, ff5, sc5);
    report("7x7", det7, inj7, ff7, sc7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

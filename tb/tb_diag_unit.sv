// tb_diag_unit: diagnosis reports of switch (1,1) with primary output (2,2).
// Detections on each side must produce one single-flit PKT_DIAG packet per
// neighbour, naming the right neighbour and addressed to the primary output;
// repeated detections of a reported neighbour and detections on the local
// port must produce none; a report is held until taken. A second unit with
// two primary outputs must send every report to both, in turn.
module tb_diag_unit;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] detect;
  logic out_valid, out_ready, report_evt;
  flit_t out_flit;
  header_t h;
  int checks = 0, failures = 0;
  coord_t got[$];

  diag_unit #(.MY_X(1), .MY_Y(1), .PO_X(2), .PO_Y(2)) dut (.*);

  // second unit: every report also goes to primary output (0,0)
  logic [NPORTS-1:0] detect2;
  logic v2, r2, e2;
  flit_t f2;
  header_t h2;
  coord_t dst2[$], nb2[$];
  bit dual_stall = 0;
  int cyc2 = 0;
  always @(negedge clk) if (dual_stall) begin cyc2++; r2 = (cyc2 % 3 == 0); end
  diag_unit #(.MY_X(1), .MY_Y(1), .PO_X(2), .PO_Y(2), .PO2_EN(1'b1), .PO2_X(0), .PO2_Y(0)) dut2 (
    .clk, .rst_n, .detect(detect2), .out_valid(v2), .out_flit(f2), .out_ready(r2), .report_evt(e2));
  always @(posedge clk) if (rst_n && v2 && r2) begin
    h2 = header_t'(f2.data);
    dst2.push_back(h2.dst);
    nb2.push_back(coord_t'(h2.info[5:0]));
  end
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect reports
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    h = header_t'(out_flit.data);
    checks++;
    if (!(out_flit.head && out_flit.tail && h.ptype == PKT_DIAG &&
          h.dst == '{x: 3'd2, y: 3'd2} && h.src == '{x: 3'd1, y: 3'd1} && h.sc == 0)) begin
      failures++; $display("bad report header %h", out_flit);
    end
    got.push_back(coord_t'(h.info[5:0]));
  end

  task automatic pulse(logic [NPORTS-1:0] m);
    @(negedge clk); detect = m; @(negedge clk); detect = '0;
  endtask

  initial begin
    detect = '0; out_ready = 0; detect2 = '0; r2 = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // local port detection: ignored
    pulse(5'b00001);
    repeat (3) @(posedge clk);
    checks++; if (out_valid) begin failures++; $display("local port reported"); end
    // east side, held while not ready
    pulse(5'b00010);
    #1; checks++; if (!out_valid) begin failures++; $display("no report"); end
    repeat (5) @(posedge clk);
    checks++; if (!out_valid) begin failures++; $display("report dropped"); end
    @(negedge clk); out_ready = 1;
    @(negedge clk); out_ready = 0;
    checks++; if (out_valid) begin failures++; $display("report repeated"); end
    // east again: already reported
    pulse(5'b00010);
    #1; checks++; if (out_valid) begin failures++; $display("east reported twice"); end
    // south, west and north together
    pulse(5'b11100);
    out_ready = 1;
    repeat (6) @(posedge clk);
    checks++;
    if (got.size() != 4) begin failures++; $display("got %0d reports", got.size()); end
    else begin
      checks++; if (got[0] != '{x: 3'd2, y: 3'd1}) begin failures++; $display("east nb"); end
      checks++; if (got[1] != '{x: 3'd1, y: 3'd0}) begin failures++; $display("south nb"); end
      checks++; if (got[2] != '{x: 3'd0, y: 3'd1}) begin failures++; $display("west nb"); end
      checks++; if (got[3] != '{x: 3'd1, y: 3'd2}) begin failures++; $display("north nb"); end
    end
    // dual primary output: west and north detections, two copies each,
    // taken only every third cycle
    dual_stall = 1;
    @(negedge clk); detect2 = 5'b11000; @(negedge clk); detect2 = '0;
    repeat (40) @(posedge clk);
    checks++;
    if (dst2.size() != 4) begin failures++; $display("dual: %0d reports", dst2.size()); end
    else begin
      checks++;
      if (!(dst2[0] == '{x: 3'd2, y: 3'd2} && dst2[1] == '{x: 3'd0, y: 3'd0} &&
            dst2[2] == '{x: 3'd2, y: 3'd2} && dst2[3] == '{x: 3'd0, y: 3'd0})) begin
        failures++; $display("dual: wrong destinations");
      end
      checks++;
      if (!(nb2[0] == '{x: 3'd0, y: 3'd1} && nb2[1] == '{x: 3'd0, y: 3'd1} &&
            nb2[2] == '{x: 3'd1, y: 3'd2} && nb2[3] == '{x: 3'd1, y: 3'd2})) begin
        failures++; $display("dual: wrong neighbours");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_trapped_packet_detector: random packets arrive at the processor of
// switch (2,1); head flits whose destination differs must raise trap_evt
// one cycle later and set trap_err; body flits, flits not accepted, and
// the disabled detector must raise nothing.
module tb_trapped_packet_detector;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable, valid, ready, trap_evt, trap_err;
  coord_t sw;
  flit_t flit;
  header_t h;
  int checks = 0, failures = 0, traps = 0;
  bit exp_evt, exp_err;

  trapped_packet_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw = '{x: 3'd2, y: 3'd1};
    enable = 1; valid = 0; ready = 0; flit = '0;
    exp_err = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 1500) begin
        rst_n = 0; #1 rst_n = 1; exp_err = 0;
        enable = 0;
      end
      valid = $urandom_range(0, 1);
      ready = $urandom_range(0, 1);
      h = header_t'($urandom);
      if ($urandom_range(0, 3) != 0) h.dst = sw;
      flit = '{head: 1'($urandom), tail: 1'($urandom), data: h};
      exp_evt = enable && valid && ready && flit.head && (h.dst != sw);
      @(posedge clk); #1;
      if (exp_evt) begin exp_err = 1; traps++; end
      checks++;
      if (trap_evt !== exp_evt) begin failures++; $display("evt mismatch i=%0d", i); end
      checks++;
      if (trap_err !== exp_err) begin failures++; $display("err mismatch i=%0d", i); end
    end
    checks++;
    if (traps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_buffer: self-checking test of the switch input FIFO.
// Random pushes and pops against a queue reference model; checks order,
// data, that a full buffer refuses input and that an empty one shows none.
module tb_input_buffer;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;
  int checks = 0, failures = 0, fulls = 0;
  flit_t q[$];

  input_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = (cyc < 1000) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 1) == 1);
      in_flit   = '{head: 1'($urandom), tail: 1'($urandom), data: $urandom};
      #1;
      checks++;
      if (in_ready !== (q.size() < DEPTH)) begin failures++; $display("ready mismatch size=%0d", q.size()); end
      checks++;
      if (out_valid !== (q.size() > 0)) begin failures++; $display("valid mismatch"); end
      if (q.size() > 0) begin
        checks++;
        if (out_flit !== q[0]) begin failures++; $display("data mismatch %h %h", out_flit, q[0]); end
      end
      if (q.size() == DEPTH && in_valid) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_flit);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_switch_counter: checks the switch count increment and its overflow
// for every count value, random header contents, with the method on and
// off; also walks one header through 20 switches and checks that the
// overflow appears exactly at the 16th.
module tb_switch_counter;
  import noc_pkg::*;
  logic enable, overflow;
  header_t hdr_in, hdr_out, h;
  int checks = 0, failures = 0;

  switch_counter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 16; v++)
        for (int r = 0; r < 20; r++) begin
          enable = e[0];
          hdr_in = header_t'($urandom);
          hdr_in.sc = 4'(v);
          #1;
          h = hdr_in;
          if (e) h.sc = 4'(v + 1);
          checks++;
          if (hdr_out !== h) begin failures++; $display("hdr mismatch v=%0d e=%0d", v, e); end
          checks++;
          if (overflow !== (e == 1 && v == 15)) begin failures++; $display("ovf mismatch v=%0d e=%0d", v, e); end
        end
    // one packet through a chain of switches
    enable = 1;
    h = '0;
    for (int hop = 1; hop <= 20; hop++) begin
      hdr_in = h;
      #1;
      checks++;
      if (overflow !== (hop == 16)) begin failures++; $display("chain ovf at hop %0d", hop); end
      h = hdr_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

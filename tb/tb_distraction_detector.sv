// tb_distraction_detector: exhaustive test of the on-XY-path comparison
// for all switch, source and destination locations of a 4x4 area, with
// check on and off. The reference walks the actual XY path of the packet:
// a switch on that path must never be flagged; a switch neither in the
// source row nor the destination column must always be flagged.
module tb_distraction_detector;
  import noc_pkg::*;
  logic check, distracted;
  coord_t sw, src, dst;
  int checks = 0, failures = 0, flagged = 0;

  distraction_detector dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
    for (int s = 0; s < 4096; s++) begin
      bit exp, on_route;
      int x, y;
      sw  = '{x: 3'(s[1:0]),  y: 3'(s[3:2])};
      src = '{x: 3'(s[5:4]),  y: 3'(s[7:6])};
      dst = '{x: 3'(s[9:8]),  y: 3'(s[11:10])};
      check = c[0];
      // walk the XY route from src to dst
      on_route = 0;
      x = int'(src.x); y = int'(src.y);
      forever begin
        if (x == int'(sw.x) && y == int'(sw.y)) on_route = 1;
        if (x != int'(dst.x)) x += (int'(dst.x) > x) ? 1 : -1;
        else if (y != int'(dst.y)) y += (int'(dst.y) > y) ? 1 : -1;
        else break;
      end
      exp = check && !((sw.y == src.y) || (sw.x == dst.x));
      #1;
      checks++;
      if (distracted !== exp) begin failures++; $display("mismatch s=%h", s); end
      if (on_route) begin
        checks++;
        if (distracted) begin failures++; $display("on-route switch flagged s=%h", s); end
      end
      if (distracted) flagged++;
    end
    checks++;
    if (flagged == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

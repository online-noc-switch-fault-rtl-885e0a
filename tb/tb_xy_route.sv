// tb_xy_route: exhaustive test of XY route computation and stuck-at-port
// fault injection over all 8x8 switch/destination pairs and all faults.
module tb_xy_route;
  import noc_pkg::*;
  coord_t cur, dst;
  fault_e fault;
  port_e  port, exp;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 6; f++)
      for (int cx = 0; cx < 8; cx++) for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++) for (int dy = 0; dy < 8; dy++) begin
          cur = '{x: 3'(cx), y: 3'(cy)};
          dst = '{x: 3'(dx), y: 3'(dy)};
          fault = fault_e'(f);
          case (f)
            1: exp = PORT_E;
            2: exp = PORT_S;
            3: exp = PORT_W;
            4: exp = PORT_N;
            5: exp = PORT_P;
            default:
              if (dx != cx) exp = (dx > cx) ? PORT_E : PORT_W;
              else if (dy != cy) exp = (dy > cy) ? PORT_N : PORT_S;
              else exp = PORT_P;
          endcase
          #1;
          checks++;
          if (port !== exp) begin
            failures++;
            if (failures < 10) $display("f=%0d cur=%0d,%0d dst=%0d,%0d got %0d exp %0d", f, cx, cy, dx, dy, port, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of noc_route_xy: for every router and destination of a 4x4 mesh
// the output port must be the first hop of the X-then-Y path, worked out
// here from the coordinate differences.
module noc_route_xy_tb;
  import pfl_pkg::*;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  logic [2:0] port;
  int checks = 0, failures = 0;

  noc_route_xy dut (.cur_x_i(cx), .cur_y_i(cy), .dst_x_i(dx), .dst_y_i(dy), .port_o(port));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        int ex, ey, expct;
        cx = COORD_W'(a % 4); cy = COORD_W'(a / 4);
        dx = COORD_W'(b % 4); dy = COORD_W'(b / 4);
        ex = b % 4 - a % 4;
        ey = b / 4 - a / 4;
        expct = (ex != 0) ? ((ex > 0) ? P_XP : P_XM)
              : (ey != 0) ? ((ey > 0) ? P_YP : P_YM) : P_LOC;
        #1;
        checks++;
        if (int'(port) != expct) begin
          failures++;
          $display("FAIL from %0d to %0d: port %0d, expected %0d", a, b, port, expct);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

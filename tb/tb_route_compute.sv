// tb_route_compute: exhaustive check of X-Y routing on an 8x8 mesh.
// For every pair of current and destination coordinates the expected port is
// worked out from the X-first, then Y rule and compared with the block.
module tb_route_compute;
  import noc_pkg::*;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  logic [PORT_W-1:0]  port;
  int checks = 0, failures = 0;

  route_compute dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .out_port(port));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
    for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) begin
      int exp;
      cx = COORD_W'(a); cy = COORD_W'(b); dx = COORD_W'(c); dy = COORD_W'(d);
      #1;
      exp = (c > a) ? 1 : (c < a) ? 2 : (d > b) ? 3 : (d < b) ? 4 : 0;
      checks++;
      if (int'(port) != exp) begin
        failures++;
        if (failures < 5) $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) port=%0d exp=%0d", a, b, c, d, port, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

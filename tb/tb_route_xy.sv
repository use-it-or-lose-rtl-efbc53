// tb_route_xy: exhaustive check of X-Y routing for a router at (3,3) and at
// the mesh corner (0,7), over every destination of the 8x8 mesh.
module tb_route_xy;
  import noc_pkg::*;
  logic [COORD_W-1:0] dx, dy;
  port_e p_mid, p_corner;
  int checks = 0, failures = 0;

  route_xy #(.MY_X(3), .MY_Y(3)) u_mid    (.dest_x(dx), .dest_y(dy), .out_port(p_mid));
  route_xy #(.MY_X(0), .MY_Y(7)) u_corner (.dest_x(dx), .dest_y(dy), .out_port(p_corner));

  function automatic int ref_port(int mx, int my, int x, int y);
    if (x != mx) return (x > mx) ? 1 : 2;
    if (y != my) return (y > my) ? 3 : 4;
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < MESH_X; x++)
      for (int y = 0; y < MESH_Y; y++) begin
        dx = COORD_W'(x); dy = COORD_W'(y);
        #1;
        checks += 2;
        if (int'(p_mid) != ref_port(3, 3, x, y)) begin
          failures++; $display("mid: dest (%0d,%0d) got %0d", x, y, p_mid);
        end
        if (int'(p_corner) != ref_port(0, 7, x, y)) begin
          failures++; $display("corner: dest (%0d,%0d) got %0d", x, y, p_corner);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

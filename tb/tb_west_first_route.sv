// Self-checking testbench of west_first_route.
// Sweeps every (router, destination, preference) combination of a 4x4 mesh
// and compares the port with a reference written from signed hop counts.
// It also checks that the port never leaves the mesh and always reduces the
// distance by one.
module tb_west_first_route;
  import la_noc_pkg::*;

  localparam int unsigned COORD_W = 2;
  localparam int N = 4;

  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  pref_t pref;
  port_e port;
  int checks = 0, failures = 0;
  int n_adaptive_y = 0, n_adaptive_x = 0;

  west_first_route #(.COORD_W(COORD_W)) dut (.*);

  function automatic port_e ref_port(int cx, int cy, int tx, int ty, pref_t p);
    int dx = tx - cx;
    int dy = ty - cy;
    if (dx < 0) return PORT_WEST;
    if (dx == 0 && dy == 0) return PORT_LOCAL;
    if (dx == 0) return (dy > 0) ? PORT_NORTH : PORT_SOUTH;
    if (dy == 0) return PORT_EAST;
    if (dy > 0) return p.ne_take_y ? PORT_NORTH : PORT_EAST;
    return p.se_take_y ? PORT_SOUTH : PORT_EAST;
  endfunction

  initial begin
    for (int cx = 0; cx < N; cx++)
    for (int cy = 0; cy < N; cy++)
    for (int tx = 0; tx < N; tx++)
    for (int ty = 0; ty < N; ty++)
    for (int p = 0; p < 4; p++) begin
      port_e exp_p;
      int nx, ny;
      cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
      dst_x = COORD_W'(tx); dst_y = COORD_W'(ty);
      pref = pref_t'(p);
      #1;
      exp_p = ref_port(cx, cy, tx, ty, pref_t'(p));
      checks++;
      if (port !== exp_p) begin
        failures++;
        $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) pref=%b got %s exp %s",
                 cx, cy, tx, ty, p, port.name(), exp_p.name());
      end
      nx = cx; ny = cy;
      case (port)
        PORT_EAST:  nx++;
        PORT_WEST:  nx--;
        PORT_NORTH: ny++;
        PORT_SOUTH: ny--;
        default: ;
      endcase
      checks++;
      if (nx < 0 || nx >= N || ny < 0 || ny >= N ||
          ((tx-nx)*(tx-nx) > (tx-cx)*(tx-cx)) ||
          ((ty-ny)*(ty-ny) > (ty-cy)*(ty-cy))) begin
        failures++;
        $display("FAIL non-minimal hop cur=(%0d,%0d) dst=(%0d,%0d)", cx, cy, tx, ty);
      end
      if (tx > cx && ty != cy) begin
        if (port == PORT_EAST) n_adaptive_x++; else n_adaptive_y++;
      end
    end
    checks++;
    if (n_adaptive_x == 0 || n_adaptive_y == 0) begin
      failures++;
      $display("FAIL adaptive choice not exercised");
    end
    $display("adaptive cases: east=%0d y=%0d", n_adaptive_x, n_adaptive_y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of la_route_unit.
// For every router of a 4x4 mesh, every destination, every legal output port
// at this router and random neighbour preferences, the look-ahead port must be
// the west-first choice made at the neighbour behind that output port with
// that neighbour's own preference word. The reference is written here from
// signed hop counts, independently of the RTL.
module tb_la_route_unit;
  import la_noc_pkg::*;

  localparam int unsigned COORD_W = 2;
  localparam int N = 4;

  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port;
  pref_t nbr_pref [NUM_DIRS];
  port_e la_port;
  int checks = 0, failures = 0;
  int n_used_pref [NUM_DIRS];

  la_route_unit #(.COORD_W(COORD_W)) dut (.*);

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
    for (int d = 0; d < NUM_DIRS; d++) n_used_pref[d] = 0;
    for (int rep = 0; rep < 8; rep++)
    for (int cx = 0; cx < N; cx++)
    for (int cy = 0; cy < N; cy++)
    for (int tx = 0; tx < N; tx++)
    for (int ty = 0; ty < N; ty++)
    for (int op = 0; op < NUM_PORTS; op++) begin
      int nx, ny, di;
      port_e exp_p;
      nx = cx; ny = cy; di = -1;
      case (op)
        1: begin nx = cx + 1; di = 0; end
        2: begin nx = cx - 1; di = 1; end
        3: begin ny = cy + 1; di = 2; end
        4: begin ny = cy - 1; di = 3; end
        default: ;
      endcase
      if (nx < 0 || nx >= N || ny < 0 || ny >= N) continue;
      cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
      dst_x = COORD_W'(tx); dst_y = COORD_W'(ty);
      out_port = port_e'(op);
      for (int d = 0; d < NUM_DIRS; d++) nbr_pref[d] = pref_t'($urandom_range(0, 3));
      #1;
      if (op == 0) exp_p = PORT_LOCAL;
      else         exp_p = ref_port(nx, ny, tx, ty, nbr_pref[di]);
      checks++;
      if (la_port !== exp_p) begin
        failures++;
        $display("FAIL cur=(%0d,%0d) out=%0d dst=(%0d,%0d) got %s exp %s",
                 cx, cy, op, tx, ty, la_port.name(), exp_p.name());
      end
      // The neighbour's preference decided an adaptive case.
      if (op != 0 && tx > nx && ty != ny) n_used_pref[di]++;
    end
    for (int d = 0; d < NUM_DIRS; d++) begin
      checks++;
      if (n_used_pref[d] == 0) begin
        failures++; $display("FAIL preference of direction %0d never used", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

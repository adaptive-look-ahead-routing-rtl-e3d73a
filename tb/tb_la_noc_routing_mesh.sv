// End-to-end testbench of la_noc_routing_mesh at its default size (4x4).
//
// The testbench plays the router datapaths and the IP cores. It injects a
// head flit at a source router, reads the port the flit takes there and the
// look-ahead port for the next router, carries that port to the next router
// on the input facing the link, and repeats until the flit is ejected.
// Between hops it changes the congestion of random routers and lets a clock
// edge pass, so the preference words move while packets are in flight.
//
// Every hop is checked against a reference model kept here: the expected
// preference of each router (comparison of its free credits one clock
// earlier) and the west-first choice made with the preference of the router
// where the hop is taken. Every path must be minimal, must end at the
// destination, and must never turn into West. Two directed cases check that
// a congested East output steers packets North and back. Traffic patterns:
// uniform random destinations and transpose ((x,y) sends to (y,x)).
// Each mechanism (adaptive Y choice, adaptive East choice, West hop, ejection,
// preference change, look-ahead with a neighbour preference differing from
// the current router's) is counted, and one that never happens fails.
module tb_la_noc_routing_mesh;
  import la_noc_pkg::*;

  localparam int MX = 4, MY = 4, NR = MX * MY;
  localparam int unsigned CONG_W  = 4;
  localparam int unsigned COORD_W = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CONG_W-1:0]  cong_free  [NR][NUM_DIRS];
  logic [COORD_W-1:0] in_dst_x   [NR][NUM_PORTS];
  logic [COORD_W-1:0] in_dst_y   [NR][NUM_PORTS];
  port_e              in_la_port [NR][NUM_PORTS];
  port_e              route_port [NR][NUM_PORTS];
  port_e              la_port    [NR][NUM_PORTS];
  pref_t              pref       [NR];

  la_noc_routing_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;

  // Mechanism counters.
  int n_adapt_y = 0, n_adapt_x = 0, n_west = 0, n_eject = 0;
  int n_pref_change = 0, n_la_nbr_differs = 0, n_edge_hops = 0;
  // Look-ahead decisions where the neighbour's preference bit that decides
  // the case differs from the current router's bit, per hop direction.
  int n_la_differs_dir [NUM_PORTS];

  pref_t model_pref [NR];

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

  function automatic port_e opp(port_e p);
    case (p)
      PORT_EAST:  return PORT_WEST;
      PORT_WEST:  return PORT_EAST;
      PORT_NORTH: return PORT_SOUTH;
      PORT_SOUTH: return PORT_NORTH;
      default:    return PORT_LOCAL;
    endcase
  endfunction

  // Apply a clock edge and update the preference model from the congestion
  // seen at that edge.
  task automatic tick();
    pref_t np;
    @(posedge clk);
    for (int r = 0; r < NR; r++) begin
      np.ne_take_y = cong_free[r][DIR_NORTH] > cong_free[r][DIR_EAST];
      np.se_take_y = cong_free[r][DIR_SOUTH] > cong_free[r][DIR_EAST];
      if (np != model_pref[r]) n_pref_change++;
      model_pref[r] = np;
    end
    @(negedge clk);
  endtask

  task automatic shake_congestion(int nrouters);
    for (int k = 0; k < nrouters; k++) begin
      automatic int r = $urandom_range(0, NR - 1);
      for (int d = 0; d < NUM_DIRS; d++) cong_free[r][d] = CONG_W'($urandom_range(0, 15));
    end
  endtask

  task automatic check_prefs();
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (pref[r] !== model_pref[r]) begin
        failures++;
        $display("FAIL pref router %0d got %b exp %b", r, pref[r], model_pref[r]);
      end
    end
  endtask

  // Send one packet from (sx,sy) to (tx,ty); returns the number of hops.
  // With shake set, congestion changes and a clock passes between hops.
  task automatic send(int sx, int sy, int tx, int ty, bit shake, output int hops,
                      output port_e path [16]);
    int cx = sx, cy = sy, r;
    port_e in_p = PORT_LOCAL, carried = PORT_LOCAL, here, ahead, exp_here, exp_ahead;
    bit went_non_west = 1'b0;
    int nx, ny;
    hops = 0;
    forever begin
      r = cy * MX + cx;
      // Garbage on the other inputs of this router.
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_dst_x[r][p] = COORD_W'($urandom_range(0, 3));
        in_dst_y[r][p] = COORD_W'($urandom_range(0, 3));
        in_la_port[r][p] = port_e'($urandom_range(0, 4));
      end
      in_dst_x[r][in_p] = COORD_W'(tx);
      in_dst_y[r][in_p] = COORD_W'(ty);
      in_la_port[r][in_p] = carried;
      #1;
      here  = route_port[r][in_p];
      ahead = la_port[r][in_p];
      exp_here = (in_p == PORT_LOCAL) ? ref_port(cx, cy, tx, ty, model_pref[r]) : carried;
      checks++;
      if (here !== exp_here) begin
        failures++;
        $display("FAIL route at (%0d,%0d) to (%0d,%0d): got %s exp %s",
                 cx, cy, tx, ty, here.name(), exp_here.name());
      end
      if (cx < tx && cy != ty) begin
        if (here == PORT_EAST) n_adapt_x++; else n_adapt_y++;
      end
      if (cx == 0 || cx == MX - 1 || cy == 0 || cy == MY - 1) n_edge_hops++;
      // West-first rule: no West hop after any other hop.
      checks++;
      if (here == PORT_WEST && went_non_west) begin
        failures++; $display("FAIL turn into West at (%0d,%0d)", cx, cy);
      end
      if (here != PORT_WEST && here != PORT_LOCAL) went_non_west = 1'b1;
      if (here == PORT_WEST) n_west++;
      if (here == PORT_LOCAL) begin
        n_eject++;
        checks++;
        if (cx != tx || cy != ty || ahead != PORT_LOCAL) begin
          failures++; $display("FAIL ejected at (%0d,%0d), destination (%0d,%0d)", cx, cy, tx, ty);
        end
        break;
      end
      path[hops] = here;
      hops++;
      nx = cx; ny = cy;
      case (here)
        PORT_EAST:  nx++;
        PORT_WEST:  nx--;
        PORT_NORTH: ny++;
        PORT_SOUTH: ny--;
        default: ;
      endcase
      checks++;
      if (nx < 0 || nx >= MX || ny < 0 || ny >= MY || hops > 6) begin
        failures++; $display("FAIL packet left the mesh or looped at (%0d,%0d)", nx, ny);
        break;
      end
      exp_ahead = ref_port(nx, ny, tx, ty, model_pref[ny * MX + nx]);
      if (nx < tx && ny != ty) begin
        pref_t pn = model_pref[ny * MX + nx], pc = model_pref[r];
        if ((ty > ny) ? (pn.ne_take_y != pc.ne_take_y) : (pn.se_take_y != pc.se_take_y)) begin
          n_la_nbr_differs++;
          n_la_differs_dir[here]++;
        end
      end
      checks++;
      if (ahead !== exp_ahead) begin
        failures++;
        $display("FAIL look-ahead at (%0d,%0d) for (%0d,%0d): got %s exp %s",
                 cx, cy, nx, ny, ahead.name(), exp_ahead.name());
      end
      // Move to the next router; the flit arrives there after a link/stage
      // delay during which preferences may change. The look-ahead port the
      // flit carries was fixed when it was computed.
      if (shake) begin
        shake_congestion(3);
        tick();
        check_prefs();
      end
      cx = nx; cy = ny;
      in_p = opp(here);
      carried = ahead;
    end
    checks++;
    if (hops != ((tx > sx) ? tx - sx : sx - tx) + ((ty > sy) ? ty - sy : sy - ty)) begin
      failures++; $display("FAIL non-minimal path (%0d,%0d)->(%0d,%0d) hops=%0d", sx, sy, tx, ty, hops);
    end
  endtask

  initial begin
    int hops, tot_hops, npk;
    port_e path [16];
    for (int r = 0; r < NR; r++) begin
      model_pref[r] = '0;
      for (int d = 0; d < NUM_DIRS; d++) cong_free[r][d] = '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_dst_x[r][p] = '0; in_dst_y[r][p] = '0; in_la_port[r][p] = PORT_LOCAL;
      end
    end
    for (int p = 0; p < NUM_PORTS; p++) n_la_differs_dir[p] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check_prefs();
    rst_n = 1'b1;

    // Directed: East outputs congested everywhere, North free -> a packet
    // from (0,0) to (3,3) climbs North first, then goes East.
    for (int r = 0; r < NR; r++) begin
      cong_free[r][DIR_EAST] = 4'd1; cong_free[r][DIR_NORTH] = 4'd12;
      cong_free[r][DIR_SOUTH] = 4'd12; cong_free[r][DIR_WEST] = 4'd8;
    end
    tick();
    check_prefs();
    send(0, 0, 3, 3, 1'b0, hops, path);
    checks++;
    if (!(path[0] == PORT_NORTH && path[1] == PORT_NORTH && path[2] == PORT_NORTH &&
          path[3] == PORT_EAST && path[4] == PORT_EAST && path[5] == PORT_EAST)) begin
      failures++; $display("FAIL congested-East detour path");
    end
    // South-east bound from (0,3) to (3,0) also avoids East first.
    send(0, 3, 3, 0, 1'b0, hops, path);
    checks++;
    if (!(path[0] == PORT_SOUTH && path[2] == PORT_SOUTH && path[3] == PORT_EAST)) begin
      failures++; $display("FAIL congested-East detour path (south-east)");
    end
    // Now North/South congested instead: the same packet goes East first.
    for (int r = 0; r < NR; r++) begin
      cong_free[r][DIR_EAST] = 4'd12; cong_free[r][DIR_NORTH] = 4'd0; cong_free[r][DIR_SOUTH] = 4'd0;
    end
    tick();
    send(0, 0, 3, 3, 1'b0, hops, path);
    checks++;
    if (!(path[0] == PORT_EAST && path[1] == PORT_EAST && path[2] == PORT_EAST &&
          path[3] == PORT_NORTH)) begin
      failures++; $display("FAIL East-first path under Y congestion");
    end

    // Directed: neighbour preferences opposite to the current router's.
    // (0,0) prefers North, (0,1) prefers East: (0,0)->(2,2) goes North, and
    // the look-ahead port for (0,1) must be East.
    for (int r = 0; r < NR; r++) begin
      cong_free[r][DIR_EAST] = 4'd12; cong_free[r][DIR_NORTH] = 4'd0; cong_free[r][DIR_SOUTH] = 4'd0;
    end
    cong_free[0][DIR_EAST] = 4'd0; cong_free[0][DIR_NORTH] = 4'd9;
    tick();
    send(0, 0, 2, 2, 1'b0, hops, path);
    checks++;
    if (!(path[0] == PORT_NORTH && path[1] == PORT_EAST)) begin
      failures++; $display("FAIL look-ahead North used the wrong preference");
    end
    // (1,3) prefers South, (1,2) prefers East: (1,3)->(3,0).
    cong_free[13][DIR_EAST] = 4'd0; cong_free[13][DIR_SOUTH] = 4'd9;
    tick();
    send(1, 3, 3, 0, 1'b0, hops, path);
    checks++;
    if (!(path[0] == PORT_SOUTH && path[1] == PORT_EAST)) begin
      failures++; $display("FAIL look-ahead South used the wrong preference");
    end
    // (0,1) prefers East, (1,1) prefers North: (0,1)->(2,3).
    for (int r = 0; r < NR; r++) cong_free[r][DIR_EAST] = 4'd12;
    cong_free[5][DIR_EAST] = 4'd0; cong_free[5][DIR_NORTH] = 4'd9;
    tick();
    send(0, 1, 2, 3, 1'b0, hops, path);
    checks++;
    if (!(path[0] == PORT_EAST && path[1] == PORT_NORTH)) begin
      failures++; $display("FAIL look-ahead East used the wrong preference");
    end

    // Uniform random traffic.
    tot_hops = 0; npk = 0;
    for (int i = 0; i < 1000; i++) begin
      automatic int sx = $urandom_range(0, 3), sy = $urandom_range(0, 3);
      automatic int tx = $urandom_range(0, 3), ty = $urandom_range(0, 3);
      shake_congestion(6);
      tick();
      send(sx, sy, tx, ty, 1'b1, hops, path);
      tot_hops += hops; npk++;
    end
    $display("uniform: %0d packets, %0d hops", npk, tot_hops);

    // Transpose traffic: every node (x,y) sends to (y,x), several rounds.
    tot_hops = 0; npk = 0;
    for (int rnd = 0; rnd < 8; rnd++)
      for (int sy = 0; sy < MY; sy++)
        for (int sx = 0; sx < MX; sx++) begin
          shake_congestion(6);
          tick();
          send(sx, sy, sy, sx, 1'b1, hops, path);
          tot_hops += hops; npk++;
        end
    $display("transpose: %0d packets, %0d hops", npk, tot_hops);

    $display("mechanisms: adaptive_y=%0d adaptive_east=%0d west=%0d eject=%0d pref_change=%0d la_nbr_differs=%0d edge=%0d",
             n_adapt_y, n_adapt_x, n_west, n_eject, n_pref_change, n_la_nbr_differs, n_edge_hops);
    checks++; if (n_adapt_y == 0)        begin failures++; $display("FAIL no adaptive Y choice"); end
    checks++; if (n_adapt_x == 0)        begin failures++; $display("FAIL no adaptive East choice"); end
    checks++; if (n_west == 0)           begin failures++; $display("FAIL no West hop"); end
    checks++; if (n_eject == 0)          begin failures++; $display("FAIL no ejection"); end
    checks++; if (n_pref_change == 0)    begin failures++; $display("FAIL no preference change"); end
    checks++; if (n_la_nbr_differs == 0) begin failures++; $display("FAIL neighbour preference never differed"); end
    for (int p = PORT_EAST; p <= PORT_SOUTH; p++) begin
      if (p == PORT_WEST) continue;  // a West hop never leads to an adaptive case
      checks++;
      if (n_la_differs_dir[p] == 0) begin
        failures++; $display("FAIL no look-ahead through port %0d with a differing neighbour preference", p);
      end
    end
    checks++; if (n_edge_hops == 0)      begin failures++; $display("FAIL no edge router hop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 50000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

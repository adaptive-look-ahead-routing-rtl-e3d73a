// Self-checking testbench of la_routing_module.
// Two instances, at (1,2) and at (3,0) of a 4x4 mesh, receive random
// congestion, neighbour preferences and head flits on all five inputs. The
// test checks the registered preference (one-clock latency), the first-hop
// route of the local input (with the router's own preference), the
// pass-through of carried ports and the look-ahead port of every input.
module tb_la_routing_module;
  import la_noc_pkg::*;

  localparam int unsigned COORD_W = 2;
  localparam int unsigned CONG_W  = 4;
  localparam int NI = 2;
  localparam int PX [NI] = '{1, 3};
  localparam int PY [NI] = '{2, 0};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cycles = 0;
  int n_inject_y = 0, n_inject_x = 0, n_pref_change = 0;

  logic [CONG_W-1:0]  cong_free  [NI][NUM_DIRS];
  pref_t              nbr_pref   [NI][NUM_DIRS];
  pref_t              pref_out   [NI];
  logic [COORD_W-1:0] in_dst_x   [NI][NUM_PORTS];
  logic [COORD_W-1:0] in_dst_y   [NI][NUM_PORTS];
  port_e              in_la_port [NI][NUM_PORTS];
  port_e              route_port [NI][NUM_PORTS];
  port_e              la_port    [NI][NUM_PORTS];

  for (genvar i = 0; i < NI; i++) begin : g_dut
    la_routing_module #(.MESH_X(4), .MESH_Y(4), .X(PX[i]), .Y(PY[i]), .CONG_W(CONG_W)) dut (
      .clk        (clk),
      .rst_n      (rst_n),
      .cong_free  (cong_free[i]),
      .nbr_pref   (nbr_pref[i]),
      .pref_out   (pref_out[i]),
      .in_dst_x   (in_dst_x[i]),
      .in_dst_y   (in_dst_y[i]),
      .in_la_port (in_la_port[i]),
      .route_port (route_port[i]),
      .la_port    (la_port[i])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

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

  // Random legal output port at (cx,cy) for a packet to (tx,ty): any port a
  // west-first router upstream could have chosen for this router.
  function automatic port_e legal_here(int cx, int cy, int tx, int ty);
    return ref_port(cx, cy, tx, ty, pref_t'($urandom_range(0, 3)));
  endfunction

  pref_t exp_pref [NI];
  pref_t prev_pref [NI];

  initial begin
    for (int i = 0; i < NI; i++) begin
      for (int d = 0; d < NUM_DIRS; d++) begin
        cong_free[i][d] = '0; nbr_pref[i][d] = '0;
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_dst_x[i][p] = '0; in_dst_y[i][p] = '0; in_la_port[i][p] = PORT_LOCAL;
      end
      exp_pref[i] = '0;
      prev_pref[i] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        // Congestion for the next edge.
        for (int d = 0; d < NUM_DIRS; d++) cong_free[i][d] = CONG_W'($urandom_range(0, 15));
        for (int d = 0; d < NUM_DIRS; d++) nbr_pref[i][d] = pref_t'($urandom_range(0, 3));
        for (int p = 0; p < NUM_PORTS; p++) begin
          int tx, ty;
          tx = $urandom_range(0, 3); ty = $urandom_range(0, 3);
          in_dst_x[i][p] = COORD_W'(tx);
          in_dst_y[i][p] = COORD_W'(ty);
          in_la_port[i][p] = legal_here(PX[i], PY[i], tx, ty);
        end
      end
      #1;
      for (int i = 0; i < NI; i++) begin
        // Preference still holds the value from the previous edge.
        checks++;
        if (pref_out[i] !== exp_pref[i]) begin
          failures++; $display("FAIL pref r%0d got %b exp %b", i, pref_out[i], exp_pref[i]);
        end
        for (int p = 0; p < NUM_PORTS; p++) begin
          port_e exp_route, exp_la;
          int nx, ny, di;
          if (p == PORT_LOCAL) begin
            exp_route = ref_port(PX[i], PY[i], in_dst_x[i][p], in_dst_y[i][p], exp_pref[i]);
            if (PX[i] < in_dst_x[i][p] && PY[i] != in_dst_y[i][p]) begin
              if (exp_route == PORT_EAST) n_inject_x++; else n_inject_y++;
            end
          end else begin
            exp_route = in_la_port[i][p];
          end
          nx = PX[i]; ny = PY[i]; di = 0;
          case (exp_route)
            PORT_EAST:  begin nx++; di = 0; end
            PORT_WEST:  begin nx--; di = 1; end
            PORT_NORTH: begin ny++; di = 2; end
            PORT_SOUTH: begin ny--; di = 3; end
            default: ;
          endcase
          exp_la = (exp_route == PORT_LOCAL) ? PORT_LOCAL
                 : ref_port(nx, ny, in_dst_x[i][p], in_dst_y[i][p], nbr_pref[i][di]);
          checks++;
          if (route_port[i][p] !== exp_route || la_port[i][p] !== exp_la) begin
            failures++;
            $display("FAIL r%0d in %0d dst=(%0d,%0d) route %s/%s la %s/%s", i, p,
                     in_dst_x[i][p], in_dst_y[i][p], route_port[i][p].name(), exp_route.name(),
                     la_port[i][p].name(), exp_la.name());
          end
        end
        exp_pref[i].ne_take_y = cong_free[i][DIR_NORTH] > cong_free[i][DIR_EAST];
        exp_pref[i].se_take_y = cong_free[i][DIR_SOUTH] > cong_free[i][DIR_EAST];
        if (exp_pref[i] != prev_pref[i]) n_pref_change++;
        prev_pref[i] = exp_pref[i];
      end
    end
    checks++;
    if (n_inject_x == 0 || n_inject_y == 0 || n_pref_change == 0) begin
      failures++;
      $display("FAIL coverage inject_x=%0d inject_y=%0d pref_change=%0d",
               n_inject_x, n_inject_y, n_pref_change);
    end
    $display("inject east=%0d y=%0d pref changes=%0d", n_inject_x, n_inject_y, n_pref_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Adaptive look-ahead routing plane of a MESH_X x MESH_Y mesh NoC (4x4 by
// default).
//
// One la_routing_module sits at every router position. The modules are wired
// to one another the way the scheme needs: every router's registered
// preference word goes to its four neighbours, so each router can make the
// adaptive west-first decision of the next hop with the congestion state of
// the router where that decision is applied. Preference inputs at the mesh
// edge are tied to zero; minimal routing never selects a port that leaves
// the mesh, so they are never used.
//
// The router datapath and the IP cores attach through the ports below, all
// indexed by router number r = y*MESH_X + x:
//   cong_free[r][d]        free credits behind mesh output d of router r
//   in_dst_x/y[r][p]       destination of the head flit at input p of r
//   in_la_port[r][p]       output port at r carried by that flit
//   route_port[r][p]       output port the flit takes at r
//   la_port[r][p]          output port it will take at the next router
//   pref[r]                preference word router r broadcasts
// Routes are combinational; preferences follow congestion after one clock.
// Mesh size follows the evaluated 4x4 network; the flat port arrays are this
// design's choice.
module la_noc_routing_mesh
  import la_noc_pkg::*;
#(
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter int unsigned CONG_W  = 4,
  localparam int unsigned NR     = MESH_X * MESH_Y,
  localparam int unsigned MAX_XY = (MESH_X > MESH_Y) ? MESH_X : MESH_Y,
  localparam int unsigned COORD_W = (MAX_XY > 2) ? $clog2(MAX_XY) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CONG_W-1:0]  cong_free  [NR][NUM_DIRS],
  input  logic [COORD_W-1:0] in_dst_x   [NR][NUM_PORTS],
  input  logic [COORD_W-1:0] in_dst_y   [NR][NUM_PORTS],
  input  port_e              in_la_port [NR][NUM_PORTS],
  output port_e              route_port [NR][NUM_PORTS],
  output port_e              la_port    [NR][NUM_PORTS],
  output pref_t              pref       [NR]
);

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned R = y * MESH_X + x;

      pref_t nbr_pref [NUM_DIRS];

      if (x + 1 < MESH_X) begin : g_e
        assign nbr_pref[DIR_EAST] = pref[R + 1];
      end else begin : g_ne
        assign nbr_pref[DIR_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign nbr_pref[DIR_WEST] = pref[R - 1];
      end else begin : g_nw
        assign nbr_pref[DIR_WEST] = '0;
      end
      if (y + 1 < MESH_Y) begin : g_n
        assign nbr_pref[DIR_NORTH] = pref[R + MESH_X];
      end else begin : g_nn
        assign nbr_pref[DIR_NORTH] = '0;
      end
      if (y > 0) begin : g_s
        assign nbr_pref[DIR_SOUTH] = pref[R - MESH_X];
      end else begin : g_ns
        assign nbr_pref[DIR_SOUTH] = '0;
      end

      la_routing_module #(
        .MESH_X (MESH_X),
        .MESH_Y (MESH_Y),
        .X      (x),
        .Y      (y),
        .CONG_W (CONG_W)
      ) u_rt (
        .clk        (clk),
        .rst_n      (rst_n),
        .cong_free  (cong_free[R]),
        .nbr_pref   (nbr_pref),
        .pref_out   (pref[R]),
        .in_dst_x   (in_dst_x[R]),
        .in_dst_y   (in_dst_y[R]),
        .in_la_port (in_la_port[R]),
        .route_port (route_port[R]),
        .la_port    (la_port[R])
      );
    end
  end

endmodule

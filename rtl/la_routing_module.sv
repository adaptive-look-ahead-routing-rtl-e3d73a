// Adaptive look-ahead routing module of one mesh router.
//
// This is the routing logic added to a two-stage, virtual-channel wormhole
// router. It has three parts:
//   * a pref_port_unit that turns the free-credit counts of the router's four
//     mesh outputs into the preference word broadcast to the neighbours;
//   * one la_route_unit per input port, which takes the output port carried
//     by an arriving head flit (computed one hop upstream) and computes the
//     port the flit will take at the next router, using that neighbour's
//     broadcast preference;
//   * for the local (injection) input, a west_first_route instance that
//     computes the first output port from the router's own preference, since
//     no upstream router has done it.
// The router datapath (input VC buffers, allocators, crossbar) is outside
// this module: it supplies the head-flit fields and the credit counts and
// consumes route_port and la_port.
//
// Interface, for each input port p (indexed by la_noc_pkg::port_e):
//   in_dst_x/y[p]   destination of the head flit at input p
//   in_la_port[p]   output port at this router carried by the flit (ignored
//                   for the local input)
//   route_port[p]   output port to request at this router
//   la_port[p]      output port at the next router, written into the flit
// route_port and la_port are combinational from the inputs; pref_out is
// registered (one clock from cong_free). Position (X, Y) is a parameter.
// The module split follows the routing scheme described for the router;
// the port encodings and the use of the own preference at injection are
// this design's choices.
module la_routing_module
  import la_noc_pkg::*;
#(
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter int unsigned X       = 0,
  parameter int unsigned Y       = 0,
  parameter int unsigned CONG_W  = 4,
  localparam int unsigned MAX_XY = (MESH_X > MESH_Y) ? MESH_X : MESH_Y,
  localparam int unsigned COORD_W = (MAX_XY > 2) ? $clog2(MAX_XY) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CONG_W-1:0]  cong_free  [NUM_DIRS],
  input  pref_t              nbr_pref   [NUM_DIRS],
  output pref_t              pref_out,
  input  logic [COORD_W-1:0] in_dst_x   [NUM_PORTS],
  input  logic [COORD_W-1:0] in_dst_y   [NUM_PORTS],
  input  port_e              in_la_port [NUM_PORTS],
  output port_e              route_port [NUM_PORTS],
  output port_e              la_port    [NUM_PORTS]
);

  localparam logic [COORD_W-1:0] MY_X = COORD_W'(X);
  localparam logic [COORD_W-1:0] MY_Y = COORD_W'(Y);

  pref_port_unit #(.CONG_W(CONG_W)) u_pref (
    .clk       (clk),
    .rst_n     (rst_n),
    .cong_free (cong_free),
    .pref      (pref_out)
  );

  port_e inj_port;

  west_first_route #(.COORD_W(COORD_W)) u_inject_route (
    .cur_x (MY_X),
    .cur_y (MY_Y),
    .dst_x (in_dst_x[PORT_LOCAL]),
    .dst_y (in_dst_y[PORT_LOCAL]),
    .pref  (pref_out),
    .port  (inj_port)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    if (p == PORT_LOCAL) begin : g_local
      assign route_port[p] = inj_port;
    end else begin : g_mesh
      assign route_port[p] = in_la_port[p];
    end

    la_route_unit #(.COORD_W(COORD_W)) u_la (
      .cur_x    (MY_X),
      .cur_y    (MY_Y),
      .dst_x    (in_dst_x[p]),
      .dst_y    (in_dst_y[p]),
      .out_port (route_port[p]),
      .nbr_pref (nbr_pref),
      .la_port  (la_port[p])
    );
  end

endmodule

// Adaptive look-ahead route unit for one input port of a mesh router.
//
// In look-ahead routing the head flit reaching a router already carries the
// output port it takes there (out_port), computed one hop upstream, so the
// router can start arbitration at once. While the flit crosses this router,
// this unit computes the port the flit will take at the next router
// (la_port) and that value replaces the field in the head flit.
//
// The next router is the neighbour behind out_port. Its west-first choice is
// made with the preference word that neighbour last broadcast (nbr_pref),
// so an adaptive decision follows the congestion of the router where it is
// applied. When out_port is LOCAL the packet leaves the network here and
// la_port is LOCAL.
//
// Interface: nbr_pref[d] is indexed by la_noc_pkg::dir_e. Purely
// combinational; it sits in parallel with switch arbitration in the first
// router stage. The neighbour-selection structure is this design's reading
// of the look-ahead scheme; the port encoding is its own.
module la_route_unit
  import la_noc_pkg::*;
#(
  parameter int unsigned COORD_W = 2
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  port_e              out_port,
  input  pref_t              nbr_pref [NUM_DIRS],
  output port_e              la_port
);

  logic [COORD_W-1:0] nxt_x, nxt_y;
  pref_t              nxt_pref;
  port_e              nxt_port;

  always_comb begin
    nxt_x    = cur_x;
    nxt_y    = cur_y;
    nxt_pref = '0;
    case (out_port)
      PORT_EAST:  begin nxt_x = cur_x + 1'b1; nxt_pref = nbr_pref[DIR_EAST];  end
      PORT_WEST:  begin nxt_x = cur_x - 1'b1; nxt_pref = nbr_pref[DIR_WEST];  end
      PORT_NORTH: begin nxt_y = cur_y + 1'b1; nxt_pref = nbr_pref[DIR_NORTH]; end
      PORT_SOUTH: begin nxt_y = cur_y - 1'b1; nxt_pref = nbr_pref[DIR_SOUTH]; end
      default:    ;
    endcase
  end

  west_first_route #(.COORD_W(COORD_W)) u_next_route (
    .cur_x (nxt_x),
    .cur_y (nxt_y),
    .dst_x (dst_x),
    .dst_y (dst_y),
    .pref  (nxt_pref),
    .port  (nxt_port)
  );

  assign la_port = (out_port == PORT_LOCAL) ? PORT_LOCAL : nxt_port;

endmodule

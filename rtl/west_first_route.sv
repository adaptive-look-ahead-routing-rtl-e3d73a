// West-first minimal route function for one router of a 2-D mesh.
//
// Given the router position (cur_x, cur_y), the packet destination
// (dst_x, dst_y) and the preference word of that router, it returns the
// output port the packet takes there. West-first forbids every turn into the
// West direction, so all westward hops are made first and deterministically.
// Once no West hop remains the packet is routed minimally; where both an East
// hop and a North (or South) hop remain the choice is adaptive and follows
// the preference bit:
//   dst_x <  cur_x                 -> WEST
//   dst_x == cur_x                 -> NORTH / SOUTH / LOCAL by dst_y
//   dst_x >  cur_x, dst_y == cur_y -> EAST
//   dst_x >  cur_x, dst_y >  cur_y -> NORTH if pref.ne_take_y else EAST
//   dst_x >  cur_x, dst_y <  cur_y -> SOUTH if pref.se_take_y else EAST
// The turn model is the one the router uses for deadlock freedom; minimal
// routing and the two-bit preference encoding are this design's choices.
// Purely combinational.
module west_first_route
  import la_noc_pkg::*;
#(
  parameter int unsigned COORD_W = 2
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  pref_t              pref,
  output port_e              port
);

  always_comb begin
    if (dst_x < cur_x) begin
      port = PORT_WEST;
    end else if (dst_x == cur_x) begin
      if (dst_y > cur_y)      port = PORT_NORTH;
      else if (dst_y < cur_y) port = PORT_SOUTH;
      else                    port = PORT_LOCAL;
    end else begin
      if (dst_y > cur_y)      port = pref.ne_take_y ? PORT_NORTH : PORT_EAST;
      else if (dst_y < cur_y) port = pref.se_take_y ? PORT_SOUTH : PORT_EAST;
      else                    port = PORT_EAST;
    end
  end

endmodule

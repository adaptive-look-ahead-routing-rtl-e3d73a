// Shared types of the adaptive look-ahead routing logic for a 2-D mesh NoC.
//
// Port numbering of every mesh router, and the preference word a router
// broadcasts to its four neighbours. Coordinates grow to the East (x) and to
// the North (y); (0,0) is the south-west corner. The numbering and the
// orientation are this design's own choice.
//
// The preference word carries one bit per "adaptive quadrant" of the
// west-first turn model: a packet that must still travel East and also North
// (or South) may leave on either the East port or the North (South) port, and
// the bit says which of the two the router currently finds less congested.
package la_noc_pkg;

  localparam int unsigned NUM_PORTS = 5;  // local + four mesh directions
  localparam int unsigned NUM_DIRS  = 4;  // mesh directions only

  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_EAST  = 3'd1,
    PORT_WEST  = 3'd2,
    PORT_NORTH = 3'd3,
    PORT_SOUTH = 3'd4
  } port_e;

  // Index of a neighbour in the per-direction arrays (pref_in, cong_free).
  // Direction d of the arrays is port (d+1).
  typedef enum logic [1:0] {
    DIR_EAST  = 2'd0,
    DIR_WEST  = 2'd1,
    DIR_NORTH = 2'd2,
    DIR_SOUTH = 2'd3
  } dir_e;

  // Preferred output of a router for the two adaptive cases of west-first.
  //   ne_take_y = 1 : North is preferred to East for north-east bound packets
  //   se_take_y = 1 : South is preferred to East for south-east bound packets
  typedef struct packed {
    logic ne_take_y;
    logic se_take_y;
  } pref_t;

  // Port through which a packet leaving on port p enters the neighbour.
  function automatic port_e opposite_port(port_e p);
    case (p)
      PORT_EAST:  return PORT_WEST;
      PORT_WEST:  return PORT_EAST;
      PORT_NORTH: return PORT_SOUTH;
      PORT_SOUTH: return PORT_NORTH;
      default:    return PORT_LOCAL;
    endcase
  endfunction

endpackage

// noc_pkg: types and constants shared by the multi-local-port mesh NoC.
//
// A flit is one byte. The first flit of every packet is the header, which
// carries the destination as three fields, most significant first:
//   [7:4] LID  local port number at the destination router
//   [3:2] X    destination router column
//   [1:0] Y    destination router row
// The byte-wide flit and the 8-bit header that holds the router coordinate
// plus a local port id follow the design description; how the eight bits are
// split between LID, X and Y is this design's choice (4/2/2: up to 16 local
// ports per router and a 4x4 mesh, which covers every nine-core configuration
// from nine single-port routers to one nine-port router).
//
// Router port numbering (used by every router module): the four directional
// ports come first, then the local ports, so a router with NLP local ports has
// NLP+4 ports and local port k is port index 4+k. North is row y-1, South is
// row y+1, West is column x-1 and East is column x+1.
package noc_pkg;

  localparam int unsigned FLIT_W = 8;
  localparam int unsigned LID_W  = 4;
  localparam int unsigned X_W    = 2;
  localparam int unsigned Y_W    = 2;
  localparam int unsigned NDIR   = 4;

  typedef logic [FLIT_W-1:0] flit_t;

  typedef struct packed {
    logic [LID_W-1:0] lid;
    logic [X_W-1:0]   x;
    logic [Y_W-1:0]   y;
  } hdr_t;

  typedef enum logic [1:0] {
    P_NORTH = 2'd0,
    P_EAST  = 2'd1,
    P_SOUTH = 2'd2,
    P_WEST  = 2'd3
  } dir_e;

  // Direction a flit enters the neighbour through, seen from the sender.
  function automatic int unsigned opposite(int unsigned d);
    return (d + 2) % 4;
  endfunction

  // Router hops between two mesh coordinates under XY routing.
  function automatic int unsigned hop_distance(logic [X_W-1:0] ax, logic [Y_W-1:0] ay,
                                               logic [X_W-1:0] bx, logic [Y_W-1:0] by);
    logic [X_W-1:0] dx;
    logic [Y_W-1:0] dy;
    dx = (ax > bx) ? ax - bx : bx - ax;
    dy = (ay > by) ? ay - by : by - ay;
    return int'(dx) + int'(dy);
  endfunction

endpackage

// route_decode: destination decode of one router input.
//
// The header flit names a destination router (X, Y) and a local port (LID).
// XY routing is applied until the packet reaches its destination router: the
// column is corrected first (East/West), then the row (North/South). At the
// destination router the LID field selects which of the NLP local ports gets
// the packet; this is the extra decoding a multi-local-port router needs on
// top of a plain XY router.
//
// Interface: `hdr` is the header flit; `port` is a one-hot vector over the
// router's NLP+4 ports (North, East, South, West, Local0 .. Local(NLP-1)).
// Purely combinational. A LID that does not exist at this router is this
// design's choice to deliver to local port 0; the router asserts against it.
module route_decode
  import noc_pkg::*;
#(
  parameter int unsigned NLP  = 4,
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  flit_t               hdr,
  output logic [NLP+4-1:0]    port
);

  hdr_t h;
  assign h = hdr_t'(hdr);

  always_comb begin
    port = '0;
    if (h.x > X_W'(MY_X))      port[int'(P_EAST)]  = 1'b1;
    else if (h.x < X_W'(MY_X)) port[int'(P_WEST)]  = 1'b1;
    else if (h.y > Y_W'(MY_Y)) port[int'(P_SOUTH)] = 1'b1;
    else if (h.y < Y_W'(MY_Y)) port[int'(P_NORTH)] = 1'b1;
    else if (int'(h.lid) < NLP) port[NDIR + int'(h.lid)] = 1'b1;
    else                        port[NDIR] = 1'b1;
  end

endmodule

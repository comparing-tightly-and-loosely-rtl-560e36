// noc_pkg: types and constants shared by the mesochronous switch.
//
// A flit is a 32-bit data word (the width seen on the link in the
// reference waveforms) plus two framing bits that mark the first (head)
// and last (tail) flit of a packet. The head flit carries a source route
// in its low bits: ROUTE_W bits name the output port at this hop and the
// switch shifts the route right by ROUTE_W bits before forwarding, so the
// next hop finds its own port number in the low bits. The framing bits
// and the route format are this design's choice.
package noc_pkg;

  parameter int unsigned FLIT_W  = 32;  // data bits per flit
  parameter int unsigned NSLOTS  = 3;   // front-end latches per synchronizer

  typedef struct packed {
    logic              head;  // first flit of a packet, carries the route
    logic              tail;  // last flit of a packet, releases the path
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Route step applied by a switch to a head flit.
  function automatic flit_t route_shift(flit_t f, int unsigned route_w);
    flit_t r;
    r = f;
    if (f.head) r.data = f.data >> route_w;
    return r;
  endfunction

endpackage

// noc_pkg: types and constants shared by the switch and its synchronizing
// input buffers.
//
// A flit is a 32-bit payload word plus two framing bits (head, tail). The
// 32-bit word width matches the data words of the reference waveforms; the
// framing bits and the routing field are this design's own choices. The head
// flit of a packet carries a source route in its low payload bits: each switch
// takes the lowest PORT_W bits as the output port number and shifts the route
// right by PORT_W bits before forwarding the head flit.
package noc_pkg;

  parameter int unsigned PAYLOAD_W = 32;

  typedef struct packed {
    logic                 head;     // first flit of a packet, carries the route
    logic                 tail;     // last flit of a packet (head&tail = 1-flit packet)
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  parameter int unsigned FLIT_W = $bits(flit_t);

endpackage

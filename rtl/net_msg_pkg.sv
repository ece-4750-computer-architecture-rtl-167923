// net_msg_pkg: message format and port numbering shared by the ring network.
//
// Every packet is a single flit of a single phit. The 22-bit message is, from
// the most significant bit down: dest[21:19], src[18:16], opaque[15:8] and
// payload[7:0]. Field widths and order follow the network message format of
// the design (payload 8 bits, source/destination 3 bits, opaque 8 bits). The
// opaque field carries no function in the network; it lets a user tell
// messages apart. The port numbering of a router (0 west, 1 terminal, 2 east)
// also follows the design. The helper function that builds a message is this
// package's own convenience.
package net_msg_pkg;

  localparam int unsigned PAYLOAD_NBITS = 8;
  localparam int unsigned OPAQUE_NBITS  = 8;
  localparam int unsigned SRCDEST_NBITS = 3;
  localparam int unsigned MSG_NBITS     = 2*SRCDEST_NBITS + OPAQUE_NBITS + PAYLOAD_NBITS;

  // Number of routers in the ring by default; at most 2**SRCDEST_NBITS
  localparam int unsigned RING_NODES    = 8;

  typedef logic [SRCDEST_NBITS-1:0] node_id_t;

  typedef struct packed {
    node_id_t                  dest;
    node_id_t                  src;
    logic [OPAQUE_NBITS-1:0]   opaque;
    logic [PAYLOAD_NBITS-1:0]  payload;
  } net_msg_t;

  // Router port numbering
  localparam int unsigned NUM_PORTS = 3;
  localparam int unsigned PORT_WEST = 0;
  localparam int unsigned PORT_TERM = 1;
  localparam int unsigned PORT_EAST = 2;

  function automatic net_msg_t mk_net_msg(node_id_t src, node_id_t dest,
                                          logic [OPAQUE_NBITS-1:0] opaque,
                                          logic [PAYLOAD_NBITS-1:0] payload);
    net_msg_t m;
    m.dest    = dest;
    m.src     = src;
    m.opaque  = opaque;
    m.payload = payload;
    return m;
  endfunction

endpackage

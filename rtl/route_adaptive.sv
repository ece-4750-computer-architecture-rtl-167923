// route_adaptive: congestion-weighted route computation for injected packets.
//
// Used on a router's terminal input. Like the greedy scheme it counts the hops
// to the destination in each direction, but it adds a penalty for the traffic
// already moving that way past this router:
//   cost = hops + CONG_WEIGHT * (packets in the outgoing channel queue
//                                + packets in the input queue that feeds
//                                  this router from the opposite side)
// Eastward traffic sits in the east channel queue and in the west input queue
// (packets arriving from the west travel east), westward traffic in the west
// channel queue and the east input queue. The cheaper direction wins, east on
// a tie, so a packet may be sent the long (non-minimal) way round when the
// short way is backed up. A packet addressed to this router requests the
// terminal port. Output: one-hot request vector (bit 0 west, bit 1 terminal,
// bit 2 east). Purely combinational; every congestion input is a free-entry
// count of a queue adjacent to the router, so no register stage is needed.
//
// Sensing congestion through free-entry counts and weighting it against
// distance follows the design; the cost formula, the choice of queues and
// CONG_WEIGHT = 1 are this implementation's choices.
module route_adaptive
  import net_msg_pkg::*;
#(
  parameter int unsigned NUM_ROUTERS  = net_msg_pkg::RING_NODES,
  parameter int unsigned INQ_ENTRIES  = 4,
  parameter int unsigned CHAN_ENTRIES = 2,
  parameter int unsigned CONG_WEIGHT  = 1
) (
  input  node_id_t                       router_id,
  input  node_id_t                       dest,
  input  logic [$clog2(CHAN_ENTRIES):0]  east_chan_free,
  input  logic [$clog2(CHAN_ENTRIES):0]  west_chan_free,
  input  logic [$clog2(INQ_ENTRIES):0]   num_free_west,
  input  logic [$clog2(INQ_ENTRIES):0]   num_free_east,
  output logic [NUM_PORTS-1:0]           reqs
);

  int unsigned hops_east, hops_west;
  int unsigned load_east, load_west;
  int unsigned cost_east, cost_west;

  always_comb begin
    hops_east = (int'(dest) + NUM_ROUTERS - int'(router_id)) % NUM_ROUTERS;
    hops_west = (int'(router_id) + NUM_ROUTERS - int'(dest)) % NUM_ROUTERS;
    load_east = (CHAN_ENTRIES - int'(east_chan_free)) + (INQ_ENTRIES - int'(num_free_west));
    load_west = (CHAN_ENTRIES - int'(west_chan_free)) + (INQ_ENTRIES - int'(num_free_east));
    cost_east = hops_east + CONG_WEIGHT * load_east;
    cost_west = hops_west + CONG_WEIGHT * load_west;
    reqs = '0;
    if (dest == router_id)           reqs[PORT_TERM] = 1'b1;
    else if (cost_east <= cost_west) reqs[PORT_EAST] = 1'b1;
    else                             reqs[PORT_WEST] = 1'b1;
  end

endmodule

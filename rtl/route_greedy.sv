// route_greedy: deterministic greedy route computation for one router input.
//
// From this router's id and a packet's destination it counts the hops to the
// destination going east (towards increasing router ids, wrapping around) and
// going west, and requests the output port in the direction with fewer hops.
// When both are equal (the destination is half-way round the ring) it always
// picks east. A packet that has arrived requests the terminal port. The result
// is a one-hot request vector over the router's output ports (bit 0 west,
// bit 1 terminal, bit 2 east). Purely combinational.
//
// The hop comparison, the one-hot request vector and east-on-tie follow the
// design; that east means increasing router id is this implementation's
// reading of the ring drawing.
module route_greedy
  import net_msg_pkg::*;
#(
  parameter int unsigned NUM_ROUTERS = net_msg_pkg::RING_NODES
) (
  input  node_id_t                router_id,
  input  node_id_t                dest,
  output logic [NUM_PORTS-1:0]    reqs
);

  int unsigned hops_east, hops_west;

  always_comb begin
    hops_east = (int'(dest) + NUM_ROUTERS - int'(router_id)) % NUM_ROUTERS;
    hops_west = (int'(router_id) + NUM_ROUTERS - int'(dest)) % NUM_ROUTERS;
    reqs = '0;
    if (dest == router_id)           reqs[PORT_TERM] = 1'b1;
    else if (hops_east <= hops_west) reqs[PORT_EAST] = 1'b1;
    else                             reqs[PORT_WEST] = 1'b1;
  end

endmodule

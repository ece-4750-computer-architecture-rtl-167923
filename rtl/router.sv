// router: single-cycle three-port ring router.
//
// Ports are numbered 0 (west neighbour), 1 (terminal) and 2 (east
// neighbour); each is a val/rdy input and a val/rdy output carrying one
// network message. Every input feeds a four-entry normal queue. The queue
// heads go into a message-wide 3x3 crossbar whose selects, together with the
// output vals and the queue dequeue signals, come from router_ctrl
// (route computation, bubble flow-control and round-robin arbitration). The
// outputs are not registered: a packet at the head of an input queue leaves
// through the crossbar in the cycle it wins arbitration, so a packet spends
// one cycle in the router (enqueue at edge t, out_val during cycle t). The
// input queues' free-entry counts for the west and east ports feed the bubble
// rule.
//
// east_chan_free and west_chan_free are the free-entry counts of the channel
// queues that leave this router; only the adaptive configuration
// (ADAPTIVE = 1) reads them. Everything here follows the router datapath of
// the design; the two congestion inputs are this implementation's interface
// for the adaptive scheme.
module router
  import net_msg_pkg::*;
#(
  parameter int unsigned NUM_ROUTERS  = net_msg_pkg::RING_NODES,
  parameter bit          ADAPTIVE     = 1'b0,
  parameter bit          BUBBLE       = 1'b1,
  parameter int unsigned INQ_ENTRIES  = 4,
  parameter int unsigned CHAN_ENTRIES = 2,
  parameter int unsigned CONG_WEIGHT  = 1
) (
  input  logic                              clk,
  input  logic                              reset,
  input  node_id_t                          router_id,

  input  net_msg_t [NUM_PORTS-1:0]          in_msg,
  input  logic     [NUM_PORTS-1:0]          in_val,
  output logic     [NUM_PORTS-1:0]          in_rdy,

  output net_msg_t [NUM_PORTS-1:0]          out_msg,
  output logic     [NUM_PORTS-1:0]          out_val,
  input  logic     [NUM_PORTS-1:0]          out_rdy,

  input  logic [$clog2(CHAN_ENTRIES):0]     east_chan_free,
  input  logic [$clog2(CHAN_ENTRIES):0]     west_chan_free
);

  localparam int unsigned FREE_NBITS = $clog2(INQ_ENTRIES) + 1;

  net_msg_t [NUM_PORTS-1:0]                 in_deq_msg;
  logic     [NUM_PORTS-1:0]                 in_deq_val;
  logic     [NUM_PORTS-1:0]                 in_deq_rdy;
  logic     [NUM_PORTS-1:0][FREE_NBITS-1:0] num_free;
  node_id_t [NUM_PORTS-1:0]                 dest;
  logic     [NUM_PORTS-1:0][1:0]            xbar_sel;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_inq
    normal_queue #(
      .MSG_NBITS (MSG_NBITS),
      .NUM_MSGS  (INQ_ENTRIES)
    ) u_queue (
      .clk              (clk),
      .reset            (reset),
      .enq_val          (in_val[i]),
      .enq_rdy          (in_rdy[i]),
      .enq_msg          (in_msg[i]),
      .deq_val          (in_deq_val[i]),
      .deq_rdy          (in_deq_rdy[i]),
      .deq_msg          (in_deq_msg[i]),
      .num_free_entries (num_free[i])
    );
    assign dest[i] = in_deq_msg[i].dest;
  end

  crossbar #(
    .MSG_NBITS (MSG_NBITS),
    .NUM_PORTS (NUM_PORTS)
  ) u_xbar (
    .in_msg  (in_deq_msg),
    .sel     (xbar_sel),
    .out_msg (out_msg)
  );

  router_ctrl #(
    .NUM_ROUTERS  (NUM_ROUTERS),
    .ADAPTIVE     (ADAPTIVE),
    .BUBBLE       (BUBBLE),
    .INQ_ENTRIES  (INQ_ENTRIES),
    .CHAN_ENTRIES (CHAN_ENTRIES),
    .CONG_WEIGHT  (CONG_WEIGHT)
  ) u_ctrl (
    .clk            (clk),
    .reset          (reset),
    .router_id      (router_id),
    .dest           (dest),
    .in_deq_val     (in_deq_val),
    .in_deq_rdy     (in_deq_rdy),
    .num_free_west  (num_free[PORT_WEST]),
    .num_free_east  (num_free[PORT_EAST]),
    .east_chan_free (east_chan_free),
    .west_chan_free (west_chan_free),
    .out_val        (out_val),
    .out_rdy        (out_rdy),
    .xbar_sel       (xbar_sel)
  );

endmodule

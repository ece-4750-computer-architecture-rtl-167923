// router_ctrl: control unit of the single-cycle three-port router.
//
// Input side, one unit per input queue: the destination at the head of the
// queue goes through route computation, which gives a one-hot request for an
// output port (0 west, 1 terminal, 2 east); the request is raised only while
// the queue head is valid. Output side, one unit per output port: the
// requests aimed at that port are gathered, a round-robin arbiter picks one,
// the port's val is raised when any input asks for it, and the grant sets the
// port's crossbar select. A grant on a port whose rdy is high dequeues the
// winning input (in_deq_rdy), so a packet crosses the router in the same
// cycle it is granted.
//
// Bubble flow-control: a packet from the terminal input that is routed east
// may leave only while the router's west input queue has more than one free
// entry, and one routed west only while the east input queue has more than
// one free entry; otherwise its request is held back. Packets already in the
// ring are not restricted. BUBBLE = 0 removes the rule, giving the
// intermediate network without deadlock avoidance that the design uses to
// show why the rule is needed; it is not meant for use.
//
// Route computation: with ADAPTIVE = 0 (the baseline) every input uses the
// greedy scheme. With ADAPTIVE = 1 (the alternative) the terminal input uses
// the congestion-weighted scheme; packets already in the ring keep travelling
// in the direction they arrived in until they reach their destination, so a
// non-minimal choice made at injection is never undone.
//
// The structure (route computation, request/grant vectors, per-output
// round-robin arbiters, crossbar selects) and the bubble rule follow the
// design. Keeping the travel direction of in-ring packets in the adaptive
// router, and its use of the channel and input-queue free counts as
// congestion, are this implementation's choices. In the baseline
// configuration the two channel free counts are unused inputs, and
// term_bubble_stall (a terminal packet held by the bubble rule) is an
// observation signal that no logic reads.
module router_ctrl
  import net_msg_pkg::*;
#(
  parameter int unsigned NUM_ROUTERS  = net_msg_pkg::RING_NODES,
  parameter bit          ADAPTIVE     = 1'b0,
  parameter bit          BUBBLE       = 1'b1,
  parameter int unsigned INQ_ENTRIES  = 4,
  parameter int unsigned CHAN_ENTRIES = 2,
  parameter int unsigned CONG_WEIGHT  = 1
) (
  input  logic                                     clk,
  input  logic                                     reset,
  input  node_id_t                                 router_id,

  // Input queue heads
  input  node_id_t [NUM_PORTS-1:0]                 dest,
  input  logic     [NUM_PORTS-1:0]                 in_deq_val,
  output logic     [NUM_PORTS-1:0]                 in_deq_rdy,

  // Bubble flow-control: free entries of the west (in0) and east (in2) input queues
  input  logic [$clog2(INQ_ENTRIES):0]             num_free_west,
  input  logic [$clog2(INQ_ENTRIES):0]             num_free_east,

  // Congestion: free entries of the channel queues leaving this router
  input  logic [$clog2(CHAN_ENTRIES):0]            east_chan_free,
  input  logic [$clog2(CHAN_ENTRIES):0]            west_chan_free,

  // Output ports
  output logic     [NUM_PORTS-1:0]                 out_val,
  input  logic     [NUM_PORTS-1:0]                 out_rdy,
  output logic     [NUM_PORTS-1:0][1:0]            xbar_sel
);

  // route[i]   : one-hot output port wanted by the head of input i
  // in_reqs[i] : route[i] gated by valid and the bubble rule
  // out_reqs[j]: requests gathered per output port, bit i from input i
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] route;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] in_reqs;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] out_reqs;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] out_grants;

  // The terminal packet is routed into the ring but held back for lack of a bubble
  logic term_bubble_stall;

  //--------------------------------------------------------------------------
  // Route computation
  //--------------------------------------------------------------------------

  if (ADAPTIVE) begin : g_adaptive
    route_adaptive #(
      .NUM_ROUTERS  (NUM_ROUTERS),
      .INQ_ENTRIES  (INQ_ENTRIES),
      .CHAN_ENTRIES (CHAN_ENTRIES),
      .CONG_WEIGHT  (CONG_WEIGHT)
    ) u_route_term (
      .router_id      (router_id),
      .dest           (dest[PORT_TERM]),
      .east_chan_free (east_chan_free),
      .west_chan_free (west_chan_free),
      .num_free_west  (num_free_west),
      .num_free_east  (num_free_east),
      .reqs           (route[PORT_TERM])
    );

    // In-ring packets keep their direction of travel
    always_comb begin
      route[PORT_WEST] = '0;   // arrived from the west, travelling east
      route[PORT_EAST] = '0;   // arrived from the east, travelling west
      if (dest[PORT_WEST] == router_id) route[PORT_WEST][PORT_TERM] = 1'b1;
      else                              route[PORT_WEST][PORT_EAST] = 1'b1;
      if (dest[PORT_EAST] == router_id) route[PORT_EAST][PORT_TERM] = 1'b1;
      else                              route[PORT_EAST][PORT_WEST] = 1'b1;
    end
  end else begin : g_greedy
    for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
      route_greedy #(
        .NUM_ROUTERS (NUM_ROUTERS)
      ) u_route (
        .router_id (router_id),
        .dest      (dest[i]),
        .reqs      (route[i])
      );
    end
  end

  //--------------------------------------------------------------------------
  // Input control with the bubble rule on the terminal input
  //--------------------------------------------------------------------------

  logic bubble_ok;

  always_comb begin
    bubble_ok = 1'b1;
    if (BUBBLE) begin
      if (route[PORT_TERM][PORT_EAST] && !(num_free_west > 1)) bubble_ok = 1'b0;
      if (route[PORT_TERM][PORT_WEST] && !(num_free_east > 1)) bubble_ok = 1'b0;
    end

    term_bubble_stall = in_deq_val[PORT_TERM] && !bubble_ok;

    for (int i = 0; i < NUM_PORTS; i++) begin
      in_reqs[i] = in_deq_val[i] ? route[i] : '0;
    end
    if (!bubble_ok) in_reqs[PORT_TERM] = '0;

    for (int j = 0; j < NUM_PORTS; j++)
      for (int i = 0; i < NUM_PORTS; i++)
        out_reqs[j][i] = in_reqs[i][j];
  end

  //--------------------------------------------------------------------------
  // Output control: one round-robin arbiter per output port
  //--------------------------------------------------------------------------

  for (genvar j = 0; j < NUM_PORTS; j++) begin : g_out
    rr_arbiter #(
      .NUM_REQS (NUM_PORTS)
    ) u_arb (
      .clk    (clk),
      .reset  (reset),
      .en     (out_rdy[j]),
      .reqs   (out_reqs[j]),
      .grants (out_grants[j])
    );

    assign out_val[j] = |out_reqs[j];

    always_comb begin
      xbar_sel[j] = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (out_grants[j][i]) xbar_sel[j] = 2'(i);
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_deq_rdy[i] = 1'b0;
      for (int j = 0; j < NUM_PORTS; j++)
        if (out_grants[j][i] && out_rdy[j]) in_deq_rdy[i] = 1'b1;
    end
  end

  // Each input asks for at most one output
  always_ff @(posedge clk) begin
    if (!reset)
      for (int i = 0; i < NUM_PORTS; i++)
        assert ($onehot0(in_reqs[i])) else $error("router_ctrl: input %0d requests several outputs", i);
  end

endmodule

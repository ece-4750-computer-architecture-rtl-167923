// ring_net: bidirectional ring of NUM_ROUTERS routers with elastic-buffer
// flow-control.
//
// Router i has id i and its terminal on port 1 (in_*[i], out_*[i]). Its east
// port (2) drives a two-entry channel queue into the west port (0) of router
// i+1, and router i+1's west port drives a second channel queue back into
// router i's east port; router NUM_ROUTERS-1 wraps around to router 0. The
// channel queues are the elastic buffers: a packet the next router cannot
// take waits in the channel, and each channel's free-entry count is handed
// back to the router that feeds it as congestion information.
//
// Timing: a packet accepted at a terminal input on edge t reaches a
// destination h hops away at the earliest in cycle t + 2h (one cycle in each
// router input queue and one in each channel queue, crossbars combinational),
// so the zero-load latency from the source handshake to the sink handshake is
// 1 + 2h cycles.
//
// ADAPTIVE = 0 builds the baseline network (greedy routing), ADAPTIVE = 1 the
// alternative (adaptive routing). The topology, the two-entry channels and
// the port assignment follow the design; feeding channel free counts back as
// congestion information is this implementation's choice.
module ring_net
  import net_msg_pkg::*;
#(
  parameter int unsigned NUM_ROUTERS  = net_msg_pkg::RING_NODES,
  parameter bit          ADAPTIVE     = 1'b0,
  parameter bit          BUBBLE       = 1'b1,
  parameter int unsigned INQ_ENTRIES  = 4,
  parameter int unsigned CHAN_ENTRIES = 2,
  parameter int unsigned CONG_WEIGHT  = 1
) (
  input  logic                                clk,
  input  logic                                reset,

  input  net_msg_t [NUM_ROUTERS-1:0]          in_msg,
  input  logic     [NUM_ROUTERS-1:0]          in_val,
  output logic     [NUM_ROUTERS-1:0]          in_rdy,

  output net_msg_t [NUM_ROUTERS-1:0]          out_msg,
  output logic     [NUM_ROUTERS-1:0]          out_val,
  input  logic     [NUM_ROUTERS-1:0]          out_rdy
);

  localparam int unsigned CFREE_NBITS = $clog2(CHAN_ENTRIES) + 1;

  // Router-side port bundles
  net_msg_t [NUM_ROUTERS-1:0][NUM_PORTS-1:0] r_in_msg,  r_out_msg;
  logic     [NUM_ROUTERS-1:0][NUM_PORTS-1:0] r_in_val,  r_in_rdy;
  logic     [NUM_ROUTERS-1:0][NUM_PORTS-1:0] r_out_val, r_out_rdy;

  // Channel queue free counts: east channel i leaves router i eastwards,
  // west channel i leaves router i+1 westwards
  logic [NUM_ROUTERS-1:0][CFREE_NBITS-1:0] east_free, west_free;

  for (genvar i = 0; i < NUM_ROUTERS; i++) begin : g_node
    localparam int unsigned NEXT = (i + 1) % NUM_ROUTERS;
    localparam int unsigned PREV = (i + NUM_ROUTERS - 1) % NUM_ROUTERS;

    // Terminal
    assign r_in_msg[i][PORT_TERM]  = in_msg[i];
    assign r_in_val[i][PORT_TERM]  = in_val[i];
    assign in_rdy[i]               = r_in_rdy[i][PORT_TERM];
    assign out_msg[i]              = r_out_msg[i][PORT_TERM];
    assign out_val[i]              = r_out_val[i][PORT_TERM];
    assign r_out_rdy[i][PORT_TERM] = out_rdy[i];

    router #(
      .NUM_ROUTERS  (NUM_ROUTERS),
      .ADAPTIVE     (ADAPTIVE),
      .BUBBLE       (BUBBLE),
      .INQ_ENTRIES  (INQ_ENTRIES),
      .CHAN_ENTRIES (CHAN_ENTRIES),
      .CONG_WEIGHT  (CONG_WEIGHT)
    ) u_router (
      .clk            (clk),
      .reset          (reset),
      .router_id      (node_id_t'(i)),
      .in_msg         (r_in_msg[i]),
      .in_val         (r_in_val[i]),
      .in_rdy         (r_in_rdy[i]),
      .out_msg        (r_out_msg[i]),
      .out_val        (r_out_val[i]),
      .out_rdy        (r_out_rdy[i]),
      .east_chan_free (east_free[i]),
      .west_chan_free (west_free[PREV])
    );

    // Channel from router i east port to router NEXT west port
    normal_queue #(
      .MSG_NBITS (MSG_NBITS),
      .NUM_MSGS  (CHAN_ENTRIES)
    ) u_east_chan (
      .clk              (clk),
      .reset            (reset),
      .enq_val          (r_out_val[i][PORT_EAST]),
      .enq_rdy          (r_out_rdy[i][PORT_EAST]),
      .enq_msg          (r_out_msg[i][PORT_EAST]),
      .deq_val          (r_in_val[NEXT][PORT_WEST]),
      .deq_rdy          (r_in_rdy[NEXT][PORT_WEST]),
      .deq_msg          (r_in_msg[NEXT][PORT_WEST]),
      .num_free_entries (east_free[i])
    );

    // Channel from router NEXT west port to router i east port
    normal_queue #(
      .MSG_NBITS (MSG_NBITS),
      .NUM_MSGS  (CHAN_ENTRIES)
    ) u_west_chan (
      .clk              (clk),
      .reset            (reset),
      .enq_val          (r_out_val[NEXT][PORT_WEST]),
      .enq_rdy          (r_out_rdy[NEXT][PORT_WEST]),
      .enq_msg          (r_out_msg[NEXT][PORT_WEST]),
      .deq_val          (r_in_val[i][PORT_EAST]),
      .deq_rdy          (r_in_rdy[i][PORT_EAST]),
      .deq_msg          (r_in_msg[i][PORT_EAST]),
      .num_free_entries (west_free[i])
    );
  end

endmodule

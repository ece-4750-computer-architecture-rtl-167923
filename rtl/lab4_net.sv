// lab4_net: the baseline and the alternative ring networks side by side.
//
// Two independent eight-node bidirectional rings with elastic-buffer
// flow-control, round-robin arbitration and bubble flow-control. base_*
// terminals belong to the baseline ring, whose routers route greedily (fewer
// hops, east on a tie). alt_* terminals belong to the alternative ring, whose
// routers choose the direction of each injected packet by weighing distance
// against the occupancy of the neighbouring channel and input queues. Terminal n of
// each ring is router n's port 1: in_* is a val/rdy input that injects one
// message, out_* a val/rdy output that delivers one. The two rings share only
// clock and reset.
module lab4_net
  import net_msg_pkg::*;
(
  input  logic                          clk,
  input  logic                          reset,

  input  net_msg_t [RING_NODES-1:0]    base_in_msg,
  input  logic     [RING_NODES-1:0]    base_in_val,
  output logic     [RING_NODES-1:0]    base_in_rdy,
  output net_msg_t [RING_NODES-1:0]    base_out_msg,
  output logic     [RING_NODES-1:0]    base_out_val,
  input  logic     [RING_NODES-1:0]    base_out_rdy,

  input  net_msg_t [RING_NODES-1:0]    alt_in_msg,
  input  logic     [RING_NODES-1:0]    alt_in_val,
  output logic     [RING_NODES-1:0]    alt_in_rdy,
  output net_msg_t [RING_NODES-1:0]    alt_out_msg,
  output logic     [RING_NODES-1:0]    alt_out_val,
  input  logic     [RING_NODES-1:0]    alt_out_rdy
);

  ring_net #(
    .ADAPTIVE (1'b0)
  ) u_base (
    .clk     (clk),
    .reset   (reset),
    .in_msg  (base_in_msg),
    .in_val  (base_in_val),
    .in_rdy  (base_in_rdy),
    .out_msg (base_out_msg),
    .out_val (base_out_val),
    .out_rdy (base_out_rdy)
  );

  ring_net #(
    .ADAPTIVE (1'b1)
  ) u_alt (
    .clk     (clk),
    .reset   (reset),
    .in_msg  (alt_in_msg),
    .in_val  (alt_in_val),
    .in_rdy  (alt_in_rdy),
    .out_msg (alt_out_msg),
    .out_val (alt_out_val),
    .out_rdy (alt_out_rdy)
  );

endmodule

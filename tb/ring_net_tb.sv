// ring_net_tb: directed and random tests of the baseline ring network.
//
// Ring 0 is the eight-node baseline at its default parameters; ring 1 is a
// four-node baseline, to exercise the ring-size parameter. Sources and sinks
// as in the end-to-end test: a scoreboard checks that every message reaches
// the terminal named by its destination, unchanged, in order per
// source/destination pair.
//
// Directed cases on ring 0, each alone in the network, with the zero-load
// latency 1 + 2 * (minimal hops) checked for each message: one packet from a
// node to itself; from node A to node B; A to B and B to A together; one
// source sending one packet to every node (the eight messages of the
// design's example, opaque 0..7 with payloads ce ff 80 c0 55 96 32 2e);
// every node sending to one destination; every node to its neighbour. Then
// prolonged nearest-neighbour, hotspot and tornado traffic and uniform random
// traffic with random sink stalls, on both rings, which must all drain.
//
// Deadlock case: ring 2 is the eight-node baseline built without the bubble
// rule (BUBBLE = 0). Twenty packets from every node to the node half-way
// round (all routed east) must drain on ring 0 and must leave ring 2 stuck,
// with no delivery for 300 cycles.
module ring_net_tb;
  import net_msg_pkg::*;

  localparam int R = 3;
  localparam int NN [R] = '{8, 4, 8};

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  net_msg_t [7:0] in_msg  [R];
  logic     [7:0] in_val  [R];
  logic     [7:0] in_rdy  [R];
  net_msg_t [7:0] out_msg [R];
  logic     [7:0] out_val [R];
  logic     [7:0] out_rdy [R];

  ring_net u_ring8 (
    .clk(clk), .reset(reset),
    .in_msg(in_msg[0]), .in_val(in_val[0]), .in_rdy(in_rdy[0]),
    .out_msg(out_msg[0]), .out_val(out_val[0]), .out_rdy(out_rdy[0])
  );

  ring_net #(.NUM_ROUTERS(4)) u_ring4 (
    .clk(clk), .reset(reset),
    .in_msg(in_msg[1][3:0]), .in_val(in_val[1][3:0]), .in_rdy(in_rdy[1][3:0]),
    .out_msg(out_msg[1][3:0]), .out_val(out_val[1][3:0]), .out_rdy(out_rdy[1][3:0])
  );
  ring_net #(.BUBBLE(1'b0)) u_ring8_nobubble (
    .clk(clk), .reset(reset),
    .in_msg(in_msg[2]), .in_val(in_val[2]), .in_rdy(in_rdy[2]),
    .out_msg(out_msg[2]), .out_val(out_val[2]), .out_rdy(out_rdy[2])
  );

  assign in_rdy[1][7:4]  = '0;
  assign out_msg[1][7:4] = '0;
  assign out_val[1][7:4] = '0;

  function automatic int min_hops(int n, int s, int d);
    int he, hw;
    he = (d - s + n) % n;
    hw = (s - d + n) % n;
    return (he <= hw) ? he : hw;
  endfunction

  net_msg_t src_q [R][8][$];
  net_msg_t exp_q [R][64][$];
  int       inj_cycle [R][bit [MSG_NBITS-1:0]];
  int       outstanding [R];
  int       delivered [R];
  bit       sink_stalls = 1'b0;
  bit       check_latency = 1'b0;

  for (genvar r = 0; r < R; r++) begin : g_ring
    for (genvar n = 0; n < NN[r]; n++) begin : g_term
      always @(posedge clk) begin
        if (reset) begin
          in_val[r][n] <= 1'b0;
          out_rdy[r][n] <= 1'b0;
        end else begin
          if (in_val[r][n] && in_rdy[r][n]) begin
            inj_cycle[r][in_msg[r][n]] = cycle;
            void'(src_q[r][n].pop_front());
          end
          in_val[r][n] <= (src_q[r][n].size() > 0);
          if (src_q[r][n].size() > 0) in_msg[r][n] <= src_q[r][n][0];

          if (out_val[r][n] && out_rdy[r][n]) begin
            net_msg_t m;
            int idx;
            m = out_msg[r][n];
            idx = int'(m.src) * 8 + int'(m.dest);
            check(int'(m.dest) == n, $sformatf("ring %0d: message for %0d delivered at %0d", r, m.dest, n));
            check(exp_q[r][idx].size() > 0 && exp_q[r][idx][0] == m,
                  $sformatf("ring %0d: unexpected or out-of-order message %h", r, m));
            if (exp_q[r][idx].size() > 0 && exp_q[r][idx][0] == m) begin
              void'(exp_q[r][idx].pop_front());
              outstanding[r]--;
            end
            delivered[r]++;
            if (check_latency && inj_cycle[r].exists(m))
              check(cycle - inj_cycle[r][m] == 1 + 2 * min_hops(NN[r], int'(m.src), int'(m.dest)),
                    $sformatf("ring %0d: %0d->%0d latency %0d", r, m.src, m.dest, cycle - inj_cycle[r][m]));
            inj_cycle[r].delete(m);
          end
          out_rdy[r][n] <= sink_stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
        end
      end
    end
    for (genvar n = NN[r]; n < 8; n++) begin : g_unused
      assign in_val[r][n]  = 1'b0;
      assign in_msg[r][n]  = '0;
      assign out_rdy[r][n] = 1'b0;
    end
  end

  int tag = 0;
  task automatic send(int r, int s, int d, logic [7:0] opaque, logic [7:0] payload);
    net_msg_t m;
    m = mk_net_msg(node_id_t'(s), node_id_t'(d), opaque, payload);
    src_q[r][s].push_back(m);
    exp_q[r][s * 8 + d].push_back(m);
    outstanding[r]++;
  endtask

  task automatic send_auto(int r, int s, int d);
    send(r, s, d, 8'(tag), 8'($urandom));
    tag++;
  endtask

  // Wait until rings 0 and 1 are empty (ring 2 is only used by the deadlock case)
  task automatic drain(string name, int limit);
    int start;
    start = cycle;
    while ((outstanding[0] != 0 || outstanding[1] != 0) && cycle - start < limit) @(posedge clk);
    check(outstanding[0] == 0 && outstanding[1] == 0,
          $sformatf("%s: %0d/%0d messages undelivered", name, outstanding[0], outstanding[1]));
    repeat (3) @(posedge clk);
  endtask

  logic [7:0] fig_payload [8] = '{8'hce, 8'hff, 8'h80, 8'hc0, 8'h55, 8'h96, 8'h32, 8'h2e};

  initial begin
    for (int r = 0; r < R; r++) begin outstanding[r] = 0; delivered[r] = 0; end
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);

    check_latency = 1'b1;
    send(0, 3, 3, 8'h00, 8'h11);                 drain("self", 50);
    send(0, 1, 6, 8'h01, 8'h22);                 drain("A to B", 50);
    send(0, 2, 5, 8'h02, 8'h33);
    send(0, 5, 2, 8'h03, 8'h44);                 drain("A to B and B to A", 50);
    check_latency = 1'b0;
    for (int d = 0; d < 8; d++) send(0, 0, d, 8'(d), fig_payload[d]);
    drain("single source", 200);
    for (int s = 0; s < 8; s++) send(0, s, 6, 8'(s), 8'($urandom));
    drain("single destination", 200);
    check_latency = 1'b1;
    for (int s = 0; s < 8; s++) send(0, s, (s + 1) % 8, 8'(s), 8'($urandom));
    drain("neighbour", 200);
    check_latency = 1'b0;

    for (int stall = 0; stall < 2; stall++) begin
      sink_stalls = stall[0];
      for (int i = 0; i < 50; i++)
        for (int r = 0; r < 2; r++)
          for (int s = 0; s < NN[r]; s++) send_auto(r, s, (s + 1) % NN[r]);
      drain("nearest_neighbor", 10000);
      for (int i = 0; i < 50; i++)
        for (int r = 0; r < 2; r++)
          for (int s = 0; s < NN[r]; s++) send_auto(r, s, 1);
      drain("hotspot", 10000);
      for (int i = 0; i < 50; i++)
        for (int r = 0; r < 2; r++)
          for (int s = 0; s < NN[r]; s++) send_auto(r, s, (s + NN[r] / 2 - 1) % NN[r]);
      drain("tornado", 10000);
      for (int i = 0; i < 100; i++)
        for (int r = 0; r < 2; r++)
          for (int s = 0; s < NN[r]; s++) send_auto(r, s, $urandom_range(0, NN[r] - 1));
      drain("urandom", 10000);
    end

    // Deadlock: every node sends a stream of packets half-way round the ring,
    // all of which go east. Without the bubble rule the eastward ring fills
    // with packets that all wait for each other; with it everything drains.
    begin
      int stuck_since;
      int last_delivered;
      for (int i = 0; i < 20; i++)
        for (int s = 0; s < 8; s++) begin
          send_auto(0, s, (s + 4) % 8);
          send_auto(2, s, (s + 4) % 8);
        end
      last_delivered = delivered[2];
      stuck_since = cycle;
      while (outstanding[0] != 0 || (outstanding[2] != 0 && cycle - stuck_since < 300)) begin
        @(posedge clk);
        if (delivered[2] != last_delivered) begin
          last_delivered = delivered[2];
          stuck_since = cycle;
        end
      end
      check(outstanding[0] == 0, "bubble flow-control: deadlock traffic drained");
      check(outstanding[2] != 0, "without bubble flow-control the same traffic deadlocks");
      $display("deadlock case: %0d packets stuck without bubble flow-control", outstanding[2]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

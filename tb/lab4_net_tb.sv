// lab4_net_tb: end-to-end test of both ring networks at their default size.
//
// The same traffic is offered to the baseline (greedy) and the alternative
// (adaptive) ring. Each terminal has a source that injects its list of
// messages through the val/rdy input and a sink that accepts deliveries,
// optionally with random ready stalls. Every message carries a unique opaque
// tag. A scoreboard checks that each message reaches the terminal named by
// its destination exactly once and unchanged; in the baseline ring, whose
// routes are deterministic, it also checks that messages between one source
// and one destination arrive in the order they were sent.
//
// Phases: (1) zero-load: every source/destination pair alone, latency must be
// 1 + 2 * (minimal hop count) cycles and the injection direction must be the
// greedy one (east on a tie); (2) the evaluation traffic patterns (urandom,
// partition2, partition4, tornado, neighbor, complement, hotspot) at full
// injection rate with and without sink stalls, each of which must drain
// (no deadlock). Probes into the routers count the mechanisms of the design
// (bubble stalls, arbitration conflicts, channel back-pressure, wrap-around
// traffic, east-on-tie routes, non-minimal adaptive routes); one that never
// happens is a failure.
module lab4_net_tb;
  import net_msg_pkg::*;

  localparam int N = RING_NODES;
  localparam int R = 2;            // 0 baseline, 1 alternative
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  net_msg_t [N-1:0] in_msg  [R];
  logic     [N-1:0] in_val  [R];
  logic     [N-1:0] in_rdy  [R];
  net_msg_t [N-1:0] out_msg [R];
  logic     [N-1:0] out_val [R];
  logic     [N-1:0] out_rdy [R];

  lab4_net dut (
    .clk          (clk),
    .reset        (reset),
    .base_in_msg  (in_msg[0]),  .base_in_val (in_val[0]),  .base_in_rdy (in_rdy[0]),
    .base_out_msg (out_msg[0]), .base_out_val(out_val[0]), .base_out_rdy(out_rdy[0]),
    .alt_in_msg   (in_msg[1]),  .alt_in_val  (in_val[1]),  .alt_in_rdy  (in_rdy[1]),
    .alt_out_msg  (out_msg[1]), .alt_out_val (out_val[1]), .alt_out_rdy (out_rdy[1])
  );

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

  //--------------------------------------------------------------------------
  // Reference model: hop counts and the greedy direction
  //--------------------------------------------------------------------------
  function automatic int hops_east(int s, int d); return (d - s + N) % N; endfunction
  function automatic int hops_west(int s, int d); return (s - d + N) % N; endfunction
  function automatic int min_hops(int s, int d);
    return (hops_east(s, d) <= hops_west(s, d)) ? hops_east(s, d) : hops_west(s, d);
  endfunction
  // 0 west, 2 east, 1 local
  function automatic int greedy_dir(int s, int d);
    if (s == d) return 1;
    return (hops_east(s, d) <= hops_west(s, d)) ? 2 : 0;
  endfunction

  //--------------------------------------------------------------------------
  // Sources, sinks and scoreboard
  //--------------------------------------------------------------------------
  net_msg_t src_q [R][N][$];
  net_msg_t exp_q [R][N*N][$];
  int       inj_cycle [R][bit [MSG_NBITS-1:0]];
  int       inj_dir   [R][bit [MSG_NBITS-1:0]];
  int       outstanding [R];
  int       last_latency [R];
  bit       sink_stalls = 1'b0;
  bit       check_zero_load = 1'b0;

  // Mechanism counters
  int n_bubble_stall [R];
  int n_arb_conflict [R];
  int n_chan_backpressure [R];
  int n_sink_backpressure [R];
  int n_wrap [R];
  int n_tie_east;
  int n_nonminimal;
  int n_delivered [R];

  for (genvar r = 0; r < R; r++) begin : g_ring
    for (genvar n = 0; n < N; n++) begin : g_term
      // Source
      always @(posedge clk) begin
        if (reset) begin
          in_val[r][n] <= 1'b0;
        end else begin
          if (in_val[r][n] && in_rdy[r][n]) begin
            inj_cycle[r][in_msg[r][n]] = cycle;
            void'(src_q[r][n].pop_front());
          end
          in_val[r][n] <= (src_q[r][n].size() > 0);
          if (src_q[r][n].size() > 0) in_msg[r][n] <= src_q[r][n][0];
        end
      end

      // Sink
      always @(posedge clk) begin
        if (reset) begin
          out_rdy[r][n] <= 1'b0;
        end else begin
          if (out_val[r][n] && out_rdy[r][n]) begin
            net_msg_t m;
            int idx;
            bit found;
            m = out_msg[r][n];
            n_delivered[r]++;
            check(int'(m.dest) == n, $sformatf("ring %0d: message for %0d delivered at %0d", r, m.dest, n));
            idx = int'(m.src) * N + int'(m.dest);
            found = 1'b0;
            if (r == 0) begin
              if (exp_q[r][idx].size() > 0 && exp_q[r][idx][0] == m) begin
                found = 1'b1;
                void'(exp_q[r][idx].pop_front());
              end
            end else begin
              for (int k = 0; k < exp_q[r][idx].size(); k++)
                if (!found && exp_q[r][idx][k] == m) begin
                  found = 1'b1;
                  exp_q[r][idx].delete(k);
                end
            end
            check(found, $sformatf("ring %0d: unexpected or out-of-order message %h at %0d", r, m, n));
            if (found) outstanding[r]--;
            if (inj_cycle[r].exists(m)) begin
              last_latency[r] = cycle - inj_cycle[r][m];
              if (check_zero_load)
                check(last_latency[r] == 1 + 2 * min_hops(int'(m.src), int'(m.dest)),
                      $sformatf("ring %0d: %0d->%0d latency %0d, expected %0d", r, m.src, m.dest,
                                last_latency[r], 1 + 2 * min_hops(int'(m.src), int'(m.dest))));
              inj_cycle[r].delete(m);
            end
            if (m.src != m.dest && inj_dir[r].exists(m)) begin
              if (r == 0) begin
                check(inj_dir[r][m] == greedy_dir(int'(m.src), int'(m.dest)),
                      $sformatf("baseline: %0d->%0d injected towards port %0d", m.src, m.dest, inj_dir[r][m]));
                if (hops_east(int'(m.src), int'(m.dest)) == hops_west(int'(m.src), int'(m.dest))
                    && inj_dir[r][m] == 2)
                  n_tie_east++;
              end else begin
                if (check_zero_load)
                  check(inj_dir[r][m] == greedy_dir(int'(m.src), int'(m.dest)),
                        $sformatf("alternative at zero load: %0d->%0d injected towards port %0d",
                                  m.src, m.dest, inj_dir[r][m]));
                if (hops_east(int'(m.src), int'(m.dest)) != hops_west(int'(m.src), int'(m.dest))
                    && inj_dir[r][m] != greedy_dir(int'(m.src), int'(m.dest)))
                  n_nonminimal++;
              end
              inj_dir[r].delete(m);
            end
          end
          out_rdy[r][n] <= sink_stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
        end
      end
    end
  end

  //--------------------------------------------------------------------------
  // Probes into the routers
  //--------------------------------------------------------------------------
  `define LAB4_PROBE(RING, R_IDX)                                                        \
    for (genvar n = 0; n < N; n++) begin : g_probe_``RING                                \
      always @(posedge clk) if (!reset) begin                                            \
        if (dut.RING.g_node[n].u_router.u_ctrl.term_bubble_stall) n_bubble_stall[R_IDX]++; \
        for (int p = 0; p < NUM_PORTS; p++) begin                                        \
          if ($countones(dut.RING.g_node[n].u_router.u_ctrl.out_reqs[p]) > 1)            \
            n_arb_conflict[R_IDX]++;                                                     \
          if (p != PORT_TERM && dut.RING.g_node[n].u_router.out_val[p]                   \
              && !dut.RING.g_node[n].u_router.out_rdy[p])                                \
            n_chan_backpressure[R_IDX]++;                                                \
          if (p != PORT_TERM && dut.RING.g_node[n].u_router.out_val[p]                   \
              && dut.RING.g_node[n].u_router.out_rdy[p]                                  \
              && dut.RING.g_node[n].u_router.u_ctrl.xbar_sel[p] == 2'(PORT_TERM))        \
            inj_dir[R_IDX][dut.RING.g_node[n].u_router.out_msg[p]] = p;                  \
        end                                                                              \
        if (n == N-1 && dut.RING.g_node[n].u_router.out_val[PORT_EAST]                   \
            && dut.RING.g_node[n].u_router.out_rdy[PORT_EAST]) n_wrap[R_IDX]++;          \
        if (n == 0 && dut.RING.g_node[n].u_router.out_val[PORT_WEST]                     \
            && dut.RING.g_node[n].u_router.out_rdy[PORT_WEST]) n_wrap[R_IDX]++;          \
        if (out_val[R_IDX][n] && !out_rdy[R_IDX][n]) n_sink_backpressure[R_IDX]++;       \
      end                                                                                \
    end

  `LAB4_PROBE(u_base, 0)
  `LAB4_PROBE(u_alt, 1)

  //--------------------------------------------------------------------------
  // Traffic
  //--------------------------------------------------------------------------
  int tag = 0;

  task automatic send(int s, int d);
    net_msg_t m;
    m = mk_net_msg(node_id_t'(s), node_id_t'(d), 8'(tag), 8'($urandom));
    tag++;
    for (int r = 0; r < R; r++) begin
      src_q[r][s].push_back(m);
      exp_q[r][s * N + d].push_back(m);
      outstanding[r]++;
    end
  endtask

  task automatic drain(string name, int limit);
    int start;
    start = cycle;
    while ((outstanding[0] != 0 || outstanding[1] != 0) && cycle - start < limit)
      @(posedge clk);
    check(outstanding[0] == 0, $sformatf("%s: baseline left %0d messages undelivered", name, outstanding[0]));
    check(outstanding[1] == 0, $sformatf("%s: alternative left %0d messages undelivered", name, outstanding[1]));
    if (name.substr(0, 5) != "single")
      $display("pattern %-11s done in %0d cycles", name, cycle - start);
    repeat (5) @(posedge clk);
  endtask

  function automatic int pattern_dest(string pat, int s, int i);
    case (pat)
      "urandom":    return $urandom_range(0, N - 1);
      "partition2": return ($urandom_range(0, N - 1) & 3) | (s & 4);
      "partition4": return ($urandom_range(0, N - 1) & 1) | (s & 6);
      "tornado":    return (s + 3) % N;
      "neighbor":   return (s + 1) % N;
      "complement": return (~s) & (N - 1);
      "hotspot":    return 5;
      "alltoall":   return (s + i) % N;
      default:      return s;
    endcase
  endfunction

  string pats[8] = '{"urandom", "partition2", "partition4", "tornado",
                     "neighbor", "complement", "hotspot", "alltoall"};

  initial begin
    for (int r = 0; r < R; r++) begin
      outstanding[r] = 0;
      n_bubble_stall[r] = 0; n_arb_conflict[r] = 0; n_chan_backpressure[r] = 0;
      n_sink_backpressure[r] = 0; n_wrap[r] = 0; n_delivered[r] = 0;
      for (int n = 0; n < N; n++) begin
        in_msg[r][n] = '0;
        in_val[r][n] = 1'b0;
        out_rdy[r][n] = 1'b0;
      end
    end
    n_tie_east = 0;
    n_nonminimal = 0;

    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);

    // Phase 1: zero-load latency and direction for every pair
    check_zero_load = 1'b1;
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        send(s, d);
        drain($sformatf("single %0d->%0d", s, d), 100);
      end
    check_zero_load = 1'b0;

    // Phase 2: evaluation patterns at full injection rate
    for (int stall = 0; stall < 2; stall++) begin
      sink_stalls = stall[0];
      foreach (pats[p]) begin
        for (int i = 0; i < 60; i++)
          for (int s = 0; s < N; s++)
            send(s, pattern_dest(pats[p], s, i));
        drain(pats[p], 20000);
      end
    end
    sink_stalls = 1'b0;

    // Mechanisms that must have happened
    for (int r = 0; r < R; r++) begin
      $display("ring %0d: delivered %0d, bubble stalls %0d, arbitration conflicts %0d, channel back-pressure %0d, sink back-pressure %0d, wrap-around transfers %0d",
               r, n_delivered[r], n_bubble_stall[r], n_arb_conflict[r], n_chan_backpressure[r],
               n_sink_backpressure[r], n_wrap[r]);
      check(n_bubble_stall[r] > 0, $sformatf("ring %0d: bubble rule never held a packet", r));
      check(n_arb_conflict[r] > 0, $sformatf("ring %0d: no arbitration conflict", r));
      check(n_chan_backpressure[r] > 0, $sformatf("ring %0d: no channel back-pressure", r));
      check(n_sink_backpressure[r] > 0, $sformatf("ring %0d: no sink back-pressure", r));
      check(n_wrap[r] > 0, $sformatf("ring %0d: wrap-around channel never used", r));
    end
    $display("east-on-tie routes %0d, non-minimal adaptive routes %0d", n_tie_east, n_nonminimal);
    check(n_tie_east > 0, "no half-way packet was routed east");
    check(n_nonminimal > 0, "adaptive ring never routed non-minimally");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

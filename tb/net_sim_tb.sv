// net_sim_tb: latency against injection rate for the evaluation traffic
// patterns, on both rings.
//
// Each terminal generates a packet in a cycle with probability equal to the
// injection rate, into an unbounded source queue, with a destination drawn
// from the pattern:
//   urandom     dest = random % 8
//   partition2  dest = (random & 3'b011) | (src & 3'b100)
//   partition4  dest = (random & 3'b001) | (src & 3'b110)
//   tornado     dest = (src + 3) % 8
//   neighbor    dest = (src + 1) % 8
//   complement  dest = ~src
// Latency runs from the first clock edge at which the packet could have been
// accepted to the edge at which the sink accepts it, so it includes waiting
// in the source queue; an unhindered packet takes 1 + 2 * hops cycles. After
// a warm-up, packets generated during a measurement window are averaged; the
// network is then drained. Printed: one line per pattern and rate with the
// average latency of the baseline and the alternative ring.
//
// Checks: every packet is delivered to the right terminal (no loss, no
// deadlock even far past saturation); at 5 % injection the average latency
// of each pattern is within one cycle of its zero-load value 1 + 2 * (mean
// minimal hops), computed here from the pattern (the sample of random
// destinations can fall slightly below it); for uniform random traffic that
// zero-load value is 5 cycles; and on tornado traffic at 35 % injection,
// past the baseline's saturation, the adaptive ring's latency is below the
// baseline's.
module net_sim_tb;
  import net_msg_pkg::*;

  localparam int N = RING_NODES;
  localparam int R = 2;
  localparam int WARMUP  = 300;
  localparam int MEASURE = 1000;

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

  // Packet record: the message and the edge it could first have been taken
  typedef struct {
    net_msg_t msg;
    int       stamp;
    bit       measured;
  } pkt_t;

  pkt_t src_q [R][N][$];
  int   stamp_of [R][bit [MSG_NBITS-1:0]];
  bit   meas_of  [R][bit [MSG_NBITS-1:0]];
  int   outstanding [R];
  longint lat_sum [R];
  int   lat_cnt [R];

  int   rate_pct = 0;
  int   pattern = 0;
  bit   generating = 1'b0;
  bit   measuring = 1'b0;
  int   seq = 0;

  function automatic int pick_dest(int pat, int s);
    int rnd;
    rnd = $urandom_range(0, 7);
    case (pat)
      0: return rnd;
      1: return (rnd & 3) | (s & 4);
      2: return (rnd & 1) | (s & 6);
      3: return (s + 3) % N;
      4: return (s + 1) % N;
      default: return (~s) & 7;
    endcase
  endfunction

  // Generators: one draw per terminal per cycle, the same packet offered to both rings
  always @(posedge clk) begin
    if (!reset && generating) begin
      for (int s = 0; s < N; s++) begin
        if ($urandom_range(0, 99) < rate_pct) begin
          net_msg_t m;
          m = mk_net_msg(node_id_t'(s), node_id_t'(pick_dest(pattern, s)), 8'(seq), 8'(seq >> 8));
          seq++;
          for (int r = 0; r < R; r++) begin
            src_q[r][s].push_back('{msg: m, stamp: cycle + 1, measured: measuring});
            outstanding[r]++;
          end
        end
      end
    end
  end

  for (genvar r = 0; r < R; r++) begin : g_ring
    for (genvar n = 0; n < N; n++) begin : g_term
      always @(posedge clk) begin
        if (reset) begin
          in_val[r][n] <= 1'b0;
          out_rdy[r][n] <= 1'b0;
        end else begin
          if (in_val[r][n] && in_rdy[r][n]) begin
            pkt_t p;
            p = src_q[r][n].pop_front();
            stamp_of[r][p.msg] = p.stamp;
            meas_of[r][p.msg] = p.measured;
          end
          in_val[r][n] <= (src_q[r][n].size() > 0);
          if (src_q[r][n].size() > 0) in_msg[r][n] <= src_q[r][n][0].msg;
          out_rdy[r][n] <= 1'b1;

          if (out_val[r][n] && out_rdy[r][n]) begin
            net_msg_t m;
            m = out_msg[r][n];
            check(int'(m.dest) == n, $sformatf("ring %0d: message for %0d delivered at %0d", r, m.dest, n));
            check(stamp_of[r].exists(m), $sformatf("ring %0d: unknown message %h", r, m));
            if (stamp_of[r].exists(m)) begin
              if (meas_of[r][m]) begin
                lat_sum[r] += longint'(cycle - stamp_of[r][m]);
                lat_cnt[r]++;
              end
              stamp_of[r].delete(m);
              meas_of[r].delete(m);
              outstanding[r]--;
            end
          end
        end
      end
    end
  end

  // Zero-load latency of a pattern: 1 + 2 * mean minimal hops over its destinations
  function automatic real zero_load(int pat);
    real sum;
    int cnt;
    sum = 0.0;
    cnt = 0;
    for (int s = 0; s < N; s++)
      for (int x = 0; x < 8; x++) begin
        int d, he, hw;
        case (pat)
          0: d = x;
          1: d = (x & 3) | (s & 4);
          2: d = (x & 1) | (s & 6);
          3: d = (s + 3) % N;
          4: d = (s + 1) % N;
          default: d = (~s) & 7;
        endcase
        he = (d - s + N) % N;
        hw = (s - d + N) % N;
        sum += 1.0 + 2.0 * ((he <= hw) ? he : hw);
        cnt++;
      end
    return sum / cnt;
  endfunction

  string names [6] = '{"urandom", "partition2", "partition4", "tornado", "neighbor", "complement"};
  int    rates [7] = '{5, 15, 25, 35, 45, 55, 65};

  initial begin
    for (int r = 0; r < R; r++) outstanding[r] = 0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);

    check(zero_load(0) == 5.0, "uniform random zero-load latency is 5 cycles");
    $display("pattern      rate%%  base_latency  alt_latency  zero_load");
    for (int p = 0; p < 6; p++) begin
      foreach (rates[k]) begin
        real avg [R];
        int start;
        pattern = p;
        rate_pct = rates[k];
        for (int r = 0; r < R; r++) begin lat_sum[r] = 0; lat_cnt[r] = 0; end
        generating = 1'b1;
        repeat (WARMUP) @(posedge clk);
        measuring = 1'b1;
        repeat (MEASURE) @(posedge clk);
        measuring = 1'b0;
        generating = 1'b0;
        start = cycle;
        while ((outstanding[0] != 0 || outstanding[1] != 0) && cycle - start < 40000) @(posedge clk);
        check(outstanding[0] == 0 && outstanding[1] == 0,
              $sformatf("%s at %0d%%: %0d/%0d packets undelivered", names[p], rates[k], outstanding[0], outstanding[1]));
        for (int r = 0; r < R; r++) avg[r] = (lat_cnt[r] > 0) ? real'(lat_sum[r]) / lat_cnt[r] : 0.0;
        $display("%-11s  %4d  %12.2f  %11.2f  %9.2f%s", names[p], rates[k], avg[0], avg[1], zero_load(p),
                 (avg[0] > 100.0) ? "  (baseline saturated)" : "");
        if (rates[k] == 5) begin
          check(avg[0] > zero_load(p) - 1.0 && avg[0] < zero_load(p) + 1.0,
                $sformatf("%s baseline latency %0.2f at 5%%, zero-load %0.2f", names[p], avg[0], zero_load(p)));
          check(avg[1] > zero_load(p) - 1.0 && avg[1] < zero_load(p) + 1.0,
                $sformatf("%s alternative latency %0.2f at 5%%, zero-load %0.2f", names[p], avg[1], zero_load(p)));
        end
        if (p == 3 && rates[k] == 35)
          check(avg[1] < avg[0], $sformatf("tornado at 35%%: adaptive %0.2f not below greedy %0.2f", avg[1], avg[0]));
        repeat (5) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

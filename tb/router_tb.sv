// router_tb: checks one baseline router (id 2) through its three ports.
//
// Sources drive the west (0), terminal (1) and east (2) inputs from message
// lists; sinks accept from the three outputs, always ready, at random or
// never. A scoreboard expects every message on the output port that greedy
// routing gives for router 2 (terminal for destination 2; east for 3..6,
// where 6 is the half-way tie; west for 7, 0 and 1), in order per
// input/output pair; the input port is carried in the opaque field.
//
// Directed cases: the example of a packet from terminal 2 to itself, which
// must come out of the terminal output one cycle after it is accepted; and
// the bubble rule in both directions: with three packets stuck in the west
// (east) input queue, a terminal packet routed east (west) must not leave
// while that queue has only one free entry, and must leave once it drains.
// A random phase then mixes traffic on all ports with random sink stalls.
module router_tb;
  import net_msg_pkg::*;

  localparam int ID = 2;

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

  net_msg_t [2:0] in_msg, out_msg;
  logic     [2:0] in_val, in_rdy, out_val, out_rdy;

  router #(.ADAPTIVE(1'b0)) dut (
    .clk(clk), .reset(reset), .router_id(node_id_t'(ID)),
    .in_msg(in_msg), .in_val(in_val), .in_rdy(in_rdy),
    .out_msg(out_msg), .out_val(out_val), .out_rdy(out_rdy),
    .east_chan_free(2'd2), .west_chan_free(2'd2)
  );

  function automatic int exp_port(int d);
    int he, hw;
    he = (d - ID + 8) % 8;
    hw = (ID - d + 8) % 8;
    if (d == ID) return 1;
    return (he <= hw) ? 2 : 0;
  endfunction

  net_msg_t src_q [3][$];
  net_msg_t exp_q [3][3][$];
  int       sink_mode [3];    // 0 ready, 1 random, 2 never
  int       fires [3];
  int       outstanding = 0;
  int       inj_cycle [bit [MSG_NBITS-1:0]];
  int       last_latency;

  for (genvar p = 0; p < 3; p++) begin : g_port
    always @(posedge clk) begin
      if (reset) begin
        in_val[p] <= 1'b0;
        out_rdy[p] <= 1'b0;
      end else begin
        if (in_val[p] && in_rdy[p]) begin
          inj_cycle[in_msg[p]] = cycle;
          void'(src_q[p].pop_front());
        end
        in_val[p] <= (src_q[p].size() > 0);
        if (src_q[p].size() > 0) in_msg[p] <= src_q[p][0];

        if (out_val[p] && out_rdy[p]) begin
          net_msg_t m;
          int ip;
          m = out_msg[p];
          ip = int'(m.opaque[7:6]);
          fires[p]++;
          check(exp_port(int'(m.dest)) == p, $sformatf("dest %0d left on port %0d", m.dest, p));
          check(ip < 3 && exp_q[ip][p].size() > 0 && exp_q[ip][p][0] == m,
                $sformatf("unexpected or out-of-order message %h on port %0d", m, p));
          if (ip < 3 && exp_q[ip][p].size() > 0 && exp_q[ip][p][0] == m) begin
            void'(exp_q[ip][p].pop_front());
            outstanding--;
          end
          if (inj_cycle.exists(m)) last_latency = cycle - inj_cycle[m];
        end
        case (sink_mode[p])
          0: out_rdy[p] <= 1'b1;
          1: out_rdy[p] <= ($urandom_range(0, 2) != 0);
          default: out_rdy[p] <= 1'b0;
        endcase
      end
    end
  end

  int seq = 0;
  task automatic send(int p, int s, int d, logic [7:0] payload);
    net_msg_t m;
    m = mk_net_msg(node_id_t'(s), node_id_t'(d), {2'(p), 6'(seq)}, payload);
    seq++;
    src_q[p].push_back(m);
    exp_q[p][exp_port(d)].push_back(m);
    outstanding++;
  endtask

  task automatic drain(int limit);
    int start;
    start = cycle;
    while (outstanding != 0 && cycle - start < limit) @(posedge clk);
    check(outstanding == 0, $sformatf("%0d messages undelivered", outstanding));
  endtask

  initial begin
    for (int p = 0; p < 3; p++) begin
      sink_mode[p] = 0; fires[p] = 0; in_val[p] = 0; in_msg[p] = '0; out_rdy[p] = 0;
    end
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);

    // Example: terminal of router 2 to itself, one cycle through the router
    send(1, ID, ID, 8'hce);
    drain(20);
    check(last_latency == 1, $sformatf("terminal to terminal latency %0d, expected 1", last_latency));

    // Bubble rule, eastward injection: fill the west input queue to one free entry
    sink_mode[1] = 2;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 3; i++) send(0, 0, ID, 8'(i));
    repeat (8) @(posedge clk);
    check(dut.num_free[PORT_WEST] == 3'd1, "west input queue holds three packets");
    send(1, ID, 4, 8'haa);
    repeat (10) @(posedge clk);
    check(fires[2] == 0, "terminal packet held while the west input queue has no bubble");
    sink_mode[1] = 0;
    drain(50);
    check(fires[2] == 1, "terminal packet sent east once the bubble returned");

    // Bubble rule, westward injection
    sink_mode[1] = 2;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 3; i++) send(2, 4, ID, 8'(i));
    repeat (8) @(posedge clk);
    send(1, ID, 0, 8'hbb);
    repeat (10) @(posedge clk);
    check(fires[0] == 0, "terminal packet held while the east input queue has no bubble");
    sink_mode[1] = 0;
    drain(50);
    check(fires[0] == 1, "terminal packet sent west once the bubble returned");

    // Random traffic on all ports
    for (int p = 0; p < 3; p++) sink_mode[p] = 1;
    for (int i = 0; i < 400; i++)
      for (int p = 0; p < 3; p++)
        send(p, $urandom_range(0, 7), $urandom_range(0, 7), 8'($urandom));
    drain(20000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

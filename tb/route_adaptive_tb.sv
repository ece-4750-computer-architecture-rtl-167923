// route_adaptive_tb: checks the congestion-weighted route computation.
//
// For every router, destination, pair of channel free counts (0..2) and pair
// of input-queue free counts (0..4) the request must match
//   cost = hops + (2 - channel free) + (4 - input queue free)
// per direction (east uses the east channel and the west input queue, west
// the west channel and the east input queue), the cheaper direction winning
// and east on a tie, terminal at the destination. Directed cases: with empty
// queues a packet three hops east goes east; with the east channel full and
// one packet in the west input queue it goes the long way, west (a
// non-minimal route); with only the east channel full it is a tie and goes
// east.
module route_adaptive_tb;
  import net_msg_pkg::*;

  int checks = 0;
  int failures = 0;

  node_id_t   router_id, dest;
  logic [1:0] east_free, west_free;
  logic [2:0] inq_free_west, inq_free_east;
  logic [2:0] reqs;

  route_adaptive #(.NUM_ROUTERS(8), .INQ_ENTRIES(4), .CHAN_ENTRIES(2), .CONG_WEIGHT(1)) dut (
    .router_id(router_id), .dest(dest),
    .east_chan_free(east_free), .west_chan_free(west_free),
    .num_free_west(inq_free_west), .num_free_east(inq_free_east), .reqs(reqs)
  );

  task automatic expect_reqs(logic [2:0] exp, string what);
    #1;
    checks++;
    if (reqs !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s: reqs %b expected %b", what, reqs, exp);
    end
  endtask

  initial begin
    router_id = 3'd1; dest = 3'd4; east_free = 2'd2; west_free = 2'd2;
    inq_free_west = 3'd4; inq_free_east = 3'd4;
    expect_reqs(3'b100, "three hops east, no congestion");
    east_free = 2'd0; inq_free_west = 3'd3;
    expect_reqs(3'b001, "three hops east, eastward traffic 3 packets: non-minimal west");
    inq_free_west = 3'd4;
    expect_reqs(3'b100, "east channel full only: tie, east");
    dest = 3'd1;
    expect_reqs(3'b010, "own terminal");

    for (int id = 0; id < 8; id++)
      for (int d = 0; d < 8; d++)
        for (int ef = 0; ef <= 2; ef++)
          for (int wf = 0; wf <= 2; wf++)
            for (int qw = 0; qw <= 4; qw++)
              for (int qe = 0; qe <= 4; qe++) begin
                int ce, cw;
                logic [2:0] exp;
                router_id = 3'(id); dest = 3'(d); east_free = 2'(ef); west_free = 2'(wf);
                inq_free_west = 3'(qw); inq_free_east = 3'(qe);
                ce = (d - id + 8) % 8 + (2 - ef) + (4 - qw);
                cw = (id - d + 8) % 8 + (2 - wf) + (4 - qe);
                exp = (d == id) ? 3'b010 : (ce <= cw) ? 3'b100 : 3'b001;
                expect_reqs(exp, $sformatf("router %0d dest %0d free e%0d w%0d qw%0d qe%0d", id, d, ef, wf, qw, qe));
              end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// route_greedy_tb: checks greedy route computation for every router and
// destination of the eight-node ring.
//
// Expected: terminal (bit 1) when the destination is this router, otherwise
// east (bit 2) when the eastward hop count (dest - id mod 8) is not larger
// than the westward one, else west (bit 0). Destinations four hops away are a
// tie and must go east.
module route_greedy_tb;
  import net_msg_pkg::*;

  int checks = 0;
  int failures = 0;

  node_id_t   router_id, dest;
  logic [2:0] reqs;

  route_greedy #(.NUM_ROUTERS(8)) dut (.router_id(router_id), .dest(dest), .reqs(reqs));

  initial begin
    for (int id = 0; id < 8; id++)
      for (int d = 0; d < 8; d++) begin
        logic [2:0] exp;
        int he, hw;
        router_id = 3'(id); dest = 3'(d);
        #1;
        he = (d - id + 8) % 8;
        hw = (id - d + 8) % 8;
        exp = (d == id) ? 3'b010 : (he <= hw) ? 3'b100 : 3'b001;
        checks++;
        if (reqs !== exp) begin
          failures++;
          $display("FAIL: router %0d dest %0d reqs %b expected %b", id, d, reqs, exp);
        end
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

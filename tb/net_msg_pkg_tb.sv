// net_msg_pkg_tb: checks the network message layout.
//
// Builds messages with mk_net_msg from random fields and checks that each
// field sits at its bit positions in the packed 22-bit word: dest[21:19],
// src[18:16], opaque[15:8], payload[7:0], and that the port numbers are
// west 0, terminal 1, east 2.
module net_msg_pkg_tb;
  import net_msg_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    net_msg_t m;
    logic [21:0] w;
    check(MSG_NBITS == 22, "message is 22 bits");
    check($bits(net_msg_t) == 22, "net_msg_t is 22 bits");
    check(PORT_WEST == 0 && PORT_TERM == 1 && PORT_EAST == 2, "port numbering");
    check(RING_NODES == 8, "eight routers");
    for (int i = 0; i < 200; i++) begin
      logic [2:0] s, d;
      logic [7:0] o, p;
      s = 3'($urandom); d = 3'($urandom); o = 8'($urandom); p = 8'($urandom);
      m = mk_net_msg(s, d, o, p);
      w = m;
      check(w[21:19] == d, "dest field");
      check(w[18:16] == s, "src field");
      check(w[15:8]  == o, "opaque field");
      check(w[7:0]   == p, "payload field");
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

// router_ctrl_tb: checks the router control unit against a reference model.
//
// A baseline (greedy) and an alternative (adaptive) instance get the same
// random inputs every cycle: queue-head destinations and valids, the west and
// east input-queue free counts, the channel free counts, the output readies
// and the router id. A model written here computes the routes (greedy; or
// adaptive on the terminal input and direction-keeping on the ring inputs),
// applies the bubble rule to the terminal input (east needs more than one
// free entry in the west input queue, west more than one in the east input
// queue), runs one round-robin pointer per output and predicts out_val,
// xbar_sel and in_deq_rdy. Directed cases check that a terminal packet is
// held by the bubble rule and released when the bubble appears.
module router_ctrl_tb;
  import net_msg_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  node_id_t             router_id;
  node_id_t [2:0]       dest;
  logic     [2:0]       in_deq_val;
  logic     [2:0]       in_deq_rdy [2];
  logic     [2:0]       free_west, free_east;
  logic     [1:0]       east_cf, west_cf;
  logic     [2:0]       out_val [2];
  logic     [2:0]       out_rdy;
  logic     [2:0][1:0]  xbar_sel [2];

  router_ctrl #(.ADAPTIVE(1'b0)) u_base (
    .clk(clk), .reset(reset), .router_id(router_id), .dest(dest),
    .in_deq_val(in_deq_val), .in_deq_rdy(in_deq_rdy[0]),
    .num_free_west(free_west), .num_free_east(free_east),
    .east_chan_free(east_cf), .west_chan_free(west_cf),
    .out_val(out_val[0]), .out_rdy(out_rdy), .xbar_sel(xbar_sel[0])
  );

  router_ctrl #(.ADAPTIVE(1'b1)) u_alt (
    .clk(clk), .reset(reset), .router_id(router_id), .dest(dest),
    .in_deq_val(in_deq_val), .in_deq_rdy(in_deq_rdy[1]),
    .num_free_west(free_west), .num_free_east(free_east),
    .east_chan_free(east_cf), .west_chan_free(west_cf),
    .out_val(out_val[1]), .out_rdy(out_rdy), .xbar_sel(xbar_sel[1])
  );

  int ptr [2][3];

  function automatic int route_port(int alt, int i, int id, int d);
    int he, hw, ce, cw;
    he = (d - id + 8) % 8;
    hw = (id - d + 8) % 8;
    if (d == id) return 1;
    if (alt == 0) return (he <= hw) ? 2 : 0;
    if (i == 0) return 2;
    if (i == 2) return 0;
    ce = he + (2 - int'(east_cf)) + (4 - int'(free_west));
    cw = hw + (2 - int'(west_cf)) + (4 - int'(free_east));
    return (ce <= cw) ? 2 : 0;
  endfunction

  int n_held = 0;

  task automatic check_cycle();
    int win [2][3];
    #1;
    for (int a = 0; a < 2; a++) begin
      int  want [3];
      bit  req [3][3];
      logic [2:0] exp_rdy;
      for (int i = 0; i < 3; i++) begin
        want[i] = in_deq_val[i] ? route_port(a, i, int'(router_id), int'(dest[i])) : -1;
        for (int j = 0; j < 3; j++) req[i][j] = 0;
      end
      if (want[1] == 2 && !(free_west > 1)) begin want[1] = -1; n_held++; end
      if (want[1] == 0 && !(free_east > 1)) begin want[1] = -1; n_held++; end
      for (int i = 0; i < 3; i++) if (want[i] >= 0) req[i][want[i]] = 1;
      exp_rdy = '0;
      for (int j = 0; j < 3; j++) begin
        win[a][j] = -1;
        for (int k = 0; k < 3; k++) begin
          int i;
          i = (ptr[a][j] + k) % 3;
          if (win[a][j] < 0 && req[i][j]) win[a][j] = i;
        end
        check(out_val[a][j] == (win[a][j] >= 0), $sformatf("ctrl %0d out%0d_val", a, j));
        if (win[a][j] >= 0) begin
          check(int'(xbar_sel[a][j]) == win[a][j],
                $sformatf("ctrl %0d xbar_sel%0d %0d expected %0d", a, j, xbar_sel[a][j], win[a][j]));
          if (out_rdy[j]) exp_rdy[win[a][j]] = 1'b1;
        end
      end
      check(in_deq_rdy[a] == exp_rdy, $sformatf("ctrl %0d in_deq_rdy %b expected %b", a, in_deq_rdy[a], exp_rdy));
    end
    @(posedge clk);
    for (int a = 0; a < 2; a++)
      for (int j = 0; j < 3; j++)
        if (out_rdy[j] && win[a][j] >= 0) ptr[a][j] = (win[a][j] + 1) % 3;
    #1;
  endtask

  initial begin
    for (int a = 0; a < 2; a++) for (int j = 0; j < 3; j++) ptr[a][j] = 0;
    router_id = 3'd2; dest = '0; in_deq_val = '0; free_west = 3'd4; free_east = 3'd4;
    east_cf = 2'd2; west_cf = 2'd2; out_rdy = 3'b111;
    repeat (2) @(posedge clk);
    reset = 1'b0;
    #1;

    // Bubble rule: terminal packet to node 4 (east), west input queue has one free entry
    dest[1] = 3'd4; in_deq_val = 3'b010; free_west = 3'd1;
    #1;
    check(out_val[0] == 3'b000 && in_deq_rdy[0] == 3'b000, "held without a bubble in the west input queue");
    free_west = 3'd2;
    #1;
    check(out_val[0] == 3'b100 && in_deq_rdy[0] == 3'b010, "released once the west input queue has a bubble");
    // Terminal packet to node 0 (west), east input queue has one free entry
    dest[1] = 3'd0; free_east = 3'd1;
    #1;
    check(out_val[0] == 3'b000, "held without a bubble in the east input queue");
    free_east = 3'd3;
    #1;
    check(out_val[0] == 3'b001 && int'(xbar_sel[0][0]) == 1, "released towards the west");
    check_cycle();

    for (int c = 0; c < 5000; c++) begin
      router_id  = 3'($urandom);
      for (int i = 0; i < 3; i++) dest[i] = 3'($urandom);
      in_deq_val = 3'($urandom);
      free_west  = 3'($urandom_range(0, 4));
      free_east  = 3'($urandom_range(0, 4));
      east_cf    = 2'($urandom_range(0, 2));
      west_cf    = 2'($urandom_range(0, 2));
      out_rdy    = 3'($urandom);
      check_cycle();
    end
    check(n_held > 0, "bubble rule exercised in the random phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

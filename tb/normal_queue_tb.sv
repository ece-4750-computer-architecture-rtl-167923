// normal_queue_tb: checks the val/rdy queue against a reference queue.
//
// Two instances are tested, with two entries (a channel) and four entries (a
// router input). Directed steps check the one-cycle enqueue-to-dequeue delay,
// the full condition (enq_rdy low with NUM_MSGS entries, even while
// dequeuing) and num_free_entries. A random phase then drives enq_val and
// deq_rdy at random and compares every dequeued message, deq_val, enq_rdy
// and num_free_entries with a SystemVerilog queue model.
module normal_queue_tb;

  localparam int W = 22;

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

  logic         enq_val [2];
  logic         enq_rdy [2];
  logic [W-1:0] enq_msg [2];
  logic         deq_val [2];
  logic         deq_rdy [2];
  logic [W-1:0] deq_msg [2];
  logic [1:0]   free2;
  logic [2:0]   free4;

  normal_queue #(.MSG_NBITS(W), .NUM_MSGS(2)) u_q2 (
    .clk(clk), .reset(reset),
    .enq_val(enq_val[0]), .enq_rdy(enq_rdy[0]), .enq_msg(enq_msg[0]),
    .deq_val(deq_val[0]), .deq_rdy(deq_rdy[0]), .deq_msg(deq_msg[0]),
    .num_free_entries(free2)
  );

  normal_queue #(.MSG_NBITS(W), .NUM_MSGS(4)) u_q4 (
    .clk(clk), .reset(reset),
    .enq_val(enq_val[1]), .enq_rdy(enq_rdy[1]), .enq_msg(enq_msg[1]),
    .deq_val(deq_val[1]), .deq_rdy(deq_rdy[1]), .deq_msg(deq_msg[1]),
    .num_free_entries(free4)
  );

  logic [W-1:0] model [2][$];
  int           cap [2] = '{2, 4};

  function automatic int free_of(int q);
    return (q == 0) ? int'(free2) : int'(free4);
  endfunction

  // Compare outputs with the model just before each edge, then update it
  task automatic step();
    #4;
    for (int q = 0; q < 2; q++) begin
      check(deq_val[q] == (model[q].size() > 0), $sformatf("q%0d deq_val", q));
      check(enq_rdy[q] == (model[q].size() < cap[q]), $sformatf("q%0d enq_rdy", q));
      check(free_of(q) == cap[q] - model[q].size(), $sformatf("q%0d num_free_entries %0d", q, free_of(q)));
      if (deq_val[q] && model[q].size() > 0)
        check(deq_msg[q] == model[q][0], $sformatf("q%0d deq_msg %h expected %h", q, deq_msg[q], model[q][0]));
    end
    @(posedge clk);
    for (int q = 0; q < 2; q++) begin
      bit e, d;
      e = enq_val[q] && (model[q].size() < cap[q]);
      d = deq_rdy[q] && (model[q].size() > 0);
      if (d) void'(model[q].pop_front());
      if (e) model[q].push_back(enq_msg[q]);
    end
    #1;
  endtask

  initial begin
    for (int q = 0; q < 2; q++) begin
      enq_val[q] = 0; deq_rdy[q] = 0; enq_msg[q] = '0;
    end
    repeat (2) @(posedge clk);
    reset = 1'b0;
    #1;

    // Fill both queues without dequeuing, then try to enqueue while full and dequeuing
    for (int i = 0; i < 5; i++) begin
      for (int q = 0; q < 2; q++) begin
        enq_val[q] = 1; enq_msg[q] = W'(100 * q + i);
      end
      step();
    end
    check(enq_rdy[0] == 0 && enq_rdy[1] == 0, "both queues full");
    for (int q = 0; q < 2; q++) deq_rdy[q] = 1;
    #0;
    check(enq_rdy[0] == 0 && enq_rdy[1] == 0, "a full normal queue does not accept while dequeuing");
    step();
    for (int q = 0; q < 2; q++) begin enq_val[q] = 0; end
    for (int i = 0; i < 5; i++) step();
    for (int q = 0; q < 2; q++) check(model[q].size() == 0, "drained");

    // One-cycle latency: enqueue at one edge, valid right after it
    enq_val[0] = 1; enq_msg[0] = 22'h2abcd; deq_rdy[0] = 0;
    check(deq_val[0] == 0, "empty before enqueue");
    step();
    enq_val[0] = 0;
    check(deq_val[0] == 1 && deq_msg[0] == 22'h2abcd, "valid one cycle after enqueue");
    deq_rdy[0] = 1;
    step();

    // Random traffic
    for (int i = 0; i < 3000; i++) begin
      for (int q = 0; q < 2; q++) begin
        enq_val[q] = ($urandom_range(0, 2) != 0);
        enq_msg[q] = W'($urandom);
        deq_rdy[q] = ($urandom_range(0, 2) != 0);
      end
      step();
    end

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

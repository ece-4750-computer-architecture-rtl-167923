// rr_arbiter_tb: checks the round-robin arbiter against a reference model.
//
// A three-input arbiter is driven with random requests and a random enable.
// The model keeps the index of the highest-priority requester, starting at 0
// after reset; the grant must be the first requester at or after it (one-hot,
// none without requests), and the pointer moves past the winner only when
// enable is high. A directed part checks fairness: with all three requesting
// and enable high, grants rotate 0, 1, 2, 0, ...
module rr_arbiter_tb;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       en;
  logic [2:0] reqs;
  logic [2:0] grants;

  rr_arbiter #(.NUM_REQS(3)) dut (.clk(clk), .reset(reset), .en(en), .reqs(reqs), .grants(grants));

  int ptr = 0;

  task automatic check_cycle();
    logic [2:0] exp;
    int w;
    exp = '0;
    w = -1;
    for (int k = 0; k < 3; k++)
      if (w < 0 && reqs[(ptr + k) % 3]) w = (ptr + k) % 3;
    if (w >= 0) exp[w] = 1'b1;
    #1;
    checks++;
    if (grants !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: reqs %b ptr %0d grants %b expected %b", $time, reqs, ptr, grants, exp);
    end
    @(posedge clk);
    if (en && w >= 0) ptr = (w + 1) % 3;
    #1;
  endtask

  initial begin
    en = 0; reqs = 0;
    repeat (2) @(posedge clk);
    reset = 0;
    #1;
    // Fairness under full load
    en = 1; reqs = 3'b111;
    #1;
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (grants !== 3'(1 << (i % 3))) begin
        failures++;
        $display("FAIL: rotation step %0d grants %b", i, grants);
      end
      check_cycle();
    end
    // Random
    for (int i = 0; i < 3000; i++) begin
      reqs = 3'($urandom);
      en = ($urandom_range(0, 3) != 0);
      check_cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

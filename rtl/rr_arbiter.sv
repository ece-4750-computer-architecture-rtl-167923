// rr_arbiter: round-robin arbiter.
//
// Grants at most one of NUM_REQS requests, one-hot, combinationally. The
// search starts at the requester after the one last granted, so every
// requester that keeps asking is served within NUM_REQS grants. The priority
// pointer moves only on a clock edge where en is high and some request is
// granted; the router drives en with the output port's rdy, so a grant that
// does not turn into a transfer keeps its priority. After reset requester 0
// has the highest priority. Round-robin arbitration follows the design; the
// enable and reset priority are this implementation's choices.
module rr_arbiter #(
  parameter int unsigned NUM_REQS = 3
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 en,
  input  logic [NUM_REQS-1:0]  reqs,
  output logic [NUM_REQS-1:0]  grants
);

  localparam int unsigned IDX_NBITS = (NUM_REQS > 1) ? $clog2(NUM_REQS) : 1;

  // Index of the highest-priority requester this cycle
  logic [IDX_NBITS-1:0] first;
  logic [IDX_NBITS-1:0] winner;
  logic                 found;

  always_comb begin
    grants = '0;
    winner = first;
    found  = 1'b0;
    for (int k = 0; k < NUM_REQS; k++) begin
      int unsigned idx;
      idx = (int'(first) + k) % NUM_REQS;
      if (!found && reqs[idx]) begin
        found       = 1'b1;
        winner      = IDX_NBITS'(idx);
        grants[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      first <= '0;
    end else if (en && found) begin
      first <= (winner == IDX_NBITS'(NUM_REQS - 1)) ? '0 : winner + IDX_NBITS'(1);
    end
  end

  // At most one grant per cycle
  always_ff @(posedge clk) begin
    if (!reset) assert ($onehot0(grants)) else $error("rr_arbiter: more than one grant");
  end

endmodule

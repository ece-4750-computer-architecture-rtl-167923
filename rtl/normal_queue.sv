// normal_queue: val/rdy first-in first-out queue with a free-entry count.
//
// Messages are enqueued and dequeued through two val/rdy handshakes; a
// transfer happens on a rising clock edge where val and rdy are both high.
// The storage is an array tracked by head and tail pointers plus an entry
// count. This is a "normal" queue: enq_rdy depends only on the registered
// count (no bypass from enq to deq and no pipelining of a full queue), so a
// message enqueued in cycle t can be dequeued at the earliest in cycle t+1 and
// a full queue accepts nothing in the cycle it is dequeued. num_free_entries
// is the number of empty slots, from a register, $clog2(NUM_MSGS)+1 bits wide.
//
// The interface (enq/deq val-rdy, num_free_entries) and the two-entry default
// follow the queue the design uses for its channels and router inputs; the
// head/tail/count organisation is this implementation's choice. Reset empties
// the queue; the stored messages themselves are not reset.
module normal_queue #(
  parameter int unsigned MSG_NBITS = net_msg_pkg::MSG_NBITS,
  parameter int unsigned NUM_MSGS  = 2
) (
  input  logic                        clk,
  input  logic                        reset,

  input  logic                        enq_val,
  output logic                        enq_rdy,
  input  logic [MSG_NBITS-1:0]        enq_msg,

  output logic                        deq_val,
  input  logic                        deq_rdy,
  output logic [MSG_NBITS-1:0]        deq_msg,

  output logic [$clog2(NUM_MSGS):0]   num_free_entries
);

  localparam int unsigned PTR_NBITS = (NUM_MSGS > 1) ? $clog2(NUM_MSGS) : 1;
  localparam int unsigned CNT_NBITS = $clog2(NUM_MSGS) + 1;

  typedef logic [PTR_NBITS-1:0] ptr_t;
  typedef logic [CNT_NBITS-1:0] cnt_t;

  logic [MSG_NBITS-1:0] entries [NUM_MSGS];
  ptr_t head, tail;
  cnt_t count;

  logic do_enq, do_deq;

  assign enq_rdy = (count != cnt_t'(NUM_MSGS));
  assign deq_val = (count != '0);
  assign deq_msg = entries[head];
  assign num_free_entries = cnt_t'(NUM_MSGS) - count;

  assign do_enq = enq_val && enq_rdy;
  assign do_deq = deq_val && deq_rdy;

  function automatic ptr_t incr(ptr_t p);
    return (p == ptr_t'(NUM_MSGS - 1)) ? '0 : p + ptr_t'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_enq) tail <= incr(tail);
      if (do_deq) head <= incr(head);
      if (do_enq && !do_deq)      count <= count + cnt_t'(1);
      else if (!do_enq && do_deq) count <= count - cnt_t'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (do_enq) entries[tail] <= enq_msg;
  end

  // Handshake rules: the queue never overflows or underflows
  always_ff @(posedge clk) begin
    if (!reset) begin
      assert (count <= cnt_t'(NUM_MSGS))
        else $error("normal_queue: count %0d exceeds %0d entries", count, NUM_MSGS);
    end
  end

endmodule

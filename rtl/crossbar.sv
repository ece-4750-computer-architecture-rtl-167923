// crossbar: NUM_PORTS x NUM_PORTS message crossbar.
//
// Output j carries the input named by sel[j]; a select that names no input
// gives an all-zero message. It is purely combinational and as wide as a
// network message. The router uses a 3x3 instance whose selects come from the
// output arbiters of the control unit. The crossbar as a select-driven
// multiplexer per output follows the design; the zero output for an
// out-of-range select is this implementation's choice.
module crossbar #(
  parameter int unsigned MSG_NBITS = net_msg_pkg::MSG_NBITS,
  parameter int unsigned NUM_PORTS = 3
) (
  input  logic [NUM_PORTS-1:0][MSG_NBITS-1:0]             in_msg,
  input  logic [NUM_PORTS-1:0][$clog2(NUM_PORTS)-1:0]     sel,
  output logic [NUM_PORTS-1:0][MSG_NBITS-1:0]             out_msg
);

  always_comb begin
    for (int j = 0; j < NUM_PORTS; j++) begin
      out_msg[j] = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (sel[j] == ($clog2(NUM_PORTS))'(i)) out_msg[j] = in_msg[i];
      end
    end
  end

endmodule

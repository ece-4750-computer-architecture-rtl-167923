// crossbar_tb: checks the 3x3 message crossbar.
//
// For every combination of the three selects (0..3) and random input
// messages, each output must equal the input its select names, and zero for
// select 3, which names no input.
module crossbar_tb;
  import net_msg_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [2:0][21:0] in_msg;
  logic [2:0][1:0]  sel;
  logic [2:0][21:0] out_msg;

  crossbar #(.MSG_NBITS(22), .NUM_PORTS(3)) dut (.in_msg(in_msg), .sel(sel), .out_msg(out_msg));

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int c = 0; c < 64; c++) begin
        for (int i = 0; i < 3; i++) in_msg[i] = 22'($urandom);
        sel = 6'(c);
        #1;
        for (int j = 0; j < 3; j++) begin
          logic [21:0] exp;
          exp = (sel[j] == 2'd3) ? '0 : in_msg[sel[j]];
          checks++;
          if (out_msg[j] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL: out%0d sel %0d got %h expected %h", j, sel[j], out_msg[j], exp);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

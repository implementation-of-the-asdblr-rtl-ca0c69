// tb_ternary_receiver: sweeps the input current over its whole range and
// checks the Track and TR outputs against the 100 uA and 300 uA decision
// levels, including the three nominal levels 0, 200 and 400 uA.
`timescale 1ps/1ps
module tb_ternary_receiver;
  import dtmroc_pkg::*;
  logic [CUR_BITS-1:0] i_ua;
  logic track, tr;
  int checks = 0, failures = 0;

  ternary_receiver dut (.*);

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << CUR_BITS); i++) begin
      i_ua = CUR_BITS'(i);
      #10;
      checks++;
      if (track != (i > 100) || tr != (i > 300)) begin
        failures++; $display("FAIL %0d uA: track %b tr %b", i, track, tr);
      end
    end
    i_ua = 0;   #10; checks++; if ({track, tr} != 2'b00) failures++;
    i_ua = 200; #10; checks++; if ({track, tr} != 2'b10) failures++;
    i_ua = 400; #10; checks++; if ({track, tr} != 2'b11) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

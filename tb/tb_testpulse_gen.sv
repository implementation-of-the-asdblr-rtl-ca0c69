// tb_testpulse_gen: fires the test pulse with random delays and measures
// the number of clock cycles from the fire cycle to the pulse (expected
// delay + 1), its one-cycle width and that both outputs pulse together.
`timescale 1ps/1ps
module tb_testpulse_gen;
  logic clk = 0, rst_n = 0, fire = 0;
  logic [7:0] delay = 0;
  logic [1:0] tp_pulse;
  int checks = 0, failures = 0;

  testpulse_gen dut (.*);
  always #12500 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic int d = (n < 3) ? n : int'($urandom % 256);
      automatic int waited = 0;
      delay = 8'(d);
      @(negedge clk) fire = 1;
      @(negedge clk) fire = 0;
      waited = 1;
      while (tp_pulse == 2'b00 && waited < 300) begin
        @(negedge clk); waited++;
      end
      checks++;
      if (tp_pulse != 2'b11 || waited != d + 1) begin
        failures++; $display("FAIL delay %0d: pulse %b after %0d cycles", d, tp_pulse, waited);
      end
      @(negedge clk);
      checks++;
      if (tp_pulse != 2'b00) begin failures++; $display("FAIL pulse wider than one cycle"); end
      repeat ($urandom % 4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

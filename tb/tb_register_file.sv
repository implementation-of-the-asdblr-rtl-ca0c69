// tb_register_file: writes random values to every register address and
// checks each output against a model; unused addresses must change nothing.
`timescale 1ps/1ps
module tb_register_file;
  import dtmroc_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0;
  logic [DAC_BITS-1:0] dac_code [NDAC];
  logic [7:0] tp_amp, tp_delay;
  logic [7:0] model [6];
  int checks = 0, failures = 0;

  register_file dut (.*);
  always #12500 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (dac_code[i] != model[i]) begin failures++; $display("FAIL %s dac%0d", what, i); end
    end
    checks += 2;
    if (tp_amp   != model[4]) begin failures++; $display("FAIL %s tp_amp", what); end
    if (tp_delay != model[5]) begin failures++; $display("FAIL %s tp_delay", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    check_all("reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      addr  = 4'($urandom);
      wdata = 8'($urandom);
      we    = ($urandom % 4) != 0;
      @(negedge clk);
      if (we && addr < 6) model[addr] = wdata;
      we = 0;
      check_all("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

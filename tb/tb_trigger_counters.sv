// tb_trigger_counters: checks the bunch counter (one count per clock,
// cleared by bc_rst, 8-bit wrap) and the event counter (one count per l1a,
// cleared by ev_rst) against counts kept by the testbench.
`timescale 1ps/1ps
module tb_trigger_counters;
  import dtmroc_pkg::*;

  logic clk = 0, rst_n = 0, bc_rst = 0, ev_rst = 0, l1a = 0;
  evhdr_t hdr;
  int checks = 0, failures = 0;
  int cyc_since_bcr, n_l1a;

  trigger_counters dut (.*);
  always #12500 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    cyc_since_bcr = 0; n_l1a = 0;
    for (int n = 0; n < 1500; n++) begin
      checks++;
      if (hdr.bcid != 8'(cyc_since_bcr) || hdr.l1id != 8'(n_l1a)) begin
        failures++;
        $display("FAIL cycle %0d bcid %0d exp %0d l1id %0d exp %0d", n, hdr.bcid, 8'(cyc_since_bcr), hdr.l1id, 8'(n_l1a));
      end
      bc_rst = ($urandom % 400) == 0;
      ev_rst = ($urandom % 300) == 0;
      l1a    = ($urandom % 5) == 0;
      @(negedge clk);
      cyc_since_bcr = bc_rst ? 0 : cyc_since_bcr + 1;
      n_l1a = ev_rst ? 0 : n_l1a + int'(l1a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

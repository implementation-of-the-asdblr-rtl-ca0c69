// tb_dll: measures the rising edge of each DLL output relative to the bunch
// crossing clock edge. Expected: eight phases (2k+1)*25 ns/16 after the
// edge, spaced 3.125 ns apart, all at 40 MHz, every cycle.
`timescale 1ps/1ps
module tb_dll;
  logic bx_clk = 0;
  logic [7:0] bc;
  int checks = 0, failures = 0;
  time t_bx;
  time t_last [8];

  dll dut (.bx_clk(bx_clk), .bc(bc));

  always #12500 bx_clk = ~bx_clk;
  always @(posedge bx_clk) t_bx = $time;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < 8; k++) begin : g_mon
    initial t_last[k] = 0;
    always @(posedge bc[k]) begin
      if ($time > 100000) begin
        checks++;
        if ($time - t_bx != (2 * k + 1) * 25000 / 16) begin
          failures++; $display("FAIL BC%0d edge %0t after bx", k + 1, $time - t_bx);
        end
        if (t_last[k] != 0) begin
          checks++;
          if ($time - t_last[k] != 25000) begin failures++; $display("FAIL BC%0d period", k + 1); end
        end
      end
      t_last[k] = $time;
    end
  end

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

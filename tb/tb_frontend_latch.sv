// tb_frontend_latch: drives a random Track/TR level per channel and per
// 3.125 ns bin, changing only at bin boundaries, and generates the eight
// phase clocks mid-bin. After each crossing the latched 144-bit slice must
// hold the Track level of every bin and the OR of the TR levels.
`timescale 1ps/1ps
module tb_frontend_latch;
  import dtmroc_pkg::*;

  logic bx_clk = 0, rst_n = 0;
  logic [7:0]  bc = '0;
  logic [15:0] track = '0, tr = '0;
  slice_t slice_out;
  slice_t exp_q [$];
  int checks = 0, failures = 0, n_tr = 0, n_trk = 0;

  frontend_latch dut (.*);

  always #12500 bx_clk = ~bx_clk;
  // Phase clocks mid-bin: BC(k+1) rises (2k+1) x 1.5625 ns after bx_clk.
  always @(bx_clk) bc[0] <= #1562 bx_clk;
  for (genvar k = 1; k < 8; k++) begin : g_ph
    always @(bc[k-1]) bc[k] <= #3125 bc[k-1];
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: one crossing per bx_clk rising edge, bins set at boundaries.
  initial begin
    #30000 rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      automatic slice_t e = '0;
      @(posedge bx_clk);
      for (int k = 0; k < 8; k++) begin
        automatic logic [15:0] t = 16'($urandom), r = 16'($urandom) & 16'($urandom) & 16'($urandom);
        if (k > 0) #3125;
        track = t | r;     // a TR hit always comes with a Track hit
        tr    = r;
        for (int ch = 0; ch < 16; ch++) begin
          e[ch*9 + k] = track[ch];
          e[ch*9 + 8] |= tr[ch];
        end
      end
      exp_q.push_back(e);
    end
  end

  // Check: the slice latched at the edge after each crossing.
  initial begin
    @(posedge rst_n);
    @(posedge bx_clk);
    for (int c = 0; c < 399; c++) begin
      @(posedge bx_clk); #1000;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL no expected slice"); end
      else begin
        automatic slice_t e = exp_q.pop_front();
        if (slice_out != e) begin failures++; $display("FAIL crossing %0d: %h exp %h", c, slice_out, e); end
        for (int ch = 0; ch < 16; ch++) begin n_tr += int'(e[ch*9+8]); n_trk += int'(|e[ch*9 +: 8]); end
      end
    end
    checks++;
    if (n_tr == 0 || n_trk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

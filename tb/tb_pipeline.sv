// tb_pipeline: pushes a random 144-bit slice every cycle into the full-size
// 132-deep pipeline and checks that each leaves exactly 132 cycles later
// (3.3 us at 25 ns), over several laps of the circular buffer.
`timescale 1ps/1ps
module tb_pipeline;
  import dtmroc_pkg::*;

  logic clk = 0, rst_n = 0;
  slice_t slice_in = '0, slice_out;
  slice_t hist [int];
  int checks = 0, failures = 0;

  pipeline #(.WIDTH(SLICE_BITS), .DEPTH(PIPE_DEPTH)) dut (.*);
  always #12500 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic slice_t rnd();
    slice_t s;
    for (int i = 0; i < SLICE_BITS; i += 32) s[i +: 16] = 16'($urandom);
    for (int i = 16; i < SLICE_BITS; i += 32) s[i +: 16] = 16'($urandom);
    return s;
  endfunction

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    // edge t samples hist[t]; after edge t+DEPTH the output must equal it
    for (int t = 0; t < 5 * PIPE_DEPTH + 7; t++) begin
      hist[t] = rnd();
      slice_in = hist[t];
      @(negedge clk);
      if (t >= int'(PIPE_DEPTH)) begin
        checks++;
        if (slice_out != hist[t - int'(PIPE_DEPTH)]) begin
          failures++; $display("FAIL at slice %0d", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

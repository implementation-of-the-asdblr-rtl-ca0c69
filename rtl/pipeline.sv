// pipeline: Level 1 latency buffer for the 144-bit timeslices.
//
// A circular buffer of DEPTH locations clocked by the bunch crossing clock.
// Each cycle the location under the write pointer is read out and then
// overwritten with the new timeslice, so every slice leaves the pipeline
// exactly DEPTH cycles after it entered. With the chip's 132 locations at
// 25 ns this is the 3.3 us Level 1 trigger latency. The buffer is a plain
// memory without reset; its output is undefined for the first DEPTH cycles.
//
// Interface: slice_in written each cycle; slice_out registered.
// Timing: slice_out after edge t+DEPTH equals slice_in sampled at edge t.
`timescale 1ps/1ps
module pipeline #(
  parameter int unsigned WIDTH = 144,
  parameter int unsigned DEPTH = 132
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] slice_in,
  output logic [WIDTH-1:0] slice_out
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         wp <= '0;
    else if (wp == AW'(DEPTH - 1))      wp <= '0;
    else                                wp <= wp + 1'b1;
  end

  always_ff @(posedge clk) begin
    slice_out <= mem[wp];
    mem[wp]   <= slice_in;
  end

endmodule

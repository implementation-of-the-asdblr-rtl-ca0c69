// frontend_latch: time digitizer and timeslice latch for 16 channels.
//
// The Track level of every channel is sampled on the rising edge of each of
// the eight DLL phase clocks BC1..BC8, giving eight 3.125 ns time bins per
// 25 ns bunch crossing. The TR level is sampled on the same edges and reduced
// to one bit that is set if TR was seen in any bin of the crossing. At the
// next bx_clk rising edge the 8 + 1 bits of all 16 channels are latched as
// one 144-bit timeslice. Sampling eight phases of one clock, 9 bits per
// channel and the 144-bit width follow the chip; the OR of the TR samples
// and the bit layout are choices of this design.
//
// Slice layout: bits [9*ch +: 9] belong to channel ch; bit 9*ch+k (k=0..7)
// is the Track sample taken at BC(k+1); bit 9*ch+8 is the TR bit.
//
// Timing: slice_out changes on bx_clk rising edges and holds the crossing
// that ended at that edge. The phase edges must all fall inside the crossing
// (the dll model places them mid-bin).
`timescale 1ps/1ps
module frontend_latch
  import dtmroc_pkg::*;
#(
  parameter int unsigned N_CH  = NCH,
  parameter int unsigned N_BIN = NBINS
) (
  input  logic                           bx_clk,
  input  logic                           rst_n,
  input  logic [N_BIN-1:0]               bc,        // DLL phases BC1..BC8
  input  logic [N_CH-1:0]                track,
  input  logic [N_CH-1:0]                tr,
  output logic [N_CH*(N_BIN+1)-1:0]      slice_out
);

  logic [N_CH-1:0] trk_s [N_BIN];
  logic [N_CH-1:0] tr_s  [N_BIN];

  for (genvar k = 0; k < N_BIN; k++) begin : g_phase
    logic [N_CH-1:0] trk_q, tr_q;
    always_ff @(posedge bc[k] or negedge rst_n) begin
      if (!rst_n) begin
        trk_q <= '0;
        tr_q  <= '0;
      end else begin
        trk_q <= track;
        tr_q  <= tr;
      end
    end
    assign trk_s[k] = trk_q;
    assign tr_s[k]  = tr_q;
  end

  logic [N_CH*(N_BIN+1)-1:0] slice_d;

  always_comb begin
    slice_d = '0;
    for (int ch = 0; ch < N_CH; ch++) begin
      for (int k = 0; k < N_BIN; k++) begin
        slice_d[ch*(N_BIN+1) + k] = trk_s[k][ch];
        slice_d[ch*(N_BIN+1) + N_BIN] = slice_d[ch*(N_BIN+1) + N_BIN] | tr_s[k][ch];
      end
    end
  end

  always_ff @(posedge bx_clk or negedge rst_n) begin
    if (!rst_n) slice_out <= '0;
    else        slice_out <= slice_d;
  end

endmodule

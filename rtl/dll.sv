// dll: behavioural model of the delay locked loop (not synthesizable).
//
// From the 40 MHz bunch crossing clock the DLL makes eight clocks of the
// same frequency, BC1..BC8, with equally spaced phase delays, so that their
// rising edges cut each 25 ns crossing into eight 3.125 ns time bins. This
// model replaces the analog delay line and its lock loop by fixed transport
// delays: a line of eight delay elements, the first half a bin long and the
// others one bin (3.125 ns) long, so bc[k] (BC(k+1)) follows bx_clk delayed
// by (2k+1)/16 of the clock period. This puts each sampling edge in the
// middle of its bin and keeps BC8 clear of the next crossing's edge. The half-bin offset and the
// always-locked behaviour are choices of this model.
//
// Interface: bx_clk in, bc[7:0] out. Time unit 1 ps.
`timescale 1ps/1ps
module dll #(
  parameter int unsigned BX_PERIOD_PS = 25000,
  parameter int unsigned NPHASE       = 8
) (
  input  logic              bx_clk,
  output logic [NPHASE-1:0] bc
);

  localparam int unsigned STEP_PS  = BX_PERIOD_PS / NPHASE;        // one time bin
  localparam int unsigned FIRST_PS = BX_PERIOD_PS / (2 * NPHASE);  // half a bin

  initial bc = '0;

  // A line of equal delay elements; each element's delay is shorter than
  // half the clock period, so every edge of the clock travels down the line.
  always @(bx_clk) bc[0] <= #(FIRST_PS) bx_clk;

  for (genvar k = 1; k < NPHASE; k++) begin : g_tap
    always @(bc[k-1]) bc[k] <= #(STEP_PS) bc[k-1];
  end

endmodule

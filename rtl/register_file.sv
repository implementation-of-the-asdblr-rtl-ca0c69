// register_file: the DTMROC's programmable settings.
//
// Holds the four 8-bit threshold DAC codes (Track and TR thresholds of the
// two ASDBLRs), the test pulse amplitude code and the test pulse delay. The
// chip loads its registers through the command line and has four 8-bit
// DACs and a test pulse of programmable amplitude and delay; the address
// map (see dtmroc_pkg) and the all-zero reset values are this design's
// choice. Writes to unused addresses are ignored. The codes drive the
// analog DACs directly.
//
// Interface: we/addr/wdata from the command decoder; write takes effect at
// the clock edge where we is high.
`timescale 1ps/1ps
module register_file
  import dtmroc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [3:0]          addr,
  input  logic [7:0]          wdata,
  output logic [DAC_BITS-1:0] dac_code [NDAC],
  output logic [7:0]          tp_amp,
  output logic [7:0]          tp_delay
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NDAC); i++) dac_code[i] <= '0;
      tp_amp   <= '0;
      tp_delay <= '0;
    end else if (we) begin
      unique case (addr)
        REG_DAC0:     dac_code[0] <= wdata;
        REG_DAC1:     dac_code[1] <= wdata;
        REG_DAC2:     dac_code[2] <= wdata;
        REG_DAC3:     dac_code[3] <= wdata;
        REG_TP_AMP:   tp_amp      <= wdata;
        REG_TP_DELAY: tp_delay    <= wdata;
        default: ;
      endcase
    end
  end

endmodule

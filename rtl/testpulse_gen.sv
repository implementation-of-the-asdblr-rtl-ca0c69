// testpulse_gen: timing of the two test pulse outputs.
//
// A test pulse command (fire) starts a countdown of `delay` bunch crossings;
// when it ends, both test pulse outputs are asserted together for one
// crossing. The analog part of the chip shapes these pulses and sets their
// amplitude from the amplitude register. Two outputs and a programmable
// delay follow the chip; the delay unit (whole crossings) and firing both
// outputs together are this design's choice. A new fire while a pulse is
// pending restarts the countdown.
//
// Timing: with delay = d, tp_pulse is high in the cycle d+1 cycles after the
// one in which fire was high (d = 0: the next cycle).
`timescale 1ps/1ps
module testpulse_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fire,
  input  logic [7:0] delay,
  output logic [1:0] tp_pulse
);

  logic       pending;
  logic [7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      cnt      <= '0;
      tp_pulse <= '0;
    end else begin
      tp_pulse <= '0;
      if (fire) begin
        if (delay == '0) tp_pulse <= 2'b11;
        else begin
          pending <= 1'b1;
          cnt     <= delay - 1'b1;
        end
      end else if (pending) begin
        if (cnt == '0) begin
          pending  <= 1'b0;
          tp_pulse <= 2'b11;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

endmodule

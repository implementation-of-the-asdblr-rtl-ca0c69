// trigger_counters: bunch crossing and Level 1 event counters.
//
// bcid counts bunch crossing clocks and is cleared by the bunch counter
// reset command; l1id counts accepted Level 1 triggers and is cleared by the
// event counter reset command. hdr presents the pair as the header of the
// event being triggered: it is valid in the cycle l1a is high, and l1id
// advances after it. Both counters wrap at 8 bits. The chip's command set
// includes resets; what they clear and the counter widths are choices of
// this design.
`timescale 1ps/1ps
module trigger_counters
  import dtmroc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   bc_rst,
  input  logic   ev_rst,
  input  logic   l1a,
  output evhdr_t hdr
);

  logic [ID_BITS-1:0] bcid, l1id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid <= '0;
      l1id <= '0;
    end else begin
      bcid <= bc_rst ? '0 : bcid + 1'b1;
      if (ev_rst)   l1id <= '0;
      else if (l1a) l1id <= l1id + 1'b1;
    end
  end

  assign hdr = '{l1id: l1id, bcid: bcid};

endmodule

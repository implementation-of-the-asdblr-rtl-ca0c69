// ternary_receiver: behavioural model of the DTMROC ternary input receiver.
//
// Each ASDBLR channel reports its two discriminators as one current: the
// Track and TR discriminators each switch a 200 uA source onto a shared
// output, so the line carries 0, 200 or 400 uA. The real receiver is a
// low-impedance current-mode circuit; this model takes the input current as
// an unsigned code in uA and compares it with two thresholds placed midway
// between the levels (100 and 300 uA, a choice of this model). Because the
// Track threshold is always below the TR threshold, a TR hit implies a
// Track hit, which is what the ternary code assumes.
//
// Interface: i_ua (current in uA) in; track, tr out. Purely combinational.
`timescale 1ps/1ps
module ternary_receiver
  import dtmroc_pkg::*;
#(
  parameter int unsigned TRACK_TH_UA = 100,
  parameter int unsigned TR_TH_UA    = 300
) (
  input  logic [CUR_BITS-1:0] i_ua,
  output logic                track,
  output logic                tr
);

  always_comb begin
    track = (32'(i_ua) > TRACK_TH_UA);
    tr    = (32'(i_ua) > TR_TH_UA);
  end

endmodule

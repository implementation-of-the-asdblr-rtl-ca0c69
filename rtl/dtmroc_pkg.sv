// dtmroc_pkg: sizes, types and command codes shared by the DTMROC blocks.
//
// The channel count (16), the 8 time bins plus one TR bit per channel, the
// 144-bit timeslice, the 132-deep pipeline, the 13-event derandomizer with
// three timeslices per event and the four 8-bit DACs are the chip's own
// numbers. The serial command codes, the event header (8-bit event and
// bunch counters) and the register map are choices of this design.
`timescale 1ps/1ps
package dtmroc_pkg;

  localparam int unsigned NCH            = 16;   // two 8-channel ASDBLRs
  localparam int unsigned NBINS          = 8;    // 3.125 ns bins per 25 ns crossing
  localparam int unsigned CH_BITS        = NBINS + 1;        // 8 track bits + TR bit
  localparam int unsigned SLICE_BITS     = NCH * CH_BITS;    // 144
  localparam int unsigned PIPE_DEPTH     = 132;  // 3.3 us at 25 ns
  localparam int unsigned DERAND_EVENTS  = 13;
  localparam int unsigned SLICES_PER_EV  = 3;
  localparam int unsigned DAC_BITS       = 8;
  localparam int unsigned NDAC           = 4;
  localparam int unsigned ID_BITS        = 8;    // event and bunch counter widths
  localparam int unsigned CUR_BITS       = 10;   // ternary input current code, uA

  typedef logic [SLICE_BITS-1:0] slice_t;

  // Header sent ahead of every event on the readout line.
  typedef struct packed {
    logic [ID_BITS-1:0] l1id;   // Level 1 event number since the last event counter reset
    logic [ID_BITS-1:0] bcid;   // bunch counter value when the trigger was decoded
  } evhdr_t;

  localparam int unsigned HDR_BITS    = 1 + $bits(evhdr_t);                 // start bit + header
  localparam int unsigned PACKET_BITS = HDR_BITS + SLICES_PER_EV * SLICE_BITS;

  // Serial commands. Every command starts with a 1 bit; the line idles at 0.
  //   1 1 0                         Level 1 trigger (3 bits)
  //   1 0 1 op[3:0]                 control command (7 bits)
  //   1 0 1 1000 addr[3:0] data[7:0] register write (19 bits)
  //   1 0 0 / 1 1 1                 reserved, ignored (3 bits)
  // Fields are sent most significant bit first.
  localparam logic [1:0] PFX_L1A = 2'b10;
  localparam logic [1:0] PFX_CTL = 2'b01;

  typedef enum logic [3:0] {
    OP_SOFT_RESET = 4'b0001,   // empties derandomizer and readout
    OP_BC_RESET   = 4'b0010,   // clears the bunch counter
    OP_EV_RESET   = 4'b0011,   // clears the event counter
    OP_TEST_PULSE = 4'b0100,   // fires the test pulse outputs
    OP_WRITE_REG  = 4'b1000    // followed by addr[3:0] data[7:0]
  } opcode_e;

  // Register map.
  localparam logic [3:0] REG_DAC0     = 4'd0;  // ASDBLR A track threshold
  localparam logic [3:0] REG_DAC1     = 4'd1;  // ASDBLR A TR threshold
  localparam logic [3:0] REG_DAC2     = 4'd2;  // ASDBLR B track threshold
  localparam logic [3:0] REG_DAC3     = 4'd3;  // ASDBLR B TR threshold
  localparam logic [3:0] REG_TP_AMP   = 4'd4;  // test pulse amplitude code
  localparam logic [3:0] REG_TP_DELAY = 4'd5;  // test pulse delay, crossings

endpackage

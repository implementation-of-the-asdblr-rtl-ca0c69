// readout_controller: serialises derandomizer events onto the readout line.
//
// Whenever the derandomizer holds a complete event, the controller sends it
// one bit per bunch crossing clock (40 Mbit/s) on data_out, which feeds the
// off-chip low level driver. The packet format is this design's choice:
//
//   start bit '1', l1id[7:0], bcid[7:0]   (header, MSB first)
//   slice 0, slice 1, slice 2              (144 bits each, bit 0 first:
//                                           channel 0 bins BC1..BC8, TR,
//                                           then channel 1, ...)
//
// 17 + 432 = 449 bits, followed by at least one idle '0' before the next
// start bit. The event is released (ev_pop) in the cycle its last bit is
// loaded. While a slice is being shifted out the next one is already
// requested through rd_idx, which covers the derandomizer's read latency.
// clr (soft reset) aborts a packet in progress and returns the line to idle.
//
// Timing: data_out is registered; the start bit appears one cycle after
// ev_avail is seen in IDLE.
`timescale 1ps/1ps
module readout_controller
  import dtmroc_pkg::*;
#(
  parameter int unsigned WIDTH  = SLICE_BITS,
  parameter int unsigned NSLICE = SLICES_PER_EV
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             ev_avail,
  input  evhdr_t           ev_hdr,
  output logic [1:0]       rd_idx,
  input  logic [WIDTH-1:0] rd_slice,
  output logic             ev_pop,
  output logic             data_out,
  output logic             busy
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_e;

  localparam int unsigned HW = $bits(evhdr_t);
  localparam int unsigned BW = $clog2(WIDTH + 1);

  state_e           state;
  logic [HW-1:0]    hdr_sr;
  logic [WIDTH-1:0] dat_sr;
  logic [BW-1:0]    bits_left;   // bits still to send after the current one
  logic [1:0]       slice_no;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hdr_sr    <= '0;
      dat_sr    <= '0;
      bits_left <= '0;
      slice_no  <= '0;
      rd_idx    <= '0;
      data_out  <= 1'b0;
      ev_pop    <= 1'b0;
    end else if (clr) begin
      state     <= S_IDLE;
      rd_idx    <= '0;
      data_out  <= 1'b0;
      ev_pop    <= 1'b0;
    end else begin
      ev_pop <= 1'b0;
      unique case (state)
        S_IDLE: begin
          data_out <= 1'b0;
          rd_idx   <= '0;
          if (ev_avail && !ev_pop) begin
            data_out  <= 1'b1;                 // start bit
            hdr_sr    <= ev_hdr;
            bits_left <= BW'(HW);
            state     <= S_HDR;
          end
        end
        S_HDR: begin
          data_out  <= hdr_sr[HW-1];
          hdr_sr    <= hdr_sr << 1;
          bits_left <= bits_left - 1'b1;
          if (bits_left == BW'(1)) begin
            // header done: next cycle sends slice 0, bit 0
            state     <= S_DATA;
            slice_no  <= '0;
            bits_left <= '0;
          end
        end
        S_DATA: begin
          if (bits_left == '0) begin
            // load a new slice and send its bit 0
            data_out  <= rd_slice[0];
            dat_sr    <= rd_slice >> 1;
            bits_left <= BW'(WIDTH - 1);
            rd_idx    <= (32'(slice_no) == NSLICE - 1) ? 2'd0 : slice_no + 2'd1;
          end else begin
            data_out  <= dat_sr[0];
            dat_sr    <= dat_sr >> 1;
            bits_left <= bits_left - 1'b1;
            if (bits_left == BW'(1)) begin
              if (32'(slice_no) == NSLICE - 1) begin
                ev_pop <= 1'b1;
                state  <= S_IDLE;
              end else begin
                slice_no <= slice_no + 2'd1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // An event is released only while the derandomizer holds one.
  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) ev_pop && !clr |-> ev_avail);

endmodule

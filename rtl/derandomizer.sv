// derandomizer: event buffer between the Level 1 trigger and the readout.
//
// When a Level 1 trigger (l1a) arrives, the pipeline output of that cycle
// and of the two following cycles (three 25 ns timeslices) are written into
// the next free event slot together with the event header. Up to EVENTS
// events are held. The readout side sees the oldest complete event: its
// header, and any of its three slices selected by rd_idx (registered read,
// one cycle of latency). ev_pop frees that slot.
//
// The three-slice capture and the 13-event depth follow the chip. What
// happens to a trigger that finds the buffer full, or that arrives while the
// previous event is still being captured, is this design's choice: the
// trigger is dropped and flagged on `overflow` for one cycle. clr (soft
// reset) empties the buffer.
//
// Interface:
//   write: l1a, hdr_in (valid with l1a), slice_in (pipeline output)
//   read:  ev_avail, ev_hdr, rd_idx, rd_slice, ev_pop
//   status: occupancy (events held or being captured), overflow
`timescale 1ps/1ps
module derandomizer
  import dtmroc_pkg::*;
#(
  parameter int unsigned WIDTH  = SLICE_BITS,
  parameter int unsigned EVENTS = DERAND_EVENTS,
  parameter int unsigned NSLICE = SLICES_PER_EV
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  // capture side
  input  logic             l1a,
  input  evhdr_t           hdr_in,
  input  logic [WIDTH-1:0] slice_in,
  // readout side
  output logic             ev_avail,
  output evhdr_t           ev_hdr,
  input  logic [1:0]       rd_idx,
  output logic [WIDTH-1:0] rd_slice,
  input  logic             ev_pop,
  // status
  output logic [$clog2(EVENTS+1)-1:0] occupancy,
  output logic             overflow
);

  localparam int unsigned EW = (EVENTS > 1) ? $clog2(EVENTS) : 1;
  localparam int unsigned CW = $clog2(EVENTS + 1);
  localparam int unsigned SW = $clog2(NSLICE + 1);

  logic [WIDTH-1:0] mem  [EVENTS * NSLICE];
  evhdr_t           hmem [EVENTS];

  logic [EW-1:0] wr_ev, rd_ev;
  logic [CW-1:0] used;      // slots allocated, including one being captured
  logic [CW-1:0] ready;     // complete events
  logic [SW-1:0] cap_cnt;   // slices still to capture for the current event
  logic          capturing;

  assign capturing = (cap_cnt != '0);

  function automatic logic [EW-1:0] inc_ev(logic [EW-1:0] p);
    return (p == EW'(EVENTS - 1)) ? '0 : p + 1'b1;
  endfunction

  logic accept, pop_ok, cap_last;
  always_comb begin
    accept   = l1a && !capturing && (used != CW'(EVENTS));
    pop_ok   = ev_pop && (ready != '0);
    cap_last = capturing && (cap_cnt == SW'(1));
  end

  // Slice index within the event being captured.
  logic [SW-1:0] cap_idx;
  assign cap_idx = accept ? '0 : SW'(NSLICE) - cap_cnt;

  always_ff @(posedge clk) begin
    if (accept || capturing)
      mem[32'(wr_ev) * NSLICE + 32'(cap_idx)] <= slice_in;
    if (accept)
      hmem[wr_ev] <= hdr_in;
    rd_slice <= mem[32'(rd_ev) * NSLICE + 32'(rd_idx)];
  end

  // NSLICE == 1 completes in the accept cycle itself.
  logic done;
  assign done = (NSLICE == 1) ? accept : cap_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ev    <= '0;
      rd_ev    <= '0;
      used     <= '0;
      ready    <= '0;
      cap_cnt  <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      wr_ev    <= '0;
      rd_ev    <= '0;
      used     <= '0;
      ready    <= '0;
      cap_cnt  <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= l1a && !accept;
      if (accept)
        cap_cnt <= SW'(NSLICE - 1);
      else if (capturing)
        cap_cnt <= cap_cnt - 1'b1;
      if (done)
        wr_ev <= inc_ev(wr_ev);
      if (pop_ok)
        rd_ev <= inc_ev(rd_ev);
      used  <= used  + CW'(accept) - CW'(pop_ok);
      ready <= ready + CW'(done)   - CW'(pop_ok);
    end
  end

  assign ev_avail  = (ready != '0);
  assign ev_hdr    = hmem[rd_ev];
  assign occupancy = used;

  // rd_idx must name one of the event's slices.
  a_rd_idx: assert property (@(posedge clk) disable iff (!rst_n) ev_avail |-> 32'(rd_idx) < NSLICE);

endmodule

// dtmroc_top: digital part of the DTMROC readout chip for 16 straw channels.
//
// Two 8-channel ASDBLR front ends deliver each channel as a ternary current
// (0/200/400 uA = none/Track/Track+TR). The ternary receivers split it into
// Track and TR levels; the front-end latch samples the Track level in eight
// 3.125 ns bins per 25 ns crossing, using the eight DLL phase clocks, adds
// one TR bit per channel and latches a 144-bit timeslice every crossing.
// The slices run through a 132-deep pipeline (3.3 us Level 1 latency). A
// Level 1 trigger decoded from the serial command line copies three
// consecutive slices leaving the pipeline, with an event header, into the
// 13-event derandomizer, from which the readout controller serialises
// events at 40 Mbit/s to the low level driver. The command line also
// carries resets, a test pulse command and register loads; the registers
// set four threshold DAC codes and the test pulse amplitude and delay.
//
// Ports: the LVDS receivers, the low level driver, the DACs and the test
// pulse shapers are analog and outside this module: bx_clk and cmd_in are
// the CMOS outputs of the LVDS receivers, data_out feeds the driver, and
// dac_code / tp_amp / tp_pulse drive the analog DACs and pulse shapers.
// asd_i_ua carries each channel's ternary current as a code in uA.
//
// Timing: everything runs on bx_clk (40 MHz); the DLL phases only clock the
// time-bin samplers. The DLL is a behavioural model, so this top simulates
// but the sampler clocks need a real DLL in silicon.
`timescale 1ps/1ps
module dtmroc_top
  import dtmroc_pkg::*;
(
  input  logic                bx_clk,
  input  logic                rst_n,
  input  logic                cmd_in,
  input  logic [CUR_BITS-1:0] asd_i_ua [NCH],
  output logic                data_out,
  output logic                readout_busy,
  output logic [DAC_BITS-1:0] dac_code [NDAC],
  output logic [7:0]          tp_amp,
  output logic [1:0]          tp_pulse,
  output logic [$clog2(DERAND_EVENTS+1)-1:0] derand_occupancy,
  output logic                derand_overflow
);

  // ---------------- timing and front end ----------------
  logic [NBINS-1:0] bc;
  dll #(.BX_PERIOD_PS(25000), .NPHASE(NBINS)) u_dll (.bx_clk(bx_clk), .bc(bc));

  logic [NCH-1:0] track, tr;
  for (genvar ch = 0; ch < NCH; ch++) begin : g_rx
    ternary_receiver u_rx (.i_ua(asd_i_ua[ch]), .track(track[ch]), .tr(tr[ch]));
  end

  slice_t slice_fe, slice_pipe;
  frontend_latch #(.N_CH(NCH), .N_BIN(NBINS)) u_fe (
    .bx_clk(bx_clk), .rst_n(rst_n), .bc(bc), .track(track), .tr(tr), .slice_out(slice_fe)
  );

  pipeline #(.WIDTH(SLICE_BITS), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk(bx_clk), .rst_n(rst_n), .slice_in(slice_fe), .slice_out(slice_pipe)
  );

  // ---------------- commands and registers ----------------
  logic       l1a, soft_rst, bc_rst, ev_rst, tp_fire, reg_we;
  logic [3:0] reg_addr;
  logic [7:0] reg_wdata, tp_delay;

  command_decoder u_cmd (
    .clk(bx_clk), .rst_n(rst_n), .cmd_in(cmd_in),
    .l1a(l1a), .soft_rst(soft_rst), .bc_rst(bc_rst), .ev_rst(ev_rst), .tp_fire(tp_fire),
    .reg_we(reg_we), .reg_addr(reg_addr), .reg_wdata(reg_wdata)
  );

  register_file u_regs (
    .clk(bx_clk), .rst_n(rst_n), .we(reg_we), .addr(reg_addr), .wdata(reg_wdata),
    .dac_code(dac_code), .tp_amp(tp_amp), .tp_delay(tp_delay)
  );

  testpulse_gen u_tp (
    .clk(bx_clk), .rst_n(rst_n), .fire(tp_fire), .delay(tp_delay), .tp_pulse(tp_pulse)
  );

  evhdr_t hdr;
  trigger_counters u_cnt (
    .clk(bx_clk), .rst_n(rst_n), .bc_rst(bc_rst), .ev_rst(ev_rst), .l1a(l1a), .hdr(hdr)
  );

  // ---------------- Level 1 selection and readout ----------------
  logic       ev_avail, ev_pop;
  evhdr_t     ev_hdr;
  logic [1:0] rd_idx;
  slice_t     rd_slice;

  derandomizer #(.WIDTH(SLICE_BITS), .EVENTS(DERAND_EVENTS), .NSLICE(SLICES_PER_EV)) u_derand (
    .clk(bx_clk), .rst_n(rst_n), .clr(soft_rst),
    .l1a(l1a), .hdr_in(hdr), .slice_in(slice_pipe),
    .ev_avail(ev_avail), .ev_hdr(ev_hdr), .rd_idx(rd_idx), .rd_slice(rd_slice), .ev_pop(ev_pop),
    .occupancy(derand_occupancy), .overflow(derand_overflow)
  );

  readout_controller #(.WIDTH(SLICE_BITS), .NSLICE(SLICES_PER_EV)) u_ro (
    .clk(bx_clk), .rst_n(rst_n), .clr(soft_rst),
    .ev_avail(ev_avail), .ev_hdr(ev_hdr), .rd_idx(rd_idx), .rd_slice(rd_slice), .ev_pop(ev_pop),
    .data_out(data_out), .busy(readout_busy)
  );

endmodule

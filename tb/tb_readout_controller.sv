// tb_readout_controller: feeds random events to the readout controller from
// a small event-buffer model with the derandomizer's interface (registered
// slice read, pop), decodes the serial line independently and compares
// every packet with the event it came from.
//
// Checked: start bit, 16 header bits MSB first, 3 x 144 data bits LSB first,
// one bit per clock (449 cycles per packet), at least one idle bit between
// packets, the start bit one cycle after an event appears, and that a soft
// reset (clr) in the middle of a packet returns the line to idle.
`timescale 1ps/1ps
module tb_readout_controller;
  import dtmroc_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  logic ev_avail, ev_pop, data_out, busy;
  evhdr_t ev_hdr;
  logic [1:0] rd_idx;
  slice_t rd_slice;
  int checks = 0, failures = 0, n_pkt = 0, n_clr = 0;

  typedef struct { evhdr_t h; slice_t s [3]; } ev_t;
  ev_t buf_q [$];      // events held by the buffer model
  ev_t sent_q [$];     // events offered to the controller, in order

  readout_controller dut (.*);
  always #12500 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic ev_t rnd_ev();
    ev_t e;
    e.h = evhdr_t'($urandom);
    for (int i = 0; i < 3; i++)
      for (int b = 0; b < SLICE_BITS; b += 16) e.s[i][b +: 16] = 16'($urandom);
    return e;
  endfunction

  // Buffer model.
  assign ev_avail = buf_q.size() != 0;
  assign ev_hdr   = ev_avail ? buf_q[0].h : '0;
  always @(posedge clk) begin
    rd_slice <= ev_avail ? buf_q[0].s[rd_idx] : '0;
    if (ev_pop && !clr) begin
      check(ev_avail, "pop with an event present");
      if (ev_avail) void'(buf_q.pop_front());
    end
  end

  task automatic offer();
    ev_t e = rnd_ev();
    buf_q.push_back(e);
    sent_q.push_back(e);
  endtask

  // Line decoder (samples on the falling edge, the line changes on rising).
  int     idle_run = 1;
  bit     rx_on = 1;
  ev_t    got;
  logic [15:0] h;
  bit     aborted;

  task automatic receive_packet();
    check(idle_run >= 1, "idle bit between packets");
    h = '0;
    aborted = 0;
    for (int i = 0; i < 16; i++) begin @(negedge clk); h = {h[14:0], data_out}; end
    got.h = evhdr_t'(h);
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < SLICE_BITS; b++) begin
        @(negedge clk);
        got.s[s][b] = data_out;
        if (!rx_on) aborted = 1;
      end
    if (!aborted) begin
      check(sent_q.size() != 0, "packet matches an offered event");
      if (sent_q.size() != 0) begin
        check(got.h == sent_q[0].h, "header");
        for (int s = 0; s < 3; s++) check(got.s[s] == sent_q[0].s[s], $sformatf("slice %0d", s));
        void'(sent_q.pop_front());
        n_pkt++;
      end
    end
    idle_run = 0;
  endtask

  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (!rx_on) idle_run = 0;
      else if (data_out == 1'b0) idle_run++;
      else receive_packet();
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(data_out == 0 && !busy, "idle after reset");
    // Start-bit latency and back-to-back events.
    offer();
    @(negedge clk);
    check(data_out == 1'b1, "start bit one cycle after ev_avail");
    repeat (6) offer();
    // Bit rate: all seven packets take 7 * 450 cycles, less the last idle bit.
    repeat (7 * 450 - 1) @(negedge clk);
    check(sent_q.size() == 0 && buf_q.size() == 0 && !busy, "7 packets in 7x450 cycles");
    // Soft reset mid-packet.
    offer();
    repeat (100) @(negedge clk);
    rx_on = 0;
    clr = 1;
    @(negedge clk) clr = 0;
    check(data_out == 0 && !busy, "clr returns the line to idle");
    buf_q.delete(); sent_q.delete(); n_clr++;
    repeat (500) @(negedge clk);
    rx_on = 1;
    // Random arrivals.
    for (int i = 0; i < 30; i++) begin
      repeat ($urandom % 700) @(negedge clk);
      offer();
    end
    wait (buf_q.size() == 0 && !busy);
    repeat (5) @(negedge clk);
    check(n_pkt == 37 && sent_q.size() == 0, "all packets received");
    $display("packets %0d", n_pkt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

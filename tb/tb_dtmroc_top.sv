// tb_dtmroc_top: end-to-end test of the DTMROC digital chip at its full
// size (16 channels, 132-deep pipeline, 13-event derandomizer).
//
// Every 25 ns crossing, each channel's ternary current is set per 3.125 ns
// bin to 0, 200 or 400 uA (no hit / Track / Track+TR), and the testbench
// records the 144-bit slice the chip should latch for that crossing.
// Commands go in on the serial command line; the serial readout line is
// decoded and each packet is compared with the slices of the three
// crossings the trigger points at. For a trigger whose last command bit is
// sampled at clock edge E, those are the crossings that started at edges
// E-134, E-133 and E-132: two clock edges through the front-end latch and
// its pipeline write, 132 in the pipeline. The header carries the event
// count since the last event counter reset and the bunch count E-B-1 for a
// bunch counter reset sampled at edge B.
//
// Mechanisms exercised and counted: register writes (DAC codes, test pulse
// amplitude/delay), the test pulse with its delay, bunch and event counter
// resets, Level 1 triggers read out, Track and TR bits in the data, a
// derandomizer overflow (a burst of 16 triggers), back-to-back readout at
// 450 clocks per event, and a soft reset in the middle of a packet.
`timescale 1ps/1ps
module tb_dtmroc_top;
  import dtmroc_pkg::*;

  logic                bx_clk = 0, rst_n = 0, cmd_in = 0;
  logic [CUR_BITS-1:0] asd_i_ua [NCH];
  logic                data_out, readout_busy, derand_overflow;
  logic [DAC_BITS-1:0] dac_code [NDAC];
  logic [7:0]          tp_amp;
  logic [1:0]          tp_pulse;
  logic [3:0]          derand_occupancy;

  dtmroc_top dut (.*);

  always #12500 bx_clk = ~bx_clk;

  int checks = 0, failures = 0;
  int n_ev = 0, n_tr = 0, n_trk = 0, n_ovf = 0, n_soft = 0, n_bcr = 0, n_ecr = 0,
      n_reg = 0, n_tp = 0, n_b2b = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (60000) @(posedge bx_clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ternary current stimulus ----------------
  int     edge_n = 0;          // rising edges of bx_clk so far
  slice_t exp_slice [int];     // expected slice of the crossing starting at edge n

  initial foreach (asd_i_ua[i]) asd_i_ua[i] = '0;

  always @(posedge bx_clk) begin : stim
    automatic slice_t e = '0;
    automatic int c;
    edge_n++;
    c = edge_n;
    for (int k = 0; k < NBINS; k++) begin
      if (k > 0) #3125;
      for (int ch = 0; ch < NCH; ch++) begin
        automatic int r = int'($urandom % 10);
        automatic int lvl = (r < 6) ? 0 : (r < 9) ? 200 : 400;
        asd_i_ua[ch] = CUR_BITS'(lvl);
        e[ch*CH_BITS + k] = (lvl >= 200);
        e[ch*CH_BITS + NBINS] |= (lvl >= 400);
      end
    end
    exp_slice[c] = e;
  end

  // ---------------- command line ----------------
  typedef struct { evhdr_t h; slice_t s [3]; } ev_t;
  ev_t exp_q [$];
  int  last_bcr = 0;
  int  n_l1_since_ecr = 0;

  // Sends n bits MSB first; returns E, the edge that samples the last bit.
  task automatic send(input logic [31:0] v, input int n, output int e_last);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge bx_clk) cmd_in = v[i];
    end
    e_last = edge_n + 1;
    @(negedge bx_clk) cmd_in = 0;
  endtask

  task automatic trigger(input bit expect_accept);
    int e;
    ev_t ev;
    send({1'b1, PFX_L1A}, 3, e);
    ev.h.l1id = 8'(n_l1_since_ecr);
    ev.h.bcid = 8'(e - last_bcr - 1);
    for (int i = 0; i < 3; i++) ev.s[i] = exp_slice[e - 134 + i];
    n_l1_since_ecr++;
    if (expect_accept) exp_q.push_back(ev);
  endtask

  task automatic control(input opcode_e op, output int e);
    send({1'b1, PFX_CTL, op}, 7, e);
  endtask

  task automatic write_reg(input logic [3:0] a, input logic [7:0] d);
    int e;
    send({1'b1, PFX_CTL, OP_WRITE_REG, a, d}, 19, e);
  endtask

  // ---------------- readout line decoder ----------------
  bit   rx_on = 1;
  int   start_edge [$];
  ev_t  got;
  logic [15:0] h;
  bit   aborted;

  task automatic receive_packet();
    start_edge.push_back(edge_n);
    h = '0;
    aborted = 0;
    for (int i = 0; i < 16; i++) begin @(negedge bx_clk); h = {h[14:0], data_out}; end
    got.h = evhdr_t'(h);
    for (int s = 0; s < 3 && !aborted; s++)
      for (int b = 0; b < SLICE_BITS && !aborted; b++) begin
        @(negedge bx_clk);
        got.s[s][b] = data_out;
        if (!rx_on) aborted = 1;
      end
    if (!aborted) begin
      check(exp_q.size() != 0, "packet expected");
      if (exp_q.size() != 0) begin
        check(got.h == exp_q[0].h, "event header");
        if (got.h != exp_q[0].h)
          $display("  header l1id %0d bcid %0d, expected %0d %0d", got.h.l1id, got.h.bcid, exp_q[0].h.l1id, exp_q[0].h.bcid);
        for (int s = 0; s < 3; s++) begin
          check(got.s[s] == exp_q[0].s[s], $sformatf("event slice %0d", s));
          for (int ch = 0; ch < NCH; ch++) begin
            n_tr  += int'(got.s[s][ch*CH_BITS + NBINS]);
            n_trk += int'(|got.s[s][ch*CH_BITS +: NBINS]);
          end
        end
        void'(exp_q.pop_front());
        n_ev++;
      end
    end
  endtask

  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge bx_clk);
      if (rx_on && data_out) receive_packet();
    end
  end

  always @(negedge bx_clk) if (derand_overflow) n_ovf++;

  // ---------------- test sequence ----------------
  task automatic wait_idle();
    int guard = 0;
    while ((readout_busy || derand_occupancy != 0 || exp_q.size() != 0) && guard < 20000) begin
      @(negedge bx_clk); guard++;
    end
    repeat (3) @(negedge bx_clk);
    check(exp_q.size() == 0, "all expected events read out");
  endtask

  initial begin : seq
    int e;
    logic [7:0] regs [6];
    repeat (4) @(negedge bx_clk);
    rst_n = 1;
    repeat (4) @(negedge bx_clk);
    check(data_out == 0 && !readout_busy && derand_occupancy == 0, "idle after reset");

    // Registers.
    for (int a = 0; a < 6; a++) begin
      regs[a] = 8'($urandom);
      if (a == 5) regs[a] = 8'd17;   // test pulse delay
      write_reg(4'(a), regs[a]);
      n_reg++;
    end
    @(negedge bx_clk);
    for (int a = 0; a < 4; a++) check(dac_code[a] == regs[a], $sformatf("DAC%0d code", a));
    check(tp_amp == regs[4], "test pulse amplitude code");

    // Test pulse: fire sampled at F+1, pulse after edge F+1+delay.
    control(OP_TEST_PULSE, e);
    begin
      int guard;
      guard = 0;
      while (tp_pulse == 2'b00 && guard < 400) begin @(negedge bx_clk); guard++; end
      check(tp_pulse == 2'b11 && edge_n == e + 1 + 17, "test pulse delay");
      if (tp_pulse == 2'b11) n_tp++;
    end

    // Counter resets, then let the pipeline fill with known crossings.
    control(OP_BC_RESET, e); last_bcr = e; n_bcr++;
    control(OP_EV_RESET, e); n_l1_since_ecr = 0; n_ecr++;
    repeat (150) @(negedge bx_clk);

    // Single triggers spread out.
    for (int i = 0; i < 6; i++) begin
      trigger(1);
      repeat (200 + $urandom % 500) @(negedge bx_clk);
    end
    wait_idle();

    // Burst: 16 back-to-back triggers; 13 fit, 3 overflow.
    begin
      int ovf0, first;
      ovf0  = n_ovf;
      first = start_edge.size();
      for (int i = 0; i < 16; i++) trigger(i < 13);
      wait_idle();
      check(n_ovf - ovf0 == 3, "three triggers overflow the derandomizer");
      for (int i = first + 1; i < first + 13 && i < start_edge.size(); i++) begin
        check(start_edge[i] - start_edge[i-1] == PACKET_BITS + 1, "back-to-back packets every 450 clocks");
        if (start_edge[i] - start_edge[i-1] != PACKET_BITS + 1) $display("  packet %0d started %0d clocks after the previous one", i, start_edge[i] - start_edge[i-1]);
        n_b2b++;
      end
    end

    // Event counter reset, bunch counter reset, more triggers.
    control(OP_EV_RESET, e); n_l1_since_ecr = 0; n_ecr++;
    repeat (37) @(negedge bx_clk);
    control(OP_BC_RESET, e); last_bcr = e; n_bcr++;
    for (int i = 0; i < 4; i++) begin
      trigger(1);
      repeat (20 + $urandom % 100) @(negedge bx_clk);
    end
    wait_idle();

    // Soft reset in the middle of a packet empties the derandomizer.
    trigger(1); trigger(1); trigger(1);
    repeat (120) @(negedge bx_clk);
    rx_on = 0;
    control(OP_SOFT_RESET, e);
    repeat (2) @(negedge bx_clk);
    check(derand_occupancy == 0 && !readout_busy && data_out == 0, "soft reset empties readout");
    exp_q.delete();
    n_soft++;
    repeat (10) @(negedge bx_clk);
    rx_on = 1;
    trigger(1);
    repeat (10) @(negedge bx_clk);
    trigger(1);
    wait_idle();

    check(n_ev > 0,   "events read out");
    check(n_tr > 0,   "TR bits seen");
    check(n_trk > 0,  "Track hits seen");
    check(n_ovf > 0,  "derandomizer overflow");
    check(n_soft > 0, "soft reset");
    check(n_bcr > 0 && n_ecr > 0, "counter resets");
    check(n_reg > 0,  "register writes");
    check(n_tp > 0,   "test pulse");
    check(n_b2b == 12, "back-to-back readout of the 13-event burst");
    $display("events %0d  TR bits %0d  track hits %0d  overflows %0d  soft resets %0d  BCR %0d  ECR %0d  reg writes %0d  test pulses %0d  back-to-back %0d",
             n_ev, n_tr, n_trk, n_ovf, n_soft, n_bcr, n_ecr, n_reg, n_tp, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

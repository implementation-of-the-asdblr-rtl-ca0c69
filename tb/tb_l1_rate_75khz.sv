// tb_l1_rate_75khz: runs the full-size DTMROC at the ATLAS maximum Level 1
// trigger rate of 75 kHz with random (memoryless) trigger arrival.
//
// At 40 MHz a 75 kHz rate is one trigger per 533 clocks on average, while
// one event takes 450 clocks on the readout line, so the line is about 84%
// busy and the 13-event derandomizer has to absorb the bursts of a random
// arrival process. Each clock a trigger is started with probability 1/533
// (when the command line is free). Every packet is decoded and compared
// with the crossings its trigger selected (see tb_dtmroc_top for the
// timing). A trigger is expected to be dropped exactly when the
// derandomizer already holds 13 events; the overflow flag must agree.
// Reported: events read out, triggers dropped, peak occupancy.
`timescale 1ps/1ps
module tb_l1_rate_75khz;
  import dtmroc_pkg::*;

  localparam int N_TRIG      = 300;
  localparam int MEAN_CLOCKS = 533;   // 40 MHz / 75 kHz

  logic                bx_clk = 0, rst_n = 0, cmd_in = 0;
  logic [CUR_BITS-1:0] asd_i_ua [NCH];
  logic                data_out, readout_busy, derand_overflow;
  logic [DAC_BITS-1:0] dac_code [NDAC];
  logic [7:0]          tp_amp;
  logic [1:0]          tp_pulse;
  logic [3:0]          derand_occupancy;

  dtmroc_top dut (.*);

  always #12500 bx_clk = ~bx_clk;

  int checks = 0, failures = 0, n_ev = 0, n_drop = 0, peak = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (N_TRIG * MEAN_CLOCKS * 2 + 20000) @(posedge bx_clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ternary current stimulus, as in tb_dtmroc_top.
  int     edge_n = 0;
  slice_t exp_slice [int];
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
        automatic int lvl = (r < 7) ? 0 : (r < 9) ? 200 : 400;
        asd_i_ua[ch] = CUR_BITS'(lvl);
        e[ch*CH_BITS + k] = (lvl >= 200);
        e[ch*CH_BITS + NBINS] |= (lvl >= 400);
      end
    end
    exp_slice[c] = e;
    if (exp_slice.exists(c - 400)) exp_slice.delete(c - 400);
  end

  typedef struct { evhdr_t h; slice_t s [3]; } ev_t;
  ev_t exp_q [$];
  int  last_bcr = 0, n_l1 = 0;

  task automatic send(input logic [31:0] v, input int n, output int e_last);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge bx_clk) cmd_in = v[i];
    end
    e_last = edge_n + 1;
    @(negedge bx_clk) cmd_in = 0;
  endtask

  task automatic trigger();
    int e;
    bit drop;
    ev_t ev;
    send({1'b1, PFX_L1A}, 3, e);
    // After edge E: the derandomizer decides at edge E+1.
    drop = (derand_occupancy == 4'(DERAND_EVENTS));
    ev.h.l1id = 8'(n_l1);
    ev.h.bcid = 8'(e - last_bcr - 1);
    for (int i = 0; i < 3; i++) ev.s[i] = exp_slice[e - 134 + i];
    n_l1++;
    if (!drop) exp_q.push_back(ev);
    else n_drop++;
    @(negedge bx_clk);
    check(derand_overflow == drop, "overflow flag when the derandomizer is full");
  endtask

  // Readout decoder.
  ev_t  got;
  logic [15:0] h;
  task automatic receive_packet();
    h = '0;
    for (int i = 0; i < 16; i++) begin @(negedge bx_clk); h = {h[14:0], data_out}; end
    got.h = evhdr_t'(h);
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < SLICE_BITS; b++) begin
        @(negedge bx_clk);
        got.s[s][b] = data_out;
      end
    check(exp_q.size() != 0, "packet expected");
    if (exp_q.size() != 0) begin
      check(got.h == exp_q[0].h, "event header");
      for (int s = 0; s < 3; s++) check(got.s[s] == exp_q[0].s[s], $sformatf("event slice %0d", s));
      void'(exp_q.pop_front());
      n_ev++;
    end
  endtask

  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge bx_clk);
      if (data_out) receive_packet();
    end
  end

  always @(negedge bx_clk) if (int'(derand_occupancy) > peak) peak = int'(derand_occupancy);

  initial begin : seq
    int e, guard;
    repeat (4) @(negedge bx_clk);
    rst_n = 1;
    repeat (4) @(negedge bx_clk);
    send({1'b1, PFX_CTL, OP_BC_RESET}, 7, e); last_bcr = e;
    send({1'b1, PFX_CTL, OP_EV_RESET}, 7, e); n_l1 = 0;
    repeat (150) @(negedge bx_clk);
    for (int t = 0; t < N_TRIG; ) begin
      if (($urandom % MEAN_CLOCKS) == 0) begin
        trigger();
        t++;
      end else begin
        @(negedge bx_clk);
      end
    end
    guard = 0;
    while ((readout_busy || exp_q.size() != 0) && guard < 20000) begin @(negedge bx_clk); guard++; end
    check(exp_q.size() == 0, "every accepted event read out");
    check(n_ev + n_drop == N_TRIG, "events plus drops equal triggers");
    $display("triggers %0d  read out %0d  dropped %0d  peak derandomizer occupancy %0d of %0d",
             N_TRIG, n_ev, n_drop, peak, DERAND_EVENTS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

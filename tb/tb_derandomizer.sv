// tb_derandomizer: random Level 1 triggers against the full-size
// 13-event derandomizer, with a slice input that is unique every cycle.
//
// A reference model in the testbench decides which triggers are accepted
// (buffer not full, no capture in progress) and which three slices each
// event must hold. A reader pops events at random times, reading the three
// slices through rd_idx with one cycle of latency. Checked: slice contents,
// headers, event order, occupancy, the overflow flag, and the soft reset.
// Bursts of triggers force the buffer full so overflows occur.
`timescale 1ps/1ps
module tb_derandomizer;
  import dtmroc_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, l1a = 0, ev_pop = 0;
  evhdr_t hdr_in = '0, ev_hdr;
  slice_t slice_in = '0, rd_slice;
  logic [1:0] rd_idx = 0;
  logic ev_avail, overflow;
  logic [3:0] occupancy;
  int checks = 0, failures = 0, n_ovf = 0, n_ev = 0, n_clr = 0, n_full = 0;

  typedef struct { evhdr_t h; slice_t s [3]; } ev_t;
  ev_t exp_q [$];
  int  cyc = 0;
  int  cap_left = 0;   // model: slices still to capture
  int  m_used = 0;
  ev_t cur;

  derandomizer dut (.*);
  always #12500 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic slice_t pat(int c);
    return {4'(c), {5{c}}, ~c};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // Driver, model and reader in one loop: inputs change at negedge, the
  // model follows the edge that samples them. The reader reads the head
  // event's three slices (rs = 1..4) and then pops it.
  int mode = 0;   // 0 random, 1 burst
  int rs = 0;
  bit m_ovf;
  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (cyc = 0; cyc < 60000; cyc++) begin
      ev_pop = 0;
      if (rs >= 2 && exp_q.size() != 0) begin
        check(rd_slice == exp_q[0].s[rs-2], $sformatf("slice %0d", rs-2));
        check(ev_hdr == exp_q[0].h, "header");
      end
      if (cyc % 5000 == 0) mode = 1;
      if (cyc % 5000 == 200) mode = 0;
      slice_in = pat(cyc);
      hdr_in   = '{l1id: 8'($urandom), bcid: 8'(cyc)};
      l1a      = (mode == 1) ? (cyc % 3 == 0) : (($urandom % 40) == 0);
      clr      = (cyc % 7919 == 7918);
      if (clr) rs = 0;
      else if (rs == 0) begin
        if (ev_avail && mode == 0 && ($urandom % 8) == 0) rs = 1;
      end
      if (rs >= 1 && rs <= 3) begin rd_idx = 2'(rs - 1); rs++; end
      else if (rs == 4) begin ev_pop = 1; rd_idx = 0; rs = 0; end
      @(posedge clk);
      m_ovf = 0;
      if (clr) begin
        exp_q.delete(); cap_left = 0; m_used = 0; n_clr++;
      end else begin
        automatic bit accept = l1a && cap_left == 0 && m_used < 13;
        if (ev_pop) begin void'(exp_q.pop_front()); m_used--; n_ev++; end
        if (cap_left > 0) begin
          cur.s[3 - cap_left] = pat(cyc);
          cap_left--;
          if (cap_left == 0) exp_q.push_back(cur);
        end
        m_ovf = l1a && !accept;
        if (m_ovf) n_ovf++;
        if (l1a && m_used >= 13) n_full++;
        if (accept) begin
          cur.h = hdr_in; cur.s[0] = pat(cyc); cap_left = 2; m_used++;
        end
      end
      @(negedge clk);
      check(int'(occupancy) == m_used, "occupancy");
      check(ev_avail == (exp_q.size() != 0), "ev_avail");
      check(overflow == m_ovf, "overflow flag");
    end
    check(n_ovf > 0 && n_ev > 100 && n_clr > 0 && n_full > 0, "all mechanisms exercised");
    $display("events %0d dropped %0d (full %0d) clears %0d", n_ev, n_ovf, n_full, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

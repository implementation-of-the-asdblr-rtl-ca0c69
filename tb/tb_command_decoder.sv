// tb_command_decoder: self-checking test of the serial command decoder.
//
// Sends every command type MSB first on the falling clock edge and checks
// that exactly the expected output pulses in the cycle after the last bit,
// and for one cycle only. Register writes use random addresses and data.
// Reserved prefixes and unknown opcodes must produce no pulse.
`timescale 1ps/1ps
module tb_command_decoder;
  import dtmroc_pkg::*;

  logic clk = 0, rst_n = 0, cmd_in = 0;
  logic l1a, soft_rst, bc_rst, ev_rst, tp_fire, reg_we;
  logic [3:0] reg_addr;
  logic [7:0] reg_wdata;
  int checks = 0, failures = 0;

  command_decoder dut (.*);

  always #12500 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Sends n bits MSB first; returns with cmd_in low, just after the edge that
  // registered the decoder's response to the last bit.
  task automatic send(input logic [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge clk) cmd_in = v[i];
    end
    @(negedge clk) cmd_in = 0;   // the last bit has been sampled; outputs now valid
  endtask

  function automatic logic [5:0] outs();
    return {l1a, soft_rst, bc_rst, ev_rst, tp_fire, reg_we};
  endfunction

  task automatic expect_pulse(input logic [5:0] exp, input string what);
    check(outs() == exp, what);
    @(negedge clk);
    check(outs() == 6'b0, {what, " lasts one cycle"});
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(outs() == 0, "idle after reset");

    send({1'b1, PFX_L1A}, 3);                       expect_pulse(6'b100000, "l1a");
    send({1'b1, PFX_CTL, OP_SOFT_RESET}, 7);        expect_pulse(6'b010000, "soft reset");
    send({1'b1, PFX_CTL, OP_BC_RESET}, 7);          expect_pulse(6'b001000, "bc reset");
    send({1'b1, PFX_CTL, OP_EV_RESET}, 7);          expect_pulse(6'b000100, "ev reset");
    send({1'b1, PFX_CTL, OP_TEST_PULSE}, 7);        expect_pulse(6'b000010, "test pulse");

    for (int i = 0; i < 40; i++) begin
      automatic logic [3:0] a = 4'($urandom);
      automatic logic [7:0] d = 8'($urandom);
      send({1'b1, PFX_CTL, OP_WRITE_REG, a, d}, 19);
      check(reg_addr == a && reg_wdata == d, "register write fields");
      expect_pulse(6'b000001, "register write");
    end

    // Back-to-back triggers every three crossings.
    for (int i = 0; i < 5; i++) begin
      for (int b = 2; b >= 0; b--) begin
        @(negedge clk) cmd_in = (b != 0);
        if (i > 0 && b == 2) check(l1a == 1'b1, "back-to-back l1a");
        else check(l1a == 1'b0, "l1a only after third bit");
      end
    end
    @(negedge clk) cmd_in = 0;
    check(l1a == 1'b1, "last back-to-back l1a");

    // Reserved prefixes and unknown opcodes do nothing.
    send(3'b100, 3);  check(outs() == 0, "reserved 100"); @(negedge clk); check(outs() == 0, "reserved 100 quiet");
    send(3'b111, 3);  check(outs() == 0, "reserved 111"); @(negedge clk); check(outs() == 0, "reserved 111 quiet");
    send({1'b1, PFX_CTL, 4'b1111}, 7); check(outs() == 0, "unknown opcode");
    // The decoder is back in idle: a trigger works.
    send({1'b1, PFX_L1A}, 3); expect_pulse(6'b100000, "l1a after reserved");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

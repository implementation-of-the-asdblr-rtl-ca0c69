// command_decoder: decodes the serial trigger and command line from the ROD.
//
// The line is sampled on every bunch crossing clock edge and idles at 0.
// A 1 starts a command; the next two bits select it (MSB first):
//   1 1 0                               Level 1 trigger
//   1 0 1 op[3:0]                       control command (see dtmroc_pkg)
//   1 0 1 1000 addr[3:0] data[7:0]      register write
//   1 0 0, 1 1 1                        reserved, ignored
// The decoder looks for the Level 1 trigger first: it is the shortest code,
// so triggers can follow each other every three crossings. The command set
// (trigger, resets, test pulse, register loads) is the chip's; the bit codes
// and lengths are this design's choice.
//
// Outputs are one-cycle pulses, registered, asserted in the cycle after the
// last bit of the command was sampled. reg_addr/reg_wdata are valid with
// reg_we.
`timescale 1ps/1ps
module command_decoder
  import dtmroc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_in,
  output logic       l1a,
  output logic       soft_rst,
  output logic       bc_rst,
  output logic       ev_rst,
  output logic       tp_fire,
  output logic       reg_we,
  output logic [3:0] reg_addr,
  output logic [7:0] reg_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_PFX, S_OP, S_ADDR, S_DATA} state_e;

  state_e      state;
  logic [3:0]  cnt;     // bits still to collect in this field, minus one
  logic [6:0]  sr;      // bits of the current field received so far

  logic [7:0]  sr_n;
  assign sr_n = {sr[6:0], cmd_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      sr        <= '0;
      l1a       <= 1'b0;
      soft_rst  <= 1'b0;
      bc_rst    <= 1'b0;
      ev_rst    <= 1'b0;
      tp_fire   <= 1'b0;
      reg_we    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
    end else begin
      l1a      <= 1'b0;
      soft_rst <= 1'b0;
      bc_rst   <= 1'b0;
      ev_rst   <= 1'b0;
      tp_fire  <= 1'b0;
      reg_we   <= 1'b0;
      sr       <= sr_n[6:0];
      unique case (state)
        S_IDLE: begin
          if (cmd_in) begin
            state <= S_PFX;
            cnt   <= 4'd1;
          end
        end
        S_PFX: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            if (sr_n[1:0] == PFX_L1A) begin
              l1a   <= 1'b1;
              state <= S_IDLE;
            end else if (sr_n[1:0] == PFX_CTL) begin
              state <= S_OP;
              cnt   <= 4'd3;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_OP: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            state <= S_IDLE;
            unique case (sr_n[3:0])
              OP_SOFT_RESET: soft_rst <= 1'b1;
              OP_BC_RESET:   bc_rst   <= 1'b1;
              OP_EV_RESET:   ev_rst   <= 1'b1;
              OP_TEST_PULSE: tp_fire  <= 1'b1;
              OP_WRITE_REG: begin
                state <= S_ADDR;
                cnt   <= 4'd3;
              end
              default: ;
            endcase
          end
        end
        S_ADDR: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            reg_addr <= sr_n[3:0];
            state    <= S_DATA;
            cnt      <= 4'd7;
          end
        end
        S_DATA: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            reg_wdata <= sr_n[7:0];
            reg_we    <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // At most one command is decoded per clock.
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({l1a, soft_rst, bc_rst, ev_rst, tp_fire, reg_we}));

endmodule

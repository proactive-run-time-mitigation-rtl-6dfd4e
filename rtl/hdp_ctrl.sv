// hdp_ctrl: HDP control unit, the sequencer of a mode switch.
//
// When the requested mode (from the HDP CSR) differs from the active one,
// the unit switches ALUs in this order:
//   WAKE_DRAIN  issue is stalled; the target ALU's power switch is turned on
//               while the active ALU finishes the operation it holds (at most
//               66 cycles, a divide). Both must be done to leave the state.
//   (on leaving) the target's clock is ungated, the target becomes the active
//               ALU (demux/mux select) and the clock generator is asked for
//               the target's frequency (clk_req_o pulse, clk_sel_o).
//   CLK_WAIT    issue stays stalled until the clock generator acknowledges.
//   GATE_CLK    issue resumes; the previous ALU's clock is gated.
//   GATE_PWR    the previous ALU's power switch is turned off.
// A request that changes during a switch is served once the switch ends.
// Issue is also stalled while the active ALU's supply is not yet good (after
// reset) and in the cycle the request differs from the active mode, so no
// operation enters the ALU that is about to be left.
//
// Interface: per-ALU vectors for idle status, power good, power on and clock
// enable; a request/acknowledge pair to the clock generator. Reset: fast ALU
// active, powered and clocked.
//
// The order of the steps follows the HDP description. The state encoding,
// the pulse handshake with the clock generator and stalling issue until the
// new frequency is acknowledged are this design's choices.
module hdp_ctrl
  import hdp_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  input  hdp_mode_e        req_mode_i,
  input  logic [N_ALU-1:0] alu_idle_i,
  input  logic [N_ALU-1:0] pwr_good_i,
  input  logic             clk_ack_i,
  output hdp_mode_e        active_o,
  output logic             stall_o,
  output logic [N_ALU-1:0] pwr_on_o,
  output logic [N_ALU-1:0] clk_en_o,
  output logic             clk_req_o,
  output hdp_mode_e        clk_sel_o,
  output logic             switching_o
);

  typedef enum logic [2:0] {S_RUN, S_WAKE_DRAIN, S_CLK_WAIT, S_GATE_CLK, S_GATE_PWR} state_e;

  state_e    state_q;
  hdp_mode_e active_q, target_q, old_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_RUN;
      active_q  <= MODE_FAST;
      target_q  <= MODE_FAST;
      old_q     <= MODE_FAST;
      pwr_on_o  <= N_ALU'(1) << MODE_FAST;
      clk_en_o  <= N_ALU'(1) << MODE_FAST;
      clk_req_o <= 1'b0;
    end else begin
      clk_req_o <= 1'b0;
      unique case (state_q)
        S_RUN: if (req_mode_i != active_q) begin
          target_q           <= req_mode_i;
          pwr_on_o[req_mode_i] <= 1'b1;
          state_q            <= S_WAKE_DRAIN;
        end
        S_WAKE_DRAIN: if (alu_idle_i[active_q] && pwr_good_i[target_q]) begin
          clk_en_o[target_q] <= 1'b1;
          old_q              <= active_q;
          active_q           <= target_q;
          clk_req_o          <= 1'b1;
          state_q            <= S_CLK_WAIT;
        end
        S_CLK_WAIT: if (clk_ack_i) state_q <= S_GATE_CLK;
        S_GATE_CLK: begin
          clk_en_o[old_q] <= 1'b0;
          state_q         <= S_GATE_PWR;
        end
        S_GATE_PWR: begin
          pwr_on_o[old_q] <= 1'b0;
          state_q         <= S_RUN;
        end
        default: state_q <= S_RUN;
      endcase
    end
  end

  assign active_o    = active_q;
  assign clk_sel_o   = active_q;
  assign switching_o = (state_q != S_RUN);
  assign stall_o     = (state_q == S_WAKE_DRAIN) || (state_q == S_CLK_WAIT)
                    || (state_q == S_RUN && req_mode_i != active_q)
                    || !pwr_good_i[active_q];

  // a clock is only ever enabled on a powered domain
  assert property (@(posedge clk_i) disable iff (!rst_ni) (clk_en_o & ~pwr_on_o) == '0)
    else $error("hdp_ctrl: clock enabled on an unpowered ALU");
  // outside a switch exactly the active ALU is clocked and powered
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   state_q == S_RUN |-> (clk_en_o == (N_ALU'(1) << active_q) && pwr_on_o == clk_en_o))
    else $error("hdp_ctrl: idle ALU not gated outside a switch");

endmodule

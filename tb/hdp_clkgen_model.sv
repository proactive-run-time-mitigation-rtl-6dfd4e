// hdp_clkgen_model: behavioural model of the core clock generator driven by
// the HDP control unit (testbench only).
//
// Produces the core clock at the frequency of the selected ALU mode: fast
// 3.69 GHz, mid 3.39 GHz, slow 2.46 GHz (periods 271.0, 295.0 and 406.5 ps).
// On a req_i pulse sampled at a rising edge it starts running at the
// frequency of sel_i from the next cycle and, LOCK_CYCLES rising edges
// later, raises ack_o for one cycle to report that the frequency is stable.
// The frequency change is glitch-free in this model.
module hdp_clkgen_model
  import hdp_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 10
) (
  input  hdp_mode_e sel_i,
  input  logic      req_i,
  output logic      clk_o,
  output logic      ack_o
);
  timeunit 1ps; timeprecision 1fs;

  function automatic realtime period_of(hdp_mode_e m);
    case (m)
      MODE_FAST: return 271.0;
      MODE_MID:  return 295.0;
      default:   return 406.5;
    endcase
  endfunction

  realtime period = 271.0;
  int      lock_cnt = 0;

  initial begin
    clk_o = 1'b0;
    ack_o = 1'b0;
    forever begin
      #(period / 2.0) clk_o = 1'b1;
      #(period / 2.0) clk_o = 1'b0;
    end
  end

  always @(posedge clk_o) begin
    ack_o <= 1'b0;
    if (req_i) begin
      period   <= period_of(sel_i);
      lock_cnt <= LOCK_CYCLES;
    end else if (lock_cnt > 1) begin
      lock_cnt <= lock_cnt - 1;
    end else if (lock_cnt == 1) begin
      lock_cnt <= 0;
      ack_o    <= 1'b1;
    end
  end
endmodule

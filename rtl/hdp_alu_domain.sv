// hdp_alu_domain: one power and clock domain of the heterogeneous datapath,
// holding one ALU with its power switch and integrated clock gater.
//
// The power switch runs on the free clock and reports when the domain supply
// has settled. The domain then comes up in two steps: in the first cycle with
// a good supply the ICG is opened for one clock edge while the ALU's reset is
// still asserted, so every ALU register is cleared; from the next cycle the
// reset is released and pwr_good_o reports the domain usable. While the
// domain is not up, its outputs are clamped (ready and response low, idle
// high), standing in for isolation cells.
//
// Timing: pwr_good_o rises WAKE_CYCLES + 1 cycles after pwr_on_i rises and
// falls one cycle after pwr_on_i falls. After that
// the timing is that of hdp_alu, with the clock running from the rising edge
// after clk_en_i goes high.
//
// Clock gating and power gating per ALU domain follow the HDP description;
// the reset-on-wake-up step and the output clamping are this design's
// choices.
module hdp_alu_domain
  import hdp_pkg::*;
#(
  parameter int unsigned WAKE_CYCLES = 8
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     pwr_on_i,
  input  logic     clk_en_i,
  input  alu_req_t req_i,
  output logic     ready_o,
  output alu_rsp_t rsp_o,
  output logic     idle_o,
  output logic     pwr_good_o
);

  logic     gclk, alu_rst_n, alu_ready, alu_idle, supply_good, up_q;
  alu_rsp_t alu_rsp;

  hdp_power_switch #(.WAKE_CYCLES(WAKE_CYCLES)) u_psw (
    .clk_i, .rst_ni, .on_i(pwr_on_i), .pwr_good_o(supply_good)
  );

  // domain up one cycle after the supply is good (that cycle clocks the reset)
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)           up_q <= 1'b0;
    else if (!supply_good) up_q <= 1'b0;
    else                   up_q <= 1'b1;
  end

  // down as soon as the supply is lost
  assign pwr_good_o = up_q & supply_good;

  hdp_icg u_icg (.clk_i, .en_i(clk_en_i | (supply_good & !up_q)), .clk_o(gclk));

  assign alu_rst_n = rst_ni & pwr_good_o;

  hdp_alu u_alu (
    .clk_i(gclk), .rst_ni(alu_rst_n), .req_i,
    .ready_o(alu_ready), .rsp_o(alu_rsp), .idle_o(alu_idle)
  );

  assign ready_o = pwr_good_o & alu_ready;
  assign rsp_o   = pwr_good_o ? alu_rsp : '0;
  assign idle_o  = !pwr_good_o | alu_idle;

endmodule

// hdp_power_switch: behavioural model of the power switch of one HDP ALU
// domain.
//
// The real part is a header switch (analog, process-specific) that connects
// the domain's virtual supply to the global supply. This model only captures
// what the rest of the HDP sees: after on_i rises, the supply takes
// WAKE_CYCLES clock cycles to settle, and only then is pwr_good_o raised.
// When on_i falls, pwr_good_o falls at the next clock edge.
//
// Timing: on_i high from cycle c on gives pwr_good_o high from cycle
// c + WAKE_CYCLES on. The wake-up time is not given numerically for the HDP
// (only that the whole switch takes tens of cycles); 8 cycles is this
// model's assumption.
module hdp_power_switch #(
  parameter int unsigned WAKE_CYCLES = 8
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic on_i,
  output logic pwr_good_o
);

  localparam int unsigned CW = $clog2(WAKE_CYCLES + 1);
  logic [CW-1:0] ramp_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ramp_q     <= '0;
      pwr_good_o <= 1'b0;
    end else if (!on_i) begin
      ramp_q     <= '0;
      pwr_good_o <= 1'b0;
    end else if (!pwr_good_o) begin
      if (ramp_q == CW'(WAKE_CYCLES - 1)) pwr_good_o <= 1'b1;
      else                                ramp_q     <= ramp_q + 1'b1;
    end
  end

endmodule

// tb_hdp_icg: self-checking testbench of hdp_icg.
//
// Toggles the enable at random points of the high and low clock phases and
// checks that the gated clock follows the input clock exactly in the cycles
// whose enable was high before the rising edge, and never produces a pulse
// shorter than the high phase.
module tb_hdp_icg;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0;
  realtime t_rise;
  bit      seen_rise = 0;

  hdp_icg dut (.clk_i(clk), .en_i(en), .clk_o(gclk));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $realtime, msg); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // glitch check: every gated pulse lasts a full high phase
  always @(posedge gclk) begin t_rise = $realtime; seen_rise = 1; end
  always @(negedge gclk) if (seen_rise) check($realtime - t_rise > 4.99, "short gated pulse");

  initial begin
    bit en_at_edge;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      // change enable somewhere in the low phase (time 0..4 after negedge)
      #($urandom_range(1, 4));
      en = $urandom_range(0, 1);
      en_at_edge = en;
      @(posedge clk);
      #0.5;
      check(gclk == en_at_edge, $sformatf("gated clock %0b with enable %0b", gclk, en_at_edge));
      if (en_at_edge) n_on++; else n_off++;
      // change enable in the high phase: must not affect this pulse
      #($urandom_range(1, 3));
      en = $urandom_range(0, 1);
      #0.5;
      check(gclk == en_at_edge, "enable change in high phase leaked");
      @(negedge clk);
      #0.1;
      check(gclk == 1'b0, "gated clock high while clock low");
    end
    check(n_on > 0 && n_off > 0, "both enable values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

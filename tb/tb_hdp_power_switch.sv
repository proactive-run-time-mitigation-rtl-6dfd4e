// tb_hdp_power_switch: self-checking testbench of hdp_power_switch.
//
// Turns the switch on for random lengths of time and checks that power good
// rises exactly WAKE_CYCLES cycles after the request, stays high while on,
// and falls one cycle after the switch is turned off, also when it is
// turned off before the supply has settled.
module tb_hdp_power_switch;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned WAKE = 8;
  logic clk = 0, rst_n = 0, on = 0, pg;
  int checks = 0, failures = 0;

  hdp_power_switch #(.WAKE_CYCLES(WAKE)) dut (.clk_i(clk), .rst_ni(rst_n), .on_i(on), .pwr_good_o(pg));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $realtime, msg); end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!pg, "off after reset");
    for (int n = 0; n < 200; n++) begin
      len = $urandom_range(1, 20);
      @(posedge clk); #1 on = 1;
      for (int c = 1; c <= len; c++) begin
        @(posedge clk); #1;
        check(pg == (c >= int'(WAKE)), $sformatf("cycle %0d after on: pg=%0b", c, pg));
      end
      on = 0;
      @(posedge clk); #1;
      check(!pg, "off one cycle after on_i falls");
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        check(!pg, "stays off");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

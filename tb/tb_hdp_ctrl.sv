// tb_hdp_ctrl: self-checking testbench of hdp_ctrl, the HDP switch sequencer.
//
// The testbench plays the ALU domains and the clock generator. For random
// mode changes it holds the old ALU busy for a random drain time (up to the
// 66-cycle divide), lets the target's supply settle after a random wake-up
// time and acknowledges the clock change after a random lock time, then
// checks cycle by cycle:
//   - the target is powered in the cycle after the request
//   - the switch happens in the first cycle where the old ALU is idle and the
//     target's supply is good, together with the clock request for the target
//   - issue is stalled from the request until the clock is acknowledged
//   - one cycle later the old clock is gated, one more and it is unpowered
// It also checks the stall after reset until the fast ALU's supply is good.
module tb_hdp_ctrl;
  import hdp_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic             clk = 0, rst_n = 0, clk_ack = 0, stall, clk_req, switching;
  hdp_mode_e        req_mode, active, clk_sel;
  logic [N_ALU-1:0] idle, pwr_good, pwr_on, clk_en;
  int checks = 0, failures = 0;
  int n_drain = 0;

  hdp_ctrl dut (.clk_i(clk), .rst_ni(rst_n), .req_mode_i(req_mode), .alu_idle_i(idle),
                .pwr_good_i(pwr_good), .clk_ack_i(clk_ack), .active_o(active), .stall_o(stall),
                .pwr_on_o(pwr_on), .clk_en_o(clk_en), .clk_req_o(clk_req), .clk_sel_o(clk_sel),
                .switching_o(switching));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $realtime, msg); end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hdp_mode_e old, tgt;
    int drain, wake, lock, t;
    req_mode = MODE_FAST; idle = '1; pwr_good = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(active == MODE_FAST && pwr_on == 3'b001 && clk_en == 3'b001, "reset state");
    check(stall, "stall while fast ALU supply not good");
    step();
    pwr_good = 3'b001;
    #1 check(!stall && !switching, "no stall once powered");
    for (int n = 0; n < 300; n++) begin
      old = active;
      do tgt = hdp_mode_e'($urandom_range(0, 2)); while (tgt == old);
      drain = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, DIV_LATENCY);
      wake  = $urandom_range(1, 12);
      lock  = $urandom_range(1, 12);
      // request
      req_mode = tgt;
      idle[old] = (drain == 0);
      #1 check(stall, "stall in the request cycle");
      step();
      check(pwr_on[tgt] && !clk_en[tgt] && switching && stall, "target powered after request");
      // drain and wake-up in parallel
      t = 0;
      while (!(idle[old] && pwr_good[tgt])) begin
        t++;
        if (t >= drain) idle[old] = 1'b1;
        if (t >= wake)  pwr_good[tgt] = 1'b1;
        #1;
        check(active == old && stall && !clk_req, "no switch before drain and wake-up");
        if (!idle[old]) n_drain++;
        if (!(idle[old] && pwr_good[tgt])) step();
      end
      step();
      check(active == tgt && clk_req && clk_sel == tgt, "switch and clock request");
      check(clk_en[tgt] && clk_en[old] && pwr_on[old], "both clocked during the switch");
      for (int c = 0; c < lock; c++) begin
        check(stall, "stall until clock acknowledged");
        step();
        check(!clk_req, "single clock request pulse");
      end
      clk_ack = 1;
      #1 check(stall, "stall in the acknowledge cycle");
      step();
      clk_ack = 0;
      #1 check(!stall && switching && clk_en[old], "issue resumes after acknowledge");
      step();
      check(!clk_en[old] && pwr_on[old], "old clock gated first");
      step();
      pwr_good[old] = 1'b0;
      check(!pwr_on[old] && !switching, "old supply off, switch done");
      check(clk_en == (N_ALU'(1) << tgt) && pwr_on == clk_en, "only target clocked and powered");
      repeat ($urandom_range(0, 3)) begin
        step();
        check(!switching && !stall, "stays in run");
      end
    end
    check(n_drain > 0, "drain waits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hdp_alu_domain: self-checking testbench of hdp_alu_domain, one gated
// ALU domain.
//
// Checks that the domain reports itself up exactly WAKE_CYCLES + 1 cycles
// after power-on, that its outputs are clamped (not ready, no response,
// idle) while it is down, that an ALU powered off in the middle of a divide
// comes back clean after the next wake-up (no stray result, idle, ready),
// that a clock-gated but powered domain holds its state, and that
// operations give the reference results once the domain is up and clocked.
module tb_hdp_alu_domain;
  import hdp_pkg::*;
  import hdp_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned WAKE = 8;
  logic     clk = 0, rst_n = 0, pwr_on = 0, clk_en = 0, ready, idle, up;
  alu_req_t req;
  alu_rsp_t rsp;
  int checks = 0, failures = 0;

  hdp_alu_domain #(.WAKE_CYCLES(WAKE)) dut (
    .clk_i(clk), .rst_ni(rst_n), .pwr_on_i(pwr_on), .clk_en_i(clk_en),
    .req_i(req), .ready_o(ready), .rsp_o(rsp), .idle_o(idle), .pwr_good_o(up)
  );

  always #1 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $realtime, msg); end
  endtask

  task automatic step();
    @(posedge clk); #0.1;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wake();
    pwr_on = 1;
    for (int c = 1; c <= int'(WAKE) + 1; c++) begin
      step();
      check(up == (c == int'(WAKE) + 1), $sformatf("up at cycle %0d: %0b", c, up));
      if (!up) check(!ready && !rsp.valid && idle, "outputs clamped while down");
    end
  endtask

  task automatic run(alu_op_e op, logic [63:0] a, logic [63:0] b);
    int t;
    req = '{valid: 1'b1, op: op, a: a, b: b};
    step();
    req = '0;
    t = 1;
    while (!rsp.valid && t < 100) begin step(); t++; end
    check(rsp.valid && rsp.result == ref_alu(op, a, b), $sformatf("%s result", op.name()));
    check(t == int'(ref_latency(op)), $sformatf("%s latency %0d", op.name(), t));
    step();
  endtask

  initial begin
    req = '0;
    repeat (2) step();
    rst_n = 1;
    step();
    check(!up && !ready && idle, "down after reset");
    for (int n = 0; n < 20; n++) begin
      wake();
      clk_en = 1;
      step();
      check(ready && idle && !rsp.valid, "clean after wake-up");
      run(OP_ADD, {$urandom, $urandom}, {$urandom, $urandom});
      run(OP_MULH, rand_operand(), rand_operand());
      run(OP_REM, rand_operand(), rand_operand());
      // start a divide, gate the clock for a while: state must hold
      req = '{valid: 1'b1, op: OP_DIVU, a: 64'd5000, b: 64'd7};
      step();
      req = '0;
      repeat (10) step();
      clk_en = 0;
      repeat (30) begin step(); check(!idle && !rsp.valid, "gated domain holds its divide"); end
      if (n % 2 == 0) begin
        // resume: the divide finishes 66 clocked cycles after issue
        clk_en = 1;
        while (!rsp.valid) step();
        check(rsp.result == 64'd714, "divide resumes after clock gating");
        step();
      end else begin
        // power off mid-divide: the next wake-up must start clean
        pwr_on = 0;
        step();
        check(!up && !ready && !rsp.valid && idle, "clamped after power-off");
        repeat ($urandom_range(0, 5)) step();
        continue;
      end
      clk_en = 0;
      step();
      pwr_on = 0;
      step();
      check(!up, "down after power-off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

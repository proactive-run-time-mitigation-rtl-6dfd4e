// tb_hdp_alu: self-checking testbench of hdp_alu.
//
// Issues every operation with directed corner operands and random operands,
// one at a time, and checks each result against hdp_ref_pkg and its latency
// (1 cycle basic, 2 multiply, 66 divide). Then issues a burst of single-cycle
// operations in consecutive cycles to check one-per-cycle throughput, and
// checks ready/idle around a divide.
module tb_hdp_alu;
  import hdp_pkg::*;
  import hdp_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  alu_req_t req;
  logic     ready, idle;
  alu_rsp_t rsp;
  int       checks = 0, failures = 0;
  longint   cycle = 0;

  always #1 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hdp_alu dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .ready_o(ready), .rsp_o(rsp), .idle_o(idle));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // issue one op, wait for its result, check value and latency
  task automatic run_op(alu_op_e op, logic [63:0] a, logic [63:0] b);
    longint t0;
    logic [63:0] exp;
    exp = ref_alu(op, a, b);
    while (!ready) @(posedge clk);
    req = '{valid: 1'b1, op: op, a: a, b: b};
    t0 = cycle;
    @(posedge clk); #0.1;
    req = '0;
    while (!rsp.valid) begin
      check(!ready || ref_latency(op) == 1, "ready while busy");
      @(posedge clk); #0.1;
    end
    check(rsp.result == exp, $sformatf("%s a=%h b=%h got %h exp %h", op.name(), a, b, rsp.result, exp));
    check(cycle - t0 == longint'(ref_latency(op)),
          $sformatf("%s latency %0d exp %0d", op.name(), cycle - t0, ref_latency(op)));
    @(posedge clk); #0.1;
  endtask

  logic [63:0] corner [6] = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000, 64'h0000_0000_8000_0000, 64'h7fff_ffff_ffff_ffff};

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e op;
    logic [63:0] burst_a [8];
    int got;
    req = '0;
    repeat (3) @(posedge clk);
    #0.1 rst_n = 1'b1;
    @(posedge clk); #0.1;
    check(idle && ready, "idle after reset");
    // directed corners for every operation
    for (int o = 0; o < N_OPS; o++) begin
      op = alu_op_e'(o);
      foreach (corner[i]) foreach (corner[j]) run_op(op, corner[i], corner[j]);
    end
    // random
    for (int n = 0; n < 3000; n++) begin
      op = alu_op_e'($urandom_range(0, N_OPS - 1));
      run_op(op, rand_operand(), rand_operand());
    end
    // back-to-back single-cycle ops: one result per cycle
    foreach (burst_a[i]) burst_a[i] = {$urandom, $urandom};
    got = 0;
    fork
      begin
        foreach (burst_a[i]) begin
          req = '{valid: 1'b1, op: OP_ADD, a: burst_a[i], b: 64'(i)};
          @(posedge clk); #0.1;
        end
        req = '0;
      end
      begin
        @(posedge clk); #0.1;
        repeat (8) begin
          check(rsp.valid && rsp.result == burst_a[got] + 64'(got), "burst result");
          got++;
          @(posedge clk); #0.1;
        end
      end
    join
    // idle low while a divide is in flight
    req = '{valid: 1'b1, op: OP_DIVU, a: 64'd1000, b: 64'd7};
    @(posedge clk); #0.1;
    req = '0;
    check(!idle && !ready, "busy during divide");
    repeat (65) @(posedge clk);
    #0.1;
    check(rsp.valid && !idle && rsp.result == 64'd142, "divide result pending");
    @(posedge clk); #0.1;
    check(idle, "idle after divide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hdp_top: end-to-end testbench of the heterogeneous datapath at its
// default parameters.
//
// A clock generator model supplies the core clock at the frequency of the
// active mode. One process issues a stream of random ALU operations (one in
// ten a divide) and a scoreboard checks every result, in order, against
// hdp_ref_pkg. A second process writes the HDP CSR with new modes, often
// while a divide is in flight, and also tries the unused mode encoding.
// Monitors check and count:
//   - each mode became active and the clock period matches its frequency
//   - drain waits (switch held back by an operation in the old ALU)
//   - wake-ups, clock-frequency changes, clock gating, power gating
//   - issue stalls during a switch
//   - no rising edge on the gated clock of an idle ALU outside a switch
//   - switch time within 66 + wake-up + clock lock + a few cycles, and
//     exactly 1 + (WAKE_CYCLES + 2) + (LOCK_CYCLES + 1) + 1 = 23 stalled
//     cycles when the old ALU is already idle
// Every mechanism must occur at least once.
module tb_hdp_top;
  import hdp_pkg::*;
  import hdp_ref_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned LOCK_CYCLES = 10;
  localparam int unsigned N_ISSUE     = 4000;

  logic            clk, rst_n;
  alu_req_t        req;
  logic            ready;
  alu_rsp_t        rsp;
  logic            csr_we;
  logic [11:0]     csr_addr;
  logic [63:0]     csr_wdata, csr_rdata;
  logic            csr_hit, clk_req, clk_ack, switching;
  hdp_mode_e       clk_sel, active;

  hdp_clkgen_model #(.LOCK_CYCLES(LOCK_CYCLES)) u_clkgen (
    .sel_i(clk_sel), .req_i(clk_req), .clk_o(clk), .ack_o(clk_ack)
  );

  hdp_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_i(req), .ready_o(ready), .rsp_o(rsp),
    .csr_we_i(csr_we), .csr_addr_i(csr_addr), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit),
    .clk_req_o(clk_req), .clk_sel_o(clk_sel), .clk_ack_i(clk_ack),
    .active_o(active), .switching_o(switching)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  // mechanism counters
  int n_active [3];
  int n_drain_wait = 0, n_wake = 0, n_clk_change = 0, n_clk_gate = 0;
  int n_pwr_gate = 0, n_stall = 0, n_switch = 0, n_results = 0, n_div = 0;
  int n_period_ok [3];
  // stall runs: length of each switch stall that had no drain wait
  int run_len = 0, n_quick_switch = 0;
  bit run_drained = 0, run_switch = 0;
  localparam int unsigned QUICK_STALL = 1 + (8 + 2) + (LOCK_CYCLES + 1) + 1;

  logic [63:0] exp_q [$];
  bit          done_issue = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- issue process ----------------
  task automatic issue(alu_op_e op, logic [63:0] a, logic [63:0] b);
    bit taken;
    req = '{valid: 1'b1, op: op, a: a, b: b};
    do begin
      @(negedge clk);
      taken = ready;
      if (!taken && switching) n_stall++;
      @(posedge clk); #1;
    end while (!taken);
    exp_q.push_back(ref_alu(op, a, b));
    if (is_div(op)) n_div++;
    req = '0;
  endtask

  // ---------------- CSR write ----------------
  task automatic csr_write(logic [63:0] v);
    csr_we = 1'b1; csr_addr = CSR_HDP_ADDR; csr_wdata = v;
    @(posedge clk); #1;
    csr_we = 1'b0; csr_addr = '0; csr_wdata = '0;
  endtask

  // ---------------- scoreboard and monitors ----------------
  logic [2:0]  clk_en_prev, pwr_on_prev, pwr_good_prev;
  logic        sw_prev = 0;
  longint      sw_start = 0;
  realtime     t_last = 0;
  int          gated_edges [3];

  for (genvar i = 0; i < 3; i++) begin : g_mon
    // rising edges of a gated clock while its ALU should be idle
    always @(posedge dut.g_dom[i].u_dom.gclk)
      if (rst_n && !switching && active != hdp_mode_e'(i)) gated_edges[i]++;
  end

  always @(negedge clk) if (rst_n) begin
    if (rsp.valid) begin
      n_results++;
      if (exp_q.size() == 0) check(0, "unexpected result");
      else check(rsp.result == exp_q.pop_front(), $sformatf("result %h", rsp.result));
    end
    if (switching && !dut.idle[dut.u_ctrl.active_q] && dut.u_ctrl.state_q == dut.u_ctrl.S_WAKE_DRAIN) begin
      n_drain_wait++;
      run_drained = 1;
    end
    if (dut.stall) begin
      run_len++;
      if (switching) run_switch = 1;
    end else if (run_len > 0) begin
      if (run_switch && !run_drained) begin
        n_quick_switch++;
        check(run_len == int'(QUICK_STALL), $sformatf("switch stall %0d cycles, expected %0d", run_len, QUICK_STALL));
      end
      run_len = 0; run_drained = 0; run_switch = 0;
    end
    n_wake       += $countones(dut.pwr_good & ~pwr_good_prev);
    n_clk_gate   += $countones(clk_en_prev & ~dut.clk_en);
    n_pwr_gate   += $countones(pwr_on_prev & ~dut.pwr_on);
    if (clk_ack) n_clk_change++;
    if (!switching) n_active[active]++;
    if (switching && !sw_prev) begin sw_start = cycle; n_switch++; end
    if (!switching && sw_prev)
      check(cycle - sw_start <= longint'(DIV_LATENCY + 8 + LOCK_CYCLES + 6),
            $sformatf("switch took %0d cycles", cycle - sw_start));
    clk_en_prev   = dut.clk_en;
    pwr_on_prev   = dut.pwr_on;
    pwr_good_prev = dut.pwr_good;
    sw_prev       = switching;
  end

  // clock period of the active mode, measured outside switches
  always @(posedge clk) begin
    if (rst_n && !switching && !sw_prev && t_last > 0) begin
      realtime p, e;
      p = $realtime - t_last;
      e = (active == MODE_FAST) ? 271.0 : (active == MODE_MID) ? 295.0 : 406.5;
      if (p > e - 0.01 && p < e + 0.01) n_period_ok[active]++;
    end
    t_last = $realtime;
  end

  initial begin
    rst_n = 1'b0; req = '0; csr_we = 0; csr_addr = '0; csr_wdata = '0;
    clk_en_prev = '0; pwr_on_prev = '0; pwr_good_prev = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    clk_en_prev = dut.clk_en; pwr_on_prev = dut.pwr_on; pwr_good_prev = dut.pwr_good;
    fork
      begin : issuer
        for (int n = 0; n < N_ISSUE; n++) begin
          alu_op_e op;
          if ($urandom_range(0, 9) == 0)
            op = alu_op_e'($urandom_range(int'(OP_DIV), int'(OP_REMUW)));
          else
            op = alu_op_e'($urandom_range(0, int'(OP_DIV) - 1));
          issue(op, rand_operand(), rand_operand());
          if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
          #1;
        end
        done_issue = 1;
      end
      begin : switcher
        // directed: read back reset state, try the unused encoding
        @(posedge clk); #1;
        csr_addr = CSR_HDP_ADDR; #1;
        check(csr_hit && csr_rdata[1:0] == 2'(MODE_FAST) && csr_rdata[3:2] == 2'(MODE_FAST), "CSR reset value");
        csr_addr = '0;
        csr_write(64'd3);
        csr_addr = CSR_HDP_ADDR; #1;
        check(csr_rdata[1:0] == 2'(MODE_FAST), "unused mode ignored");
        csr_addr = '0;
        while (!done_issue) begin
          hdp_mode_e m;
          repeat ($urandom_range(100, 400)) @(posedge clk);
          #1;
          // often wait until a divide is in flight, to force a drain wait
          if ($urandom_range(0, 1) == 1) begin
            int guard;
            guard = 0;
            while (!(dut.u_ctrl.active_q == active && !dut.idle[active]
                     && dut.dom_ready[active] == 0) && guard < 200) begin
              @(posedge clk); #1; guard++;
            end
          end
          do m = hdp_mode_e'($urandom_range(0, 2)); while (m == active);
          csr_write(64'(m));
          wait (switching == 1'b1);
          wait (switching == 1'b0);
          @(posedge clk); #1;
          csr_addr = CSR_HDP_ADDR; #1;
          check(csr_rdata[3:2] == 2'(m) && active == m && !csr_rdata[4], "CSR active mode after switch");
          csr_addr = '0;
        end
      end
    join
    repeat (80) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d results missing", exp_q.size()));
    for (int i = 0; i < 3; i++) begin
      check(n_active[i] > 0, $sformatf("mode %0d never active", i));
      check(n_period_ok[i] > 0, $sformatf("mode %0d clock period never seen", i));
      check(gated_edges[i] == 0, $sformatf("gated clock of idle ALU %0d toggled %0d times", i, gated_edges[i]));
    end
    check(n_switch > 0, "no mode switch");
    check(n_drain_wait > 0, "no drain wait");
    check(n_wake > 0, "no wake-up");
    check(n_clk_change > 0, "no clock-frequency change");
    check(n_clk_gate > 0, "no clock gating");
    check(n_pwr_gate > 0, "no power gating");
    check(n_stall > 0, "no issue stall");
    check(n_quick_switch > 0, "no switch without drain wait");
    check(n_results == N_ISSUE, $sformatf("results %0d", n_results));
    $display("quick_switches=%0d switches=%0d drain_wait_cycles=%0d wakeups=%0d clk_changes=%0d clk_gates=%0d pwr_gates=%0d stalls=%0d divides=%0d",
             n_quick_switch, n_switch, n_drain_wait, n_wake, n_clk_change, n_clk_gate, n_pwr_gate, n_stall, n_div);
    $display("cycles in mode fast/mid/slow = %0d/%0d/%0d", n_active[0], n_active[1], n_active[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

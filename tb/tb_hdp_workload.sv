// tb_hdp_workload: job-stream workload on the heterogeneous datapath at its
// default parameters.
//
// Replays the shape of a streaming run: 10 frames of 10 jobs each. Before
// every job the scheduler (played by this testbench) writes the HDP CSR with
// the job's mode, following the three phases of a typical mitigated run:
// the first 20 jobs in fast mode to build slack, jobs 20..89 alternating
// between the neighbouring mid and slow modes, the last 10 jobs in slow mode
// to use up the remaining slack. Each job is a stream of JOB_OPS ALU
// operations (1% divides, 4% multiplies, the rest single-cycle), issued
// back to back and checked against the reference model.
//
// It checks that every result is correct, that the number of mode switches
// equals the number of mode changes in the schedule, and that the cycles
// lost to switching stay below 0.5% of the run. Jobs last about a hundred
// microseconds or more, so one switch per job should cost well under 0.1%.
// The run takes about a minute of simulation time.
// The frame time in each phase is printed.
module tb_hdp_workload;
  import hdp_pkg::*;
  import hdp_ref_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned FRAMES        = 10;
  localparam int unsigned JOBS_PER_FRAME = 10;
  localparam int unsigned N_JOBS        = FRAMES * JOBS_PER_FRAME;
  localparam int unsigned JOB_OPS       = 250000;

  logic            clk, rst_n;
  alu_req_t        req;
  logic            ready;
  alu_rsp_t        rsp;
  logic            csr_we;
  logic [11:0]     csr_addr;
  logic [63:0]     csr_wdata, csr_rdata;
  logic            csr_hit, clk_req, clk_ack, switching;
  hdp_mode_e       clk_sel, active;

  hdp_clkgen_model u_clkgen (.sel_i(clk_sel), .req_i(clk_req), .clk_o(clk), .ack_o(clk_ack));

  hdp_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_i(req), .ready_o(ready), .rsp_o(rsp),
    .csr_we_i(csr_we), .csr_addr_i(csr_addr), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit),
    .clk_req_o(clk_req), .clk_sel_o(clk_sel), .clk_ack_i(clk_ack),
    .active_o(active), .switching_o(switching)
  );

  int     checks = 0, failures = 0;
  longint cycle = 0, switch_cycles = 0, n_switch = 0, n_results = 0, n_issued = 0;
  int     n_job_mode [3];
  logic [63:0] exp_q [$];
  bit     sw_prev = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  function automatic hdp_mode_e job_mode(int j);
    if (j < 20) return MODE_FAST;
    if (j >= 90) return MODE_SLOW;
    return (j % 2 == 0) ? MODE_MID : MODE_SLOW;
  endfunction

  initial begin : watchdog
    repeat (100000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (rsp.valid) begin
      n_results++;
      if (exp_q.size() == 0) check(0, "unexpected result");
      else check(rsp.result == exp_q.pop_front(), $sformatf("result %h", rsp.result));
    end
    // cycles in which issue is held back by a mode switch
    if (dut.stall && (switching || dut.req_mode != active)) switch_cycles++;
    if (switching && !sw_prev) n_switch++;
    sw_prev = switching;
  end

  initial begin
    int          expected_switches = 0;
    hdp_mode_e   prev_mode = MODE_FAST;
    realtime     t_frame;
    longint      c_start;
    rst_n = 1'b0; req = '0; csr_we = 0; csr_addr = '0; csr_wdata = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (dut.pwr_good[MODE_FAST]);
    @(posedge clk); #1;
    c_start = cycle;
    t_frame = $realtime;
    for (int j = 0; j < int'(N_JOBS); j++) begin
      hdp_mode_e m;
      m = job_mode(j);
      if (m != prev_mode) expected_switches++;
      prev_mode = m;
      n_job_mode[m]++;
      // the scheduler's CSR write at the job boundary
      csr_we = 1'b1; csr_addr = CSR_HDP_ADDR; csr_wdata = 64'(m);
      @(posedge clk); #1;
      csr_we = 1'b0; csr_addr = '0; csr_wdata = '0;
      for (int n = 0; n < int'(JOB_OPS); n++) begin
        alu_op_e op;
        bit taken;
        int r;
        r = $urandom_range(0, 99);
        if (r == 0)      op = alu_op_e'($urandom_range(int'(OP_DIV), int'(OP_REMUW)));
        else if (r < 5)  op = alu_op_e'($urandom_range(int'(OP_MUL), int'(OP_MULW)));
        else             op = alu_op_e'($urandom_range(0, int'(OP_MUL) - 1));
        req = '{valid: 1'b1, op: op, a: {$urandom, $urandom}, b: {$urandom, $urandom}};
        do begin
          @(negedge clk);
          taken = ready;
          @(posedge clk); #1;
        end while (!taken);
        exp_q.push_back(ref_alu(req.op, req.a, req.b));
        n_issued++;
      end
      req = '0;
      if (j % JOBS_PER_FRAME == JOBS_PER_FRAME - 1) begin
        $display("frame %0d: %0.1f us, last mode %s", j / JOBS_PER_FRAME,
                 ($realtime - t_frame) / 1.0e6, m.name());
        t_frame = $realtime;
      end
    end
    repeat (100) @(posedge clk);
    begin
      real overhead;
      overhead = 100.0 * real'(switch_cycles) / real'(cycle - c_start);
      $display("jobs=%0d ops=%0d cycles=%0d switches=%0d switch_cycles=%0d overhead=%0.3f%%",
               N_JOBS, n_issued, cycle - c_start, n_switch, switch_cycles, overhead);
      check(overhead < 0.5, $sformatf("switch overhead %0.3f%%", overhead));
    end
    check(n_results == n_issued && exp_q.size() == 0, "all results returned");
    check(n_switch == longint'(expected_switches),
          $sformatf("switches %0d expected %0d", n_switch, expected_switches));
    check(active == MODE_SLOW, "ends in slow mode");
    for (int i = 0; i < 3; i++) check(n_job_mode[i] > 0, "each mode used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hdp_mux: self-checking testbench of hdp_mux.
//
// Drives a different random response and ready on each input and checks
// that the output is the one of the selected input, and that the unused
// select value 3 returns no response and not ready.
module tb_hdp_mux;
  import hdp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic [1:0] sel;
  alu_rsp_t   rsp_in [N_ALU];
  logic       rdy_in [N_ALU];
  alu_rsp_t   rsp;
  logic       rdy;
  int checks = 0, failures = 0;

  hdp_mux dut (.sel_i(sel), .rsp_i(rsp_in), .ready_i(rdy_in), .rsp_o(rsp), .ready_o(rdy));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      sel = 2'($urandom_range(0, 3));
      for (int i = 0; i < N_ALU; i++) begin
        rsp_in[i] = '{valid: 1'($urandom), result: {$urandom, $urandom}};
        rdy_in[i] = 1'($urandom);
      end
      #1;
      if (sel == 2'd3) check(rsp == '0 && !rdy, "unused select");
      else check(rsp == rsp_in[sel] && rdy == rdy_in[sel], $sformatf("select %0d", sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hdp_demux: self-checking testbench of hdp_demux.
//
// For random requests and every select value, checks that the selected
// output carries the request unchanged and every other output is all zero.
module tb_hdp_demux;
  import hdp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic [1:0] sel;
  alu_req_t   req;
  alu_req_t   out [N_ALU];
  int checks = 0, failures = 0;

  hdp_demux dut (.sel_i(sel), .req_i(req), .req_o(out));

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
      sel = 2'($urandom_range(0, N_ALU - 1));
      req = '{valid: 1'($urandom), op: alu_op_e'($urandom_range(0, N_OPS - 1)),
              a: {$urandom, $urandom}, b: {$urandom, $urandom}};
      #1;
      for (int i = 0; i < N_ALU; i++) begin
        if (i == int'(sel)) check(out[i] == req, $sformatf("selected output %0d", i));
        else                check(out[i] == '0, $sformatf("idle output %0d not zero", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

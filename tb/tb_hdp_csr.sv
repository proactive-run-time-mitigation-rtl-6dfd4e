// tb_hdp_csr: self-checking testbench of hdp_csr.
//
// Writes random values to the HDP CSR address and to other addresses and
// checks the requested-mode field (including that encoding 3 is ignored and
// that other addresses do not change it), the read-only status fields, the
// address hit and that other addresses read zero.
module tb_hdp_csr;
  import hdp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic        clk = 0, rst_n = 0, we = 0, hit, sw;
  logic [11:0] addr;
  logic [63:0] wdata, rdata;
  hdp_mode_e   mode, act;
  int checks = 0, failures = 0;

  hdp_csr dut (.clk_i(clk), .rst_ni(rst_n), .we_i(we), .addr_i(addr), .wdata_i(wdata),
               .rdata_o(rdata), .hit_o(hit), .mode_o(mode), .active_i(act), .switching_i(sw));

  always #5 clk = ~clk;

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
    logic [1:0] model;
    addr = '0; wdata = '0; act = MODE_FAST; sw = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = 2'd0;
    check(mode == MODE_FAST, "reset mode");
    for (int n = 0; n < 1000; n++) begin
      we    = 1'($urandom);
      addr  = ($urandom_range(0, 2) == 0) ? 12'($urandom) : 12'h7C0;
      wdata = {$urandom, $urandom};
      act   = hdp_mode_e'($urandom_range(0, 2));
      sw    = 1'($urandom);
      #1;
      check(hit == (addr == 12'h7C0), "hit");
      if (addr == 12'h7C0)
        check(rdata == {59'b0, sw, 2'(act), model}, $sformatf("read %h", rdata));
      else
        check(rdata == '0, "other address reads zero");
      @(posedge clk); #1;
      if (we && addr == 12'h7C0 && wdata[1:0] != 2'd3) model = wdata[1:0];
      check(2'(mode) == model, $sformatf("mode %0d exp %0d", mode, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// hdp_top: heterogeneous datapath (HDP), the ALU of the core with three
// speed/energy modes that software switches at run time.
//
// Three ALUs of identical function (fast, mid, slow) sit in separate clock-
// and power-gated domains. Only the active one is clocked and powered. The
// input demux sends each issued operation to the active ALU, the output mux
// returns its result. Software writes the requested mode into the HDP CSR;
// the control unit then drains the active ALU while waking the target,
// switches the demux/mux, asks the clock generator for the target's
// frequency, and finally clock-gates and power-gates the previous ALU.
//
// Interfaces:
//   issue/writeback  req_i/ready_o (valid/ready) and rsp_o (one-cycle valid)
//                    as seen by the core's execute stage
//   CSR              write enable, address, write data; read data and hit
//   clock generator  clk_req_o pulse with clk_sel_o = mode whose frequency
//                    is wanted; clk_ack_i pulse once it runs at it
//   status           active_o mode, switching_o
// clk_i is the core clock delivered by the clock generator.
//
// Timing: ALU latencies are those of hdp_alu (1, 2 or 66 cycles). During a
// switch ready_o is low for 1 cycle (request seen), then until both the old
// ALU has drained (up to 66 cycles) and the target domain is up
// (WAKE_CYCLES + 2 cycles), then 1 more, then until the clock generator's
// acknowledge has been seen: 23 cycles in all with an idle ALU and an
// acknowledge 11 cycles after the request.
//
// The structure follows the HDP description. Stalling issue for the whole
// switch, the handshake with the clock generator and the wake-up time are
// this design's choices.
module hdp_top
  import hdp_pkg::*;
#(
  parameter int unsigned WAKE_CYCLES = 8
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  alu_req_t        req_i,
  output logic            ready_o,
  output alu_rsp_t        rsp_o,
  input  logic            csr_we_i,
  input  logic [11:0]     csr_addr_i,
  input  logic [XLEN-1:0] csr_wdata_i,
  output logic [XLEN-1:0] csr_rdata_o,
  output logic            csr_hit_o,
  output logic            clk_req_o,
  output hdp_mode_e       clk_sel_o,
  input  logic            clk_ack_i,
  output hdp_mode_e       active_o,
  output logic            switching_o
);

  hdp_mode_e        req_mode, active;
  logic             stall, mux_ready;
  logic [N_ALU-1:0] idle, pwr_good, pwr_on, clk_en;
  alu_req_t         issue;
  alu_req_t         dom_req   [N_ALU];
  alu_rsp_t         dom_rsp   [N_ALU];
  logic             dom_ready [N_ALU];

  hdp_csr u_csr (
    .clk_i, .rst_ni,
    .we_i(csr_we_i), .addr_i(csr_addr_i), .wdata_i(csr_wdata_i),
    .rdata_o(csr_rdata_o), .hit_o(csr_hit_o),
    .mode_o(req_mode), .active_i(active), .switching_i(switching_o)
  );

  hdp_ctrl u_ctrl (
    .clk_i, .rst_ni,
    .req_mode_i(req_mode), .alu_idle_i(idle), .pwr_good_i(pwr_good), .clk_ack_i,
    .active_o(active), .stall_o(stall), .pwr_on_o(pwr_on), .clk_en_o(clk_en),
    .clk_req_o, .clk_sel_o, .switching_o
  );

  always_comb begin
    issue       = req_i;
    issue.valid = req_i.valid && !stall;
  end

  hdp_demux #(.N(N_ALU)) u_demux (.sel_i(active), .req_i(issue), .req_o(dom_req));

  for (genvar i = 0; i < N_ALU; i++) begin : g_dom
    hdp_alu_domain #(.WAKE_CYCLES(WAKE_CYCLES)) u_dom (
      .clk_i, .rst_ni,
      .pwr_on_i(pwr_on[i]), .clk_en_i(clk_en[i]),
      .req_i(dom_req[i]), .ready_o(dom_ready[i]), .rsp_o(dom_rsp[i]),
      .idle_o(idle[i]), .pwr_good_o(pwr_good[i])
    );
  end

  hdp_mux #(.N(N_ALU)) u_mux (
    .sel_i(active), .rsp_i(dom_rsp), .ready_i(dom_ready), .rsp_o, .ready_o(mux_ready)
  );

  assign ready_o  = mux_ready && !stall;
  assign active_o = active;

endmodule

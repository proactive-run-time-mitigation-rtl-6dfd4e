// hdp_demux: input demultiplexer of the heterogeneous datapath.
//
// Steers the request from the issue stage to the active ALU only. The
// request of every other ALU is held at zero (valid, operation and operands),
// so the idle, clock-gated ALUs see no input toggling. Purely combinational.
//
// The demux and its role follow the HDP description; zeroing the inputs of
// the idle ALUs is this design's choice.
module hdp_demux
  import hdp_pkg::*;
#(
  parameter int unsigned N = N_ALU
) (
  input  logic [$clog2(N)-1:0] sel_i,
  input  alu_req_t             req_i,
  output alu_req_t             req_o [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      req_o[i] = (sel_i == ($clog2(N))'(i)) ? req_i : '0;
    end
  end

endmodule

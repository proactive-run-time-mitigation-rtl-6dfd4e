// hdp_mux: output multiplexer of the heterogeneous datapath.
//
// Returns the response and the ready of the active ALU to the core and
// ignores the others. Purely combinational. An out-of-range select returns
// no response and not ready.
//
// Follows the HDP description; the bundle format is this design's choice.
module hdp_mux
  import hdp_pkg::*;
#(
  parameter int unsigned N = N_ALU
) (
  input  logic [$clog2(N)-1:0] sel_i,
  input  alu_rsp_t             rsp_i   [N],
  input  logic                 ready_i [N],
  output alu_rsp_t             rsp_o,
  output logic                 ready_o
);

  always_comb begin
    rsp_o   = '0;
    ready_o = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (sel_i == ($clog2(N))'(i)) begin
        rsp_o   = rsp_i[i];
        ready_o = ready_i[i];
      end
    end
  end

endmodule

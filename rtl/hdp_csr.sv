// hdp_csr: control and status register of the heterogeneous datapath.
//
// Software selects the HDP mode with an ordinary CSR-write instruction to
// address CSR_ADDR. Field layout (64-bit CSR):
//   [1:0] requested mode, read/write (0 fast, 1 mid, 2 slow); writing the
//         unused encoding 3 leaves the field unchanged (WARL)
//   [3:2] active mode, read-only (the ALU now in use)
//   [4]   switching, read-only (a mode switch is in progress)
// Other bits read as zero and ignore writes.
//
// Timing: a write in cycle c changes mode_o from cycle c+1 on. The read path
// is combinational: hit_o flags an access to CSR_ADDR so that the core's CSR
// file can select rdata_o. Reset selects the fast mode.
//
// That a CSR holds the mode and that writing it starts a switch follows the
// HDP description; the address, layout, status fields and reset value are
// this design's choices.
module hdp_csr
  import hdp_pkg::*;
#(
  parameter logic [11:0] CSR_ADDR = CSR_HDP_ADDR
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            we_i,
  input  logic [11:0]     addr_i,
  input  logic [XLEN-1:0] wdata_i,
  output logic [XLEN-1:0] rdata_o,
  output logic            hit_o,
  output hdp_mode_e       mode_o,
  input  hdp_mode_e       active_i,
  input  logic            switching_i
);

  assign hit_o = (addr_i == CSR_ADDR);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mode_o <= MODE_FAST;
    end else if (we_i && hit_o && wdata_i[1:0] != 2'd3) begin
      mode_o <= hdp_mode_e'(wdata_i[1:0]);
    end
  end

  assign rdata_o = hit_o ? {{(XLEN-5){1'b0}}, switching_i, active_i, mode_o} : '0;

endmodule

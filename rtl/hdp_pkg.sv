// hdp_pkg: types and constants shared by the heterogeneous-datapath (HDP) blocks.
//
// The HDP holds three ALUs of identical function (fast, mid, slow), of which
// exactly one is active. The mode encoding, the ALU operation set and the
// request/response bundles between the core, the input demux, the ALUs and
// the output mux are defined here.
//
// The three modes and the 66-cycle worst-case ALU latency come from the HDP
// description. The 64-bit data width follows the RV64 Ariane core that hosts
// the HDP. The operation encoding, the 2-cycle multiply and the CSR address
// are this design's own choices.
package hdp_pkg;

  localparam int unsigned XLEN  = 64;
  localparam int unsigned N_ALU = 3;

  // Worst-case latency of any ALU operation (the serial divider), in cycles
  // from the cycle an operation is issued to the cycle its result is valid.
  localparam int unsigned DIV_LATENCY = 66;
  localparam int unsigned MUL_LATENCY = 2;

  // HDP mode = index of the active ALU.
  typedef enum logic [1:0] {
    MODE_FAST = 2'd0,
    MODE_MID  = 2'd1,
    MODE_SLOW = 2'd2
  } hdp_mode_e;

  // CSR that holds the requested HDP mode (custom machine read/write space).
  localparam logic [11:0] CSR_HDP_ADDR = 12'h7C0;

  typedef enum logic [5:0] {
    OP_ADD, OP_SUB, OP_ADDW, OP_SUBW,
    OP_XOR, OP_OR, OP_AND,
    OP_SLL, OP_SRL, OP_SRA, OP_SLLW, OP_SRLW, OP_SRAW,
    OP_SLT, OP_SLTU,
    OP_EQ, OP_NE, OP_LTS, OP_GES, OP_LTU, OP_GEU,
    OP_MUL, OP_MULH, OP_MULHU, OP_MULHSU, OP_MULW,
    OP_DIV, OP_DIVU, OP_REM, OP_REMU,
    OP_DIVW, OP_DIVUW, OP_REMW, OP_REMUW
  } alu_op_e;

  localparam int unsigned N_OPS = 34;

  typedef struct packed {
    logic            valid;
    alu_op_e         op;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
  } alu_req_t;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] result;
  } alu_rsp_t;

  function automatic logic is_mul(alu_op_e op);
    return op inside {OP_MUL, OP_MULH, OP_MULHU, OP_MULHSU, OP_MULW};
  endfunction

  function automatic logic is_div(alu_op_e op);
    return op inside {OP_DIV, OP_DIVU, OP_REM, OP_REMU, OP_DIVW, OP_DIVUW, OP_REMW, OP_REMUW};
  endfunction

endpackage

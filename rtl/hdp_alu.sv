// hdp_alu: one RV64 integer ALU of the heterogeneous datapath.
//
// The HDP contains three copies of this unit (fast, mid, slow). They compute
// the same function and differ only in their physical implementation
// (threshold-voltage mix and target clock), so one RTL module serves all three.
//
// Operations (hdp_pkg::alu_op_e): add/sub (also the 32-bit W forms), logic,
// shifts, set-less-than, branch compares (result 0/1), multiply and divide /
// remainder in all RV64M forms, with the RISC-V results for division by zero
// and signed overflow.
//
// Interface: valid/ready request bundle (req_i, ready_o); response bundle
// rsp_o whose valid is a one-cycle pulse (the writeback always accepts).
// idle_o is high when nothing is in flight and no result is pending, which
// is what the HDP control unit waits for before it switches ALUs.
//
// Timing: an operation presented with ready_o high in cycle c is accepted at
// the end of c. Single-cycle operations return in cycle c+1 and a new one can
// be accepted every cycle. Multiplies return in c+2. Divides use a radix-2
// restoring divider (1 load cycle, 64 iterations, 1 sign-fix cycle) and return
// in c+66, the worst-case ALU latency stated for the HDP. ready_o is low while
// a multiply or divide is in flight.
//
// The 66-cycle worst case follows the HDP description; the operation set is
// that of the Ariane ALU and multiply/divide unit; the 2-cycle multiply and
// the single-issue restoring divider are this design's own choices.
module hdp_alu
  import hdp_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  alu_req_t req_i,
  output logic     ready_o,
  output alu_rsp_t rsp_o,
  output logic     idle_o
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV, S_FIX} state_e;

  state_e          state_q;
  alu_op_e         op_q;
  alu_rsp_t        rsp_q;

  // multiplier operands, sign- or zero-extended to 65 bits
  logic [XLEN:0]   ma_q, mb_q;
  // divider state
  logic [XLEN-1:0] quo_q, rem_q, dvs_q;
  logic [5:0]      cnt_q;
  logic            neg_q_q, neg_r_q;

  logic            fire;
  assign fire    = req_i.valid && (state_q == S_IDLE);
  assign ready_o = (state_q == S_IDLE);
  assign idle_o  = (state_q == S_IDLE) && !rsp_q.valid;
  assign rsp_o   = rsp_q;

  // ---------------------------------------------------------------------
  // single-cycle operations
  // ---------------------------------------------------------------------
  logic [XLEN-1:0] a, b, basic;
  logic [31:0]     w;
  logic [5:0]      shamt;
  logic [4:0]      shamt_w;

  assign a       = req_i.a;
  assign b       = req_i.b;
  assign shamt   = b[5:0];
  assign shamt_w = b[4:0];

  always_comb begin
    w     = '0;
    basic = '0;
    unique case (req_i.op)
      OP_ADD:  basic = a + b;
      OP_SUB:  basic = a - b;
      OP_ADDW: begin w = a[31:0] + b[31:0]; basic = {{32{w[31]}}, w}; end
      OP_SUBW: begin w = a[31:0] - b[31:0]; basic = {{32{w[31]}}, w}; end
      OP_XOR:  basic = a ^ b;
      OP_OR:   basic = a | b;
      OP_AND:  basic = a & b;
      OP_SLL:  basic = a << shamt;
      OP_SRL:  basic = a >> shamt;
      OP_SRA:  basic = XLEN'($signed(a) >>> shamt);
      OP_SLLW: begin w = a[31:0] << shamt_w; basic = {{32{w[31]}}, w}; end
      OP_SRLW: begin w = a[31:0] >> shamt_w; basic = {{32{w[31]}}, w}; end
      OP_SRAW: begin w = 32'($signed(a[31:0]) >>> shamt_w); basic = {{32{w[31]}}, w}; end
      OP_SLT, OP_LTS: basic = XLEN'($signed(a) < $signed(b));
      OP_SLTU, OP_LTU: basic = XLEN'(a < b);
      OP_GES:  basic = XLEN'($signed(a) >= $signed(b));
      OP_GEU:  basic = XLEN'(a >= b);
      OP_EQ:   basic = XLEN'(a == b);
      OP_NE:   basic = XLEN'(a != b);
      default: basic = '0;
    endcase
  end

  // ---------------------------------------------------------------------
  // operand preparation for multiply and divide
  // ---------------------------------------------------------------------
  logic            a_sgn, b_sgn, is_w;
  logic [XLEN-1:0] da, db, da_mag, db_mag;

  always_comb begin
    a_sgn = 1'b0;
    b_sgn = 1'b0;
    is_w  = req_i.op inside {OP_DIVW, OP_DIVUW, OP_REMW, OP_REMUW};
    unique case (req_i.op)
      OP_MULH, OP_DIV, OP_REM, OP_DIVW, OP_REMW: begin a_sgn = 1'b1; b_sgn = 1'b1; end
      OP_MULHSU:                                 a_sgn = 1'b1;
      default: ;
    endcase
    // the W forms divide the low words, extended as their signedness says
    if (is_w) begin
      da = a_sgn ? {{32{a[31]}}, a[31:0]} : {32'b0, a[31:0]};
      db = b_sgn ? {{32{b[31]}}, b[31:0]} : {32'b0, b[31:0]};
    end else begin
      da = a;
      db = b;
    end
    da_mag = (a_sgn && da[XLEN-1]) ? -da : da;
    db_mag = (b_sgn && db[XLEN-1]) ? -db : db;
  end

  // ---------------------------------------------------------------------
  // multiply result (from registered operands)
  // ---------------------------------------------------------------------
  logic [2*XLEN-1:0] prod;
  logic [XLEN-1:0]   mul_res;
  // context width 2*XLEN: the operands are sign-extended to it first
  assign prod = (2*XLEN)'($signed(ma_q) * $signed(mb_q));
  always_comb begin
    unique case (op_q)
      OP_MUL:  mul_res = prod[XLEN-1:0];
      OP_MULW: mul_res = {{32{prod[31]}}, prod[31:0]};
      default: mul_res = prod[2*XLEN-1:XLEN];
    endcase
  end

  // ---------------------------------------------------------------------
  // divider iteration and sign fix-up
  // ---------------------------------------------------------------------
  logic [XLEN:0]   rem_sh;
  logic            rem_ge;
  logic [XLEN-1:0] q_fix, r_fix, div_res;
  logic            op_w_q, op_rem_q;

  assign rem_sh = {rem_q, quo_q[XLEN-1]};
  assign rem_ge = rem_sh >= {1'b0, dvs_q};
  assign q_fix  = neg_q_q ? -quo_q : quo_q;
  assign r_fix  = neg_r_q ? -rem_q : rem_q;
  assign op_w_q   = op_q inside {OP_DIVW, OP_DIVUW, OP_REMW, OP_REMUW};
  assign op_rem_q = op_q inside {OP_REM, OP_REMU, OP_REMW, OP_REMUW};
  always_comb begin
    div_res = op_rem_q ? r_fix : q_fix;
    if (op_w_q) div_res = {{32{div_res[31]}}, div_res[31:0]};
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      op_q    <= OP_ADD;
      rsp_q   <= '0;
      ma_q    <= '0;
      mb_q    <= '0;
      quo_q   <= '0;
      rem_q   <= '0;
      dvs_q   <= '0;
      cnt_q   <= '0;
      neg_q_q <= 1'b0;
      neg_r_q <= 1'b0;
    end else begin
      rsp_q.valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (fire) begin
          op_q <= req_i.op;
          if (is_mul(req_i.op)) begin
            ma_q    <= {a_sgn & a[XLEN-1], a};
            mb_q    <= {b_sgn & b[XLEN-1], b};
            state_q <= S_MUL;
          end else if (is_div(req_i.op)) begin
            quo_q   <= da_mag;
            rem_q   <= '0;
            dvs_q   <= db_mag;
            cnt_q   <= '0;
            neg_q_q <= a_sgn && (da[XLEN-1] ^ db[XLEN-1]) && (db != '0);
            neg_r_q <= a_sgn && da[XLEN-1];
            state_q <= S_DIV;
          end else begin
            rsp_q <= '{valid: 1'b1, result: basic};
          end
        end
        S_MUL: begin
          rsp_q   <= '{valid: 1'b1, result: mul_res};
          state_q <= S_IDLE;
        end
        S_DIV: begin
          rem_q <= rem_ge ? rem_sh[XLEN-1:0] - dvs_q : rem_sh[XLEN-1:0];
          quo_q <= {quo_q[XLEN-2:0], rem_ge};
          cnt_q <= cnt_q + 6'd1;
          if (cnt_q == 6'(XLEN - 1)) state_q <= S_FIX;
        end
        S_FIX: begin
          rsp_q   <= '{valid: 1'b1, result: div_res};
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule

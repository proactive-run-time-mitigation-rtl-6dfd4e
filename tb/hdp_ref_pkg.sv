// hdp_ref_pkg: reference model of the HDP ALU operations for the testbenches.
//
// Computes each operation straight from the RISC-V definitions with wide
// arithmetic (128-bit products, explicit division-by-zero and overflow cases),
// independently of the bit-serial divider and the sign handling of hdp_alu.
package hdp_ref_pkg;
  import hdp_pkg::*;

  function automatic logic [63:0] sext32(logic [31:0] v);
    return {{32{v[31]}}, v};
  endfunction

  function automatic logic [63:0] ref_alu(alu_op_e op, logic [63:0] a, logic [63:0] b);
    logic signed [127:0] ps;
    logic        [127:0] pu;
    logic signed [63:0]  sa, sb;
    logic signed [31:0]  wa, wb;
    sa = a; sb = b; wa = a[31:0]; wb = b[31:0];
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_ADDW: return sext32(a[31:0] + b[31:0]);
      OP_SUBW: return sext32(a[31:0] - b[31:0]);
      OP_XOR:  return a ^ b;
      OP_OR:   return a | b;
      OP_AND:  return a & b;
      OP_SLL:  return a << b[5:0];
      OP_SRL:  return a >> b[5:0];
      OP_SRA:  return sa >>> b[5:0];
      OP_SLLW: return sext32(a[31:0] << b[4:0]);
      OP_SRLW: return sext32(a[31:0] >> b[4:0]);
      OP_SRAW: return sext32(wa >>> b[4:0]);
      OP_SLT, OP_LTS: return {63'b0, sa < sb};
      OP_SLTU, OP_LTU: return {63'b0, a < b};
      OP_GES:  return {63'b0, sa >= sb};
      OP_GEU:  return {63'b0, a >= b};
      OP_EQ:   return {63'b0, a == b};
      OP_NE:   return {63'b0, a != b};
      OP_MUL:  begin pu = {64'b0, a} * {64'b0, b}; return pu[63:0]; end
      OP_MULW: begin pu = {64'b0, a} * {64'b0, b}; return sext32(pu[31:0]); end
      OP_MULHU: begin pu = {64'b0, a} * {64'b0, b}; return pu[127:64]; end
      OP_MULH: begin ps = 128'(sa) * 128'(sb); return ps[127:64]; end
      OP_MULHSU: begin ps = $signed(128'(sa)) * $signed({64'b0, b}); return ps[127:64]; end
      OP_DIV:  begin
        if (b == 0) return '1;
        if (a == 64'h8000_0000_0000_0000 && b == '1) return a;
        return sa / sb;
      end
      OP_REM:  begin
        if (b == 0) return a;
        if (a == 64'h8000_0000_0000_0000 && b == '1) return 0;
        return sa % sb;
      end
      OP_DIVU: return (b == 0) ? '1 : a / b;
      OP_REMU: return (b == 0) ? a : a % b;
      OP_DIVW: begin
        if (b[31:0] == 0) return '1;
        if (a[31:0] == 32'h8000_0000 && b[31:0] == '1) return sext32(a[31:0]);
        return sext32(32'(wa / wb));
      end
      OP_REMW: begin
        if (b[31:0] == 0) return sext32(a[31:0]);
        if (a[31:0] == 32'h8000_0000 && b[31:0] == '1) return 0;
        return sext32(32'(wa % wb));
      end
      OP_DIVUW: return (b[31:0] == 0) ? '1 : sext32(a[31:0] / b[31:0]);
      OP_REMUW: return (b[31:0] == 0) ? sext32(a[31:0]) : sext32(a[31:0] % b[31:0]);
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned ref_latency(alu_op_e op);
    if (is_div(op)) return DIV_LATENCY;
    if (is_mul(op)) return MUL_LATENCY;
    return 1;
  endfunction

  // random operand with a bias towards corner values
  function automatic logic [63:0] rand_operand();
    case ($urandom_range(0, 9))
      0: return 0;
      1: return '1;
      2: return 64'h8000_0000_0000_0000;
      3: return 64'h0000_0000_8000_0000;
      4: return 64'(signed'(-$urandom_range(1, 100)));
      5: return 64'($urandom_range(0, 100));
      default: return {$urandom, $urandom};
    endcase
  endfunction
endpackage

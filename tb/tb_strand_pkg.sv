// tb_strand_pkg: reference models and stimulus generators shared by the
// testbenches.
//
// ref_alu and exec_instr give the architectural meaning of an instruction,
// written independently of the RTL. eval_macro gives the meaning of a macro-op
// (what a closed-loop ALU must produce). gen_group produces either one
// random ALU instruction or a legal static strand: a prefix followed by
// instructions linked by transient operands, with at most two external source
// registers. Intermediate results go to scratch registers SCRATCH_BASE and up,
// which no other instruction reads, so they are dead after the strand, as the
// strand rules require; general registers are 1 .. GEN_REGS.
package tb_strand_pkg;
  import strand_pkg::*;

  localparam int GEN_REGS     = 15;
  localparam int SCRATCH_BASE = 40;

  function automatic logic [31:0] ref_alu(int op, logic [31:0] a, logic [31:0] b);
    case (op)
      0: return a + b;
      1: return a - b;
      2: return a & b;
      3: return a | b;
      4: return a ^ b;
      5: return a << (b % 32);
      6: return a >> (b % 32);
      7: return $unsigned($signed(a) >>> (b % 32));
      8: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      9: return (a < b) ? 32'd1 : 32'd0;
      default: return 0;
    endcase
  endfunction

  function automatic logic [31:0] sx(logic [15:0] i);
    return {{16{i[15]}}, i};
  endfunction

  // Sequential execution of one instruction on an architectural register array.
  function automatic void exec_instr(ref logic [31:0] regs[64], input instr_t ins);
    logic [31:0] a, b;
    if (ins.kind != INS_ALU) return;
    a = (ins.rs1 == 0) ? 0 : regs[ins.rs1];
    b = ins.use_imm ? sx(ins.imm) : ((ins.rs2 == 0) ? 0 : regs[ins.rs2]);
    if (ins.rd != 0) regs[ins.rd] = ref_alu(int'(ins.op), a, b);
  endfunction

  function automatic logic [31:0] pick(opd_sel_e s, logic [31:0] v1, logic [31:0] v2,
                                       logic [15:0] imm, logic [31:0] ch);
    case (s)
      OPD_SRC1:  return v1;
      OPD_SRC2:  return v2;
      OPD_IMM:   return sx(imm);
      OPD_CHAIN: return ch;
      default:   return 0;
    endcase
  endfunction

  function automatic logic [31:0] eval_macro(macro_op_t m, ref logic [31:0] regs[64]);
    logic [31:0] v1, v2, ch;
    v1 = (m.src_valid[0] && m.src_tag[0] != 0) ? regs[m.src_tag[0]] : 0;
    v2 = (m.src_valid[1] && m.src_tag[1] != 0) ? regs[m.src_tag[1]] : 0;
    ch = 0;
    for (int k = 0; k < int'(m.len); k++) begin
      ch = ref_alu(int'(m.ops[k].op), pick(m.ops[k].a_sel, v1, v2, m.ops[k].imm, ch),
                   pick(m.ops[k].b_sel, v1, v2, m.ops[k].imm, ch));
    end
    return ch;
  endfunction

  function automatic instr_t mk(int op, int rd, int rs1, int rs2, bit use_imm, int imm);
    instr_t i;
    i = '0;
    i.kind    = INS_ALU;
    i.op      = alu_op_e'(op);
    i.rd      = tag_t'(rd);
    i.rs1     = tag_t'(rs1);
    i.rs2     = tag_t'(rs2);
    i.use_imm = use_imm;
    i.imm     = 16'(imm);
    return i;
  endfunction

  function automatic instr_t mk_prefix(int len);
    instr_t i;
    i = '0;
    i.kind    = INS_PREFIX;
    i.pfx_len = 4'(len);
    return i;
  endfunction

  function automatic int gen_reg();
    return ($urandom % 8 == 0) ? 0 : 1 + int'($urandom % GEN_REGS);
  endfunction

  // One random instruction (len <= 1) or a prefixed strand of len instructions.
  // with_prefix = 0 gives the same instructions without the annotation.
  function automatic void gen_group(int len, bit with_prefix, ref instr_t q[$]);
    int e1, e2, rd, other, chain_reg;
    bit chain_left;
    if (len <= 1) begin
      q.push_back(mk($urandom % 10, 1 + $urandom % GEN_REGS, gen_reg(), gen_reg(),
                     $urandom % 2, $urandom));
      return;
    end
    if (with_prefix) q.push_back(mk_prefix(len));
    e1 = 1 + $urandom % GEN_REGS;
    e2 = 1 + $urandom % GEN_REGS;
    chain_reg = 0;
    for (int k = 0; k < len; k++) begin
      rd = (k == len - 1) ? 1 + int'($urandom % GEN_REGS) : SCRATCH_BASE + k;
      if (k == 0) begin
        q.push_back(mk($urandom % 10, rd, ($urandom % 2) ? e1 : 0, e2, $urandom % 3 == 0,
                       $urandom));
      end else begin
        case ($urandom % 4)
          0: other = e1;
          1: other = e2;
          2: other = 0;
          default: other = -1;  // immediate
        endcase
        chain_left = (other < 0) ? 1'b1 : bit'($urandom % 2);
        if (other < 0)
          q.push_back(mk($urandom % 10, rd, chain_reg, 0, 1'b1, $urandom));
        else if (chain_left)
          q.push_back(mk($urandom % 10, rd, chain_reg, other, 1'b0, 0));
        else
          q.push_back(mk($urandom % 10, rd, other, chain_reg, 1'b0, 0));
      end
      chain_reg = rd;
    end
  endfunction

endpackage
